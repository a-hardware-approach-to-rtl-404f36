// tb_kmp_prefix: loads random peptides (small alphabets, so that borders
// and fallbacks are common) into a peptide RAM, runs the failure-table
// builder and compares every table entry written with the brute-force
// border table.  It also checks that each entry is written once and that
// the build finishes within 5*m + 4 clocks.
module tb_kmp_prefix;
  import kmp_pkg::*;
  import tb_kmp_pkg::*;
  localparam int MAXP = 32, AW = 5, LW = 6;

  logic clk = 0, rst_n = 0, start = 0;
  logic [LW-1:0] pep_len = '0;
  logic busy, done;
  logic [AW-1:0] pep_raddr, fail_waddr, fail_raddr;
  char_t pep_rdata;
  logic fail_we;
  logic [LW-1:0] fail_wdata, fail_rdata;
  // test side write port of the peptide RAM
  logic tb_we = 0;
  logic [AW-1:0] tb_waddr = '0;
  char_t tb_wdata = '0;

  int checks = 0, failures = 0;

  kmp_prefix #(.MAX_PEP_LEN(MAXP)) dut (.*);
  kmp_ram #(.DW(8),  .DEPTH(MAXP)) u_pep  (.clk, .we(tb_we), .waddr(tb_waddr),
    .wdata(tb_wdata), .raddr(pep_raddr), .rdata(pep_rdata));
  kmp_ram #(.DW(LW), .DEPTH(MAXP)) u_fail (.clk, .we(fail_we), .waddr(fail_waddr),
    .wdata(fail_wdata), .raddr(fail_raddr), .rdata(fail_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int got [MAXP];
  int nwr [MAXP];
  always @(posedge clk) if (fail_we) begin
    got[fail_waddr] = int'(fail_wdata);
    nwr[fail_waddr]++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int fallbacks = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      str_t p;
      pos_t ref_t;
      int m, cyc;
      m = (t < 3) ? t : $urandom_range(MAXP, 1);
      case (t % 4)
        0: p = rand_str(m, 2);
        1: p = rand_str(m, 1);
        2: p = rand_str(m, 3);
        default: p = rand_str(m, 20);
      endcase
      ref_t = naive_borders(p);
      for (int a = 0; a < m; a++) begin
        @(negedge clk); tb_we = 1; tb_waddr = AW'(a); tb_wdata = p[a];
      end
      @(negedge clk); tb_we = 0;
      foreach (nwr[i]) begin nwr[i] = 0; got[i] = -1; end
      pep_len = LW'(m); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc <= 5*m + 4, $sformatf("build time %0d clocks for m=%0d", cyc, m));
      for (int q = 0; q < m; q++) begin
        check(nwr[q] == 1 && got[q] == int'(ref_t[q]),
              $sformatf("m=%0d fail[%0d]=%0d (x%0d) expected %0d", m, q, got[q], nwr[q], ref_t[q]));
        if (q > 0 && ref_t[q] < ref_t[q-1]) fallbacks++;
      end
      @(negedge clk);
      check(!busy, "idle after done");
    end
    check(fallbacks > 50, "fallback paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
