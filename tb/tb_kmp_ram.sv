// tb_kmp_ram: checks the block RAM: writes random words, reads them back
// one clock after the address, and checks that a read of an address being
// written in the same clock returns the old contents.  A shadow array holds
// the expected contents.
module tb_kmp_ram;
  localparam int DW = 8, DEPTH = 64, AW = 6;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  kmp_ram #(.DW(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [DW-1:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rdata, exp);
    end
  endtask

  initial begin
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = DW'($urandom); shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    // read back in random order
    repeat (200) begin
      int a;
      a = $urandom_range(DEPTH-1);
      @(negedge clk); raddr = AW'(a);
      @(negedge clk); check(shadow[a], "read");
    end
    // read during write of the same address: old data, then new
    repeat (50) begin
      int a;
      logic [DW-1:0] old;
      a = $urandom_range(DEPTH-1);
      old = shadow[a];
      @(negedge clk);
      we = 1; waddr = AW'(a); raddr = AW'(a); wdata = ~old; shadow[a] = ~old;
      @(negedge clk); we = 0;
      check(old, "read-during-write");
      @(negedge clk); check(shadow[a], "read-after-write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
