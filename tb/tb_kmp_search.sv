// tb_kmp_search: runs the KMP scan on random proteins and peptides held in
// test-side RAMs (one-clock registered read, like the block RAMs) with a
// failure table computed by brute force, and compares the reported
// positions and count with a brute-force search.  The consumer stalls at
// random; the scan must finish within 4*n + 3*matches + 4 clocks plus the
// stalled clocks.  Small alphabets give many overlapping matches and long
// fallback chains.
module tb_kmp_search;
  import kmp_pkg::*;
  import tb_kmp_pkg::*;
  localparam int MAXT = 512, MAXP = 16;
  localparam int TAW = 9, TLW = 10, PAW = 4, PLW = 5;

  logic clk = 0, rst_n = 0, start = 0;
  logic [TLW-1:0] prot_len = '0, match_count, match_pos;
  logic [PLW-1:0] pep_len = '0;
  logic busy, done, match_valid, match_ready = 0;
  logic [TAW-1:0] prot_raddr;
  logic [PAW-1:0] pep_raddr, fail_raddr;
  char_t prot_rdata, pep_rdata;
  logic [PLW-1:0] fail_rdata;

  char_t          prot_m [MAXT];
  char_t          pep_m  [MAXP];
  logic [PLW-1:0] fail_m [MAXP];
  always_ff @(posedge clk) begin
    prot_rdata <= prot_m[prot_raddr];
    pep_rdata  <= pep_m[pep_raddr];
    fail_rdata <= fail_m[fail_raddr];
  end

  int checks = 0, failures = 0;

  kmp_search #(.MAX_PROT_LEN(MAXT), .MAX_PEP_LEN(MAXP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  pos_t got;
  int   stalls = 0, stall_pct = 0;
  always @(negedge clk) match_ready = ($urandom_range(99) >= stall_pct);
  always @(posedge clk) begin
    if (match_valid && match_ready) got.push_back(int'(match_pos));
    if (busy && match_valid && !match_ready) stalls++;
  end

  initial begin
    int overlaps = 0, total = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      str_t tx, p;
      pos_t exp_pos, brd;
      int n, m, cyc, st0, alpha;
      alpha = (t % 3 == 0) ? 1 : (t % 3 == 1) ? 2 : 4;
      n = (t < 2) ? t : $urandom_range(MAXT, 1);
      m = (t == 2) ? 0 : (t == 3) ? n + 1 : $urandom_range(MAXP, 1);
      if (m > MAXP) m = MAXP;
      tx = rand_str(n, alpha);
      // half the peptides are cut from the protein so that they occur
      p.delete();
      if (t % 2 == 0 && m <= n && m > 0) begin
        int o;
        o = $urandom_range(n - m);
        for (int j = 0; j < m; j++) p.push_back(tx[o+j]);
      end else p = rand_str(m, alpha);
      brd = naive_borders(p);
      foreach (tx[i]) prot_m[i] = tx[i];
      foreach (p[i]) begin pep_m[i] = p[i]; fail_m[i] = PLW'(brd[i]); end
      exp_pos = naive_find(tx, p);
      stall_pct = (t % 4 == 0) ? 0 : 50;
      got.delete();
      st0 = stalls;
      @(negedge clk);
      prot_len = TLW'(n); pep_len = PLW'(m); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(got.size() == exp_pos.size(), $sformatf("t=%0d n=%0d m=%0d: %0d matches, expected %0d",
            t, n, m, got.size(), exp_pos.size()));
      check(int'(match_count) == exp_pos.size(), "match_count");
      foreach (exp_pos[i])
        check(i < got.size() && got[i] == exp_pos[i], $sformatf("t=%0d match %0d", t, i));
      check(cyc <= 4*n + 3*exp_pos.size() + 4 + (stalls - st0),
            $sformatf("scan time %0d clocks, n=%0d", cyc, n));
      for (int i = 1; i < exp_pos.size(); i++)
        if (exp_pos[i] - exp_pos[i-1] < m) overlaps++;
      total += exp_pos.size();
    end
    check(overlaps > 20, "overlapping matches exercised");
    check(stalls > 20, "output stalls exercised");
    $display("matches %0d overlaps %0d stalls %0d", total, overlaps, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
