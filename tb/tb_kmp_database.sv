// tb_kmp_database: database-scan workload on the four-core system at its
// default sizes, comparing the two ways of working.
//
// The peptides of an "unknown" protein (a trypsin digest; the first
// N_PEP of them, to keep the run short) are matched against a small
// database of reference proteins whose lengths sweep from 50 to 7,500
// characters.  The proteins are dealt round-robin to the four cores.  Each
// core first scans all its proteins the HW2 way (protein sent once with the
// first peptide, then peptides only) and then again the HW way (protein
// sent with every peptide).  Streams run at full rate, so the clocks each
// protein takes can be measured.  Checked: every result against a
// brute-force search; the bus words of each protein (HW2 saves exactly the
// protein's words on all but the first peptide); HW2 faster than HW for
// every protein; and each protein's time within the bound given by the
// per-phase costs (load 1 clock per character, table <= 5m+4, scan
// <= 4n + 3 per match + 4, plus a few clocks per job).  The clocks per
// protein are printed for each length.
module tb_kmp_database;
  import kmp_pkg::*;
  import tb_kmp_pkg::*;
  localparam int NC = 4, N_PROT = 16, N_PEP = 60;

  logic clk = 0, rst_n = 0;
  word_t [NC-1:0] s_axis_tdata = '0, m_axis_tdata;
  logic  [NC-1:0] s_axis_tvalid = '0, s_axis_tlast = '0, s_axis_tready;
  logic  [NC-1:0] m_axis_tvalid, m_axis_tlast, m_axis_tready = '1, busy;

  int checks = 0, failures = 0;

  kmp_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  word_t in_q  [NC][$];
  word_t exp_q [NC][$];
  bit    exp_l [NC][$];
  int    in_words [NC];
  int    ends [NC];
  longint cycle = 0;
  // per core: job count at which each protein batch ends, and its end time
  int     batch_end [NC][$];
  longint batch_t   [NC][$];

  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      for (int c = 0; c < NC; c++) begin
        if (s_axis_tvalid[c] && s_axis_tready[c]) begin
          void'(in_q[c].pop_front());
          in_words[c]++;
        end
        if (s_axis_tvalid[c] && !s_axis_tready[c]) ;
        else if (in_q[c].size() > 0) begin
          s_axis_tvalid[c] <= 1; s_axis_tdata[c] <= in_q[c][0];
        end else s_axis_tvalid[c] <= 0;
        if (m_axis_tvalid[c] && m_axis_tready[c]) begin
          check(exp_q[c].size() > 0, "unexpected output");
          if (exp_q[c].size() > 0) begin
            check(m_axis_tdata[c] == exp_q[c][0] && m_axis_tlast[c] == exp_l[c][0],
                  $sformatf("core %0d: output %h expected %h", c, m_axis_tdata[c], exp_q[c][0]));
            void'(exp_q[c].pop_front()); void'(exp_l[c].pop_front());
          end
          if (m_axis_tlast[c]) begin
            ends[c]++;
            if (batch_end[c].size() > 0 && ends[c] == batch_end[c][0]) begin
              void'(batch_end[c].pop_front());
              batch_t[c].push_back(cycle);
            end
          end
        end
      end
    end
  end

  function automatic void digest(input str_t p, ref str_t peps[$]);
    str_t cur;
    foreach (p[i]) begin
      cur.push_back(p[i]);
      if ((p[i] == "K" || p[i] == "R") && !(i + 1 < p.size() && p[i+1] == "P")) begin
        peps.push_back(cur);
        cur.delete();
      end
    end
    if (cur.size() > 0) peps.push_back(cur);
  endfunction

  str_t   peps[$];
  str_t   db[N_PROT];
  longint words_of [2][N_PROT];   // [0] HW2, [1] HW
  longint bound_of [2][N_PROT];
  int     jobs [NC];

  // queue all jobs of one protein on core c in the given way of working
  task automatic add_protein(int c, int p, bit hw);
    longint words, bound;
    int n;
    words = 0;
    bound = 0;
    n = db[p].size();
    foreach (peps[k]) begin
      pos_t w, pos;
      end_word_t e;
      bit load;
      int m;
      load = hw || (k == 0);
      m = peps[k].size();
      w = pack_job(load, db[p], peps[k]);
      words += w.size();
      foreach (w[i]) in_q[c].push_back(w[i]);
      pos = naive_find(db[p], peps[k]);
      foreach (pos[i]) begin exp_q[c].push_back(match_word(31'(pos[i]))); exp_l[c].push_back(0); end
      e = '0; e.is_end = 1; e.count = END_COUNT_W'(pos.size());
      exp_q[c].push_back(e); exp_l[c].push_back(1);
      bound += 4 + (load ? 4 * ((n + 4) / 4) : 0) + 4 * ((m + 4) / 4)
             + 5 * m + 4 + 4 * n + 3 * pos.size() + 4 + 8;
    end
    jobs[c] += peps.size();
    batch_end[c].push_back(jobs[c]);
    words_of[hw][p] = words;
    bound_of[hw][p] = bound;
  endtask

  initial begin
    str_t unknown;
    longint t_of [2][N_PROT];
    unknown = rand_str(3256, 20);
    digest(unknown, peps);
    while (peps.size() > N_PEP) void'(peps.pop_back());
    for (int p = 0; p < N_PROT; p++) begin
      int len;
      len = 50 + p * (7500 - 50) / (N_PROT - 1);
      db[p] = rand_str(len, 20);
      // every other protein contains some of the peptides
      if (p % 2 == 0) for (int k = 0; k < 4; k++) begin
        int o;
        if (peps[k*3].size() < len) begin
          o = $urandom_range(len - peps[k*3].size());
          foreach (peps[k*3][j]) db[p][o+j] = peps[k*3][j];
        end
      end
    end
    for (int hw = 0; hw < 2; hw++)
      for (int p = 0; p < N_PROT; p++) add_protein(p % NC, p, hw[0]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++) wait (ends[c] == jobs[c]);
    repeat (5) @(posedge clk);
    // per-protein times: differences of batch end times on each core
    for (int c = 0; c < NC; c++) begin
      longint prev;
      int idx;
      prev = 0;
      idx = 0;
      for (int hw = 0; hw < 2; hw++)
        for (int p = c; p < N_PROT; p += NC) begin
          t_of[hw][p] = batch_t[c][idx] - prev;
          prev = batch_t[c][idx];
          idx++;
        end
    end
    $display("%0d peptides; length, clocks HW2, clocks HW, bus words HW2, bus words HW", peps.size());
    for (int p = 0; p < N_PROT; p++) begin
      longint prot_words;
      prot_words = (db[p].size() + 4) / 4;
      $display("%5d %9d %9d %7d %7d", db[p].size(), t_of[0][p], t_of[1][p],
               words_of[0][p], words_of[1][p]);
      check(words_of[1][p] - words_of[0][p] == (peps.size() - 1) * prot_words,
            $sformatf("protein %0d: HW2 saves the protein's words on all but one peptide", p));
      check(t_of[0][p] < t_of[1][p], $sformatf("protein %0d: HW2 faster than HW", p));
      check(t_of[0][p] <= bound_of[0][p] && t_of[1][p] <= bound_of[1][p],
            $sformatf("protein %0d: time within bound (%0d/%0d, %0d/%0d)", p,
                      t_of[0][p], bound_of[0][p], t_of[1][p], bound_of[1][p]));
    end
    for (int c = 0; c < NC; c++) check(exp_q[c].size() == 0, "all results received");
    $display("%0d clocks", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
