// tb_kmp_core: end-to-end test of one core through its two streams, with
// small buffers (64-character protein, 8-character peptide) so that the
// overflow paths are reached.  A sequence of random jobs mixes the two ways
// of working: a new protein with the peptide, or only a peptide matched
// against the protein kept from before.  Both streams see random gaps and
// back-pressure.  Every job's result (match words, then the end word with
// flags and count) is compared with a brute-force search on the protein
// the core should be holding.  Each mechanism must occur at least once.
module tb_kmp_core;
  import kmp_pkg::*;
  import tb_kmp_pkg::*;
  localparam int MAXT = 64, MAXP = 8;

  logic clk = 0, rst_n = 0;
  word_t s_axis_tdata = '0, m_axis_tdata;
  logic s_axis_tvalid = 0, s_axis_tlast = 0, s_axis_tready;
  logic m_axis_tvalid, m_axis_tlast, m_axis_tready = 0, busy;

  int checks = 0, failures = 0;

  kmp_core #(.MAX_PROT_LEN(MAXT), .MAX_PEP_LEN(MAXP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected output words, in order, for all jobs
  word_t exp_q[$];
  bit    exp_last[$];
  word_t in_q[$];
  bit    in_last[$];
  int    jobs_done = 0;
  int    in_stalls = 0, out_stalls = 0;
  int    in_gap_pct = 20, out_stall_pct = 30;

  // input driver
  always @(posedge clk) begin
    if (rst_n) begin
      if (s_axis_tvalid && s_axis_tready) begin
        void'(in_q.pop_front()); void'(in_last.pop_front());
      end
      if (s_axis_tvalid && !s_axis_tready) in_stalls++;
      if (s_axis_tvalid && !s_axis_tready) ;
      else if (in_q.size() > 0 && $urandom_range(99) >= in_gap_pct) begin
        s_axis_tvalid <= 1; s_axis_tdata <= in_q[0]; s_axis_tlast <= in_last[0];
      end else s_axis_tvalid <= 0;
    end
  end

  // output monitor
  always @(negedge clk) m_axis_tready = ($urandom_range(99) >= out_stall_pct);
  always @(posedge clk) begin
    if (rst_n && m_axis_tvalid) begin
      if (!m_axis_tready) out_stalls++;
      else begin
        check(exp_q.size() > 0, "unexpected output word");
        if (exp_q.size() > 0) begin
          check(m_axis_tdata == exp_q[0] && m_axis_tlast == exp_last[0],
                $sformatf("output %h/%0d expected %h/%0d", m_axis_tdata, m_axis_tlast,
                          exp_q[0], exp_last[0]));
          if (exp_last[0]) jobs_done++;
          void'(exp_q.pop_front()); void'(exp_last.pop_front());
        end
      end
    end
  end

  int n_hw = 0, n_hw2 = 0, n_povf = 0, n_pepovf = 0, n_noprot = 0, n_match = 0;

  initial begin
    str_t held;      // protein the core should hold (truncated)
    bit   has = 0, povf = 0;
    int   n_jobs = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      bit load;
      str_t prot, pep;
      pos_t w, pos;
      int alpha, plen, mlen;
      end_word_t e;
      load = (t == 1) || ($urandom_range(3) == 0);   // t = 0: nothing held yet
      alpha = $urandom_range(3, 1);
      plen = ($urandom_range(9) == 0) ? $urandom_range(MAXT + 20, MAXT + 1)
                                      : $urandom_range(MAXT);
      mlen = ($urandom_range(14) == 0) ? $urandom_range(MAXP + 4, MAXP + 1)
                                       : $urandom_range(MAXP, 1);
      prot = rand_str(plen, alpha);
      if (load) begin
        held.delete();
        for (int i = 0; i < plen && i < MAXT; i++) held.push_back(prot[i]);
        has = 1; povf = (plen > MAXT);
        n_hw++;
      end else n_hw2++;
      pep.delete();
      if ($urandom_range(1) && held.size() >= mlen && mlen <= MAXP) begin
        int o;
        o = $urandom_range(held.size() - mlen);
        for (int j = 0; j < mlen; j++) pep.push_back(held[o+j]);
      end else pep = rand_str(mlen, alpha);
      w = pack_job(load, prot, pep);
      foreach (w[i]) begin in_q.push_back(w[i]); in_last.push_back(i == w.size() - 1); end
      e = '0;
      e.is_end = 1;
      e.prot_overflow = povf && has;
      e.pep_overflow = (mlen > MAXP);
      e.no_protein = !has;
      if (mlen <= MAXP && has) begin
        pos = naive_find(held, pep);
        foreach (pos[i]) begin exp_q.push_back(match_word(31'(pos[i]))); exp_last.push_back(0); end
        e.count = END_COUNT_W'(pos.size());
        n_match += pos.size();
      end
      exp_q.push_back(e); exp_last.push_back(1);
      n_povf += e.prot_overflow; n_pepovf += e.pep_overflow; n_noprot += e.no_protein;
      n_jobs++;
      // let some jobs queue up back to back, drain at other times
      if ($urandom_range(2) == 0) wait (jobs_done == n_jobs);
      if (t == 150) begin in_gap_pct = 0; out_stall_pct = 0; end
      if (t == 200) begin in_gap_pct = 50; out_stall_pct = 70; end
    end
    wait (jobs_done == n_jobs);
    repeat (5) @(posedge clk);
    check(!busy, "idle at the end");
    $display("jobs %0d: HW %0d HW2 %0d protein overflow %0d peptide overflow %0d no protein %0d matches %0d in stalls %0d out stalls %0d",
             n_jobs, n_hw, n_hw2, n_povf, n_pepovf, n_noprot, n_match, in_stalls, out_stalls);
    check(n_hw > 0, "protein loaded with peptide (HW)");
    check(n_hw2 > 0, "protein reused (HW2)");
    check(n_povf > 0, "protein overflow");
    check(n_pepovf > 0, "peptide overflow");
    check(n_noprot > 0, "no protein held");
    check(n_match > 0, "matches");
    check(in_stalls > 0, "input back-pressure");
    check(out_stalls > 0, "output stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
