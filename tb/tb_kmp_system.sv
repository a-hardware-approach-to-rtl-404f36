// tb_kmp_system: end-to-end run of the four-core system at its default
// sizes, in the way the host uses it for protein identification.
//
// An "unknown" protein is digested in silico with trypsin (cut after K or R
// unless a P follows) into peptides.  Each core holds a different reference
// protein, one of which is the unknown protein itself, and all four cores
// work in parallel.  Each core first receives its protein with the first
// peptide (HW way of working), then only the remaining peptides (HW2 way),
// and finally one more job that sends the protein again.  The reference
// lengths are those of Ki-67 (3,256 residues) and titin (34,350, the
// longest human protein) and two others.  Core 3 is finally given a
// protein longer than its 65,536-character buffer, and one job on every
// core carries a peptide longer than the 1,024-character peptide buffer.  Every result is compared with a brute-force search;
// the number of input words of each job is checked against the packed
// string sizes (four characters per word, sentinel, command word), and
// every mechanism (both ways of working, input and output stalls, buffer
// overflows, matches on every core) must occur.
module tb_kmp_system;
  import kmp_pkg::*;
  import tb_kmp_pkg::*;
  localparam int NC = 4, MAXT = 65536, MAXP = 1024;

  logic clk = 0, rst_n = 0;
  word_t [NC-1:0] s_axis_tdata = '0, m_axis_tdata;
  logic  [NC-1:0] s_axis_tvalid = '0, s_axis_tlast = '0, s_axis_tready;
  logic  [NC-1:0] m_axis_tvalid, m_axis_tlast, m_axis_tready = '0, busy;

  int checks = 0, failures = 0;

  kmp_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (80000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("%0d clocks", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  word_t in_q  [NC][$];
  bit    in_l  [NC][$];
  word_t exp_q [NC][$];
  bit    exp_l [NC][$];
  int    in_words [NC];        // words accepted on each input
  int    jobs_done [NC];
  int    in_stalls = 0, out_stalls = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < NC; c++) begin
        if (s_axis_tvalid[c] && s_axis_tready[c]) begin
          void'(in_q[c].pop_front()); void'(in_l[c].pop_front());
          in_words[c]++;
        end
        if (s_axis_tvalid[c] && !s_axis_tready[c]) in_stalls++;
        else if (in_q[c].size() > 0 && $urandom_range(9) != 0) begin
          s_axis_tvalid[c] <= 1; s_axis_tdata[c] <= in_q[c][0]; s_axis_tlast[c] <= in_l[c][0];
        end else s_axis_tvalid[c] <= 0;
        if (m_axis_tvalid[c]) begin
          if (!m_axis_tready[c]) out_stalls++;
          else begin
            check(exp_q[c].size() > 0, $sformatf("core %0d: unexpected output", c));
            if (exp_q[c].size() > 0) begin
              check(m_axis_tdata[c] == exp_q[c][0] && m_axis_tlast[c] == exp_l[c][0],
                    $sformatf("core %0d: output %h expected %h", c, m_axis_tdata[c], exp_q[c][0]));
              if (exp_l[c][0]) jobs_done[c]++;
              void'(exp_q[c].pop_front()); void'(exp_l[c].pop_front());
            end
          end
        end
      end
    end
  end
  longint cycles = 0;
  always @(posedge clk) if (rst_n) cycles++;

  always @(negedge clk)
    for (int c = 0; c < NC; c++) m_axis_tready[c] = ($urandom_range(3) != 0);

  // trypsin digest: cut after K or R unless the next residue is P
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

  int n_hw = 0, n_hw2 = 0, n_povf = 0, n_pepovf = 0;
  int hits [NC];

  // queue one job on core c and its expected result
  int words_expected [NC];

  task automatic add_job(int c, bit load, str_t prot, str_t held, str_t pep);
    pos_t w, pos;
    end_word_t e;
    w = pack_job(load, prot, pep);
    words_expected[c] += w.size();
    check(w.size() == 1 + (load ? (prot.size() + 4) / 4 : 0) + (pep.size() + 4) / 4,
          "packed size: four characters per word");
    foreach (w[i]) begin in_q[c].push_back(w[i]); in_l[c].push_back(i == w.size() - 1); end
    e = '0;
    e.is_end = 1;
    e.prot_overflow = (held.size() < prot.size());
    e.pep_overflow = (pep.size() > MAXP);
    if (!e.pep_overflow) begin
      pos = naive_find(held, pep);
      foreach (pos[i]) begin exp_q[c].push_back(match_word(31'(pos[i]))); exp_l[c].push_back(0); end
      e.count = END_COUNT_W'(pos.size());
      hits[c] += pos.size();
    end
    exp_q[c].push_back(e); exp_l[c].push_back(1);
    if (load) n_hw++; else n_hw2++;
    n_povf += e.prot_overflow; n_pepovf += e.pep_overflow;
  endtask

  initial begin
    str_t unknown, prot, held;
    str_t peps[$];
    int lens [NC] = '{3256, 1200, 7000, 34350};
    int n_jobs [NC];
    unknown = rand_str(3256, 20);
    digest(unknown, peps);
    // a peptide longer than the peptide buffer
    peps.push_back(rand_str(MAXP + 3, 20));
    $display("%0d peptides from the digest", peps.size());
    for (int c = 0; c < NC; c++) begin
      prot = (c == 0) ? unknown : rand_str(lens[c], 20);
      // plant a few peptides in the other references too
      if (c != 0) for (int k = 0; k < 3; k++) begin
        int o;
        o = $urandom_range(lens[c] - 60);
        foreach (peps[k*7][j]) prot[o+j] = peps[k*7][j];
      end
      held.delete();
      for (int i = 0; i < prot.size() && i < MAXT; i++) held.push_back(prot[i]);
      words_expected[c] = 0;
      foreach (peps[p]) add_job(c, p == 0, prot, held, peps[p]);
      add_job(c, 1, prot, held, peps[1]);
      n_jobs[c] = peps.size() + 1;
    end
    // core 3 then gets a protein longer than its buffer: it keeps and
    // searches the first MAXT characters and flags the overflow
    prot = rand_str(MAXT + 100, 20);
    foreach (peps[2][j]) prot[MAXT - 5 + j] = peps[2][j];   // straddles the end
    foreach (peps[3][j]) prot[MAXT - 500 + j] = peps[3][j];
    held.delete();
    for (int i = 0; i < MAXT; i++) held.push_back(prot[i]);
    add_job(3, 1, prot, held, peps[2]);
    add_job(3, 0, prot, held, peps[3]);
    n_jobs[3] += 2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NC; c++) wait (jobs_done[c] == n_jobs[c]);
    repeat (5) @(posedge clk);
    for (int c = 0; c < NC; c++) begin
      check(in_words[c] == words_expected[c], $sformatf("core %0d took %0d words, expected %0d",
            c, in_words[c], words_expected[c]));
      check(hits[c] > 0, $sformatf("core %0d had matches", c));
      check(!busy[c], "idle at the end");
    end
    $display("jobs HW %0d HW2 %0d, protein overflow %0d, peptide overflow %0d, matches %0d/%0d/%0d/%0d, input stalls %0d, output stalls %0d",
             n_hw, n_hw2, n_povf, n_pepovf, hits[0], hits[1], hits[2], hits[3],
             in_stalls, out_stalls);
    check(n_hw > 0, "HW jobs");
    check(n_hw2 > 0, "HW2 jobs");
    check(n_povf > 0, "protein overflow");
    check(n_pepovf > 0, "peptide overflow");
    check(in_stalls > 0, "input stalls");
    check(out_stalls > 0, "output stalls");
    $display("%0d clocks", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
