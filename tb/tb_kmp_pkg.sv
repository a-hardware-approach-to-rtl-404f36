// tb_kmp_pkg: reference models and stimulus helpers shared by the KMP
// testbenches.  The references are deliberately the plain brute-force
// definitions (every alignment compared character by character, every
// border length tried), not the KMP algorithm the hardware runs.
package tb_kmp_pkg;

  typedef byte unsigned str_t[$];
  typedef int unsigned  pos_t[$];

  // all start positions of pep in prot, by direct comparison
  function automatic pos_t naive_find(str_t prot, str_t pep);
    pos_t r;
    if (pep.size() == 0) return r;
    for (int i = 0; i + pep.size() <= prot.size(); i++) begin
      bit ok = 1;
      for (int j = 0; j < pep.size(); j++)
        if (prot[i+j] != pep[j]) begin ok = 0; break; end
      if (ok) r.push_back(i);
    end
    return r;
  endfunction

  // border table: fail[q] = longest proper prefix of pep[0..q] that is
  // also its suffix, found by trying every length from the longest down
  function automatic pos_t naive_borders(str_t pep);
    pos_t r;
    for (int q = 0; q < pep.size(); q++) begin
      int best = 0;
      for (int l = q; l > 0; l--) begin
        bit ok = 1;
        for (int j = 0; j < l; j++)
          if (pep[j] != pep[q-l+1+j]) begin ok = 0; break; end
        if (ok) begin best = l; break; end
      end
      r.push_back(best);
    end
    return r;
  endfunction

  // random string over the first `alpha` letters of the 20 amino acids
  function automatic str_t rand_str(int len, int alpha);
    string aa = "ACDEFGHIKLMNPQRSTVWY";
    str_t r;
    for (int i = 0; i < len; i++) r.push_back(aa[$urandom_range(alpha-1)]);
    return r;
  endfunction

  // append a string, its 0 sentinel and padding (random nonzero bytes,
  // which the core must ignore) to a byte queue
  function automatic void add_string(ref str_t bytes_q, input str_t s);
    foreach (s[i]) bytes_q.push_back(s[i]);
    bytes_q.push_back(8'h00);
    while (bytes_q.size() % 4 != 0) bytes_q.push_back(8'(1 + $urandom_range(254)));
  endfunction

  // one job as 32-bit words: command word, [protein], peptide
  function automatic pos_t pack_job(bit load_prot, str_t prot, str_t pep);
    str_t b;
    pos_t w;
    b.push_back(8'(load_prot));
    repeat (3) b.push_back(8'($urandom_range(255)));
    if (load_prot) add_string(b, prot);
    add_string(b, pep);
    for (int i = 0; i < b.size(); i += 4)
      w.push_back({b[i+3], b[i+2], b[i+1], b[i]});
    return w;
  endfunction

endpackage
