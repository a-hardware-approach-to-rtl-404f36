// tb_word_unpacker: sends random 32-bit words with random gaps and random
// consumer back-pressure, and checks that the characters come out in byte
// order (bits 7:0 first), that c_last marks the fourth byte, that TLAST is
// carried, and that drop discards the rest of a word.
module tb_word_unpacker;
  import kmp_pkg::*;
  logic clk = 0, rst_n = 0;
  word_t s_data = '0;
  logic s_valid = 0, s_last = 0, s_ready;
  char_t c_data;
  logic c_valid, c_last, c_wlast, c_ready = 0, drop = 0;
  int checks = 0, failures = 0;

  word_unpacker dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected characters: {data, last-of-word, tlast}
  typedef struct { char_t c; bit l; bit wl; } exp_t;
  exp_t expq[$];
  word_t words[$];
  bit    lasts[$];
  int    drop_at[$];     // for each word: byte index at which to drop (4 = none)
  int    n_words = 400;
  int    n_drops = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // producer: offers the next word with random gaps; the handshake is
  // sampled on the clock edge
  int p_i = 0;
  initial begin
    for (int w = 0; w < n_words; w++) begin
      words.push_back($urandom);
      lasts.push_back($urandom_range(3) == 0);
      drop_at.push_back(($urandom_range(3) == 0) ? $urandom_range(3) : 4);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      automatic int nxt = p_i;
      if (s_valid && s_ready) nxt = p_i + 1;
      p_i = nxt;
      if (s_valid && !s_ready) begin
        // hold the offered word
      end else if (nxt < n_words && $urandom_range(3) != 0) begin
        s_valid <= 1; s_data <= words[nxt]; s_last <= lasts[nxt];
      end else begin
        s_valid <= 0;
      end
    end
  end

  // consumer with its own random stalls and drops
  int w_i = 0, b_i = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      c_ready = ($urandom_range(4) != 0);
      drop    = (w_i < n_words) && (b_i == drop_at[w_i]);
    end
  end

  always @(posedge clk) begin
    if (rst_n && c_valid && c_ready && w_i < n_words) begin
      check(c_data == words[w_i][8*b_i +: 8], $sformatf("word %0d byte %0d", w_i, b_i));
      check(c_last == (b_i == 3), "c_last");
      check(c_wlast == lasts[w_i], "c_wlast");
      if (drop || b_i == 3) begin
        if (drop && b_i != 3) n_drops++;
        w_i++; b_i = 0;
      end else b_i++;
    end
  end

  initial begin
    wait (w_i == n_words);
    repeat (5) @(posedge clk);
    check(n_drops > 10, "drops exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
