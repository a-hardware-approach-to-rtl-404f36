// word_unpacker: turns a stream of 32-bit words into a stream of 8-bit
// characters.
//
// The host sends strings four characters per bus word so that every bus
// transfer is fully used; the core splits each word back into characters.
// A word is taken from the input stream (s_valid/s_ready) into a holding
// register when the register is empty or its last character is being
// consumed, so a continuous input gives one character per clock with no
// bubble between words.  Characters leave in byte order, bits 7:0 first
// (the host's little-endian char layout; this order is this design's
// choice).  c_last marks the fourth character of a word and c_wlast
// repeats the word's TLAST on each of its characters.
//
// drop: asserted together with c_ready on a character, it discards the rest
// of the current word (the padding after a sentinel or a command byte).
module word_unpacker
  import kmp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // 32-bit input stream
  input  word_t s_data,
  input  logic  s_valid,
  input  logic  s_last,
  output logic  s_ready,
  // character output stream
  output char_t c_data,
  output logic  c_valid,
  output logic  c_last,
  output logic  c_wlast,
  input  logic  c_ready,
  input  logic  drop
);

  word_t      word_q;
  logic       wlast_q;
  logic       full_q;
  logic [1:0] idx_q;

  logic c_fire, word_done;

  assign c_data    = word_q[8*idx_q +: 8];
  assign c_valid   = full_q;
  assign c_last    = (idx_q == 2'd3);
  assign c_wlast   = wlast_q;
  assign c_fire    = c_valid && c_ready;
  assign word_done = c_fire && (c_last || drop);
  assign s_ready   = !full_q || word_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q  <= '0;
      wlast_q <= 1'b0;
      full_q  <= 1'b0;
      idx_q   <= '0;
    end else begin
      if (s_valid && s_ready) begin
        word_q  <= s_data;
        wlast_q <= s_last;
        full_q  <= 1'b1;
        idx_q   <= '0;
      end else if (word_done) begin
        full_q  <= 1'b0;
        idx_q   <= '0;
      end else if (c_fire) begin
        idx_q   <= idx_q + 2'd1;
      end
    end
  end

endmodule
