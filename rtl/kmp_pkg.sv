// kmp_pkg: types and constants shared by the KMP string-matching core.
//
// A protein or peptide is a string of 8-bit characters.  The host packs
// four characters into each 32-bit bus word (first character in bits 7:0,
// the little-endian layout of a char array on the ARM host) and ends every
// string with a sentinel character of value 0, as the published KMP
// accelerator puts a sentinel at the end of both strings.  The word
// layout and the choice of 0 as sentinel are this design's own.
//
// Job framing on the input stream (this design's own choice):
//   word 0      command word; bit 0 (CMD_LOAD_PROTEIN) set means a new
//               protein follows, clear means reuse the protein already held
//               in the core's block RAM (the "HW2" way of working).
//   protein     only if CMD_LOAD_PROTEIN: characters, sentinel, padding to
//               the end of the word.
//   peptide     characters, sentinel, padding to the end of the word.
//
// Result framing on the output stream: one word per match holding the
// 0-based start position of the peptide in the protein (bit 31 clear),
// then one end word (bit 31 set, TLAST) with status flags and the match
// count.
package kmp_pkg;

  typedef logic [7:0]  char_t;
  typedef logic [31:0] word_t;

  localparam char_t SENTINEL = 8'h00;

  // command word bits
  localparam int CMD_LOAD_PROTEIN = 0;

  // end word: bit 31 end flag, 30 protein longer than the buffer, 29
  // peptide longer than the buffer, 28 no protein held, 23:0 match count
  localparam int END_COUNT_W = 24;

  typedef struct packed {
    logic                   is_end;
    logic                   prot_overflow;
    logic                   pep_overflow;
    logic                   no_protein;
    logic [3:0]             reserved;
    logic [END_COUNT_W-1:0] count;
  } end_word_t;

  function automatic word_t match_word(input logic [30:0] pos);
    return {1'b0, pos};
  endfunction

endpackage
