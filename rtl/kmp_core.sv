// kmp_core: stream-in/stream-out Knuth-Morris-Pratt protein matcher.
//
// The core finds every position at which a peptide occurs in a protein.
// Both strings arrive on one 32-bit input stream, four characters per word,
// are split back into characters (word_unpacker) and stored in local block
// RAM; the peptide's failure table is then built (kmp_prefix) and the
// protein scanned (kmp_search).  Each match position goes out as one word
// on the 32-bit output stream, followed by an end word carrying the match
// count; the host merges and scores these results.
//
// The protein stays in block RAM after a job.  A job whose command word has
// bit 0 clear sends only a peptide and is matched against the protein
// already held, so a long protein crosses the bus once for many peptides
// (the "HW2" way of working); a job with bit 0 set sends a protein and a
// peptide (the "HW" way).  Both ways follow the published accelerator; the command word
// that selects between them at run time is this design's own.
//
// Input framing (see kmp_pkg): command word, then if bit 0 the protein
// characters ended by a 0 sentinel and padded to a whole word, then the
// peptide likewise.  TLAST on the input is not needed and is ignored.
// Output: match words {1'b0, position}, then the end word (TLAST) with
// bit 31 set, bit 30 protein too long (only the first MAX_PROT_LEN
// characters were kept and searched), bit 29 peptide too long (no search
// done), bit 28 no protein held, bits 23:0 the match count.
//
// Timing: one character is loaded per clock; the failure table takes at
// most about 5 clocks per peptide character and the scan at most about
// 4 clocks per protein character plus one per match, the output stream
// stalling the scan when it is not ready.  The sizes of the buffers
// (MAX_PROT_LEN, MAX_PEP_LEN) are this design's own choice.
module kmp_core
  import kmp_pkg::*;
#(
  parameter int unsigned MAX_PROT_LEN = 65536,
  parameter int unsigned MAX_PEP_LEN  = 1024
) (
  input  logic  clk,
  input  logic  rst_n,
  // input stream from the DMA (memory-mapped to stream direction)
  input  word_t s_axis_tdata,
  input  logic  s_axis_tvalid,
  input  logic  s_axis_tlast,
  output logic  s_axis_tready,
  // output stream to the DMA (stream to memory-mapped direction)
  output word_t m_axis_tdata,
  output logic  m_axis_tvalid,
  output logic  m_axis_tlast,
  input  logic  m_axis_tready,
  // status
  output logic  busy
);

  localparam int unsigned TAW = $clog2(MAX_PROT_LEN);
  localparam int unsigned TLW = $clog2(MAX_PROT_LEN + 1);
  localparam int unsigned PAW = $clog2(MAX_PEP_LEN);
  localparam int unsigned PLW = $clog2(MAX_PEP_LEN + 1);

  typedef enum logic [2:0] {
    S_CMD, S_LOAD_PROT, S_LOAD_PEP, S_PREFIX, S_SEARCH, S_END
  } state_t;

  state_t state_q;

  // ---------------------------------------------------------------- unpack
  char_t c_data;
  logic  c_valid, c_last, c_wlast, c_ready, c_drop, c_fire;

  word_unpacker u_unpack (
    .clk, .rst_n,
    .s_data (s_axis_tdata), .s_valid(s_axis_tvalid),
    .s_last (s_axis_tlast), .s_ready(s_axis_tready),
    .c_data, .c_valid, .c_last, .c_wlast, .c_ready, .drop(c_drop)
  );

  assign c_ready = (state_q == S_CMD) || (state_q == S_LOAD_PROT) ||
                   (state_q == S_LOAD_PEP);
  assign c_fire  = c_valid && c_ready;
  assign c_drop  = (state_q == S_CMD) || (c_data == SENTINEL);

  // ---------------------------------------------------------------- buffers
  logic           prot_we;
  logic [TAW-1:0] prot_raddr;
  char_t          prot_rdata;
  logic           pep_we;
  logic [PAW-1:0] pep_raddr, pf_pep_raddr, sr_pep_raddr;
  char_t          pep_rdata;
  logic           fail_we;
  logic [PAW-1:0] fail_waddr, fail_raddr, pf_fail_raddr, sr_fail_raddr;
  logic [PLW-1:0] fail_wdata, fail_rdata;

  logic [TLW-1:0] prot_idx_q, prot_len_q;
  logic [PLW-1:0] pep_idx_q, pep_len_q;
  logic           prot_ovf_q, pep_ovf_q, has_prot_q;

  kmp_ram #(.DW(8), .DEPTH(MAX_PROT_LEN)) u_prot_ram (
    .clk, .we(prot_we), .waddr(prot_idx_q[TAW-1:0]), .wdata(c_data),
    .raddr(prot_raddr), .rdata(prot_rdata)
  );

  kmp_ram #(.DW(8), .DEPTH(MAX_PEP_LEN)) u_pep_ram (
    .clk, .we(pep_we), .waddr(pep_idx_q[PAW-1:0]), .wdata(c_data),
    .raddr(pep_raddr), .rdata(pep_rdata)
  );

  kmp_ram #(.DW(PLW), .DEPTH(MAX_PEP_LEN)) u_fail_ram (
    .clk, .we(fail_we), .waddr(fail_waddr), .wdata(fail_wdata),
    .raddr(fail_raddr), .rdata(fail_rdata)
  );

  assign prot_we = (state_q == S_LOAD_PROT) && c_fire && c_data != SENTINEL &&
                   prot_idx_q < TLW'(MAX_PROT_LEN);
  assign pep_we  = (state_q == S_LOAD_PEP) && c_fire && c_data != SENTINEL &&
                   pep_idx_q < PLW'(MAX_PEP_LEN);

  // the peptide and failure-table read ports are shared by the two engines
  assign pep_raddr  = (state_q == S_PREFIX) ? pf_pep_raddr  : sr_pep_raddr;
  assign fail_raddr = (state_q == S_PREFIX) ? pf_fail_raddr : sr_fail_raddr;

  // ---------------------------------------------------------------- engines
  logic           pf_start, pf_busy, pf_done;
  logic           sr_start, sr_busy, sr_done;
  logic [TLW-1:0] sr_count, sr_pos;
  logic           sr_valid, sr_ready;

  kmp_prefix #(.MAX_PEP_LEN(MAX_PEP_LEN)) u_prefix (
    .clk, .rst_n,
    .start(pf_start), .pep_len(pep_len_q), .busy(pf_busy), .done(pf_done),
    .pep_raddr(pf_pep_raddr), .pep_rdata,
    .fail_we, .fail_waddr, .fail_wdata,
    .fail_raddr(pf_fail_raddr), .fail_rdata
  );

  kmp_search #(.MAX_PROT_LEN(MAX_PROT_LEN), .MAX_PEP_LEN(MAX_PEP_LEN)) u_search (
    .clk, .rst_n,
    .start(sr_start), .prot_len(prot_len_q), .pep_len(pep_len_q),
    .busy(sr_busy), .done(sr_done), .match_count(sr_count),
    .match_valid(sr_valid), .match_pos(sr_pos), .match_ready(sr_ready),
    .prot_raddr, .prot_rdata,
    .pep_raddr(sr_pep_raddr), .pep_rdata,
    .fail_raddr(sr_fail_raddr), .fail_rdata
  );

  // ---------------------------------------------------------------- output
  end_word_t end_w;
  always_comb begin
    end_w               = '0;
    end_w.is_end        = 1'b1;
    end_w.prot_overflow = prot_ovf_q;
    end_w.pep_overflow  = pep_ovf_q;
    end_w.no_protein    = !has_prot_q;
    end_w.count         = END_COUNT_W'(sr_count);
  end

  always_comb begin
    m_axis_tvalid = 1'b0;
    m_axis_tlast  = 1'b0;
    m_axis_tdata  = match_word(31'(sr_pos));
    sr_ready      = 1'b0;
    if (state_q == S_SEARCH) begin
      m_axis_tvalid = sr_valid;
      sr_ready      = m_axis_tready;
    end else if (state_q == S_END) begin
      m_axis_tvalid = 1'b1;
      m_axis_tlast  = 1'b1;
      m_axis_tdata  = end_w;
    end
  end

  assign busy = (state_q != S_CMD) || pf_busy || sr_busy;

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_CMD;
      prot_idx_q <= '0;
      prot_len_q <= '0;
      pep_idx_q  <= '0;
      pep_len_q  <= '0;
      prot_ovf_q <= 1'b0;
      pep_ovf_q  <= 1'b0;
      has_prot_q <= 1'b0;
      pf_start   <= 1'b0;
      sr_start   <= 1'b0;
    end else begin
      pf_start <= 1'b0;
      sr_start <= 1'b0;
      unique case (state_q)
        S_CMD: if (c_fire) begin
          pep_idx_q <= '0;
          pep_ovf_q <= 1'b0;
          if (c_data[CMD_LOAD_PROTEIN]) begin
            prot_idx_q <= '0;
            prot_ovf_q <= 1'b0;
            has_prot_q <= 1'b0;
            prot_len_q <= '0;
            state_q    <= S_LOAD_PROT;
          end else begin
            state_q    <= S_LOAD_PEP;
          end
        end
        S_LOAD_PROT: if (c_fire) begin
          if (c_data == SENTINEL) begin
            prot_len_q <= prot_idx_q;
            has_prot_q <= 1'b1;
            state_q    <= S_LOAD_PEP;
          end else if (prot_idx_q < TLW'(MAX_PROT_LEN)) begin
            prot_idx_q <= prot_idx_q + 1'b1;
          end else begin
            prot_ovf_q <= 1'b1;
          end
        end
        S_LOAD_PEP: if (c_fire) begin
          if (c_data == SENTINEL) begin
            pep_len_q <= pep_ovf_q ? '0 : pep_idx_q;
            pf_start  <= 1'b1;
            state_q   <= S_PREFIX;
          end else if (pep_idx_q < PLW'(MAX_PEP_LEN)) begin
            pep_idx_q <= pep_idx_q + 1'b1;
          end else begin
            pep_ovf_q <= 1'b1;
          end
        end
        S_PREFIX: if (pf_done) begin
          sr_start <= 1'b1;
          state_q  <= S_SEARCH;
        end
        S_SEARCH: if (sr_done) state_q <= S_END;
        S_END:    if (m_axis_tready) state_q <= S_CMD;
        default:  state_q <= S_CMD;
      endcase
    end
  end

  // AXI-Stream rule: a word offered and not taken stays, unchanged
  assert property (@(posedge clk) disable iff (!rst_n)
    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata))
    else $error("output stream changed while stalled");

endmodule
