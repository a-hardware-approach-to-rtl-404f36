// kmp_prefix: builds the Knuth-Morris-Pratt failure table of the peptide.
//
// Before the protein can be scanned, KMP preprocesses the peptide P (length
// m) into a table fail[q] = length of the longest proper prefix of
// P[0..q] that is also a suffix of it.  The scan uses the table to jump to
// the next candidate alignment after a mismatch instead of restarting.
// The algorithm is the classic one; its sequential hardware form here is
// this design's own:
//
//   fail[0] = 0; k = 0
//   for q = 1 .. m-1:
//     while k > 0 and P[k] != P[q]: k = fail[k-1]
//     if P[k] == P[q]: k = k + 1
//     fail[q] = k
//
// The peptide and the table live in external RAMs with a one-clock
// registered read (kmp_ram).  Each q costs three clocks (read P[q], read
// P[k], compare and write) plus two clocks for every fallback step, so the
// whole table takes at most about 5*m clocks (the fallbacks total less than
// m).  start is a one-clock pulse; done pulses for one clock when fail[]
// is complete.  m = 0 finishes at once with nothing written.
module kmp_prefix
  import kmp_pkg::*;
#(
  parameter int unsigned MAX_PEP_LEN = 1024,
  localparam int unsigned AW = $clog2(MAX_PEP_LEN),
  localparam int unsigned LW = $clog2(MAX_PEP_LEN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [LW-1:0] pep_len,
  output logic          busy,
  output logic          done,
  // peptide RAM read port
  output logic [AW-1:0] pep_raddr,
  input  char_t         pep_rdata,
  // failure-table RAM write port
  output logic          fail_we,
  output logic [AW-1:0] fail_waddr,
  output logic [LW-1:0] fail_wdata,
  // failure-table RAM read port
  output logic [AW-1:0] fail_raddr,
  input  logic [LW-1:0] fail_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_RDQ, S_RDK, S_CMP, S_FB, S_DONE} state_t;

  state_t        state_q;
  logic [LW-1:0] m_q, q_q, k_q;
  char_t         pq_q;

  logic [LW-1:0] q_next;
  assign q_next = q_q + 1'b1;

  assign busy = (state_q != S_IDLE);
  assign done = (state_q == S_DONE);

  // read addresses
  always_comb begin
    pep_raddr  = q_q[AW-1:0];
    fail_raddr = '0;
    unique case (state_q)
      S_RDQ:   pep_raddr = q_q[AW-1:0];
      S_RDK:   pep_raddr = k_q[AW-1:0];
      S_CMP:   fail_raddr = AW'(k_q - 1'b1);
      S_FB:    pep_raddr = fail_rdata[AW-1:0];
      default: ;
    endcase
  end

  // table writes
  always_comb begin
    fail_we    = 1'b0;
    fail_waddr = q_q[AW-1:0];
    fail_wdata = '0;
    if (state_q == S_IDLE && start && pep_len != 0) begin
      fail_we    = 1'b1;
      fail_waddr = '0;
      fail_wdata = '0;
    end else if (state_q == S_CMP) begin
      if (pep_rdata == pq_q) begin
        fail_we    = 1'b1;
        fail_wdata = k_q + 1'b1;
      end else if (k_q == 0) begin
        fail_we    = 1'b1;
        fail_wdata = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      m_q     <= '0;
      q_q     <= '0;
      k_q     <= '0;
      pq_q    <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          m_q     <= pep_len;
          q_q     <= LW'(1);
          k_q     <= '0;
          state_q <= (pep_len > 1) ? S_RDQ : S_DONE;
        end
        S_RDQ: state_q <= S_RDK;
        S_RDK: begin
          pq_q    <= pep_rdata;       // P[q]
          state_q <= S_CMP;
        end
        S_CMP: begin                  // pep_rdata is P[k]
          if (pep_rdata == pq_q || k_q == 0) begin
            if (pep_rdata == pq_q) k_q <= k_q + 1'b1;
            q_q     <= q_next;
            state_q <= (q_next == m_q) ? S_DONE : S_RDQ;
          end else begin
            state_q <= S_FB;          // fail[k-1] is being read
          end
        end
        S_FB: begin
          k_q     <= fail_rdata;      // P[new k] is being read
          state_q <= S_CMP;
        end
        S_DONE:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
