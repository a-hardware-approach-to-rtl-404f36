// kmp_search: scans the protein with the KMP automaton and reports every
// position where the peptide occurs.
//
// With the peptide P (length m), its failure table fail[] and the protein
// T (length n) in RAM, the scan is the classic Knuth-Morris-Pratt loop,
// which reads every protein character once and never moves backwards in T:
//
//   q = 0
//   for i = 0 .. n-1:
//     while q > 0 and P[q] != T[i]: q = fail[q-1]
//     if P[q] == T[i]: q = q + 1
//     if q == m: report i-m+1; q = fail[m-1]
//
// All occurrences are reported, overlapping ones included.  The hardware
// form is this design's own: the three RAMs have a one-clock registered
// read; each protein character takes two clocks (read T[i] and P[q],
// compare), each fallback step two more, and each match waits in the
// match state until the consumer takes it (match_valid/match_ready), which
// stalls the scan.  Without stalls a scan takes at most 2n + 2*(fallbacks)
// + matches + 2 clocks, and the fallbacks total at most n.
//
// start is a one-clock pulse.  m = 0 or m > n finish at once with no
// match.  done pulses for one clock at the end; match_count then holds the
// number of matches reported.
module kmp_search
  import kmp_pkg::*;
#(
  parameter int unsigned MAX_PROT_LEN = 65536,
  parameter int unsigned MAX_PEP_LEN  = 1024,
  localparam int unsigned TAW = $clog2(MAX_PROT_LEN),
  localparam int unsigned TLW = $clog2(MAX_PROT_LEN + 1),
  localparam int unsigned PAW = $clog2(MAX_PEP_LEN),
  localparam int unsigned PLW = $clog2(MAX_PEP_LEN + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [TLW-1:0] prot_len,
  input  logic [PLW-1:0] pep_len,
  output logic           busy,
  output logic           done,
  output logic [TLW-1:0] match_count,
  // match positions
  output logic           match_valid,
  output logic [TLW-1:0] match_pos,
  input  logic           match_ready,
  // protein RAM read port
  output logic [TAW-1:0] prot_raddr,
  input  char_t          prot_rdata,
  // peptide RAM read port
  output logic [PAW-1:0] pep_raddr,
  input  char_t          pep_rdata,
  // failure-table RAM read port
  output logic [PAW-1:0] fail_raddr,
  input  logic [PLW-1:0] fail_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_RD, S_CMP, S_FB, S_EMIT, S_DONE} state_t;

  state_t         state_q;
  logic [TLW-1:0] n_q, i_q, cnt_q;
  logic [PLW-1:0] m_q, q_q;

  logic [TLW-1:0] i_next;
  logic [PLW-1:0] q_plus1;
  logic           eq;

  assign i_next  = i_q + 1'b1;
  assign q_plus1 = q_q + 1'b1;
  assign eq      = (prot_rdata == pep_rdata);

  assign busy        = (state_q != S_IDLE);
  assign done        = (state_q == S_DONE);
  assign match_count = cnt_q;
  assign match_valid = (state_q == S_EMIT);
  assign match_pos   = TLW'(i_q - TLW'(m_q) + 1'b1);

  // the protein address stays on T[i] so prot_rdata holds T[i] throughout
  assign prot_raddr = i_q[TAW-1:0];

  always_comb begin
    pep_raddr  = q_q[PAW-1:0];
    fail_raddr = PAW'(m_q - 1'b1);
    unique case (state_q)
      S_CMP:   fail_raddr = (eq && q_plus1 == m_q) ? PAW'(m_q - 1'b1)
                                                   : PAW'(q_q - 1'b1);
      S_FB:    pep_raddr  = fail_rdata[PAW-1:0];
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      n_q     <= '0;
      m_q     <= '0;
      i_q     <= '0;
      q_q     <= '0;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          n_q     <= prot_len;
          m_q     <= pep_len;
          i_q     <= '0;
          q_q     <= '0;
          cnt_q   <= '0;
          state_q <= (pep_len == 0 || TLW'(pep_len) > prot_len) ? S_DONE : S_RD;
        end
        S_RD: state_q <= S_CMP;
        S_CMP: begin
          if (eq) begin
            if (q_plus1 == m_q) begin
              state_q <= S_EMIT;      // fail[m-1] is being read
            end else begin
              q_q     <= q_plus1;
              i_q     <= i_next;
              state_q <= (i_next == n_q) ? S_DONE : S_RD;
            end
          end else if (q_q != 0) begin
            state_q <= S_FB;          // fail[q-1] is being read
          end else begin
            i_q     <= i_next;
            state_q <= (i_next == n_q) ? S_DONE : S_RD;
          end
        end
        S_FB: begin
          q_q     <= fail_rdata;      // P[new q] is being read
          state_q <= S_CMP;
        end
        S_EMIT: if (match_ready) begin
          cnt_q   <= cnt_q + 1'b1;
          q_q     <= fail_rdata;      // fail[m-1]
          i_q     <= i_next;
          state_q <= (i_next == n_q) ? S_DONE : S_RD;
        end
        S_DONE:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
