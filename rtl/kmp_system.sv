// kmp_system: the programmable-logic side of the protein-identification
// system: NUM_CORES independent KMP cores working in parallel.
//
// On the target board each core is fed by its own DMA channel, which moves
// the packed protein and peptide strings from the host's DDR memory into
// the core's input stream and writes the match positions from its output
// stream back to memory; the four DMAs reach memory through the processor's
// high-performance ports and are programmed by the ARM host.  The DMAs,
// the host and the memory are not part of this RTL: each core's two
// AXI-Stream ports are brought out here, indexed by core number, for a
// DMA (or a testbench) to drive.  Four cores is the published
// system's number; the independence of the cores follows it too.
//
// Per core c: s_axis_*[c] is the input stream (command, protein, peptide),
// m_axis_*[c] the result stream, busy[c] high while a job is in flight.
// All cores share clk and the active-low asynchronous reset rst_n.
module kmp_system
  import kmp_pkg::*;
#(
  parameter int unsigned NUM_CORES    = 4,
  parameter int unsigned MAX_PROT_LEN = 65536,
  parameter int unsigned MAX_PEP_LEN  = 1024
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  word_t [NUM_CORES-1:0]       s_axis_tdata,
  input  logic  [NUM_CORES-1:0]       s_axis_tvalid,
  input  logic  [NUM_CORES-1:0]       s_axis_tlast,
  output logic  [NUM_CORES-1:0]       s_axis_tready,
  output word_t [NUM_CORES-1:0]       m_axis_tdata,
  output logic  [NUM_CORES-1:0]       m_axis_tvalid,
  output logic  [NUM_CORES-1:0]       m_axis_tlast,
  input  logic  [NUM_CORES-1:0]       m_axis_tready,
  output logic  [NUM_CORES-1:0]       busy
);

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    kmp_core #(.MAX_PROT_LEN(MAX_PROT_LEN), .MAX_PEP_LEN(MAX_PEP_LEN)) u_core (
      .clk, .rst_n,
      .s_axis_tdata (s_axis_tdata[c]),
      .s_axis_tvalid(s_axis_tvalid[c]),
      .s_axis_tlast (s_axis_tlast[c]),
      .s_axis_tready(s_axis_tready[c]),
      .m_axis_tdata (m_axis_tdata[c]),
      .m_axis_tvalid(m_axis_tvalid[c]),
      .m_axis_tlast (m_axis_tlast[c]),
      .m_axis_tready(m_axis_tready[c]),
      .busy         (busy[c])
    );
  end

endmodule
