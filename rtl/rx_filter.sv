// rx_filter: receive-side packet filter.
//
// The parser marks every beat with a destination bit. The filter steers beats marked 1 (the
// payload of replication packets) to the replication engine and beats marked 0 (all other
// traffic) to the host DMA, so normal networking continues alongside replication. Routing is
// combinational: a beat waits only for the ready of the port it goes to, so a stalled host path
// does not block replication traffic that follows a finished host frame.
//
// Interface: one stream in (s_*, s_dest), two streams out (m_eng_*, m_qdma_*), valid/ready.
// Timing: no added latency.
module rx_filter #(
  parameter int unsigned DW = repl_pkg::DATA_W
) (
  input  logic            s_valid,
  output logic            s_ready,
  input  logic [DW-1:0]   s_data,
  input  logic [DW/8-1:0] s_keep,
  input  logic            s_last,
  input  logic            s_dest,
  output logic            m_eng_valid,
  input  logic            m_eng_ready,
  output logic [DW-1:0]   m_eng_data,
  output logic [DW/8-1:0] m_eng_keep,
  output logic            m_eng_last,
  output logic            m_qdma_valid,
  input  logic            m_qdma_ready,
  output logic [DW-1:0]   m_qdma_data,
  output logic [DW/8-1:0] m_qdma_keep,
  output logic            m_qdma_last
);
  always_comb begin
    m_eng_valid  = s_valid &&  s_dest;
    m_qdma_valid = s_valid && !s_dest;
    s_ready      = s_dest ? m_eng_ready : m_qdma_ready;
    m_eng_data   = s_data;
    m_eng_keep   = s_keep;
    m_eng_last   = s_last;
    m_qdma_data  = s_data;
    m_qdma_keep  = s_keep;
    m_qdma_last  = s_last;
  end
endmodule
