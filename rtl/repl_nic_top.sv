// repl_nic_top: replication NIC user logic, placed between the 100G MAC, the host DMA and the
// on-board memory of an FPGA SmartNIC.
//
// Receive side: frames from the MAC enter the packet parser. Replication packets (UDP to
// REPL_UDP_PORT) are split into metadata and value and go to the replication engine; every other
// frame is steered by the filter to the host DMA (C2H) unchanged. The engine drives the memory
// controller, which reaches the key-value store in HBM through a Datamover, and produces response
// and replication packets. Transmit side: the deparser turns those into Ethernet/IPv4/UDP frames and
// the arbiter merges them with the host's own frames (H2C) onto the MAC.
//
// The MAC, the host DMA engine, the Datamover and the HBM are vendor blocks; their streams and
// command/status channels are this module's ports. All logic runs on one clock (the MAC-side user
// clock); crossing to the DMA clock domain is left to the shell. Node addresses and the replicas'
// addresses are inputs, set by software.
// Defaults follow the design's main configuration: one replica (a two-node system in which each
// node leads some keys), 1 KiB values, 8-byte keys. The 512-bit stream width, the 256-entry
// outstanding-write table and the UDP port numbers are this implementation's choices.
module repl_nic_top
  import repl_pkg::*;
#(
  parameter int unsigned NUM_REPLICAS       = 1,
  parameter int unsigned VALUE_BYTES        = 1024,
  parameter int unsigned TABLE_DEPTH        = 256,
  parameter int unsigned META_FIFO_DEPTH    = 16,
  parameter int unsigned PAYLOAD_FIFO_DEPTH = 64,
  parameter int unsigned ADDR_W             = 64,
  parameter logic [15:0] REPL_UDP_PORT      = 16'h1F40,
  parameter logic [15:0] CLIENT_UDP_PORT    = 16'h1F41,
  localparam int unsigned DW    = repl_pkg::DATA_W,
  localparam int unsigned KW    = DW / 8,
  localparam int unsigned CMD_W = ADDR_W + 48
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration
  input  logic [47:0]      local_mac,
  input  logic [31:0]      local_ip,
  input  logic [NUM_REPLICAS-1:0][47:0] replica_mac,
  input  logic [NUM_REPLICAS-1:0][31:0] replica_ip,
  // MAC receive
  input  logic             cmac_rx_valid,
  output logic             cmac_rx_ready,
  input  logic [DW-1:0]    cmac_rx_data,
  input  logic [KW-1:0]    cmac_rx_keep,
  input  logic             cmac_rx_last,
  // MAC transmit
  output logic             cmac_tx_valid,
  input  logic             cmac_tx_ready,
  output logic [DW-1:0]    cmac_tx_data,
  output logic [KW-1:0]    cmac_tx_keep,
  output logic             cmac_tx_last,
  // host DMA, card to host (frames that are not replication traffic)
  output logic             qdma_c2h_valid,
  input  logic             qdma_c2h_ready,
  output logic [DW-1:0]    qdma_c2h_data,
  output logic [KW-1:0]    qdma_c2h_keep,
  output logic             qdma_c2h_last,
  // host DMA, host to card
  input  logic             qdma_h2c_valid,
  output logic             qdma_h2c_ready,
  input  logic [DW-1:0]    qdma_h2c_data,
  input  logic [KW-1:0]    qdma_h2c_keep,
  input  logic             qdma_h2c_last,
  // Datamover S2MM
  output logic             s2mm_cmd_valid,
  input  logic             s2mm_cmd_ready,
  output logic [CMD_W-1:0] s2mm_cmd,
  output logic             s2mm_valid,
  input  logic             s2mm_ready,
  output logic [DW-1:0]    s2mm_data,
  output logic [KW-1:0]    s2mm_keep,
  output logic             s2mm_last,
  input  logic             s2mm_sts_valid,
  output logic             s2mm_sts_ready,
  input  logic [7:0]       s2mm_sts,
  // Datamover MM2S
  output logic             mm2s_cmd_valid,
  input  logic             mm2s_cmd_ready,
  output logic [CMD_W-1:0] mm2s_cmd,
  input  logic             mm2s_valid,
  output logic             mm2s_ready,
  input  logic [DW-1:0]    mm2s_data,
  input  logic [KW-1:0]    mm2s_keep,
  input  logic             mm2s_last,
  input  logic             mm2s_sts_valid,
  output logic             mm2s_sts_ready,
  input  logic [7:0]       mm2s_sts,
  // status
  output logic [$clog2(TABLE_DEPTH):0] outstanding_writes,
  output logic             mem_read_error
);
  // parser -> filter
  logic          p_valid, p_ready, p_last, p_dest;
  logic [DW-1:0] p_data;
  logic [KW-1:0] p_keep;
  logic          meta_valid, meta_ready;
  meta_t         meta;
  // filter -> engine
  logic          e_valid, e_ready, e_last;
  logic [DW-1:0] e_data;
  logic [KW-1:0] e_keep;
  // engine <-> memory controller
  logic          mreq_valid, mreq_ready, mcmp_valid, mcmp_ready;
  mem_req_t      mreq, mcmp;
  logic          mwr_valid, mwr_ready, mwr_last, mrd_valid, mrd_ready, mrd_last;
  logic [DW-1:0] mwr_data, mrd_data;
  logic [KW-1:0] mwr_keep, mrd_keep;
  // engine -> deparser
  logic          t_valid, t_ready, t_last;
  logic [DW-1:0] t_data;
  logic [KW-1:0] t_keep;
  tx_meta_t      t_user;
  // deparser -> arbiter
  logic          d_valid, d_ready, d_last;
  logic [DW-1:0] d_data;
  logic [KW-1:0] d_keep;
  logic          unused_user;

  packet_parser #(.DW(DW), .REPL_UDP_PORT(REPL_UDP_PORT)) u_parser (
    .clk, .rst_n,
    .s_valid(cmac_rx_valid), .s_ready(cmac_rx_ready), .s_data(cmac_rx_data),
    .s_keep(cmac_rx_keep), .s_last(cmac_rx_last),
    .m_valid(p_valid), .m_ready(p_ready), .m_data(p_data), .m_keep(p_keep),
    .m_last(p_last), .m_dest(p_dest),
    .meta_valid, .meta_ready, .meta);

  rx_filter #(.DW(DW)) u_filter (
    .s_valid(p_valid), .s_ready(p_ready), .s_data(p_data), .s_keep(p_keep),
    .s_last(p_last), .s_dest(p_dest),
    .m_eng_valid(e_valid), .m_eng_ready(e_ready), .m_eng_data(e_data),
    .m_eng_keep(e_keep), .m_eng_last(e_last),
    .m_qdma_valid(qdma_c2h_valid), .m_qdma_ready(qdma_c2h_ready), .m_qdma_data(qdma_c2h_data),
    .m_qdma_keep(qdma_c2h_keep), .m_qdma_last(qdma_c2h_last));

  replication_engine #(
    .DW(DW), .NUM_REPLICAS(NUM_REPLICAS), .VALUE_BYTES(VALUE_BYTES), .TABLE_DEPTH(TABLE_DEPTH),
    .META_FIFO_DEPTH(META_FIFO_DEPTH), .PAYLOAD_FIFO_DEPTH(PAYLOAD_FIFO_DEPTH)
  ) u_engine (
    .clk, .rst_n, .replica_mac, .replica_ip,
    .rx_meta_valid(meta_valid), .rx_meta_ready(meta_ready), .rx_meta(meta),
    .rx_valid(e_valid), .rx_ready(e_ready), .rx_data(e_data), .rx_keep(e_keep), .rx_last(e_last),
    .mem_req_valid(mreq_valid), .mem_req_ready(mreq_ready), .mem_req(mreq),
    .mem_wr_valid(mwr_valid), .mem_wr_ready(mwr_ready), .mem_wr_data(mwr_data),
    .mem_wr_keep(mwr_keep), .mem_wr_last(mwr_last),
    .mem_cmp_valid(mcmp_valid), .mem_cmp_ready(mcmp_ready), .mem_cmp(mcmp),
    .mem_rd_valid(mrd_valid), .mem_rd_ready(mrd_ready), .mem_rd_data(mrd_data),
    .mem_rd_keep(mrd_keep), .mem_rd_last(mrd_last),
    .tx_valid(t_valid), .tx_ready(t_ready), .tx_data(t_data), .tx_keep(t_keep),
    .tx_last(t_last), .tx_user(t_user),
    .outstanding(outstanding_writes));

  memory_controller #(.DW(DW), .ADDR_W(ADDR_W), .VALUE_BYTES(VALUE_BYTES)) u_memctl (
    .clk, .rst_n,
    .mem_req_valid(mreq_valid), .mem_req_ready(mreq_ready), .mem_req(mreq),
    .mem_wr_valid(mwr_valid), .mem_wr_ready(mwr_ready), .mem_wr_data(mwr_data),
    .mem_wr_keep(mwr_keep), .mem_wr_last(mwr_last),
    .mem_cmp_valid(mcmp_valid), .mem_cmp_ready(mcmp_ready), .mem_cmp(mcmp),
    .mem_rd_valid(mrd_valid), .mem_rd_ready(mrd_ready), .mem_rd_data(mrd_data),
    .mem_rd_keep(mrd_keep), .mem_rd_last(mrd_last),
    .s2mm_cmd_valid, .s2mm_cmd_ready, .s2mm_cmd,
    .s2mm_valid, .s2mm_ready, .s2mm_data, .s2mm_keep, .s2mm_last,
    .s2mm_sts_valid, .s2mm_sts_ready, .s2mm_sts,
    .mm2s_cmd_valid, .mm2s_cmd_ready, .mm2s_cmd,
    .mm2s_valid, .mm2s_ready, .mm2s_data, .mm2s_keep, .mm2s_last,
    .mm2s_sts_valid, .mm2s_sts_ready, .mm2s_sts,
    .rd_err(mem_read_error));

  packet_deparser #(.DW(DW), .REPL_UDP_PORT(REPL_UDP_PORT), .CLIENT_UDP_PORT(CLIENT_UDP_PORT))
  u_deparser (
    .clk, .rst_n, .local_mac, .local_ip,
    .s_valid(t_valid), .s_ready(t_ready), .s_data(t_data), .s_keep(t_keep), .s_last(t_last),
    .s_user(t_user),
    .m_valid(d_valid), .m_ready(d_ready), .m_data(d_data), .m_keep(d_keep), .m_last(d_last));

  // input 0: replication frames, input 1: host frames
  axis_arbiter #(.DW(DW), .USER_W(1)) u_tx_arbiter (
    .clk, .rst_n,
    .s_valid({qdma_h2c_valid, d_valid}), .s_ready({qdma_h2c_ready, d_ready}),
    .s_data({qdma_h2c_data, d_data}), .s_keep({qdma_h2c_keep, d_keep}),
    .s_last({qdma_h2c_last, d_last}), .s_user(2'b10),
    .m_valid(cmac_tx_valid), .m_ready(cmac_tx_ready), .m_data(cmac_tx_data),
    .m_keep(cmac_tx_keep), .m_last(cmac_tx_last), .m_user(unused_user));
endmodule
