// memory_controller: key-value store access for the replication engine.
//
// Each request from the engine names a key and whether it is a read or a write. The controller
// hashes the key to a 24-bit bucket index, turns it into the byte address index * VALUE_BYTES and
// issues one Datamover command: S2MM (stream to memory) for a write, whose value then streams
// through from the engine, or MM2S (memory to stream) for a read of a whole bucket.
// The command word follows the Datamover's layout: BTT [22:0], Type [23], DSA [29:24], EOF [30],
// DRR [31], SADDR [ADDR_W+31:32], TAG [+3:+0 above SADDR], then RSVD, xCACHE and xUSER, 4 bits each.
// Type=1 (incrementing burst), EOF=1, DSA=DRR=0, xCACHE=xUSER=0 and the 4-bit rolling tag are
// this implementation's choices.
//
// Requests are queued per direction (PEND_DEPTH each). A write completes when the S2MM status
// word arrives (its bit 7, OKAY, clear marks an error); a read completes when the first data beat
// returns, and the bucket contents then stream out on mem_rd_*. Each completion echoes the
// request's metadata to the engine on mem_cmp_*, writes first when both are ready. Reads complete
// in order among reads and writes among writes.
// Interface: valid/ready everywhere. Timing: the command leaves one cycle after the request;
// data paths add no cycle.
module memory_controller
  import repl_pkg::*;
#(
  parameter int unsigned DW          = repl_pkg::DATA_W,
  parameter int unsigned ADDR_W      = 64,
  parameter int unsigned VALUE_BYTES = 1024,
  parameter int unsigned PEND_DEPTH  = 16,
  localparam int unsigned CMD_W      = ADDR_W + 48
) (
  input  logic             clk,
  input  logic             rst_n,
  // requests and write data from the engine
  input  logic             mem_req_valid,
  output logic             mem_req_ready,
  input  mem_req_t         mem_req,
  input  logic             mem_wr_valid,
  output logic             mem_wr_ready,
  input  logic [DW-1:0]    mem_wr_data,
  input  logic [DW/8-1:0]  mem_wr_keep,
  input  logic             mem_wr_last,
  // completions and read data to the engine
  output logic             mem_cmp_valid,
  input  logic             mem_cmp_ready,
  output mem_req_t         mem_cmp,
  output logic             mem_rd_valid,
  input  logic             mem_rd_ready,
  output logic [DW-1:0]    mem_rd_data,
  output logic [DW/8-1:0]  mem_rd_keep,
  output logic             mem_rd_last,
  // Datamover S2MM
  output logic             s2mm_cmd_valid,
  input  logic             s2mm_cmd_ready,
  output logic [CMD_W-1:0] s2mm_cmd,
  output logic             s2mm_valid,
  input  logic             s2mm_ready,
  output logic [DW-1:0]    s2mm_data,
  output logic [DW/8-1:0]  s2mm_keep,
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
  input  logic [DW/8-1:0]  mm2s_keep,
  input  logic             mm2s_last,
  input  logic             mm2s_sts_valid,
  output logic             mm2s_sts_ready,
  input  logic [7:0]       mm2s_sts,
  output logic             rd_err          // sticky: an MM2S status reported an error
);
  localparam int unsigned IDX_W = 24;

  function automatic logic [CMD_W-1:0] dm_cmd(input logic [ADDR_W-1:0] saddr,
                                               input logic [3:0] tag);
    logic [CMD_W-1:0] c;
    c = '0;
    c[22:0]              = 23'(VALUE_BYTES);  // BTT
    c[23]                = 1'b1;              // Type: incrementing
    c[29:24]             = 6'd0;              // DSA
    c[30]                = 1'b1;              // EOF
    c[31]                = 1'b0;              // DRR
    c[ADDR_W+31:32]      = saddr;
    c[ADDR_W+35:ADDR_W+32] = tag;
    return c;                                 // RSVD, xCACHE, xUSER = 0
  endfunction

  logic [IDX_W-1:0]  bucket;
  logic [ADDR_W-1:0] addr;
  key_hash #(.KEY_W(KEY_W), .IDX_W(IDX_W)) u_hash (.key(mem_req.meta.key), .idx(bucket));
  assign addr = ADDR_W'(bucket) * ADDR_W'(VALUE_BYTES);

  // ---- pending queues ----
  logic     wp_in_ready, wp_out_valid, wp_pop;
  logic     rp_in_ready, rp_out_valid, rp_pop;
  mem_req_t wp_out, rp_out;

  wire req_w = mem_req_valid && mem_req.is_write;
  wire req_r = mem_req_valid && !mem_req.is_write;

  assign mem_req_ready = mem_req.is_write ? (!s2mm_cmd_valid && wp_in_ready)
                                          : (!mm2s_cmd_valid && rp_in_ready);
  wire push_w = req_w && mem_req_ready;
  wire push_r = req_r && mem_req_ready;

  sync_fifo #(.WIDTH(MEMREQ_W), .DEPTH(PEND_DEPTH)) u_wpend (
    .clk, .rst_n, .in_valid(push_w), .in_ready(wp_in_ready), .in_data(mem_req),
    .out_valid(wp_out_valid), .out_ready(wp_pop), .out_data(wp_out));
  sync_fifo #(.WIDTH(MEMREQ_W), .DEPTH(PEND_DEPTH)) u_rpend (
    .clk, .rst_n, .in_valid(push_r), .in_ready(rp_in_ready), .in_data(mem_req),
    .out_valid(rp_out_valid), .out_ready(rp_pop), .out_data(rp_out));

  // ---- command registers ----
  logic [3:0] wtag, rtag;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s2mm_cmd_valid <= 1'b0;
      mm2s_cmd_valid <= 1'b0;
      s2mm_cmd       <= '0;
      mm2s_cmd       <= '0;
      wtag           <= '0;
      rtag           <= '0;
    end else begin
      if (s2mm_cmd_valid && s2mm_cmd_ready) s2mm_cmd_valid <= 1'b0;
      if (mm2s_cmd_valid && mm2s_cmd_ready) mm2s_cmd_valid <= 1'b0;
      if (push_w) begin
        s2mm_cmd_valid <= 1'b1;
        s2mm_cmd       <= dm_cmd(addr, wtag);
        wtag           <= wtag + 1'b1;
      end
      if (push_r) begin
        mm2s_cmd_valid <= 1'b1;
        mm2s_cmd       <= dm_cmd(addr, rtag);
        rtag           <= rtag + 1'b1;
      end
    end
  end

  // ---- write data straight to the Datamover ----
  assign s2mm_valid   = mem_wr_valid;
  assign mem_wr_ready = s2mm_ready;
  assign s2mm_data    = mem_wr_data;
  assign s2mm_keep    = mem_wr_keep;
  assign s2mm_last    = mem_wr_last;

  // ---- completions ----
  logic rd_active;
  wire  cand_w = s2mm_sts_valid && wp_out_valid;
  wire  cand_r = !rd_active && rp_out_valid && mm2s_valid;

  always_comb begin
    mem_cmp_valid = cand_w || cand_r;
    if (cand_w) begin
      mem_cmp     = wp_out;
      mem_cmp.err = !s2mm_sts[7];
    end else begin
      mem_cmp     = rp_out;
      mem_cmp.err = 1'b0;
    end
  end
  assign s2mm_sts_ready = cand_w && mem_cmp_ready;
  assign wp_pop         = cand_w && mem_cmp_ready;

  wire start_rd = !cand_w && cand_r && mem_cmp_ready;

  assign mem_rd_valid = rd_active && mm2s_valid;
  assign mm2s_ready   = rd_active && mem_rd_ready;
  assign mem_rd_data  = mm2s_data;
  assign mem_rd_keep  = mm2s_keep;
  assign mem_rd_last  = mm2s_last;
  assign rp_pop       = mem_rd_valid && mem_rd_ready && mm2s_last;

  assign mm2s_sts_ready = 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_active <= 1'b0;
      rd_err    <= 1'b0;
    end else begin
      if (start_rd) rd_active <= 1'b1;
      if (rp_pop)   rd_active <= 1'b0;
      if (mm2s_sts_valid && !mm2s_sts[7]) rd_err <= 1'b1;
    end
  end

  // a status word with no write outstanding is a protocol error
  a_sts: assert property (@(posedge clk) disable iff (!rst_n) s2mm_sts_valid |-> wp_out_valid);
endmodule
