// outstanding_table: record of the writes a leader is replicating.
//
// When a leader receives a client write it allocates a slot here, storing the client's metadata
// (address, id, key) with an acknowledgement count of zero; the slot number becomes the id of the
// writes sent to the replicas, whose acknowledgements carry it back. Each acknowledgement reads the
// slot, adds one, and when the count reaches NUM_REPLICAS the slot is freed and reported complete
// with the client's metadata so the final acknowledgement can be sent.
//
// The entries live in a memory array with a registered read (block RAM); one valid bit per slot is
// kept in flip-flops so the lowest free slot can be found in one cycle.
// Interface and timing:
//   alloc: alloc_ready is high when a slot is free; alloc_valid && alloc_ready writes the entry
//          and alloc_idx names the slot, in that same cycle.
//   ack:   ack_valid with ack_idx; one cycle later rsp_valid with rsp_hit (slot in use),
//          rsp_done (this was the last ack) and rsp_meta. Acks must be at least two cycles apart.
module outstanding_table
  import repl_pkg::*;
#(
  parameter int unsigned TABLE_DEPTH  = 256,
  parameter int unsigned NUM_REPLICAS = 1,
  localparam int unsigned IW = $clog2(TABLE_DEPTH),
  localparam int unsigned CW = $clog2(NUM_REPLICAS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          alloc_valid,
  output logic          alloc_ready,
  input  meta_t         alloc_meta,
  output logic [IW-1:0] alloc_idx,
  input  logic          ack_valid,
  input  logic [IW-1:0] ack_idx,
  output logic          rsp_valid,
  output logic          rsp_hit,
  output logic          rsp_done,
  output meta_t         rsp_meta,
  output logic [IW:0]   used
);
  typedef struct packed {
    meta_t         meta;
    logic [CW-1:0] acks;
  } entry_t;

  entry_t                 mem [TABLE_DEPTH];
  logic [TABLE_DEPTH-1:0] valid;
  entry_t                 rd_q;
  logic [IW-1:0]          rd_idx;
  logic                   rd_pend;

  // lowest free slot
  always_comb begin
    alloc_ready = 1'b0;
    alloc_idx   = '0;
    for (int i = TABLE_DEPTH-1; i >= 0; i--) begin
      if (!valid[i]) begin
        alloc_ready = 1'b1;
        alloc_idx   = IW'(i);
      end
    end
  end

  wire           do_alloc = alloc_valid && alloc_ready;
  wire [CW-1:0]  acks_nx  = rd_q.acks + 1'b1;
  wire           last_ack = (acks_nx == CW'(NUM_REPLICAS));
  wire           upd      = rd_pend && valid[rd_idx];

  // entry memory: one read port, one write port (allocation or count update)
  always_ff @(posedge clk) begin
    if (ack_valid) rd_q <= mem[ack_idx];
    if (do_alloc)
      mem[alloc_idx] <= '{meta: alloc_meta, acks: '0};
    else if (upd && !last_ack)
      mem[rd_idx] <= '{meta: rd_q.meta, acks: acks_nx};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid   <= '0;
      rd_pend <= 1'b0;
      rd_idx  <= '0;
      used    <= '0;
    end else begin
      rd_pend <= ack_valid;
      if (ack_valid) rd_idx <= ack_idx;
      if (do_alloc) valid[alloc_idx] <= 1'b1;
      if (upd && last_ack) valid[rd_idx] <= 1'b0;
      used <= used + (IW+1)'(do_alloc) - (IW+1)'(upd && last_ack);
    end
  end

  assign rsp_valid = rd_pend;
  assign rsp_hit   = rd_pend && valid[rd_idx];
  assign rsp_done  = rsp_hit && last_ack;
  assign rsp_meta  = rd_q.meta;

  a_ack_spacing: assert property (@(posedge clk) disable iff (!rst_n) ack_valid |=> !ack_valid);
  // allocation and update must not collide on the write port
  a_port: assert property (@(posedge clk) disable iff (!rst_n) !(do_alloc && upd && !last_ack));
endmodule
