// replication_engine: the decision core of the replication NIC.
//
// It receives the metadata and the value of every replication packet and decides which memory
// operations to run and which packets to send:
//   READ          read the key's bucket; when the data returns, send READ_RESULT to the requester.
//   WRITE         (this node is a replica) write the value; when the memory reports completion,
//                 send WRITE_ACK to the leader, echoing the leader's id.
//   WRITE_LEADER  (this node leads the key) record the client in the outstanding-write table,
//                 start the local memory write in the background, keep a copy of the value and
//                 send it as WRITE to every replica, with the table slot as id.
//   WRITE_ACK     (from a replica) count the ack in the table; when every replica has acked,
//                 send WRITE_ACK with the client's own id back to the client.
// Other opcodes are consumed and dropped.
//
// Two state machines do this. The network machine takes requests in order from a metadata FIFO
// and a payload FIFO; while it broadcasts a value, new requests keep arriving into these FIFOs and
// wait. The memory machine takes completions from the memory controller and turns them into
// response packets. The packets of both machines are merged, a frame at a time, by an arbiter in
// front of the deparser. The value copy for the broadcast holds VALUE_BYTES; a longer value is
// still written locally but is cut to that size in the broadcast.
// The leader's final ack does not wait for its own memory write to finish.
//
// The two state machines, the FIFOs and the outstanding-write table follow the design; FIFO
// depths, the opcode encoding, the use of the table slot as the replicated write's id and the
// client/engine UDP port distinction are this implementation's choices.
// Interface: valid/ready streams; tx_user carries a tx_meta_t (destination, opcode, id, key,
// payload length). A packet without payload is one beat with tx_keep all zero.
// Timing: a request leaves the FIFO one cycle after it arrives; a memory request follows one cycle
// later; a broadcast sends one beat per cycle per replica.
module replication_engine
  import repl_pkg::*;
#(
  parameter int unsigned DW                 = repl_pkg::DATA_W,
  parameter int unsigned NUM_REPLICAS       = 1,
  parameter int unsigned VALUE_BYTES        = 1024,
  parameter int unsigned TABLE_DEPTH        = 256,
  parameter int unsigned META_FIFO_DEPTH    = 16,
  parameter int unsigned PAYLOAD_FIFO_DEPTH = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_REPLICAS-1:0][47:0] replica_mac,
  input  logic [NUM_REPLICAS-1:0][31:0] replica_ip,
  // requests from the parser and filter
  input  logic                   rx_meta_valid,
  output logic                   rx_meta_ready,
  input  meta_t                  rx_meta,
  input  logic                   rx_valid,
  output logic                   rx_ready,
  input  logic [DW-1:0]          rx_data,
  input  logic [DW/8-1:0]        rx_keep,
  input  logic                   rx_last,
  // memory controller
  output logic                   mem_req_valid,
  input  logic                   mem_req_ready,
  output mem_req_t               mem_req,
  output logic                   mem_wr_valid,
  input  logic                   mem_wr_ready,
  output logic [DW-1:0]          mem_wr_data,
  output logic [DW/8-1:0]        mem_wr_keep,
  output logic                   mem_wr_last,
  input  logic                   mem_cmp_valid,
  output logic                   mem_cmp_ready,
  input  mem_req_t               mem_cmp,
  input  logic                   mem_rd_valid,
  output logic                   mem_rd_ready,
  input  logic [DW-1:0]          mem_rd_data,
  input  logic [DW/8-1:0]        mem_rd_keep,
  input  logic                   mem_rd_last,
  // packets to the deparser
  output logic                   tx_valid,
  input  logic                   tx_ready,
  output logic [DW-1:0]          tx_data,
  output logic [DW/8-1:0]        tx_keep,
  output logic                   tx_last,
  output tx_meta_t               tx_user,
  // status
  output logic [$clog2(TABLE_DEPTH):0] outstanding
);
  localparam int unsigned KW    = DW / 8;
  localparam int unsigned BEATS = (VALUE_BYTES + KW - 1) / KW;
  localparam int unsigned BW    = $clog2(BEATS + 1);
  localparam int unsigned IW    = $clog2(TABLE_DEPTH);
  localparam int unsigned RW    = (NUM_REPLICAS > 1) ? $clog2(NUM_REPLICAS) : 1;
  localparam int unsigned PW    = DW + KW + 1;
  localparam int unsigned AIW   = (BEATS > 1) ? $clog2(BEATS) : 1;

  // ---------------- request buffers ----------------
  logic  mq_valid, mq_ready;
  meta_t mq;
  sync_fifo #(.WIDTH(META_W), .DEPTH(META_FIFO_DEPTH)) u_meta_fifo (
    .clk, .rst_n, .in_valid(rx_meta_valid), .in_ready(rx_meta_ready), .in_data(rx_meta),
    .out_valid(mq_valid), .out_ready(mq_ready), .out_data(mq));

  logic          pq_valid, pq_ready;
  logic [PW-1:0] pq;
  logic [DW-1:0] pq_data;
  logic [KW-1:0] pq_keep;
  logic          pq_last;
  sync_fifo #(.WIDTH(PW), .DEPTH(PAYLOAD_FIFO_DEPTH)) u_payload_fifo (
    .clk, .rst_n, .in_valid(rx_valid), .in_ready(rx_ready), .in_data({rx_last, rx_keep, rx_data}),
    .out_valid(pq_valid), .out_ready(pq_ready), .out_data(pq));
  assign {pq_last, pq_keep, pq_data} = pq;

  // ---------------- outstanding writes ----------------
  logic          alloc_valid, alloc_ready, ack_valid;
  logic [IW-1:0] alloc_idx;
  logic          rsp_valid, rsp_hit, rsp_done;
  meta_t         rsp_meta;
  meta_t         cur, client;

  outstanding_table #(.TABLE_DEPTH(TABLE_DEPTH), .NUM_REPLICAS(NUM_REPLICAS)) u_table (
    .clk, .rst_n,
    .alloc_valid, .alloc_ready, .alloc_meta(cur), .alloc_idx,
    .ack_valid, .ack_idx(IW'(cur.id)),
    .rsp_valid, .rsp_hit, .rsp_done, .rsp_meta, .used(outstanding));

  // ---------------- network state machine ----------------
  typedef enum logic [3:0] {
    N_IDLE, N_RD_REQ, N_WR_REQ, N_WR_DATA, N_LW_ALLOC, N_LW_REQ, N_LW_DATA,
    N_BCAST, N_ACK_LOOK, N_ACK_RSP, N_ACK_TX, N_DROP
  } nstate_e;
  nstate_e nst;

  logic [DW+KW-1:0] bbuf [2**AIW];       // copy of the value being replicated
  logic [BW-1:0]    bcnt, bidx;
  logic [15:0]      blen;
  logic [RW-1:0]    ridx;
  logic [IW-1:0]    slot;

  logic          txn_valid, txn_ready, txn_last;
  logic [DW-1:0] txn_data;
  logic [KW-1:0] txn_keep;
  tx_meta_t      txn_user;

  logic [DW-1:0] bb_data;
  logic [KW-1:0] bb_keep;
  assign {bb_keep, bb_data} = bbuf[bidx[AIW-1:0]];

  always_comb begin
    mq_ready      = (nst == N_IDLE);
    pq_ready      = 1'b0;
    mem_req_valid = 1'b0;
    mem_req       = '{is_write: 1'b0, reply: 1'b1, err: 1'b0, meta: cur};
    mem_wr_valid  = 1'b0;
    mem_wr_data   = pq_data;
    mem_wr_keep   = pq_keep;
    mem_wr_last   = pq_last;
    alloc_valid   = 1'b0;
    ack_valid     = 1'b0;
    txn_valid     = 1'b0;
    txn_data      = '0;
    txn_keep      = '0;
    txn_last      = 1'b1;
    txn_user      = '0;
    unique case (nst)
      N_RD_REQ:   mem_req_valid = 1'b1;
      N_WR_REQ: begin
        mem_req_valid    = 1'b1;
        mem_req.is_write = 1'b1;
      end
      N_LW_REQ: begin
        mem_req_valid    = 1'b1;
        mem_req.is_write = 1'b1;
        mem_req.reply    = 1'b0;             // the leader's own write runs in the background
      end
      N_WR_DATA, N_LW_DATA: begin
        mem_wr_valid = pq_valid;
        pq_ready     = mem_wr_ready;
      end
      N_LW_ALLOC: alloc_valid = 1'b1;
      N_ACK_LOOK: ack_valid   = 1'b1;
      N_BCAST: begin
        txn_valid                = 1'b1;
        txn_data                 = bb_data;
        txn_keep                 = bb_keep;
        txn_last                 = (bidx == bcnt - 1'b1);
        txn_user.len             = blen;
        txn_user.to_engine       = 1'b1;
        txn_user.meta.ip         = replica_ip[ridx];
        txn_user.meta.mac        = replica_mac[ridx];
        txn_user.meta.opcode     = OP_WRITE;
        txn_user.meta.id         = 8'(slot);
        txn_user.meta.key        = cur.key;
      end
      N_ACK_TX: begin
        txn_valid                = 1'b1;
        txn_user.to_engine       = 1'b0;
        txn_user.meta            = client;
        txn_user.meta.opcode     = OP_WRITE_ACK;
      end
      N_DROP: pq_ready = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      nst    <= N_IDLE;
      cur    <= '0;
      client <= '0;
      bcnt   <= '0;
      bidx   <= '0;
      blen   <= '0;
      ridx   <= '0;
      slot   <= '0;
    end else begin
      unique case (nst)
        N_IDLE: if (mq_valid) begin
          cur <= mq;
          unique case (mq.opcode)
            OP_READ:         nst <= N_RD_REQ;
            OP_WRITE:        nst <= N_WR_REQ;
            OP_WRITE_LEADER: nst <= N_LW_ALLOC;
            OP_WRITE_ACK:    nst <= N_ACK_LOOK;
            default:         nst <= N_DROP;
          endcase
        end
        N_RD_REQ: if (mem_req_ready) nst <= N_DROP;   // drop the request's padding
        N_WR_REQ: if (mem_req_ready) nst <= N_WR_DATA;
        N_WR_DATA: if (pq_valid && mem_wr_ready && pq_last) nst <= N_IDLE;
        N_LW_ALLOC: if (alloc_ready) begin
          slot <= alloc_idx;
          nst  <= N_LW_REQ;
        end
        N_LW_REQ: if (mem_req_ready) begin
          bcnt <= '0;
          blen <= '0;
          nst  <= N_LW_DATA;
        end
        N_LW_DATA: if (pq_valid && mem_wr_ready) begin
          if (bcnt < BW'(BEATS)) begin
            bcnt <= bcnt + 1'b1;
            blen <= blen + 16'($countones(pq_keep));
          end
          if (pq_last) begin
            bidx <= '0;
            ridx <= '0;
            nst  <= N_BCAST;
          end
        end
        N_BCAST: if (txn_ready) begin
          if (txn_last) begin
            bidx <= '0;
            if (ridx == RW'(NUM_REPLICAS - 1)) nst <= N_IDLE;
            else ridx <= ridx + 1'b1;
          end else begin
            bidx <= bidx + 1'b1;
          end
        end
        N_ACK_LOOK: nst <= N_ACK_RSP;
        N_ACK_RSP: begin
          client <= rsp_meta;
          nst    <= rsp_done ? N_ACK_TX : N_DROP;
        end
        N_ACK_TX: if (txn_ready) nst <= N_DROP;
        N_DROP: if (pq_valid && pq_last) nst <= N_IDLE;
        default: nst <= N_IDLE;
      endcase
    end
  end

  // value copy for the broadcast
  always_ff @(posedge clk) begin
    if (nst == N_LW_DATA && pq_valid && mem_wr_ready && bcnt < BW'(BEATS))
      bbuf[bcnt[AIW-1:0]] <= {pq_keep, pq_data};
  end

  // ---------------- memory state machine ----------------
  typedef enum logic [1:0] {M_IDLE, M_ACK, M_RD} mstate_e;
  mstate_e  mst;
  mem_req_t mc;

  logic          txm_valid, txm_ready, txm_last;
  logic [DW-1:0] txm_data;
  logic [KW-1:0] txm_keep;
  tx_meta_t      txm_user;

  always_comb begin
    mem_cmp_ready = (mst == M_IDLE);
    mem_rd_ready  = 1'b0;
    txm_valid     = 1'b0;
    txm_data      = mem_rd_data;
    txm_keep      = '0;
    txm_last      = 1'b1;
    txm_user      = '{len: 16'd0, to_engine: 1'b1, meta: mc.meta};
    unique case (mst)
      M_ACK: begin
        txm_valid                = 1'b1;
        txm_user.meta.opcode     = OP_WRITE_ACK;
      end
      M_RD: begin
        txm_valid                = mem_rd_valid;
        txm_keep                 = mem_rd_keep;
        txm_last                 = mem_rd_last;
        mem_rd_ready             = txm_ready;
        txm_user.len             = 16'(VALUE_BYTES);
        txm_user.to_engine       = 1'b0;
        txm_user.meta.opcode     = OP_READ_RESULT;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mst <= M_IDLE;
      mc  <= '0;
    end else begin
      unique case (mst)
        M_IDLE: if (mem_cmp_valid) begin
          mc <= mem_cmp;
          if (!mem_cmp.is_write)                   mst <= M_RD;
          else if (mem_cmp.reply && !mem_cmp.err)  mst <= M_ACK;
        end
        M_ACK: if (txm_ready) mst <= M_IDLE;
        M_RD:  if (mem_rd_valid && txm_ready && mem_rd_last) mst <= M_IDLE;
        default: mst <= M_IDLE;
      endcase
    end
  end

  // ---------------- merge of the two machines' packets ----------------
  axis_arbiter #(.DW(DW), .USER_W(TXMETA_W)) u_merge (
    .clk, .rst_n,
    .s_valid({txn_valid, txm_valid}), .s_ready({txn_ready, txm_ready}),
    .s_data({txn_data, txm_data}), .s_keep({txn_keep, txm_keep}),
    .s_last({txn_last, txm_last}), .s_user({txn_user, txm_user}),
    .m_valid(tx_valid), .m_ready(tx_ready), .m_data(tx_data), .m_keep(tx_keep),
    .m_last(tx_last), .m_user(tx_user));

  a_bcast_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    nst == N_BCAST |-> bcnt != '0);
endmodule
