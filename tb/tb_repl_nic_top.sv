// tb_repl_nic_top: end-to-end test of two replication NICs connected back to back.
//
// Node A and node B each run repl_nic_top at its default parameters (one replica: the other
// node) with a Datamover/HBM model; A's MAC transmit feeds B's MAC receive and vice versa. Clients
// live on the hosts: their frames enter through the host DMA (H2C) of one node, cross the link
// and reach the other node; responses addressed to clients come back out of the host DMA (C2H).
// Node A leads some keys and node B others.
// Checked end to end, byte for byte against frames built by the testbench:
//   - write to leader: the client's WRITE_ACK arrives only after the replica acked, and both
//     memories then hold the value at hash(key) * 1024;
//   - reads at the leader and at the replica return the replicated value;
//   - ordinary UDP frames from the host cross the link unchanged and are delivered to the host;
//   - a burst of writes, so that requests queue while a broadcast is in progress.
// Mechanisms counted (each must occur): broadcast with a request waiting, an ack completing a
// replicated write, a read served from memory, a replica write ack, a frame filtered to the host,
// both transmit arbiter inputs contending. (With one replica every ack completes its write; partial
// ack counting is covered by the outstanding table and engine testbenches.)
// Cycle counts of the replication path (MAC receive -> memory command, memory data -> MAC transmit)
// are checked against the published receive/transmit latencies of the original hardware, 152 ns
// and 120 ns, i.e. 49 and 38 cycles at 322 MHz; a complete leader write is checked against
// 1776 ns (572 cycles), network excluded. Runs at the top's default parameters.
module tb_repl_nic_top;
  import repl_pkg::*;
  import tb_frames_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [47:0] NIC_MAC [2] = '{48'h02_00_00_00_00_A1, 48'h02_00_00_00_00_B1};
  localparam logic [31:0] NIC_IP  [2] = '{32'h0A00_0001, 32'h0A00_0002};
  localparam logic [47:0] HOST_MAC[2] = '{48'h02_00_00_00_00_A2, 48'h02_00_00_00_00_B2};
  localparam logic [31:0] HOST_IP [2] = '{32'h0A00_0101, 32'h0A00_0102};

  // link and host signals per node
  logic         ab_valid, ab_ready, ab_last, ba_valid, ba_ready, ba_last;
  logic [511:0] ab_data, ba_data;
  logic [63:0]  ab_keep, ba_keep;
  logic         h2c_valid[2], h2c_ready[2], h2c_last[2];
  logic [511:0] h2c_data[2];
  logic [63:0]  h2c_keep[2];
  logic         c2h_valid[2], c2h_ready[2], c2h_last[2];
  logic [511:0] c2h_data[2];
  logic [63:0]  c2h_keep[2];
  // datamover side per node
  logic         s2mm_cmd_valid[2], s2mm_cmd_ready[2], s2mm_valid[2], s2mm_ready[2], s2mm_last[2];
  logic [111:0] s2mm_cmd[2], mm2s_cmd[2];
  logic [511:0] s2mm_data[2], mm2s_data[2];
  logic [63:0]  s2mm_keep[2], mm2s_keep[2];
  logic         s2mm_sts_valid[2], s2mm_sts_ready[2], mm2s_cmd_valid[2], mm2s_cmd_ready[2];
  logic         mm2s_valid[2], mm2s_ready[2], mm2s_last[2], mm2s_sts_valid[2], mm2s_sts_ready[2];
  logic [7:0]   s2mm_sts[2], mm2s_sts[2];
  logic [8:0]   outstanding[2];
  logic         rd_err[2];

  initial for (int n = 0; n < 2; n++) begin
    h2c_valid[n] = 0; h2c_last[n] = 0; h2c_data[n] = '0; h2c_keep[n] = '0; c2h_ready[n] = 1;
  end

  repl_nic_top u_a (
    .clk, .rst_n, .local_mac(NIC_MAC[0]), .local_ip(NIC_IP[0]),
    .replica_mac(NIC_MAC[1]), .replica_ip(NIC_IP[1]),
    .cmac_rx_valid(ba_valid), .cmac_rx_ready(ba_ready), .cmac_rx_data(ba_data),
    .cmac_rx_keep(ba_keep), .cmac_rx_last(ba_last),
    .cmac_tx_valid(ab_valid), .cmac_tx_ready(ab_ready), .cmac_tx_data(ab_data),
    .cmac_tx_keep(ab_keep), .cmac_tx_last(ab_last),
    .qdma_c2h_valid(c2h_valid[0]), .qdma_c2h_ready(c2h_ready[0]), .qdma_c2h_data(c2h_data[0]),
    .qdma_c2h_keep(c2h_keep[0]), .qdma_c2h_last(c2h_last[0]),
    .qdma_h2c_valid(h2c_valid[0]), .qdma_h2c_ready(h2c_ready[0]), .qdma_h2c_data(h2c_data[0]),
    .qdma_h2c_keep(h2c_keep[0]), .qdma_h2c_last(h2c_last[0]),
    .s2mm_cmd_valid(s2mm_cmd_valid[0]), .s2mm_cmd_ready(s2mm_cmd_ready[0]), .s2mm_cmd(s2mm_cmd[0]),
    .s2mm_valid(s2mm_valid[0]), .s2mm_ready(s2mm_ready[0]), .s2mm_data(s2mm_data[0]),
    .s2mm_keep(s2mm_keep[0]), .s2mm_last(s2mm_last[0]),
    .s2mm_sts_valid(s2mm_sts_valid[0]), .s2mm_sts_ready(s2mm_sts_ready[0]), .s2mm_sts(s2mm_sts[0]),
    .mm2s_cmd_valid(mm2s_cmd_valid[0]), .mm2s_cmd_ready(mm2s_cmd_ready[0]), .mm2s_cmd(mm2s_cmd[0]),
    .mm2s_valid(mm2s_valid[0]), .mm2s_ready(mm2s_ready[0]), .mm2s_data(mm2s_data[0]),
    .mm2s_keep(mm2s_keep[0]), .mm2s_last(mm2s_last[0]),
    .mm2s_sts_valid(mm2s_sts_valid[0]), .mm2s_sts_ready(mm2s_sts_ready[0]), .mm2s_sts(mm2s_sts[0]),
    .outstanding_writes(outstanding[0]), .mem_read_error(rd_err[0]));

  repl_nic_top u_b (
    .clk, .rst_n, .local_mac(NIC_MAC[1]), .local_ip(NIC_IP[1]),
    .replica_mac(NIC_MAC[0]), .replica_ip(NIC_IP[0]),
    .cmac_rx_valid(ab_valid), .cmac_rx_ready(ab_ready), .cmac_rx_data(ab_data),
    .cmac_rx_keep(ab_keep), .cmac_rx_last(ab_last),
    .cmac_tx_valid(ba_valid), .cmac_tx_ready(ba_ready), .cmac_tx_data(ba_data),
    .cmac_tx_keep(ba_keep), .cmac_tx_last(ba_last),
    .qdma_c2h_valid(c2h_valid[1]), .qdma_c2h_ready(c2h_ready[1]), .qdma_c2h_data(c2h_data[1]),
    .qdma_c2h_keep(c2h_keep[1]), .qdma_c2h_last(c2h_last[1]),
    .qdma_h2c_valid(h2c_valid[1]), .qdma_h2c_ready(h2c_ready[1]), .qdma_h2c_data(h2c_data[1]),
    .qdma_h2c_keep(h2c_keep[1]), .qdma_h2c_last(h2c_last[1]),
    .s2mm_cmd_valid(s2mm_cmd_valid[1]), .s2mm_cmd_ready(s2mm_cmd_ready[1]), .s2mm_cmd(s2mm_cmd[1]),
    .s2mm_valid(s2mm_valid[1]), .s2mm_ready(s2mm_ready[1]), .s2mm_data(s2mm_data[1]),
    .s2mm_keep(s2mm_keep[1]), .s2mm_last(s2mm_last[1]),
    .s2mm_sts_valid(s2mm_sts_valid[1]), .s2mm_sts_ready(s2mm_sts_ready[1]), .s2mm_sts(s2mm_sts[1]),
    .mm2s_cmd_valid(mm2s_cmd_valid[1]), .mm2s_cmd_ready(mm2s_cmd_ready[1]), .mm2s_cmd(mm2s_cmd[1]),
    .mm2s_valid(mm2s_valid[1]), .mm2s_ready(mm2s_ready[1]), .mm2s_data(mm2s_data[1]),
    .mm2s_keep(mm2s_keep[1]), .mm2s_last(mm2s_last[1]),
    .mm2s_sts_valid(mm2s_sts_valid[1]), .mm2s_sts_ready(mm2s_sts_ready[1]), .mm2s_sts(mm2s_sts[1]),
    .outstanding_writes(outstanding[1]), .mem_read_error(rd_err[1]));

  for (genvar n = 0; n < 2; n++) begin : g_mem
    dm_hbm_model #(.WR_LAT(30), .RD_LAT(60)) hbm (
      .clk, .rst_n,
      .s2mm_cmd_valid(s2mm_cmd_valid[n]), .s2mm_cmd_ready(s2mm_cmd_ready[n]), .s2mm_cmd(s2mm_cmd[n]),
      .s2mm_valid(s2mm_valid[n]), .s2mm_ready(s2mm_ready[n]), .s2mm_data(s2mm_data[n]),
      .s2mm_keep(s2mm_keep[n]), .s2mm_last(s2mm_last[n]),
      .s2mm_sts_valid(s2mm_sts_valid[n]), .s2mm_sts_ready(s2mm_sts_ready[n]), .s2mm_sts(s2mm_sts[n]),
      .mm2s_cmd_valid(mm2s_cmd_valid[n]), .mm2s_cmd_ready(mm2s_cmd_ready[n]), .mm2s_cmd(mm2s_cmd[n]),
      .mm2s_valid(mm2s_valid[n]), .mm2s_ready(mm2s_ready[n]), .mm2s_data(mm2s_data[n]),
      .mm2s_keep(mm2s_keep[n]), .mm2s_last(mm2s_last[n]),
      .mm2s_sts_valid(mm2s_sts_valid[n]), .mm2s_sts_ready(mm2s_sts_ready[n]), .mm2s_sts(mm2s_sts[n]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [23:0] ref_hash(input logic [63:0] k);
    logic [23:0] f = k[23:0] ^ k[47:24] ^ {8'h00, k[63:48]};
    logic [47:0] p = 48'(f) * 48'h3779B1;
    return p[23:0];
  endfunction

  // ---------------- host side ----------------
  bytes_t c2h_q[2][$];      // frames delivered to each host
  bytes_t c2h_cur[2];
  always @(negedge clk) begin
    #2;
    for (int n = 0; n < 2; n++)
      if (c2h_valid[n] && c2h_ready[n]) begin
        take_beat(c2h_cur[n], c2h_data[n], c2h_keep[n]);
        if (c2h_last[n]) begin
          c2h_q[n].push_back(c2h_cur[n]);
          c2h_cur[n].delete();
        end
      end
  end

  semaphore h2c_lock[2];
  initial begin
    h2c_lock[0] = new(1);
    h2c_lock[1] = new(1);
  end

  task automatic host_send(input int n, input bytes_t f);
    int nb = nbeats(f.size());
    h2c_lock[n].get(1);
    for (int b = 0; b < nb; b++) begin
      @(negedge clk);
      h2c_valid[n] = 1;
      h2c_data[n]  = beat_data(f, b);
      h2c_keep[n]  = beat_keep(f, b);
      h2c_last[n]  = (b == nb - 1);
      #1;
      while (!h2c_ready[n]) begin
        @(negedge clk);
        #1;
      end
    end
    @(negedge clk);
    h2c_valid[n] = 0;
    h2c_lock[n].put(1);
  endtask

  // client on host n sends a request to the NIC of the other node
  function automatic bytes_t request(input int n, input opcode_e op, input logic [7:0] id,
                                     input logic [63:0] key, input bytes_t v);
    return repl_frame(NIC_MAC[1-n], HOST_MAC[n], HOST_IP[n], NIC_IP[1-n], CLIENT_PORT, REPL_PORT,
                      op, id, key, v);
  endfunction

  // response the client on host n expects from the NIC of the other node
  function automatic bytes_t response(input int n, input opcode_e op, input logic [7:0] id,
                                      input logic [63:0] key, input bytes_t v);
    return repl_frame(HOST_MAC[n], NIC_MAC[1-n], NIC_IP[1-n], HOST_IP[n], REPL_PORT, CLIENT_PORT,
                      op, id, key, v);
  endfunction

  task automatic wait_frames(input int n, input int count, input int limit);
    int t = 0;
    while (c2h_q[n].size() < count && t < limit) begin
      @(posedge clk);
      t++;
    end
  endtask

  // look for a frame among those delivered to host n, and remove it
  function automatic bit got_frame(input int n, input bytes_t f);
    foreach (c2h_q[n][i])
      if (same(c2h_q[n][i], f)) begin
        c2h_q[n].delete(i);
        return 1;
      end
    return 0;
  endfunction

  function automatic bit mem_holds(input int n, input logic [63:0] key, input bytes_t v);
    longint unsigned base = longint'(ref_hash(key)) * 1024;
    foreach (v[i]) if (n == 0 ? u_hbm_peek0(base + i) != v[i] : u_hbm_peek1(base + i) != v[i]) return 0;
    return 1;
  endfunction
  function automatic byte unsigned u_hbm_peek0(input longint unsigned a);
    return g_mem[0].hbm.peek(a);
  endfunction
  function automatic byte unsigned u_hbm_peek1(input longint unsigned a);
    return g_mem[1].hbm.peek(a);
  endfunction

  // ---------------- mechanism counters ----------------
  int bcast_waiting = 0, final_acks = 0, mem_reads = 0, replica_acks = 0;
  int to_host = 0, tx_contention = 0;
  always @(negedge clk) begin
    #3;
    if (rst_n) begin
      if (u_a.u_engine.nst == 4'd7 && u_a.u_engine.mq_valid) bcast_waiting++;
      if (u_b.u_engine.nst == 4'd7 && u_b.u_engine.mq_valid) bcast_waiting++;
      if (u_a.u_engine.u_table.rsp_done) final_acks++;
      if (u_b.u_engine.u_table.rsp_done) final_acks++;
      if (u_a.u_engine.mst == 2'd1 && ab_ready) replica_acks++;
      if (u_b.u_engine.mst == 2'd1 && ba_ready) replica_acks++;
      if (mm2s_cmd_valid[0] && mm2s_cmd_ready[0]) mem_reads++;
      if (mm2s_cmd_valid[1] && mm2s_cmd_ready[1]) mem_reads++;
      if (c2h_valid[0] && c2h_ready[0] && c2h_last[0]) to_host++;
      if (c2h_valid[1] && c2h_ready[1] && c2h_last[1]) to_host++;
      if (u_a.u_tx_arbiter.s_valid == 2'b11) tx_contention++;
      if (u_b.u_tx_arbiter.s_valid == 2'b11) tx_contention++;
    end
  end

  initial begin
    bytes_t v[8];
    logic [63:0] key[8];
    int cyc;
    for (int i = 0; i < 8; i++) begin
      v[i] = rand_bytes(1024);
      key[i] = {$urandom, $urandom};
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // 1. client on host B writes key 0 to leader A; client on host A writes key 1 to leader B
    fork
      host_send(1, request(1, OP_WRITE_LEADER, 8'd10, key[0], v[0]));
      host_send(0, request(0, OP_WRITE_LEADER, 8'd11, key[1], v[1]));
    join
    wait_frames(1, 1, 3000);
    wait_frames(0, 1, 3000);
    check(got_frame(1, response(1, OP_WRITE_ACK, 8'd10, key[0], '{})), "write ack from leader A to client B");
    check(got_frame(0, response(0, OP_WRITE_ACK, 8'd11, key[1], '{})), "write ack from leader B to client A");
    repeat (100) @(posedge clk);
    for (int n = 0; n < 2; n++) begin
      check(mem_holds(n, key[0], v[0]), $sformatf("node %0d holds key 0", n));
      check(mem_holds(n, key[1], v[1]), $sformatf("node %0d holds key 1", n));
    end

    // 2. reads at the leader and at the replica
    host_send(1, request(1, OP_READ, 8'd20, key[0], '{}));     // A is leader of key 0
    wait_frames(1, 1, 3000);
    check(got_frame(1, response(1, OP_READ_RESULT, 8'd20, key[0], v[0])), "read at leader");
    host_send(0, request(0, OP_READ, 8'd21, key[0], '{}));     // B is replica of key 0
    wait_frames(0, 1, 3000);
    check(got_frame(0, response(0, OP_READ_RESULT, 8'd21, key[0], v[0])), "read at replica");

    // 3. burst of writes to leader A from host B, with ordinary UDP traffic both ways
    fork
      for (int i = 2; i < 8; i++) host_send(1, request(1, OP_WRITE_LEADER, 8'(30 + i), key[i], v[i]));
      for (int i = 0; i < 6; i++) begin
        automatic bytes_t f = repl_frame(HOST_MAC[1], HOST_MAC[0], HOST_IP[0], HOST_IP[1], 16'd4000, 16'd4001,
                               8'h00, 8'(i), 64'(i), rand_bytes(100 + 150 * i));
        host_send(0, f);
        wait_frames(1, 1, 3000);
        check(got_frame(1, f), $sformatf("ordinary frame %0d delivered", i));
      end
    join
    wait_frames(1, 6, 20000);
    for (int i = 2; i < 8; i++)
      check(got_frame(1, response(1, OP_WRITE_ACK, 8'(30 + i), key[i], '{})), $sformatf("burst ack %0d", i));
    repeat (200) @(posedge clk);
    for (int i = 2; i < 8; i++)
      check(mem_holds(1, key[i], v[i]) && mem_holds(0, key[i], v[i]), $sformatf("burst key %0d replicated", i));
    check(outstanding[0] == 0 && outstanding[1] == 0, "no write left outstanding");

    // 4. cycle counts of the replication path on a quiet system (read at node A)
    begin
      automatic int c = 0, t_rx = -1, t_cmd = -1, t_data = -1, t_tx = -1;
      fork
        host_send(1, request(1, OP_READ, 8'd40, key[3], '{}));
        while (t_tx < 0 && c < 5000) begin
          @(negedge clk);
          #3;
          c++;
          if (t_rx < 0 && ba_valid && ba_ready) t_rx = c;
          if (t_cmd < 0 && mm2s_cmd_valid[0] && mm2s_cmd_ready[0]) t_cmd = c;
          if (t_data < 0 && mm2s_valid[0] && mm2s_ready[0]) t_data = c;
          if (t_data >= 0 && t_tx < 0 && ab_valid && ab_ready) t_tx = c;
        end
      join
      check(t_cmd - t_rx <= 49, $sformatf("receive path %0d cycles", t_cmd - t_rx));
      check(t_tx - t_data <= 38, $sformatf("transmit path %0d cycles", t_tx - t_data));
      $display("replication path: receive %0d cycles, transmit %0d cycles", t_cmd - t_rx, t_tx - t_data);
      wait_frames(1, 1, 3000);
      check(got_frame(1, response(1, OP_READ_RESULT, 8'd40, key[3], v[3])), "timed read");
    end

    // 5. cycle count of a complete leader write (leader receive -> client gets the ack), network
    //    excluded: 1776 ns = 572 cycles at 322 MHz
    begin
      automatic int c = 0, t_rx = -1, t_ack = -1;
      automatic bytes_t nv = rand_bytes(1024);
      fork
        host_send(1, request(1, OP_WRITE_LEADER, 8'd41, key[4], nv));
        while (t_ack < 0 && c < 5000) begin
          @(negedge clk);
          #3;
          c++;
          if (t_rx < 0 && ba_valid && ba_ready) t_rx = c;
          if (t_ack < 0 && c2h_valid[1]) t_ack = c;
        end
      join
      check(t_ack - t_rx <= 572, $sformatf("leader write %0d cycles", t_ack - t_rx));
      $display("leader write: %0d cycles from leader receive to client ack", t_ack - t_rx);
      wait_frames(1, 1, 3000);
      check(got_frame(1, response(1, OP_WRITE_ACK, 8'd41, key[4], '{})), "timed leader write ack");
      repeat (100) @(posedge clk);
      check(mem_holds(0, key[4], nv) && mem_holds(1, key[4], nv), "overwritten value replicated");
    end

    repeat (50) @(posedge clk);
    check(c2h_q[0].size() == 0 && c2h_q[1].size() == 0, "no unexpected frames at the hosts");
    check(!rd_err[0] && !rd_err[1], "no memory errors");
    $display("mechanisms: broadcast-with-waiting-request=%0d acks-completing=%0d reads=%0d replica-acks=%0d to-host=%0d tx-contention=%0d",
             bcast_waiting, final_acks, mem_reads, replica_acks, to_host, tx_contention);
    check(bcast_waiting > 0, "request waited during a broadcast");
    check(final_acks > 0, "ack completed a write");
    check(mem_reads > 0, "memory read");
    check(replica_acks > 0, "replica write ack");
    check(to_host > 0, "frames filtered to host");
    check(tx_contention > 0, "transmit arbiter contention");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
