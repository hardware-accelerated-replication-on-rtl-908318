// tb_repl_three_nodes: three replication NICs behind an Ethernet switch, two replicas per leader.
//
// Each node runs repl_nic_top with NUM_REPLICAS = 2 and its own Datamover/HBM model. A small
// switch model in the testbench collects every frame a node transmits and delivers it, whole and
// in order, to the node that owns its destination MAC (a NIC, or the host behind that NIC). Each
// node leads one key and has the other two as replicas. All clients run on the host of node 2,
// so node 2 is at once a client's NIC, a leader and a replica.
// Checked: every leader write is acknowledged to the client with its own id only after both
// replicas acked, all three memories hold the value, and reads from every node return it.
// Mechanisms counted (each must occur): an ack that leaves a write still waiting for another
// replica, an ack that completes a write, a broadcast with a request waiting.
module tb_repl_three_nodes;
  import repl_pkg::*;
  import tb_frames_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic logic [47:0] nic_mac(input int n);  return 48'h02_00_00_00_01_00 + 48'(n); endfunction
  function automatic logic [31:0] nic_ip(input int n);   return 32'h0A00_0010 + 32'(n);         endfunction
  function automatic logic [47:0] host_mac(input int n); return 48'h02_00_00_00_02_00 + 48'(n); endfunction
  function automatic logic [31:0] host_ip(input int n);  return 32'h0A00_0110 + 32'(n);         endfunction

  logic         rx_valid[N], rx_ready[N], rx_last[N], tx_valid[N], tx_ready[N], tx_last[N];
  logic [511:0] rx_data[N], tx_data[N];
  logic [63:0]  rx_keep[N], tx_keep[N];
  logic         h2c_valid[N], h2c_ready[N], h2c_last[N];
  logic [511:0] h2c_data[N];
  logic [63:0]  h2c_keep[N];
  logic         c2h_valid[N], c2h_ready[N], c2h_last[N];
  logic [511:0] c2h_data[N];
  logic [63:0]  c2h_keep[N];
  logic         s2mm_cmd_valid[N], s2mm_cmd_ready[N], s2mm_valid[N], s2mm_ready[N], s2mm_last[N];
  logic [111:0] s2mm_cmd[N], mm2s_cmd[N];
  logic [511:0] s2mm_data[N], mm2s_data[N];
  logic [63:0]  s2mm_keep[N], mm2s_keep[N];
  logic         s2mm_sts_valid[N], s2mm_sts_ready[N], mm2s_cmd_valid[N], mm2s_cmd_ready[N];
  logic         mm2s_valid[N], mm2s_ready[N], mm2s_last[N], mm2s_sts_valid[N], mm2s_sts_ready[N];
  logic [7:0]   s2mm_sts[N], mm2s_sts[N];
  logic [8:0]   outstanding[N];
  logic         rd_err[N];

  initial for (int n = 0; n < N; n++) begin
    rx_valid[n] = 0; rx_last[n] = 0; rx_data[n] = '0; rx_keep[n] = '0; tx_ready[n] = 1;
    h2c_valid[n] = 0; h2c_last[n] = 0; h2c_data[n] = '0; h2c_keep[n] = '0; c2h_ready[n] = 1;
  end

  for (genvar n = 0; n < N; n++) begin : g_node
    logic [1:0][47:0] rmac;
    logic [1:0][31:0] rip;
    assign rmac = {nic_mac((n + 2) % N), nic_mac((n + 1) % N)};
    assign rip  = {nic_ip((n + 2) % N),  nic_ip((n + 1) % N)};
    repl_nic_top #(.NUM_REPLICAS(2)) nic (
      .clk, .rst_n, .local_mac(nic_mac(n)), .local_ip(nic_ip(n)),
      .replica_mac(rmac), .replica_ip(rip),
      .cmac_rx_valid(rx_valid[n]), .cmac_rx_ready(rx_ready[n]), .cmac_rx_data(rx_data[n]),
      .cmac_rx_keep(rx_keep[n]), .cmac_rx_last(rx_last[n]),
      .cmac_tx_valid(tx_valid[n]), .cmac_tx_ready(tx_ready[n]), .cmac_tx_data(tx_data[n]),
      .cmac_tx_keep(tx_keep[n]), .cmac_tx_last(tx_last[n]),
      .qdma_c2h_valid(c2h_valid[n]), .qdma_c2h_ready(c2h_ready[n]), .qdma_c2h_data(c2h_data[n]),
      .qdma_c2h_keep(c2h_keep[n]), .qdma_c2h_last(c2h_last[n]),
      .qdma_h2c_valid(h2c_valid[n]), .qdma_h2c_ready(h2c_ready[n]), .qdma_h2c_data(h2c_data[n]),
      .qdma_h2c_keep(h2c_keep[n]), .qdma_h2c_last(h2c_last[n]),
      .s2mm_cmd_valid(s2mm_cmd_valid[n]), .s2mm_cmd_ready(s2mm_cmd_ready[n]), .s2mm_cmd(s2mm_cmd[n]),
      .s2mm_valid(s2mm_valid[n]), .s2mm_ready(s2mm_ready[n]), .s2mm_data(s2mm_data[n]),
      .s2mm_keep(s2mm_keep[n]), .s2mm_last(s2mm_last[n]),
      .s2mm_sts_valid(s2mm_sts_valid[n]), .s2mm_sts_ready(s2mm_sts_ready[n]), .s2mm_sts(s2mm_sts[n]),
      .mm2s_cmd_valid(mm2s_cmd_valid[n]), .mm2s_cmd_ready(mm2s_cmd_ready[n]), .mm2s_cmd(mm2s_cmd[n]),
      .mm2s_valid(mm2s_valid[n]), .mm2s_ready(mm2s_ready[n]), .mm2s_data(mm2s_data[n]),
      .mm2s_keep(mm2s_keep[n]), .mm2s_last(mm2s_last[n]),
      .mm2s_sts_valid(mm2s_sts_valid[n]), .mm2s_sts_ready(mm2s_sts_ready[n]), .mm2s_sts(mm2s_sts[n]),
      .outstanding_writes(outstanding[n]), .mem_read_error(rd_err[n]));
    // replica n+1 gets a slower memory than replica n+2, so the two acks arrive apart
    dm_hbm_model #(.WR_LAT(20 + 25 * n), .RD_LAT(40)) hbm (
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

  function automatic byte unsigned peek(input int n, input longint unsigned a);
    case (n)
      0:       return g_node[0].hbm.peek(a);
      1:       return g_node[1].hbm.peek(a);
      default: return g_node[2].hbm.peek(a);
    endcase
  endfunction

  function automatic bit mem_holds(input int n, input logic [63:0] key, input bytes_t v);
    longint unsigned base = longint'(ref_hash(key)) * 1024;
    foreach (v[i]) if (peek(n, base + i) != v[i]) return 0;
    return 1;
  endfunction

  // ---------------- switch ----------------
  bytes_t sw_q[N][$];     // frames waiting for output port n
  bytes_t tx_cur[N];
  int     unknown_dst = 0;

  function automatic int port_of(input bytes_t f);
    logic [47:0] d = {f[0], f[1], f[2], f[3], f[4], f[5]};
    for (int n = 0; n < N; n++) if (d == nic_mac(n) || d == host_mac(n)) return n;
    return -1;
  endfunction

  always @(negedge clk) begin
    #2;
    for (int n = 0; n < N; n++)
      if (tx_valid[n] && tx_ready[n]) begin
        take_beat(tx_cur[n], tx_data[n], tx_keep[n]);
        if (tx_last[n]) begin
          automatic int p = port_of(tx_cur[n]);
          if (p < 0) unknown_dst++;
          else sw_q[p].push_back(tx_cur[n]);
          tx_cur[n].delete();
        end
      end
  end

  for (genvar n = 0; n < N; n++) begin : g_port
    initial begin
      bytes_t f;
      int nb;
      forever begin
        @(negedge clk);
        if (sw_q[n].size() > 0) begin
          f  = sw_q[n].pop_front();
          nb = nbeats(f.size());
          for (int b = 0; b < nb; b++) begin
            if (b > 0) @(negedge clk);
            rx_valid[n] = 1;
            rx_data[n]  = beat_data(f, b);
            rx_keep[n]  = beat_keep(f, b);
            rx_last[n]  = (b == nb - 1);
            #1;
            while (!rx_ready[n]) begin
              @(negedge clk);
              #1;
            end
          end
          @(negedge clk);
          rx_valid[n] = 0;
        end
      end
    end
  end

  // ---------------- host of node 2 ----------------
  bytes_t c2h_q[$];
  bytes_t c2h_cur;
  always @(negedge clk) begin
    #2;
    if (c2h_valid[2] && c2h_ready[2]) begin
      take_beat(c2h_cur, c2h_data[2], c2h_keep[2]);
      if (c2h_last[2]) begin
        c2h_q.push_back(c2h_cur);
        c2h_cur.delete();
      end
    end
  end

  task automatic host_send(input bytes_t f);
    int nb = nbeats(f.size());
    for (int b = 0; b < nb; b++) begin
      @(negedge clk);
      h2c_valid[2] = 1;
      h2c_data[2]  = beat_data(f, b);
      h2c_keep[2]  = beat_keep(f, b);
      h2c_last[2]  = (b == nb - 1);
      #1;
      while (!h2c_ready[2]) begin
        @(negedge clk);
        #1;
      end
    end
    @(negedge clk);
    h2c_valid[2] = 0;
  endtask

  function automatic bytes_t request(input int n, input opcode_e op, input logic [7:0] id,
                                     input logic [63:0] key, input bytes_t v);
    return repl_frame(nic_mac(n), host_mac(2), host_ip(2), nic_ip(n), CLIENT_PORT, REPL_PORT,
                      op, id, key, v);
  endfunction
  function automatic bytes_t response(input int n, input opcode_e op, input logic [7:0] id,
                                      input logic [63:0] key, input bytes_t v);
    return repl_frame(host_mac(2), nic_mac(n), nic_ip(n), host_ip(2), REPL_PORT, CLIENT_PORT,
                      op, id, key, v);
  endfunction

  task automatic wait_frames(input int count, input int limit);
    int t = 0;
    while (c2h_q.size() < count && t < limit) begin
      @(posedge clk);
      t++;
    end
  endtask

  function automatic bit got_frame(input bytes_t f);
    foreach (c2h_q[i])
      if (same(c2h_q[i], f)) begin
        c2h_q.delete(i);
        return 1;
      end
    return 0;
  endfunction

  // ---------------- mechanism counters ----------------
  int partial_acks = 0, final_acks = 0, bcast_waiting = 0;
  always @(negedge clk) begin
    #3;
    if (rst_n) begin
      if (g_node[0].nic.u_engine.u_table.rsp_hit && !g_node[0].nic.u_engine.u_table.rsp_done) partial_acks++;
      if (g_node[1].nic.u_engine.u_table.rsp_hit && !g_node[1].nic.u_engine.u_table.rsp_done) partial_acks++;
      if (g_node[2].nic.u_engine.u_table.rsp_hit && !g_node[2].nic.u_engine.u_table.rsp_done) partial_acks++;
      if (g_node[0].nic.u_engine.u_table.rsp_done) final_acks++;
      if (g_node[1].nic.u_engine.u_table.rsp_done) final_acks++;
      if (g_node[2].nic.u_engine.u_table.rsp_done) final_acks++;
      if (g_node[0].nic.u_engine.nst == 4'd7 && g_node[0].nic.u_engine.mq_valid) bcast_waiting++;
      if (g_node[1].nic.u_engine.nst == 4'd7 && g_node[1].nic.u_engine.mq_valid) bcast_waiting++;
      if (g_node[2].nic.u_engine.nst == 4'd7 && g_node[2].nic.u_engine.mq_valid) bcast_waiting++;
    end
  end

  initial begin
    bytes_t v[6];
    logic [63:0] key[6];
    for (int i = 0; i < 6; i++) begin
      v[i]   = rand_bytes(1024);
      key[i] = {$urandom, $urandom};
    end
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // key i is led by node i % 3; the six writes are sent back to back
    for (int i = 0; i < 6; i++) host_send(request(i % N, OP_WRITE_LEADER, 8'(50 + i), key[i], v[i]));
    wait_frames(6, 20000);
    for (int i = 0; i < 6; i++)
      check(got_frame(response(i % N, OP_WRITE_ACK, 8'(50 + i), key[i], '{})),
            $sformatf("write ack for key %0d from leader %0d", i, i % N));
    repeat (200) @(posedge clk);
    for (int i = 0; i < 6; i++)
      for (int n = 0; n < N; n++)
        check(mem_holds(n, key[i], v[i]), $sformatf("node %0d holds key %0d", n, i));

    // every node serves reads of every key
    for (int n = 0; n < N; n++)
      for (int i = 0; i < 6; i += 2) begin
        host_send(request(n, OP_READ, 8'(n * 16 + i), key[i], '{}));
        wait_frames(1, 3000);
        check(got_frame(response(n, OP_READ_RESULT, 8'(n * 16 + i), key[i], v[i])),
              $sformatf("read of key %0d at node %0d", i, n));
      end

    repeat (50) @(posedge clk);
    check(c2h_q.size() == 0, "no unexpected frames at the host");
    check(unknown_dst == 0, "every frame addressed to a known station");
    for (int n = 0; n < N; n++) begin
      check(outstanding[n] == 0, $sformatf("node %0d has no write outstanding", n));
      check(!rd_err[n], $sformatf("node %0d memory error", n));
    end
    $display("mechanisms: partial-acks=%0d completing-acks=%0d broadcast-with-waiting-request=%0d",
             partial_acks, final_acks, bcast_waiting);
    check(partial_acks > 0, "an ack left a write waiting for another replica");
    check(final_acks > 0, "an ack completed a write");
    check(bcast_waiting > 0, "a request waited during a broadcast");
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
