// repl_pair_check: one two-node replication test at a given value size, used by
// tb_repl_value_sizes.
//
// Two repl_nic_top nodes with VALUE_BYTES = V are connected back to back, each with a
// Datamover/HBM model; node A leads the keys and node B is its replica. The client on host B
// writes three keys to leader A; clients on both hosts then read each key back, one from each
// node. Checked byte for byte: the
// client's WRITE_ACK, both memories at hash(key) * V, and each READ_RESULT; every Datamover
// command must ask for V bytes at a multiple of V, so a bucket never crosses a V-byte boundary.
// The payload FIFO is set to one value (V / 64 beats). Results: checks and failures counted here,
// done raised at the end.
module repl_pair_check
  import repl_pkg::*;
  import tb_frames_pkg::*;
#(
  parameter int V = 2048
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   done
);
  initial begin
    checks   = 0;
    failures = 0;
    done     = 0;
  end
  localparam logic [47:0] NIC_MAC [2] = '{48'h02_00_00_00_00_A1, 48'h02_00_00_00_00_B1};
  localparam logic [31:0] NIC_IP  [2] = '{32'h0A00_0001, 32'h0A00_0002};
  localparam logic [47:0] HOST_MAC[2] = '{48'h02_00_00_00_00_A2, 48'h02_00_00_00_00_B2};
  localparam logic [31:0] HOST_IP [2] = '{32'h0A00_0101, 32'h0A00_0102};

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

  // a client on host h talks to the NIC of the other node, across the link
  function automatic bytes_t request(input int h, input opcode_e op, input logic [7:0] id,
                                     input logic [63:0] key, input bytes_t v);
    return repl_frame(NIC_MAC[1 - h], HOST_MAC[h], HOST_IP[h], NIC_IP[1 - h], CLIENT_PORT, REPL_PORT,
                      op, id, key, v);
  endfunction
  function automatic bytes_t response(input int h, input opcode_e op, input logic [7:0] id,
                                      input logic [63:0] key, input bytes_t v);
    return repl_frame(HOST_MAC[h], NIC_MAC[1 - h], NIC_IP[1 - h], HOST_IP[h], REPL_PORT, CLIENT_PORT,
                      op, id, key, v);
  endfunction

  // link[n]: frames transmitted by node n, received by the other node
  logic         link_valid[2], link_ready[2], link_last[2];
  logic [511:0] link_data[2];
  logic [63:0]  link_keep[2];
  logic         h2c_valid[2], h2c_ready[2], h2c_last[2];
  logic [511:0] h2c_data[2];
  logic [63:0]  h2c_keep[2];
  logic         c2h_valid[2], c2h_ready[2], c2h_last[2];
  logic [511:0] c2h_data[2];
  logic [63:0]  c2h_keep[2];
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

  for (genvar n = 0; n < 2; n++) begin : g_node
    repl_nic_top #(.VALUE_BYTES(V), .PAYLOAD_FIFO_DEPTH(V / 64)) nic (
      .clk, .rst_n, .local_mac(NIC_MAC[n]), .local_ip(NIC_IP[n]),
      .replica_mac(NIC_MAC[1 - n]), .replica_ip(NIC_IP[1 - n]),
      .cmac_rx_valid(link_valid[1 - n]), .cmac_rx_ready(link_ready[1 - n]),
      .cmac_rx_data(link_data[1 - n]), .cmac_rx_keep(link_keep[1 - n]),
      .cmac_rx_last(link_last[1 - n]),
      .cmac_tx_valid(link_valid[n]), .cmac_tx_ready(link_ready[n]),
      .cmac_tx_data(link_data[n]), .cmac_tx_keep(link_keep[n]),
      .cmac_tx_last(link_last[n]),
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
    dm_hbm_model hbm (
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

  // every Datamover command: byte count and alignment
  int bad_cmds = 0, cmds = 0;
  always @(negedge clk) begin
    #3;
    for (int n = 0; n < 2; n++) begin
      if (s2mm_cmd_valid[n] && s2mm_cmd_ready[n]) begin
        cmds++;
        if (s2mm_cmd[n][22:0] != 23'(V) || s2mm_cmd[n][32 +: 64] % V != 0) bad_cmds++;
      end
      if (mm2s_cmd_valid[n] && mm2s_cmd_ready[n]) begin
        cmds++;
        if (mm2s_cmd[n][22:0] != 23'(V) || mm2s_cmd[n][32 +: 64] % V != 0) bad_cmds++;
      end
    end
  end

  bytes_t c2h_q[2][$];
  bytes_t c2h_cur[2];
  always @(negedge clk) begin
    #2;
    for (int h = 0; h < 2; h++)
      if (c2h_valid[h] && c2h_ready[h]) begin
        take_beat(c2h_cur[h], c2h_data[h], c2h_keep[h]);
        if (c2h_last[h]) begin
          c2h_q[h].push_back(c2h_cur[h]);
          c2h_cur[h].delete();
        end
      end
  end

  task automatic host_send(input int h, input bytes_t f);
    int nb = nbeats(f.size());
    for (int b = 0; b < nb; b++) begin
      @(negedge clk);
      h2c_valid[h] = 1;
      h2c_data[h]  = beat_data(f, b);
      h2c_keep[h]  = beat_keep(f, b);
      h2c_last[h]  = (b == nb - 1);
      #1;
      while (!h2c_ready[h]) begin
        @(negedge clk);
        #1;
      end
    end
    @(negedge clk);
    h2c_valid[h] = 0;
  endtask

  task automatic wait_frames(input int h, input int count, input int limit);
    int t = 0;
    while (c2h_q[h].size() < count && t < limit) begin
      @(posedge clk);
      t++;
    end
  endtask

  function automatic bit got_frame(input int h, input bytes_t f);
    foreach (c2h_q[h][i])
      if (same(c2h_q[h][i], f)) begin
        c2h_q[h].delete(i);
        return 1;
      end
    return 0;
  endfunction

  function automatic byte unsigned peek(input int n, input longint unsigned a);
    if (n == 0) return g_node[0].hbm.peek(a);
    return g_node[1].hbm.peek(a);
  endfunction

  function automatic bit mem_holds(input int n, input logic [63:0] key, input bytes_t v);
    longint unsigned base = longint'(ref_hash(key)) * longint'(V);
    foreach (v[i])
      if (peek(n, base + i) != v[i]) return 0;
    return 1;
  endfunction

  initial begin
    bytes_t v[3];
    logic [63:0] key[3];
    for (int i = 0; i < 3; i++) begin
      v[i]   = rand_bytes(V);
      key[i] = {$urandom, $urandom};
    end
    @(posedge rst_n);
    repeat (5) @(posedge clk);
    for (int i = 0; i < 3; i++) host_send(1, request(1, OP_WRITE_LEADER, 8'(i), key[i], v[i]));
    wait_frames(1, 3, 20000);
    for (int i = 0; i < 3; i++)
      check(got_frame(1, response(1, OP_WRITE_ACK, 8'(i), key[i], '{})),
            $sformatf("%0d B: write ack %0d", V, i));
    repeat (300) @(posedge clk);
    for (int i = 0; i < 3; i++)
      for (int n = 0; n < 2; n++)
        check(mem_holds(n, key[i], v[i]), $sformatf("%0d B: node %0d holds key %0d", V, n, i));
    // host h reads from node 1 - h: node A (leader) from host B, node B (replica) from host A
    for (int h = 0; h < 2; h++)
      for (int i = 0; i < 3; i++) begin
        host_send(h, request(h, OP_READ, 8'(16 + i), key[i], '{}));
        wait_frames(h, 1, 5000);
        check(got_frame(h, response(h, OP_READ_RESULT, 8'(16 + i), key[i], v[i])),
              $sformatf("%0d B: read of key %0d at node %0d", V, i, 1 - h));
      end
    repeat (50) @(posedge clk);
    check(c2h_q[0].size() == 0 && c2h_q[1].size() == 0, $sformatf("%0d B: no unexpected frames", V));
    check(cmds >= 12 && bad_cmds == 0, $sformatf("%0d B: %0d commands, %0d wrong", V, cmds, bad_cmds));
    check(outstanding[0] == 0 && !rd_err[0] && !rd_err[1], $sformatf("%0d B: clean finish", V));
    done = 1;
  end
endmodule
