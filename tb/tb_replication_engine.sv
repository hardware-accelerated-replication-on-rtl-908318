// tb_replication_engine: self-checking test of the replication engine with two replicas.
//
// The testbench plays the parser (metadata and values in), the memory controller (a key -> value
// store answering requests after a delay) and the deparser (random back-pressure on tx).
// Sequence: client writes to this node as leader (each is written locally without reply and sent
// as WRITE to both replicas, id = table slot), a read queued while a broadcast is running, replica
// acks (the client's ack must follow the second ack only), a replica-side WRITE (ack to the
// leader after the memory completes), reads (READ_RESULT with the stored bucket), an ack to a free
// slot and a stray READ_RESULT (both dropped). Every tx packet is matched against an expected
// packet: destination, opcode, id, key, length, port class and payload. Also checks that memory
// requests follow the requests in order and the cycle latency request -> memory request and
// memory completion -> first tx beat.
module tb_replication_engine;
  import repl_pkg::*;
  import tb_frames_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NR = 2;
  logic [NR-1:0][47:0] replica_mac = '{48'h02_00_00_00_00_B2, 48'h02_00_00_00_00_B1};
  logic [NR-1:0][31:0] replica_ip  = '{32'h0A00_0003, 32'h0A00_0002};

  logic          rx_meta_valid = 0, rx_meta_ready;
  meta_t         rx_meta = '0;
  logic          rx_valid = 0, rx_ready, rx_last = 0;
  logic [511:0]  rx_data = '0;
  logic [63:0]   rx_keep = '0;
  logic          mem_req_valid, mem_req_ready = 0;
  mem_req_t      mem_req;
  logic          mem_wr_valid, mem_wr_ready = 0, mem_wr_last;
  logic [511:0]  mem_wr_data;
  logic [63:0]   mem_wr_keep;
  logic          mem_cmp_valid = 0, mem_cmp_ready;
  mem_req_t      mem_cmp = '0;
  logic          mem_rd_valid = 0, mem_rd_ready, mem_rd_last = 0;
  logic [511:0]  mem_rd_data = '0;
  logic [63:0]   mem_rd_keep = '0;
  logic          tx_valid, tx_ready = 0, tx_last;
  logic [511:0]  tx_data;
  logic [63:0]   tx_keep;
  tx_meta_t      tx_user;
  logic [8:0]    outstanding;

  replication_engine #(.NUM_REPLICAS(NR)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  typedef struct { tx_meta_t u; bytes_t p; } pkt_t;
  pkt_t     exp_tx[$];
  mem_req_t exp_req[$];
  bytes_t   store [logic [63:0]];
  int       n_tx = 0, bcast_buffered = 0, lat_req = -1, lat_tx = -1;

  function automatic meta_t M(input logic [31:0] ip, input logic [47:0] mac, input opcode_e op,
                              input logic [7:0] id, input logic [63:0] key);
    meta_t m;
    m.ip = ip; m.mac = mac; m.opcode = op; m.id = id; m.key = key;
    return m;
  endfunction

  function automatic void expect_tx(input meta_t m, input bit to_eng, input bytes_t p);
    pkt_t e;
    e.u.meta = m; e.u.to_engine = to_eng; e.u.len = 16'(p.size()); e.p = p;
    exp_tx.push_back(e);
  endfunction

  function automatic bytes_t bucket(input logic [63:0] key);
    bytes_t b;
    for (int i = 0; i < 1024; i++) b.push_back(store.exists(key) && i < store[key].size() ? store[key][i] : 8'h00);
    return b;
  endfunction

  // parser side: metadata then value (a 12-byte padding value when v is empty)
  task automatic request(input meta_t m, input bytes_t v);
    bytes_t p = v.size() ? v : rand_bytes(12);
    int n = nbeats(p.size());
    @(negedge clk);
    rx_meta_valid = 1;
    rx_meta = m;
    #1;
    while (!rx_meta_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    rx_meta_valid = 0;
    for (int b = 0; b < n; b++) begin
      if (b > 0) @(negedge clk);
      rx_valid = 1;
      rx_data  = beat_data(p, b);
      rx_keep  = beat_keep(p, b);
      rx_last  = (b == n - 1);
      #1;
      while (!rx_ready) begin
        @(negedge clk);
        #1;
      end
    end
    @(negedge clk);
    rx_valid = 0;
  endtask

  // memory controller model
  mem_req_t cmp_q[$];
  initial begin : mem_side
    forever begin
      mem_req_t r;
      @(negedge clk);
      mem_req_ready = ($urandom % 2 == 0);
      #1;
      if (mem_req_valid && mem_req_ready) begin
        r = mem_req;
        check(exp_req.size() > 0 && r == exp_req[0], $sformatf("memory request op %0d key %h", r.meta.opcode, r.meta.key));
        if (exp_req.size() > 0) void'(exp_req.pop_front());
        @(negedge clk);
        mem_req_ready = 0;
        if (r.is_write) begin
          bytes_t got;
          bit done;
          got.delete();
          done = 0;
          while (!done) begin
            @(negedge clk);
            mem_wr_ready = ($urandom % 3 != 0);
            #1;
            if (mem_wr_valid && mem_wr_ready) begin
              take_beat(got, mem_wr_data, mem_wr_keep);
              done = mem_wr_last;
            end
          end
          @(negedge clk);
          mem_wr_ready = 0;
          store[r.meta.key] = got;
          repeat (5) @(negedge clk);
        end
        cmp_q.push_back(r);
      end
    end
  end

  initial begin : cmp_side
    forever begin
      @(negedge clk);
      if (cmp_q.size() > 0) begin
        mem_req_t r;
        r = cmp_q.pop_front();
        mem_cmp_valid = 1;
        mem_cmp = r;
        #1;
        while (!mem_cmp_ready) begin
          @(negedge clk);
          #1;
        end
        @(negedge clk);
        mem_cmp_valid = 0;
        if (!r.is_write) begin
          bytes_t b;
          b = bucket(r.meta.key);
          for (int i = 0; i < 16; i++) begin
            if (i > 0) @(negedge clk);
            mem_rd_valid = 1;
            mem_rd_data  = beat_data(b, i);
            mem_rd_keep  = '1;
            mem_rd_last  = (i == 15);
            #1;
            while (!mem_rd_ready) begin
              @(negedge clk);
              #1;
            end
          end
          @(negedge clk);
          mem_rd_valid = 0;
        end
      end
    end
  end

  // deparser side
  bytes_t   cur;
  tx_meta_t cur_u;
  bit       in_pkt = 0;
  always @(negedge clk) begin
    tx_ready = ($urandom % 4 != 0);
    #2;
    if (dut.nst == 4'd7 && dut.mq_valid) bcast_buffered++;
    if (tx_valid && tx_ready) begin
      if (!in_pkt) cur_u = tx_user;
      check(tx_user == cur_u, "sideband constant within a packet");
      in_pkt = 1;
      take_beat(cur, tx_data, tx_keep);
      if (tx_last) begin
        automatic int hit = -1;
        foreach (exp_tx[i])
          if (hit < 0 && exp_tx[i].u == cur_u && same(exp_tx[i].p, cur)) hit = i;
        check(hit >= 0, $sformatf("tx packet op %0d id %0d to %h", cur_u.meta.opcode, cur_u.meta.id, cur_u.meta.ip));
        if (hit >= 0) exp_tx.delete(hit);
        n_tx++;
        cur.delete();
        in_pkt = 0;
      end
    end
  end

  meta_t client = M(32'h0A00_0063, 48'h02_00_00_00_00_C1, OP_WRITE_LEADER, 8'd7, 64'h1111);
  meta_t leader = M(32'h0A00_0002, 48'h02_00_00_00_00_B1, OP_WRITE, 8'd9, 64'h3333);

  function automatic mem_req_t R(input bit w, input bit reply, input meta_t m);
    mem_req_t r;
    r.is_write = w; r.reply = reply; r.err = 0; r.meta = m;
    return r;
  endfunction

  initial begin
    bytes_t v1 = rand_bytes(1024), v2 = rand_bytes(200), v3 = rand_bytes(1024);
    meta_t  m, c2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. client write to leader (slot 0), with a read queued behind it
    exp_req.push_back(R(1, 0, client));
    expect_tx(M(replica_ip[0], replica_mac[0], OP_WRITE, 8'd0, 64'h1111), 1, v1);
    expect_tx(M(replica_ip[1], replica_mac[1], OP_WRITE, 8'd0, 64'h1111), 1, v1);
    fork
      request(client, v1);
      begin
        m = M(32'h0A00_0064, 48'h02_00_00_00_00_C2, OP_READ, 8'd3, 64'h2222);
        repeat (22) @(negedge clk);
        exp_req.push_back(R(0, 1, m));
        expect_tx(M(m.ip, m.mac, OP_READ_RESULT, 8'd3, 64'h2222), 0, bucket(64'h2222));
        request(m, '{});
      end
    join
    // 2. second client write to leader (slot 1), short value
    c2 = M(32'h0A00_0065, 48'h02_00_00_00_00_C3, OP_WRITE_LEADER, 8'd44, 64'h4444);
    exp_req.push_back(R(1, 0, c2));
    expect_tx(M(replica_ip[0], replica_mac[0], OP_WRITE, 8'd1, 64'h4444), 1, v2);
    expect_tx(M(replica_ip[1], replica_mac[1], OP_WRITE, 8'd1, 64'h4444), 1, v2);
    request(c2, v2);
    repeat (60) @(posedge clk);
    check(outstanding == 2, $sformatf("two writes outstanding (%0d)", outstanding));
    // 3. acks: first ack of slot 0 produces nothing, second one acks the client
    request(M(replica_ip[0], replica_mac[0], OP_WRITE_ACK, 8'd0, 64'h1111), '{});
    repeat (30) @(posedge clk);
    check(exp_tx.size() == 0 && n_tx == 5, $sformatf("no ack after one replica (%0d packets)", n_tx));
    expect_tx(M(client.ip, client.mac, OP_WRITE_ACK, 8'd7, 64'h1111), 0, '{});
    request(M(replica_ip[1], replica_mac[1], OP_WRITE_ACK, 8'd0, 64'h1111), '{});
    expect_tx(M(c2.ip, c2.mac, OP_WRITE_ACK, 8'd44, 64'h4444), 0, '{});
    request(M(replica_ip[1], replica_mac[1], OP_WRITE_ACK, 8'd1, 64'h4444), '{});
    request(M(replica_ip[0], replica_mac[0], OP_WRITE_ACK, 8'd1, 64'h4444), '{});
    // 4. ack to a free slot and a stray read result: dropped
    request(M(replica_ip[0], replica_mac[0], OP_WRITE_ACK, 8'd0, 64'h1111), '{});
    request(M(replica_ip[0], replica_mac[0], OP_READ_RESULT, 8'd0, 64'h1111), rand_bytes(1024));
    // 5. replica-side write from a leader: ack after the memory completes
    exp_req.push_back(R(1, 1, leader));
    expect_tx(M(leader.ip, leader.mac, OP_WRITE_ACK, 8'd9, 64'h3333), 1, '{});
    request(leader, v3);
    repeat (60) @(posedge clk);
    // 6. reads of written keys
    m = M(32'h0A00_0064, 48'h02_00_00_00_00_C2, OP_READ, 8'd5, 64'h3333);
    exp_req.push_back(R(0, 1, m));
    expect_tx(M(m.ip, m.mac, OP_READ_RESULT, 8'd5, 64'h3333), 0, v3);
    request(m, '{});
    m = M(32'h0A00_0064, 48'h02_00_00_00_00_C2, OP_READ, 8'd6, 64'h1111);
    exp_req.push_back(R(0, 1, m));
    expect_tx(M(m.ip, m.mac, OP_READ_RESULT, 8'd6, 64'h1111), 0, v1);
    request(m, '{});
    // latency with no stalls: request -> memory request, completion -> first tx beat
    repeat (200) @(posedge clk);
    begin
      automatic int c = 0, t_meta = -1, t_req = -1;
      m = M(32'h0A00_0064, 48'h02_00_00_00_00_C2, OP_READ, 8'd8, 64'h4444);
      exp_req.push_back(R(0, 1, m));
      expect_tx(M(m.ip, m.mac, OP_READ_RESULT, 8'd8, 64'h4444), 0, bucket(64'h4444));
      fork
        request(m, '{});
        while (t_req < 0) begin
          @(negedge clk);
          #3;
          c++;
          if (rx_meta_valid && rx_meta_ready && t_meta < 0) t_meta = c;
          if (mem_req_valid && t_req < 0) t_req = c;
        end
      join
      check(t_req - t_meta <= 3, $sformatf("request to memory request: %0d cycles", t_req - t_meta));
    end
    repeat (300) @(posedge clk);
    check(exp_tx.size() == 0, $sformatf("%0d expected packets missing", exp_tx.size()));
    check(exp_req.size() == 0, "all memory requests seen");
    check(outstanding == 0, "table empty");
    check(bcast_buffered > 0, $sformatf("request buffered during broadcast (%0d cycles)", bcast_buffered));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
