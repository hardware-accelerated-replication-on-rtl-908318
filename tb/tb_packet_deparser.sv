// tb_packet_deparser: self-checking test of the transmit-side frame builder.
//
// Feeds payloads of 0 to 1024 bytes with random destination metadata, random gaps and random
// back-pressure, and compares every emitted frame byte for byte with a frame built by the
// testbench's own reference (Ethernet, IPv4 with checksum, UDP, replication header, zero padding
// to 64 bytes). A final phase without stalls checks one beat per cycle and a one-cycle latency.
module tb_packet_deparser;
  import repl_pkg::*;
  import tb_frames_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [47:0]  local_mac = 48'h02_AA_BB_CC_DD_01;
  logic [31:0]  local_ip  = 32'hC0A8_0001;
  logic         s_valid = 0, s_ready, s_last = 0;
  logic [511:0] s_data = '0;
  logic [63:0]  s_keep = '0;
  tx_meta_t     s_user = '0;
  logic         m_valid, m_ready = 0, m_last;
  logic [511:0] m_data;
  logic [63:0]  m_keep;

  packet_deparser #(.REPL_UDP_PORT(REPL_PORT), .CLIENT_UDP_PORT(CLIENT_PORT)) dut (.*);

  bytes_t exp_q[$];
  bit     stall = 1;
  int     nframes = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(input bytes_t v, input tx_meta_t u);
    int n = (v.size() == 0) ? 1 : nbeats(v.size());
    for (int b = 0; b < n; b++) begin
      while (stall && $urandom % 4 == 0) begin
        @(negedge clk);
        s_valid = 0;
      end
      @(negedge clk);
      s_valid = 1;
      s_data  = beat_data(v, b) | (v.size() == 0 ? {16{32'hDEADBEEF}} : '0);  // junk outside keep
      s_keep  = beat_keep(v, b);
      s_last  = (b == n - 1);
      s_user  = u;
      #1;
      while (!s_ready) begin
        @(negedge clk);
        #1;
      end
    end
  endtask

  bytes_t cur;
  always @(negedge clk) begin
    m_ready = stall ? ($urandom % 3 != 0) : 1'b1;
    #1;
    if (m_valid && m_ready) begin
      take_beat(cur, m_data, m_keep);
      if (m_last) begin
        nframes++;
        if (exp_q.size() == 0) check(0, "unexpected frame");
        else begin
          check(same(exp_q[0], cur), $sformatf("frame %0d: %0d vs %0d bytes", nframes, cur.size(), exp_q[0].size()));
          void'(exp_q.pop_front());
        end
        cur.delete();
      end
    end
  end

  task automatic one(input int vlen);
    tx_meta_t u;
    bytes_t v = rand_bytes(vlen);
    u.len = 16'(vlen);
    u.to_engine = 1'($urandom);
    u.meta.ip = $urandom;
    u.meta.mac = {$urandom, $urandom};
    u.meta.opcode = 8'($urandom % 5 + 1);
    u.meta.id = 8'($urandom);
    u.meta.key = {$urandom, $urandom};
    exp_q.push_back(repl_frame(u.meta.mac, local_mac, local_ip, u.meta.ip, REPL_PORT,
                               u.to_engine ? REPL_PORT : CLIENT_PORT, u.meta.opcode, u.meta.id,
                               u.meta.key, v));
    send(v, u);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 80; i++) begin
      automatic int r = $urandom % 5;
      one(r == 0 ? 0 : r == 1 ? int'($urandom % 13) : r == 2 ? 1024 : int'($urandom % 400));
    end
    @(negedge clk);
    s_valid = 0;
    while (exp_q.size() != 0) @(posedge clk);
    stall = 0;
    repeat (3) @(posedge clk);
    fork
      begin
        for (int i = 0; i < 3; i++) one(1024);
        @(negedge clk);
        s_valid = 0;
      end
      begin : rate
        automatic int cyc = 0, first = -1, lastc = -1, nin = 0, nout = 0, first_out = -1;
        while (nout < 3 * 17) begin
          @(negedge clk);
          #2;
          cyc++;
          if (s_valid && s_ready) begin
            if (first < 0) first = cyc;
            nin++;
          end
          if (m_valid && m_ready) begin
            if (first_out < 0) first_out = cyc;
            lastc = cyc;
            nout++;
          end
        end
        // 3 values of 1024 B = 48 beats in, 3 frames of 1076 B = 51 beats out
        check(nin == 48, $sformatf("beats in %0d", nin));
        check(lastc - first_out + 1 == 51, $sformatf("line rate: 51 beats out in %0d cycles", lastc - first_out + 1));
        check(first_out - first == 1, $sformatf("latency %0d cycles", first_out - first));
      end
    join
    repeat (10) @(posedge clk);
    check(exp_q.size() == 0, "all frames received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
