// tb_packet_parser: self-checking test of the receive-side parser.
//
// Sends replication frames (values of 0 to 1024 bytes) and non-replication frames (other UDP port,
// other EtherType, other IP protocol, IP options) with random gaps and random back-pressure on both
// outputs. Expected metadata and output bytes are computed from the frames by the testbench.
// A final phase streams 1024-byte values without stalls and checks that one beat is accepted every
// cycle (line rate) and that the first payload beat leaves within 2 cycles.
module tb_packet_parser;
  import repl_pkg::*;
  import tb_frames_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          s_valid = 0, s_ready, s_last = 0;
  logic [511:0]  s_data = '0;
  logic [63:0]   s_keep = '0;
  logic          m_valid, m_ready = 0, m_last, m_dest;
  logic [511:0]  m_data;
  logic [63:0]   m_keep;
  logic          meta_valid, meta_ready = 0;
  meta_t         meta;

  packet_parser #(.REPL_UDP_PORT(REPL_PORT)) dut (.*);

  typedef struct { bit dest; bytes_t data; } exp_t;
  exp_t  exp_q[$];
  meta_t exp_meta[$];
  bit    stall = 1;
  int    pkts_out = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(input bytes_t f);
    int n = nbeats(f.size());
    // inputs change at the falling edge; a beat is taken at the rising edge if ready was high
    for (int b = 0; b < n; b++) begin
      while (stall && $urandom % 4 == 0) begin
        @(negedge clk);
        s_valid = 0;
      end
      @(negedge clk);
      s_valid = 1;
      s_data  = beat_data(f, b);
      s_keep  = beat_keep(f, b);
      s_last  = (b == n - 1);
      #1;
      while (!s_ready) begin
        @(negedge clk);
        #1;
      end
    end
  endtask

  task automatic idle();
    @(negedge clk);
    s_valid = 0;
  endtask

  // receivers
  bytes_t cur;
  bit     cur_dest;
  always @(negedge clk) begin
    m_ready    = stall ? ($urandom % 3 != 0) : 1'b1;
    meta_ready = stall ? ($urandom % 3 != 0) : 1'b1;
    #1;
    if (meta_valid && meta_ready) begin
      check(exp_meta.size() > 0 && meta == exp_meta[0], "metadata");
      if (exp_meta.size() > 0) void'(exp_meta.pop_front());
    end
    if (m_valid && m_ready) begin
      cur_dest = m_dest;
      take_beat(cur, m_data, m_keep);
      if (m_last) begin
        pkts_out++;
        if (exp_q.size() == 0) check(0, "unexpected frame");
        else begin
          check(exp_q[0].dest == cur_dest, $sformatf("dest of frame %0d", pkts_out));
          check(same(exp_q[0].data, cur), $sformatf("bytes of frame %0d (%0d vs %0d bytes)",
                pkts_out, cur.size(), exp_q[0].data.size()));
          void'(exp_q.pop_front());
        end
        cur.delete();
      end
    end
  end

  function automatic meta_t mk_meta(input logic [31:0] ip, input logic [47:0] mac,
                                    input logic [7:0] op, input logic [7:0] id, input logic [63:0] key);
    meta_t m;
    m.ip = ip; m.mac = mac; m.opcode = op; m.id = id; m.key = key;
    return m;
  endfunction

  task automatic one_frame(input int kind, input int vlen);
    logic [47:0] smac = {$urandom, $urandom};
    logic [31:0] sip  = $urandom;
    logic [7:0]  op   = 8'($urandom % 5 + 1), id = 8'($urandom);
    logic [63:0] key  = {$urandom, $urandom};
    bytes_t v = rand_bytes(vlen);
    bytes_t f = repl_frame(48'h02_00_00_00_00_01, smac, sip, 32'h0A000001, 16'd5555,
                           kind == 1 ? 16'd53 : REPL_PORT, op, id, key, v);
    exp_t e;
    if (kind == 2) f[12] = 8'h86;          // IPv6 EtherType
    if (kind == 3) f[23] = 8'd6;           // TCP
    if (kind == 4) f[14] = 8'h46;          // IP options
    if (kind == 0) begin
      exp_meta.push_back(mk_meta(sip, smac, op, id, key));
      e.dest = 1;
      e.data = f[52:$];
    end else begin
      e.dest = 0;
      e.data = f;
    end
    exp_q.push_back(e);
    send(f);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 80; i++) begin
      automatic int kind = ($urandom % 3 == 0) ? int'($urandom % 4 + 1) : 0;
      automatic int r = $urandom % 6;
      automatic int vlen = r == 0 ? int'($urandom % 13) : r == 1 ? 1024 : int'($urandom % 300);
      one_frame(kind, vlen);
    end
    idle();
    // line rate phase
    while (exp_q.size() != 0) @(posedge clk);
    stall = 0;
    repeat (4) @(posedge clk);
    fork
      begin
        for (int i = 0; i < 4; i++) one_frame(0, 1024);
        idle();
      end
      begin : rate
        automatic int first = -1, last = -1, nacc = 0, cyc = 0, first_out = -1;
        while (nacc < 4 * 17) begin
          @(negedge clk);
          #2;
          cyc++;
          if (s_valid && s_ready) begin
            if (first < 0) first = cyc;
            last = cyc;
            nacc++;
          end
          if (m_valid && m_ready && first_out < 0) first_out = cyc;
        end
        check(last - first + 1 == 4 * 17, $sformatf("line rate: %0d beats in %0d cycles", nacc, last - first + 1));
        check(first_out >= 0 && first_out - first <= 2, $sformatf("first payload beat after %0d cycles", first_out - first));
      end
    join
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0 && exp_meta.size() == 0, "all frames and metadata received");
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
