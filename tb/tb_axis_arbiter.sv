// tb_axis_arbiter: self-checking test of the packet-level two-input arbiter.
//
// Two sources send numbered multi-beat packets with random gaps while the sink applies random
// back-pressure. Checks: frames are never interleaved, each source's frames arrive complete and
// in order with their sideband, and when both sources wait the grant alternates (round robin).
module tb_axis_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0]         s_valid = '0, s_ready, s_last = '0;
  logic [1:0][511:0]  s_data = '0;
  logic [1:0][63:0]   s_keep = '0;
  logic [1:0][7:0]    s_user = '0;
  logic               m_valid, m_ready = 0, m_last;
  logic [511:0]       m_data;
  logic [63:0]        m_keep;
  logic [7:0]         m_user;

  axis_arbiter #(.USER_W(8)) dut (.*);

  localparam int NPKT = 60;
  int next_exp[2] = '{0, 0};
  int beat_exp[2] = '{0, 0};
  int owner = -1, prev_owner = -1, alternations = 0, both_waiting = 0;
  bit stall = 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // packet p of source s has 1 + p % 4 beats; beat b carries {s, p, b} in its data
  task automatic source(input int s);
    for (int p = 0; p < NPKT; p++) begin
      automatic int n = 1 + p % 4;
      for (int b = 0; b < n; b++) begin
        while (stall && $urandom % 5 == 0) begin
          @(negedge clk);
          s_valid[s] = 0;
        end
        @(negedge clk);
        s_valid[s] = 1;
        s_data[s]  = {480'd0, 8'(s), 16'(p), 8'(b)};
        s_keep[s]  = '1;
        s_last[s]  = (b == n - 1);
        s_user[s]  = 8'(p);
        #1;
        while (!s_ready[s]) begin
          @(negedge clk);
          #1;
        end
      end
    end
    @(negedge clk);
    s_valid[s] = 0;
  endtask

  always @(negedge clk) begin
    m_ready = stall ? ($urandom % 4 != 0) : 1'b1;
    #2;
    if (m_valid && m_ready) begin
      automatic int s = int'(m_data[31:24]);
      automatic int p = int'(m_data[23:8]);
      automatic int b = int'(m_data[7:0]);
      if (owner < 0) begin
        owner = s;
        if (s_valid[0] && s_valid[1]) begin
          both_waiting++;
          if (prev_owner >= 0 && s != prev_owner) alternations++;
        end
      end
      check(s == owner, "frames interleaved");
      check(p == next_exp[s] && b == beat_exp[s], $sformatf("order: src %0d pkt %0d beat %0d", s, p, b));
      check(m_user == 8'(p), "sideband");
      check(m_last == (b == p % 4), "tlast");
      beat_exp[s]++;
      if (m_last) begin
        next_exp[s]++;
        beat_exp[s] = 0;
        prev_owner = owner;
        owner = -1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      source(0);
      source(1);
    join
    repeat (20) @(posedge clk);
    check(next_exp[0] == NPKT && next_exp[1] == NPKT, "all packets delivered");
    check(both_waiting > 0 && alternations == both_waiting, $sformatf("round robin %0d of %0d", alternations, both_waiting));
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
