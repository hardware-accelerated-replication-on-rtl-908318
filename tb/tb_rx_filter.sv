// tb_rx_filter: self-checking test of the receive-side filter.
//
// Drives frames marked for the engine or for the host, with independent random back-pressure on
// the two outputs, and checks that every frame arrives whole, in order, at the right output only.
module tb_rx_filter;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         s_valid = 0, s_ready, s_last = 0, s_dest = 0;
  logic [511:0] s_data = '0;
  logic [63:0]  s_keep = '0;
  logic         m_eng_valid, m_eng_ready = 0, m_eng_last;
  logic [511:0] m_eng_data;
  logic [63:0]  m_eng_keep;
  logic         m_qdma_valid, m_qdma_ready = 0, m_qdma_last;
  logic [511:0] m_qdma_data;
  logic [63:0]  m_qdma_keep;

  rx_filter dut (.*);

  int exp_eng[$], exp_qdma[$];   // beat tags in order
  int n_eng = 0, n_qdma = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(negedge clk) begin
    m_eng_ready  = ($urandom % 3 != 0);
    m_qdma_ready = ($urandom % 3 != 0);
    #2;
    if (m_eng_valid && m_eng_ready) begin
      check(exp_eng.size() > 0 && int'(m_eng_data[31:0]) == exp_eng[0] && m_eng_keep == 64'(m_eng_data[31:0]), "engine beat");
      if (exp_eng.size() > 0) void'(exp_eng.pop_front());
      n_eng++;
    end
    if (m_qdma_valid && m_qdma_ready) begin
      check(exp_qdma.size() > 0 && int'(m_qdma_data[31:0]) == exp_qdma[0] && m_qdma_keep == 64'(m_qdma_data[31:0]), "host beat");
      if (exp_qdma.size() > 0) void'(exp_qdma.pop_front());
      n_qdma++;
    end
    check(!(m_eng_valid && m_qdma_valid), "both outputs valid");
  end

  initial begin
    automatic int tag = 1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < 100; f++) begin
      automatic bit d = 1'($urandom);
      automatic int n = 1 + $urandom % 5;
      for (int b = 0; b < n; b++) begin
        @(negedge clk);
        s_valid = 1;
        s_dest  = d;
        s_data  = 512'(tag);
        s_keep  = 64'(tag);
        s_last  = (b == n - 1);
        if (d) exp_eng.push_back(tag); else exp_qdma.push_back(tag);
        tag++;
        #1;
        while (!s_ready) begin
          @(negedge clk);
          #1;
        end
      end
    end
    @(negedge clk);
    s_valid = 0;
    repeat (10) @(posedge clk);
    check(exp_eng.size() == 0 && exp_qdma.size() == 0 && n_eng > 0 && n_qdma > 0, "all beats delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
