// tb_outstanding_table: self-checking test of the outstanding-write table.
//
// With three replicas and a 16-entry table: fills the table (allocation stops when full), then
// sends acknowledgements in random order and checks that a slot completes exactly on its third
// ack with the metadata stored at allocation, that acks to free slots miss, and that freed slots
// are allocated again, lowest first.
module tb_outstanding_table;
  import repl_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 16, NR = 3;
  logic         alloc_valid = 0, alloc_ready;
  meta_t        alloc_meta = '0;
  logic [3:0]   alloc_idx, ack_idx = '0;
  logic         ack_valid = 0;
  logic         rsp_valid, rsp_hit, rsp_done;
  meta_t        rsp_meta;
  logic [4:0]   used;

  outstanding_table #(.TABLE_DEPTH(D), .NUM_REPLICAS(NR)) dut (.*);

  meta_t stored[D];
  int    acks[D];
  bit    busy[D];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int lowest_free();
    for (int i = 0; i < D; i++) if (!busy[i]) return i;
    return -1;
  endfunction

  task automatic alloc();
    meta_t m;
    m = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    @(negedge clk);
    alloc_valid = 1;
    alloc_meta  = m;
    #1;
    check(alloc_ready == (lowest_free() >= 0), "alloc_ready");
    if (alloc_ready) begin
      check(int'(alloc_idx) == lowest_free(), $sformatf("slot %0d, expected %0d", alloc_idx, lowest_free()));
      stored[alloc_idx] = m;
      busy[alloc_idx]   = 1;
      acks[alloc_idx]   = 0;
    end
    @(negedge clk);
    alloc_valid = 0;
  endtask

  task automatic ack(input int i);
    @(negedge clk);
    ack_valid = 1;
    ack_idx   = 4'(i);
    @(negedge clk);
    ack_valid = 0;
    check(rsp_valid, "rsp_valid");
    check(rsp_hit == busy[i], $sformatf("hit slot %0d", i));
    if (busy[i]) begin
      acks[i]++;
      check(rsp_done == (acks[i] == NR), $sformatf("done slot %0d after %0d acks", i, acks[i]));
      check(rsp_meta == stored[i], "metadata");
      if (acks[i] == NR) busy[i] = 0;
    end else check(!rsp_done, "done on a free slot");
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < D + 2; i++) alloc();
    check(used == 5'(D), "table full");
    for (int r = 0; r < 200; r++) begin
      if ($urandom % 4 == 0) alloc();
      else ack($urandom % D);
    end
    begin
      automatic int n = 0;
      foreach (busy[i]) n += busy[i];
      check(int'(used) == n, $sformatf("used %0d vs %0d", used, n));
    end
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
