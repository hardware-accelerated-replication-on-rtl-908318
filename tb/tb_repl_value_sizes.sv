// tb_repl_value_sizes: leader writes and reads with 2 KiB and 4 KiB values.
//
// The value (bucket) size is a parameter of the design; the broadcast buffer, the Datamover byte
// count and the bucket address stride all follow it. This test runs two independent two-node
// systems side by side, one at VALUE_BYTES = 2048 and one at 4096 (repl_pair_check), and adds up
// their results.
module tb_repl_value_sizes;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks [2], failures [2];
  bit done [2];

  repl_pair_check #(.V(2048)) u_2k (.clk, .rst_n, .checks(checks[0]), .failures(failures[0]), .done(done[0]));
  repl_pair_check #(.V(4096)) u_4k (.clk, .rst_n, .checks(checks[1]), .failures(failures[1]), .done(done[1]));

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1]);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end
endmodule
