// tb_memory_controller: self-checking test of the memory controller against a Datamover/HBM model.
//
// Writes values (full 1 KiB buckets and shorter ones) for random keys, then mixes reads of those
// keys with writes of new keys, with random stalls in the memory model and at the engine side.
// Checks every Datamover command word field by field (BTT, Type, EOF, DSA, DRR, address =
// hash(key) * 1024, tag sequence, reserved bits), that each completion echoes its request's
// metadata in order, and that read data returns what was written (zero beyond a short value).
module tb_memory_controller;
  import repl_pkg::*;
  import tb_frames_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          mem_req_valid = 0, mem_req_ready;
  mem_req_t      mem_req = '0;
  logic          mem_wr_valid = 0, mem_wr_ready, mem_wr_last = 0;
  logic [511:0]  mem_wr_data = '0;
  logic [63:0]   mem_wr_keep = '0;
  logic          mem_cmp_valid, mem_cmp_ready = 0;
  mem_req_t      mem_cmp;
  logic          mem_rd_valid, mem_rd_ready = 0, mem_rd_last;
  logic [511:0]  mem_rd_data;
  logic [63:0]   mem_rd_keep;
  logic          s2mm_cmd_valid, s2mm_cmd_ready, s2mm_valid, s2mm_ready, s2mm_last;
  logic [111:0]  s2mm_cmd, mm2s_cmd;
  logic [511:0]  s2mm_data, mm2s_data;
  logic [63:0]   s2mm_keep, mm2s_keep;
  logic          s2mm_sts_valid, s2mm_sts_ready, mm2s_cmd_valid, mm2s_cmd_ready;
  logic          mm2s_valid, mm2s_ready, mm2s_last, mm2s_sts_valid, mm2s_sts_ready, rd_err;
  logic [7:0]    s2mm_sts, mm2s_sts;

  memory_controller dut (.*);
  dm_hbm_model #(.WR_LAT(12), .RD_LAT(25), .STALL(1)) hbm (.*);

  function automatic logic [23:0] ref_hash(input logic [63:0] k);
    logic [23:0] f = k[23:0] ^ k[47:24] ^ {8'h00, k[63:48]};
    logic [47:0] p = 48'(f) * 48'h3779B1;
    return p[23:0];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bytes_t    store [logic [63:0]];    // key -> bucket contents (1024 bytes)
  mem_req_t  exp_w[$], exp_r[$];
  logic [63:0] cmdkey_w[$], cmdkey_r[$];
  int        wtag = 0, rtag = 0, n_w = 0, n_r = 0;

  function automatic mem_req_t mk(input bit w, input logic [63:0] key);
    mem_req_t r;
    r.is_write = w; r.reply = 1'($urandom); r.err = 0;
    r.meta = {$urandom, 16'($urandom), 8'($urandom % 5 + 1), 8'($urandom), key};
    r.meta.key = key;
    return r;
  endfunction

  task automatic request(input mem_req_t r, input bytes_t v);
    @(negedge clk);
    mem_req_valid = 1;
    mem_req = r;
    #1;
    while (!mem_req_ready) begin
      @(negedge clk);
      #1;
    end
    if (r.is_write) begin
      exp_w.push_back(r); cmdkey_w.push_back(r.meta.key);
    end else begin
      exp_r.push_back(r); cmdkey_r.push_back(r.meta.key);
    end
    @(negedge clk);
    mem_req_valid = 0;
    if (r.is_write) begin
      automatic int n = nbeats(v.size());
      if (!store.exists(r.meta.key)) begin
        bytes_t z;
        for (int i = 0; i < 1024; i++) z.push_back(0);
        store[r.meta.key] = z;
      end
      foreach (v[i]) store[r.meta.key][i] = v[i];
      for (int b = 0; b < n; b++) begin
        if (b > 0) @(negedge clk);
        mem_wr_valid = 1;
        mem_wr_data  = beat_data(v, b);
        mem_wr_keep  = beat_keep(v, b);
        mem_wr_last  = (b == n - 1);
        #1;
        while (!mem_wr_ready) begin
          @(negedge clk);
          #1;
        end
      end
      @(negedge clk);
      mem_wr_valid = 0;
    end
  endtask

  function automatic bit cmd_ok(input logic [111:0] c, input logic [63:0] key, input int tag);
    return c[22:0] == 23'd1024 && c[23] == 1'b1 && c[29:24] == 6'd0 && c[30] == 1'b1 &&
           c[31] == 1'b0 && c[95:32] == 64'(ref_hash(key)) * 64'd1024 && c[99:96] == 4'(tag) &&
           c[111:100] == 12'd0;
  endfunction

  // monitors
  bytes_t rd_bytes;
  bit     rd_on = 0;
  mem_req_t rd_req;
  always @(negedge clk) begin
    mem_cmp_ready = ($urandom % 3 != 0) && !rd_on;
    mem_rd_ready  = ($urandom % 3 != 0);
    #2;
    if (s2mm_cmd_valid && s2mm_cmd_ready) begin
      check(cmdkey_w.size() > 0 && cmd_ok(s2mm_cmd, cmdkey_w[0], wtag), $sformatf("S2MM command %h", s2mm_cmd));
      if (cmdkey_w.size() > 0) void'(cmdkey_w.pop_front());
      wtag++;
    end
    if (mm2s_cmd_valid && mm2s_cmd_ready) begin
      check(cmdkey_r.size() > 0 && cmd_ok(mm2s_cmd, cmdkey_r[0], rtag), $sformatf("MM2S command %h", mm2s_cmd));
      if (cmdkey_r.size() > 0) void'(cmdkey_r.pop_front());
      rtag++;
    end
    if (mem_cmp_valid && mem_cmp_ready) begin
      if (mem_cmp.is_write) begin
        check(exp_w.size() > 0 && mem_cmp == exp_w[0], "write completion");
        if (exp_w.size() > 0) void'(exp_w.pop_front());
        n_w++;
      end else begin
        check(exp_r.size() > 0 && mem_cmp == exp_r[0], "read completion");
        if (exp_r.size() > 0) begin
          rd_req = exp_r.pop_front();
        end
        rd_on = 1;
      end
    end
    if (mem_rd_valid && mem_rd_ready) begin
      check(rd_on, "read data before its completion");
      take_beat(rd_bytes, mem_rd_data, mem_rd_keep);
      if (mem_rd_last) begin
        check(store.exists(rd_req.meta.key) && same(rd_bytes, store[rd_req.meta.key]),
              $sformatf("read data of key %h (%0d bytes)", rd_req.meta.key, rd_bytes.size()));
        rd_bytes.delete();
        rd_on = 0;
        n_r++;
      end
    end
  end

  logic [63:0] keys[$];
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) begin
      automatic logic [63:0] k = {$urandom, $urandom};
      keys.push_back(k);
      request(mk(1, k), rand_bytes(i % 3 == 0 ? 1 + $urandom % 300 : 1024));
    end
    while (exp_w.size() != 0) @(posedge clk);
    for (int i = 0; i < 24; i++) begin
      if (i % 3 == 2) begin
        automatic logic [63:0] k = {$urandom, $urandom};
        request(mk(1, k), rand_bytes(1024));
      end else request(mk(0, keys[$urandom % keys.size()]), '{});
    end
    while (exp_w.size() != 0 || exp_r.size() != 0 || rd_on) @(posedge clk);
    repeat (10) @(posedge clk);
    check(n_w == 20 && n_r == 16, $sformatf("completions %0d writes %0d reads", n_w, n_r));
    check(!rd_err, "no read error");
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
