// dm_hbm_model: behavioural model of a Datamover in front of HBM, for simulation only.
//
// Accepts S2MM commands (stream to memory) and MM2S commands (memory to stream) in the Datamover
// command layout (BTT [22:0], SADDR [ADDR_W+31:32], TAG [ADDR_W+35:ADDR_W+32]). Memory is a sparse
// array of 64-byte words, zero where never written. S2MM takes beats until tlast or BTT bytes, then
// after WR_LAT cycles returns a status byte {OKAY, 3'b0, TAG}. MM2S waits RD_LAT cycles and returns
// BTT bytes. With STALL set, ready and valid are withheld at random. Not synthesizable.
module dm_hbm_model #(
  parameter int unsigned DW     = 512,
  parameter int unsigned ADDR_W = 64,
  parameter int unsigned WR_LAT = 20,
  parameter int unsigned RD_LAT = 40,
  parameter bit          STALL  = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                s2mm_cmd_valid,
  output logic                s2mm_cmd_ready,
  input  logic [ADDR_W+47:0]  s2mm_cmd,
  input  logic                s2mm_valid,
  output logic                s2mm_ready,
  input  logic [DW-1:0]       s2mm_data,
  input  logic [DW/8-1:0]     s2mm_keep,
  input  logic                s2mm_last,
  output logic                s2mm_sts_valid,
  input  logic                s2mm_sts_ready,
  output logic [7:0]          s2mm_sts,
  input  logic                mm2s_cmd_valid,
  output logic                mm2s_cmd_ready,
  input  logic [ADDR_W+47:0]  mm2s_cmd,
  output logic                mm2s_valid,
  input  logic                mm2s_ready,
  output logic [DW-1:0]       mm2s_data,
  output logic [DW/8-1:0]     mm2s_keep,
  output logic                mm2s_last,
  output logic                mm2s_sts_valid,
  input  logic                mm2s_sts_ready,
  output logic [7:0]          mm2s_sts
);
  localparam int unsigned KW = DW / 8;
  logic [DW-1:0] mem [longint unsigned];
  int unsigned   writes, reads;

  function automatic logic [DW-1:0] rd_word(input longint unsigned a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  function automatic bit coin();
    return STALL ? ($urandom % 4 == 0) : 1'b0;
  endfunction

  // peek at a byte, for testbenches
  function automatic byte unsigned peek(input longint unsigned byte_addr);
    logic [DW-1:0] w;
    w = rd_word(byte_addr / KW);
    return w[8*(byte_addr % KW) +: 8];
  endfunction

  initial begin : s2mm
    logic [ADDR_W+47:0] cmd;
    longint unsigned    base;
    int unsigned        btt, got;
    bit                 done;
    s2mm_cmd_ready = 0; s2mm_ready = 0; s2mm_sts_valid = 0; s2mm_sts = 0; writes = 0;
    forever begin
      s2mm_cmd_ready <= 1'b1;
      do @(posedge clk); while (!(rst_n && s2mm_cmd_valid && s2mm_cmd_ready));
      cmd = s2mm_cmd;
      s2mm_cmd_ready <= 1'b0;
      btt  = int'(cmd[22:0]);
      base = longint'(cmd[ADDR_W+31:32]) / KW;
      got  = 0;
      done = 0;
      while (!done) begin
        s2mm_ready <= !coin();
        @(posedge clk);
        if (s2mm_valid && s2mm_ready) begin
          logic [DW-1:0] w;
          w = rd_word(base + got);
          for (int i = 0; i < KW; i++) if (s2mm_keep[i]) w[8*i +: 8] = s2mm_data[8*i +: 8];
          mem[base + got] = w;
          got++;
          done = s2mm_last || (got * KW >= btt);
        end
      end
      s2mm_ready <= 1'b0;
      repeat (WR_LAT) @(posedge clk);
      writes++;
      s2mm_sts_valid <= 1'b1;
      s2mm_sts       <= {1'b1, 3'b000, cmd[ADDR_W+35:ADDR_W+32]};
      do @(posedge clk); while (!s2mm_sts_ready);
      s2mm_sts_valid <= 1'b0;
    end
  end

  initial begin : mm2s
    logic [ADDR_W+47:0] cmd;
    longint unsigned    base;
    int unsigned        btt, n;
    mm2s_cmd_ready = 0; mm2s_valid = 0; mm2s_data = '0; mm2s_keep = '0; mm2s_last = 0;
    mm2s_sts_valid = 0; mm2s_sts = 0; reads = 0;
    forever begin
      mm2s_cmd_ready <= 1'b1;
      do @(posedge clk); while (!(rst_n && mm2s_cmd_valid && mm2s_cmd_ready));
      cmd = mm2s_cmd;
      mm2s_cmd_ready <= 1'b0;
      btt  = int'(cmd[22:0]);
      base = longint'(cmd[ADDR_W+31:32]) / KW;
      n    = (btt + KW - 1) / KW;
      repeat (RD_LAT) @(posedge clk);
      for (int b = 0; b < n; b++) begin
        while (coin()) begin
          mm2s_valid <= 1'b0;
          @(posedge clk);
        end
        mm2s_valid <= 1'b1;
        mm2s_data  <= rd_word(base + b);
        mm2s_keep  <= (b == n - 1 && btt % KW != 0) ? KW'((65'd1 << (btt % KW)) - 1) : '1;
        mm2s_last  <= (b == n - 1);
        do @(posedge clk); while (!mm2s_ready);
      end
      mm2s_valid <= 1'b0;
      mm2s_last  <= 1'b0;
      reads++;
      mm2s_sts_valid <= 1'b1;
      mm2s_sts       <= {1'b1, 3'b000, cmd[ADDR_W+35:ADDR_W+32]};
      do @(posedge clk); while (!mm2s_sts_ready);
      mm2s_sts_valid <= 1'b0;
    end
  end
endmodule
