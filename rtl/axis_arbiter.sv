// axis_arbiter: packet-level two-input stream arbiter.
//
// Merges two AXI-Stream sources into one without interleaving frames: when idle it grants a
// requesting input, giving priority to the input that was not served last (round robin), and
// holds the grant until that input's beat with tlast has passed. A sideband word (USER_W bits)
// travels with each beat. On the transmit side it lets replication frames and host frames share
// the MAC; inside the replication engine it merges the frames of its two state machines.
//
// Interface: s_*[2] in, m_* out, valid/ready. Timing: combinational data path, no added cycle;
// the grant decision for a new frame is made in the cycle its first beat is presented.
module axis_arbiter #(
  parameter int unsigned DW     = repl_pkg::DATA_W,
  parameter int unsigned USER_W = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [1:0]           s_valid,
  output logic [1:0]           s_ready,
  input  logic [1:0][DW-1:0]   s_data,
  input  logic [1:0][DW/8-1:0] s_keep,
  input  logic [1:0]           s_last,
  input  logic [1:0][USER_W-1:0] s_user,
  output logic                 m_valid,
  input  logic                 m_ready,
  output logic [DW-1:0]        m_data,
  output logic [DW/8-1:0]      m_keep,
  output logic                 m_last,
  output logic [USER_W-1:0]    m_user
);
  logic busy;       // a frame is in progress
  logic owner;      // input that owns the output while busy
  logic last_srv;   // input served last
  logic sel;

  always_comb begin
    if (busy)                          sel = owner;
    else if (s_valid[0] && s_valid[1]) sel = ~last_srv;
    else                               sel = s_valid[1];
    m_valid    = s_valid[sel];
    m_data     = s_data[sel];
    m_keep     = s_keep[sel];
    m_last     = s_last[sel];
    m_user     = s_user[sel];
    s_ready    = '0;
    s_ready[sel] = m_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      owner    <= 1'b0;
      last_srv <= 1'b1;
    end else if (m_valid && m_ready) begin
      busy     <= !m_last;
      owner    <= sel;
      last_srv <= sel;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid);
endmodule
