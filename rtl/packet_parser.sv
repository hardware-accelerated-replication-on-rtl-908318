// packet_parser: receive-side parser of the replication NIC.
//
// Looks at the first beat of every frame arriving from the MAC. A frame is a replication packet
// when it is IPv4 (EtherType 0x0800, no IP options), UDP, and addressed to REPL_UDP_PORT; the
// exact rule is this implementation's choice. For a replication packet the parser emits one
// metadata record (sender IP and MAC, opcode, id, key) and then the value alone: the 52 header
// bytes are stripped and the remaining bytes realigned to byte 0 of each beat. Any other frame is
// passed on unchanged. Every output beat carries m_dest: 1 for replication payload, 0 for frames
// that the filter downstream sends to the host.
//
// Interface: AXI-Stream in (s_*), stream out (m_*, m_dest), metadata out (meta_*). All valid/ready.
// Timing: one register stage; a beat per cycle at full rate. A replication frame whose payload
// ends within the last 52 bytes of its final beat takes one extra cycle to flush.
// The metadata record is offered before or with the first payload beat; the parser waits for the
// metadata slot to be free before it accepts a new frame.
module packet_parser
  import repl_pkg::*;
#(
  parameter int unsigned DW            = repl_pkg::DATA_W,
  parameter logic [15:0] REPL_UDP_PORT = 16'h1F40
) (
  input  logic            clk,
  input  logic            rst_n,
  // from the MAC
  input  logic            s_valid,
  output logic            s_ready,
  input  logic [DW-1:0]   s_data,
  input  logic [DW/8-1:0] s_keep,
  input  logic            s_last,
  // payload or pass-through frame
  output logic            m_valid,
  input  logic            m_ready,
  output logic [DW-1:0]   m_data,
  output logic [DW/8-1:0] m_keep,
  output logic            m_last,
  output logic            m_dest,
  // metadata of replication packets
  output logic            meta_valid,
  input  logic            meta_ready,
  output meta_t           meta
);
  localparam int unsigned KW = DW / 8;
  localparam int unsigned H  = HDR_BYTES;          // bytes stripped from the first beat
  localparam int unsigned R  = KW - H;             // payload bytes left in the first beat

  typedef enum logic [1:0] {S_FIRST, S_FWD, S_STRIP, S_FLUSH} state_e;
  state_e state;

  logic [DW-1:0] hold_data;
  logic [KW-1:0] hold_keep;

  function automatic logic [7:0] byte_at(input logic [DW-1:0] d, input int unsigned i);
    return d[8*i +: 8];
  endfunction

  // --- classification of a first beat ---
  logic  is_repl;
  meta_t meta_in;
  always_comb begin
    is_repl = ({byte_at(s_data, OFF_ETYPE), byte_at(s_data, OFF_ETYPE+1)} == 16'h0800) &&
              (byte_at(s_data, OFF_IP_VHL) == 8'h45) &&
              (byte_at(s_data, OFF_IP_PROTO) == 8'd17) &&
              ({byte_at(s_data, OFF_UDP_DPORT), byte_at(s_data, OFF_UDP_DPORT+1)} == REPL_UDP_PORT) &&
              (&s_keep[H-1:0]);
    for (int i = 0; i < 4; i++) meta_in.ip[31-8*i -: 8]  = byte_at(s_data, OFF_IP_SRC + i);
    for (int i = 0; i < 6; i++) meta_in.mac[47-8*i -: 8] = byte_at(s_data, OFF_SRC_MAC + i);
    meta_in.opcode = byte_at(s_data, OFF_OPCODE);
    meta_in.id     = byte_at(s_data, OFF_ID);
    for (int i = 0; i < 8; i++) meta_in.key[63-8*i -: 8] = byte_at(s_data, OFF_KEY + i);
  end

  // output register may load when empty or being drained
  wire adv = !m_valid || m_ready;

  always_comb begin
    unique case (state)
      S_FIRST: s_ready = adv && !meta_valid;
      S_FWD,
      S_STRIP: s_ready = adv;
      default: s_ready = 1'b0;
    endcase
  end

  wire take = s_valid && s_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_FIRST;
      m_valid    <= 1'b0;
      m_data     <= '0;
      m_keep     <= '0;
      m_last     <= 1'b0;
      m_dest     <= 1'b0;
      meta_valid <= 1'b0;
      meta       <= '0;
      hold_data  <= '0;
      hold_keep  <= '0;
    end else begin
      if (meta_valid && meta_ready) meta_valid <= 1'b0;
      if (m_valid && m_ready)       m_valid    <= 1'b0;

      unique case (state)
        S_FIRST: if (take) begin
          if (is_repl) begin
            meta_valid <= 1'b1;
            meta       <= meta_in;
            if (s_last) begin
              // the whole value (possibly empty) sits in this beat
              m_valid <= 1'b1;
              m_data  <= DW'(s_data >> (8*H));
              m_keep  <= KW'(s_keep >> H);
              m_last  <= 1'b1;
              m_dest  <= 1'b1;
            end else begin
              hold_data <= s_data;
              hold_keep <= s_keep;
              state     <= S_STRIP;
            end
          end else begin
            m_valid <= 1'b1;
            m_data  <= s_data;
            m_keep  <= s_keep;
            m_last  <= s_last;
            m_dest  <= 1'b0;
            if (!s_last) state <= S_FWD;
          end
        end
        S_FWD: if (take) begin
          m_valid <= 1'b1;
          m_data  <= s_data;
          m_keep  <= s_keep;
          m_last  <= s_last;
          m_dest  <= 1'b0;
          if (s_last) state <= S_FIRST;
        end
        S_STRIP: if (take) begin
          // R bytes left from the held beat, then the first H bytes of this one
          m_valid   <= 1'b1;
          m_data    <= DW'(hold_data >> (8*H)) | DW'(s_data << (8*R));
          m_keep    <= KW'(hold_keep >> H) | KW'(s_keep << R);
          m_dest    <= 1'b1;
          hold_data <= s_data;
          hold_keep <= s_keep;
          if (s_last) begin
            if (|s_keep[KW-1:H]) begin
              m_last <= 1'b0;
              state  <= S_FLUSH;
            end else begin
              m_last <= 1'b1;
              state  <= S_FIRST;
            end
          end else begin
            m_last <= 1'b0;
          end
        end
        S_FLUSH: if (adv) begin
          m_valid <= 1'b1;
          m_data  <= DW'(hold_data >> (8*H));
          m_keep  <= KW'(hold_keep >> H);
          m_last  <= 1'b1;
          m_dest  <= 1'b1;
          state   <= S_FIRST;
        end
        default: state <= S_FIRST;
      endcase
    end
  end

  a_meta_stable: assert property (@(posedge clk) disable iff (!rst_n)
    meta_valid && !meta_ready |=> meta_valid && $stable(meta));
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_data) && $stable(m_last));
endmodule
