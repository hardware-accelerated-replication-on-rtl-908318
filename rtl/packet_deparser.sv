// packet_deparser: transmit-side packet builder of the replication NIC.
//
// Takes a payload stream from the replication engine whose sideband carries the destination
// metadata (IP, MAC, opcode, id, key), the payload length and whether the destination is another
// node's engine or a client. It emits a complete frame: Ethernet header (local MAC as source,
// EtherType IPv4), IPv4 header with computed checksum, UDP header, the 10-byte replication header,
// then the payload shifted behind the 52 header bytes. A frame shorter than one beat is padded with
// zero bytes to 64 bytes, the Ethernet minimum. A frame without payload is requested by a single
// beat with tkeep all zero and tlast set.
//
// Choices of this implementation: TTL 64, don't-fragment set, IP identification 0, UDP checksum 0
// (allowed for IPv4), source port REPL_UDP_PORT, destination port REPL_UDP_PORT towards engines and
// CLIENT_UDP_PORT towards clients.
// Interface: s_* (payload + s_user of type tx_meta_t), m_* frame out, valid/ready.
// Timing: one register stage, one beat per cycle; one extra beat flushes the last payload bytes
// when they do not fit behind the previous beat.
module packet_deparser
  import repl_pkg::*;
#(
  parameter int unsigned DW              = repl_pkg::DATA_W,
  parameter logic [15:0] REPL_UDP_PORT   = 16'h1F40,
  parameter logic [15:0] CLIENT_UDP_PORT = 16'h1F41
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [47:0]     local_mac,
  input  logic [31:0]     local_ip,
  input  logic            s_valid,
  output logic            s_ready,
  input  logic [DW-1:0]   s_data,
  input  logic [DW/8-1:0] s_keep,
  input  logic            s_last,
  input  tx_meta_t        s_user,
  output logic            m_valid,
  input  logic            m_ready,
  output logic [DW-1:0]   m_data,
  output logic [DW/8-1:0] m_keep,
  output logic            m_last
);
  localparam int unsigned KW = DW / 8;
  localparam int unsigned H  = HDR_BYTES;
  localparam int unsigned R  = KW - H;

  typedef enum logic [1:0] {S_FIRST, S_BODY, S_FLUSH} state_e;
  state_e state;

  logic [DW-1:0] hold_data;
  logic [KW-1:0] hold_keep;

  // ---- header of the frame described by s_user ----
  logic [8*H-1:0] hdr;
  logic [15:0]    ip_len, udp_len, dport;
  logic [19:0]    csum_acc;
  logic [15:0]    csum;
  logic [15:0]    ipw [10];

  // h with the nbytes low bytes of val written big-endian at byte offset off
  function automatic logic [8*H-1:0] put(input logic [8*H-1:0] h, input int unsigned off,
                                         input int unsigned nbytes, input logic [63:0] val);
    logic [8*H-1:0] r;
    r = h;
    for (int i = 0; i < nbytes; i++) r[8*(off+i) +: 8] = val[8*(nbytes-1-i) +: 8];
    return r;
  endfunction

  always_comb begin
    udp_len = 16'd18 + s_user.len;          // 8 B UDP + 10 B replication header + value
    ip_len  = 16'd20 + udp_len;
    dport   = s_user.to_engine ? REPL_UDP_PORT : CLIENT_UDP_PORT;
    ipw[0] = 16'h4500;                      // version 4, IHL 5, TOS 0
    ipw[1] = ip_len;
    ipw[2] = 16'h0000;                      // identification
    ipw[3] = 16'h4000;                      // don't fragment
    ipw[4] = 16'h4011;                      // TTL 64, protocol UDP
    ipw[5] = 16'h0000;                      // checksum field while summing
    ipw[6] = local_ip[31:16];
    ipw[7] = local_ip[15:0];
    ipw[8] = s_user.meta.ip[31:16];
    ipw[9] = s_user.meta.ip[15:0];
    csum_acc = '0;
    for (int i = 0; i < 10; i++) csum_acc += 20'(ipw[i]);
    csum_acc = 20'(csum_acc[15:0]) + 20'(csum_acc[19:16]);
    csum_acc = 20'(csum_acc[15:0]) + 20'(csum_acc[19:16]);
    csum     = ~csum_acc[15:0];

    hdr = '0;
    hdr = put(hdr, OFF_DST_MAC, 6, 64'(s_user.meta.mac));
    hdr = put(hdr, OFF_SRC_MAC, 6, 64'(local_mac));
    hdr = put(hdr, OFF_ETYPE,   2, 64'h0800);
    for (int i = 0; i < 10; i++) hdr = put(hdr, OFF_IP_VHL + 2*i, 2, 64'(ipw[i]));
    hdr = put(hdr, OFF_IP_VHL + 10, 2, 64'(csum));
    hdr = put(hdr, OFF_UDP_SPORT, 2, 64'(REPL_UDP_PORT));
    hdr = put(hdr, OFF_UDP_DPORT, 2, 64'(dport));
    hdr = put(hdr, OFF_UDP_DPORT + 2, 2, 64'(udp_len));
    hdr = put(hdr, OFF_UDP_DPORT + 4, 2, 64'h0000);
    hdr = put(hdr, OFF_OPCODE, 1, 64'(s_user.meta.opcode));
    hdr = put(hdr, OFF_ID,     1, 64'(s_user.meta.id));
    hdr = put(hdr, OFF_KEY,    8, s_user.meta.key);
  end

  // bytes outside tkeep are zeroed so that padding is zero
  logic [DW-1:0] s_dm;
  always_comb for (int i = 0; i < KW; i++) s_dm[8*i +: 8] = s_keep[i] ? s_data[8*i +: 8] : 8'h00;

  wire adv  = !m_valid || m_ready;
  assign s_ready = (state != S_FLUSH) && adv;
  wire take = s_valid && s_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_FIRST;
      m_valid   <= 1'b0;
      m_data    <= '0;
      m_keep    <= '0;
      m_last    <= 1'b0;
      hold_data <= '0;
      hold_keep <= '0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      unique case (state)
        S_FIRST: if (take) begin
          m_valid   <= 1'b1;
          m_data    <= DW'(hdr) | DW'(s_dm << (8*H));
          hold_data <= s_dm;
          hold_keep <= s_keep;
          if (s_last && !(|s_keep[KW-1:R])) begin
            m_keep <= '1;                  // whole frame in one beat: pad to 64 bytes
            m_last <= 1'b1;
          end else begin
            m_keep <= {KW'(s_keep << H)} | KW'({H{1'b1}});
            m_last <= 1'b0;
            state  <= s_last ? S_FLUSH : S_BODY;
          end
        end
        S_BODY: if (take) begin
          m_valid   <= 1'b1;
          m_data    <= DW'(hold_data >> (8*R)) | DW'(s_dm << (8*H));
          m_keep    <= KW'(hold_keep >> R) | KW'(s_keep << H);
          hold_data <= s_dm;
          hold_keep <= s_keep;
          if (s_last && |s_keep[KW-1:R]) begin
            m_last <= 1'b0;
            state  <= S_FLUSH;
          end else begin
            m_last <= s_last;
            if (s_last) state <= S_FIRST;
          end
        end
        S_FLUSH: if (adv) begin
          m_valid <= 1'b1;
          m_data  <= DW'(hold_data >> (8*R));
          m_keep  <= KW'(hold_keep >> R);
          m_last  <= 1'b1;
          state   <= S_FIRST;
        end
        default: state <= S_FIRST;
      endcase
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_data) && $stable(m_last));
endmodule
