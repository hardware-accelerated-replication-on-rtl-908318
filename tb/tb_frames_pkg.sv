// tb_frames_pkg: reference frame builder for the replication NIC testbenches.
//
// Builds frames byte by byte, straight from the header layout (Ethernet, IPv4 with checksum, UDP,
// opcode, id, key, value), independently of the RTL, and converts between byte queues and
// 512-bit stream beats (frame byte 0 in bits [7:0]).
package tb_frames_pkg;
  typedef byte unsigned bytes_t[$];

  localparam logic [15:0] REPL_PORT   = 16'h1F40;
  localparam logic [15:0] CLIENT_PORT = 16'h1F41;

  function automatic void push_be(ref bytes_t q, input logic [63:0] v, input int n);
    for (int i = n - 1; i >= 0; i--) q.push_back(v[8*i +: 8]);
  endfunction

  function automatic logic [15:0] ip_csum(input bytes_t h);  // h: the 20 header bytes
    logic [31:0] s = 0;
    for (int i = 0; i < 20; i += 2) if (i != 10) s += {h[i], h[i+1]};
    while (s[31:16] != 0) s = s[15:0] + s[31:16];
    return ~s[15:0];
  endfunction

  // A replication frame as the deparser should emit it (padded to 64 bytes).
  function automatic bytes_t repl_frame(input logic [47:0] dmac, input logic [47:0] smac,
      input logic [31:0] sip, input logic [31:0] dip, input logic [15:0] sport,
      input logic [15:0] dport, input logic [7:0] op, input logic [7:0] id,
      input logic [63:0] key, input bytes_t value);
    bytes_t f, ip;
    logic [15:0] udp_len, cs;
    udp_len = 16'(18 + value.size());
    push_be(f, 64'(dmac), 6);
    push_be(f, 64'(smac), 6);
    push_be(f, 64'h0800, 2);
    push_be(ip, 64'h4500, 2);
    push_be(ip, 64'(udp_len + 16'd20), 2);
    push_be(ip, 64'h0000, 2);
    push_be(ip, 64'h4000, 2);
    push_be(ip, 64'h4011, 2);
    push_be(ip, 64'h0000, 2);
    push_be(ip, 64'(sip), 4);
    push_be(ip, 64'(dip), 4);
    cs = ip_csum(ip);
    ip[10] = cs[15:8];
    ip[11] = cs[7:0];
    f = {f, ip};
    push_be(f, 64'(sport), 2);
    push_be(f, 64'(dport), 2);
    push_be(f, 64'(udp_len), 2);
    push_be(f, 64'h0000, 2);
    f.push_back(op);
    f.push_back(id);
    push_be(f, key, 8);
    f = {f, value};
    while (f.size() < 64) f.push_back(8'h00);
    return f;
  endfunction

  function automatic bytes_t rand_bytes(input int n);
    bytes_t q;
    for (int i = 0; i < n; i++) q.push_back(8'($urandom));
    return q;
  endfunction

  // beats of a byte queue
  function automatic int nbeats(input int nbytes);
    return (nbytes + 63) / 64;
  endfunction

  function automatic logic [511:0] beat_data(input bytes_t q, input int b);
    logic [511:0] d = '0;
    for (int i = 0; i < 64; i++) if (64*b + i < q.size()) d[8*i +: 8] = q[64*b + i];
    return d;
  endfunction

  function automatic logic [63:0] beat_keep(input bytes_t q, input int b);
    logic [63:0] k = '0;
    for (int i = 0; i < 64; i++) if (64*b + i < q.size()) k[i] = 1'b1;
    return k;
  endfunction

  // append the kept bytes of a beat to a queue
  function automatic void take_beat(ref bytes_t q, input logic [511:0] d, input logic [63:0] k);
    for (int i = 0; i < 64; i++) if (k[i]) q.push_back(d[8*i +: 8]);
  endfunction

  function automatic bit same(input bytes_t a, input bytes_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction
endpackage
