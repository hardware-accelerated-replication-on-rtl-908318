// repl_pkg: types and constants shared by the replication NIC.
//
// A replication packet is Ethernet (14 B) + IPv4 without options (20 B) + UDP (8 B) followed by a
// 10-byte replication header: opcode (1 B), id (1 B) and key (8 B), then the value. The field sizes
// of that header and of the metadata record follow the design; the opcode numbers, the UDP ports
// and the 512-bit stream width are this implementation's choices.
// Streams carry frame byte 0 in tdata[7:0]; multi-byte header fields are big-endian.
package repl_pkg;

  localparam int unsigned DATA_W   = 512;
  localparam int unsigned KEEP_W   = DATA_W / 8;
  localparam int unsigned KEY_W    = 64;
  localparam int unsigned HDR_BYTES = 52;   // 14 + 20 + 8 + 1 + 1 + 8

  // byte offsets of the header fields inside the frame
  localparam int unsigned OFF_DST_MAC   = 0;
  localparam int unsigned OFF_SRC_MAC   = 6;
  localparam int unsigned OFF_ETYPE     = 12;
  localparam int unsigned OFF_IP_VHL    = 14;
  localparam int unsigned OFF_IP_PROTO  = 23;
  localparam int unsigned OFF_IP_SRC    = 26;
  localparam int unsigned OFF_IP_DST    = 30;
  localparam int unsigned OFF_UDP_SPORT = 34;
  localparam int unsigned OFF_UDP_DPORT = 36;
  localparam int unsigned OFF_OPCODE    = 42;
  localparam int unsigned OFF_ID        = 43;
  localparam int unsigned OFF_KEY       = 44;

  typedef enum logic [7:0] {
    OP_READ         = 8'h01,  // client -> any node
    OP_WRITE        = 8'h02,  // leader -> replica
    OP_WRITE_LEADER = 8'h03,  // client -> leader of the key
    OP_READ_RESULT  = 8'h04,  // node -> client
    OP_WRITE_ACK    = 8'h05   // replica -> leader, and leader -> client
  } opcode_e;

  // Metadata exchanged between the replication modules: 4 B IP, 6 B MAC, 1 B opcode, 1 B id, 8 B key.
  // On the receive side ip/mac are the sender's; on the transmit side they are the destination.
  typedef struct packed {
    logic [31:0]      ip;
    logic [47:0]      mac;
    logic [7:0]       opcode;
    logic [7:0]       id;
    logic [KEY_W-1:0] key;
  } meta_t;

  // Sideband of the engine -> deparser stream.
  typedef struct packed {
    logic [15:0] len;        // payload bytes
    logic        to_engine;  // 1: destination UDP port is the engine's, 0: the client's
    meta_t       meta;
  } tx_meta_t;

  // Request to, and completion from, the memory controller.
  typedef struct packed {
    logic  is_write;
    logic  reply;     // a response packet must follow completion
    logic  err;       // completion only: the Datamover reported an error
    meta_t meta;
  } mem_req_t;

  localparam int unsigned META_W    = $bits(meta_t);
  localparam int unsigned TXMETA_W  = $bits(tx_meta_t);
  localparam int unsigned MEMREQ_W  = $bits(mem_req_t);

endpackage
