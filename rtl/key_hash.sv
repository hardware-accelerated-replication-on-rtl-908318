// key_hash: maps a 64-bit key to a 24-bit bucket index of the key-value store.
//
// With 1 KiB buckets a 24-bit index covers 16 GiB, the whole HBM. The hash itself is this
// implementation's choice: the key is folded by XOR into 24 bits and the fold is multiplied by an
// odd constant (keeping the low 24 bits), which is a bijection on 24-bit values and spreads
// neighbouring keys over distant buckets. Purely combinational.
module key_hash #(
  parameter int unsigned KEY_W = 64,
  parameter int unsigned IDX_W = 24
) (
  input  logic [KEY_W-1:0] key,
  output logic [IDX_W-1:0] idx
);
  localparam int unsigned NSLICE = (KEY_W + IDX_W - 1) / IDX_W;
  localparam logic [IDX_W-1:0] MIX = IDX_W'(32'h9E3779B1);  // odd

  logic [NSLICE*IDX_W-1:0] key_ext;
  logic [IDX_W-1:0]        fold;

  always_comb begin
    key_ext = (NSLICE*IDX_W)'(key);
    fold    = '0;
    for (int s = 0; s < NSLICE; s++) fold ^= key_ext[s*IDX_W +: IDX_W];
    idx = IDX_W'(fold * MIX);
  end
endmodule
