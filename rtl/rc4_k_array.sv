// rc4_k_array: the key bytes of the candidate key under test.
//
// RC4 repeats the key to fill a 256-byte K-array. As in the document, only
// the key itself is stored (KEY_BYTES bytes, four for a 32-bit key) and the
// functional unit addresses it modulo the key length. The array is a small
// register file: `load` copies a whole key, most significant byte first
// (K[0] = key[8*KEY_BYTES-1 -: 8]), in one clock; the read port is
// combinational so a key byte is available in the same cycle its index is
// presented. The byte order and the parallel load are this design's choices.
module rc4_k_array #(
  parameter int unsigned KEY_BYTES = 4,
  parameter int unsigned ADDR_W    = (KEY_BYTES > 1) ? $clog2(KEY_BYTES) : 1
) (
  input  logic                   clk,
  input  logic                   load,
  input  logic [8*KEY_BYTES-1:0] key_in,
  input  logic [ADDR_W-1:0]      addr,
  output logic [7:0]             rdata
);

  logic [7:0] k [KEY_BYTES];

  always_ff @(posedge clk) begin
    if (load) begin
      for (int unsigned n = 0; n < KEY_BYTES; n++)
        k[n] <= key_in[8*(KEY_BYTES-n)-1 -: 8];
    end
  end

  always_comb begin
    rdata = '0;
    if (32'(addr) < KEY_BYTES) rdata = k[addr];
  end

endmodule
