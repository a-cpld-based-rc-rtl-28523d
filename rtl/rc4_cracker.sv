// rc4_cracker: brute-force known-plaintext key search for RC4.
//
// NUM_FU identical functional units each test one candidate key per pass of
// 1304 clock cycles, all driven in lock-step by one control unit. Each unit has
// its own key space register; unit n starts at key_base + n * keys_per_fu and
// steps by one after every pass, so the units cover disjoint ranges of
// keys_per_fu keys each. A unit computes the RC4 key schedule for its key and
// the first four keystream bytes and compares them with `test_bytes`
// (known plaintext XOR ciphertext). When any unit matches all four, the
// engine stops in Done with `found` high; `found_unit` and `found_key` name the
// first matching unit and its key, and `probe_byte` returns byte `ext_addr`
// of that unit's K-array. When every unit has tested keys_per_fu keys
// without a match, it stops with `exhausted` high.
//
// The defaults are the document's prototype: five functional units and 32-bit
// keys. The inputs are sampled in the Clear state that follows reset and read
// again throughout the search, so they must be held stable; to start a new
// search, apply reset. The range split, the stop on exhaustion and the
// found-key outputs are this design's choices; the document says only that
// every unit searches a different key space and that the user can probe the
// machine for the matching key.
module rc4_cracker
  import rc4_pkg::*;
#(
  parameter int unsigned NUM_FU    = 5,
  parameter int unsigned KEY_BYTES = 4,
  parameter int unsigned KEY_W     = 8 * KEY_BYTES,
  parameter int unsigned KA_W      = (KEY_BYTES > 1) ? $clog2(KEY_BYTES) : 1,
  parameter int unsigned FU_W      = (NUM_FU > 1) ? $clog2(NUM_FU) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [KEY_W-1:0] key_base,
  input  logic [KEY_W-1:0] keys_per_fu,
  input  byte_t            test_bytes [TEST_BYTES],
  input  logic [KA_W-1:0]  ext_addr,
  output logic             done,
  output logic             found,
  output logic             exhausted,
  output logic [FU_W-1:0]  found_unit,
  output logic [KEY_W-1:0] found_key,
  output byte_t            probe_byte,
  output logic [KEY_W-1:0] keys_tested,
  output state_t           state
);

  fu_ctrl_t          ctrl;
  logic              ksr_load, ksr_inc;
  logic [KEY_W-1:0]  cur_key   [NUM_FU];
  byte_t             k_byte    [NUM_FU];
  logic [NUM_FU-1:0] key_found;

  rc4_control #(.KEY_W(KEY_W)) u_control (
    .clk         (clk),
    .rst_n       (rst_n),
    .test_bytes  (test_bytes),
    .keys_per_fu (keys_per_fu),
    .any_found   (|key_found),
    .ctrl        (ctrl),
    .ksr_load    (ksr_load),
    .ksr_inc     (ksr_inc),
    .state       (state),
    .done        (done),
    .found       (found),
    .exhausted   (exhausted),
    .keys_tested (keys_tested)
  );

  for (genvar n = 0; n < NUM_FU; n++) begin : g_unit
    logic [KEY_W-1:0] start_key;
    assign start_key = key_base + KEY_W'(n) * keys_per_fu;

    rc4_key_space_reg #(.WIDTH(KEY_W)) u_ksr (
      .clk       (clk),
      .rst_n     (rst_n),
      .load      (ksr_load),
      .start_key (start_key),
      .inc       (ksr_inc),
      .key       (cur_key[n])
    );

    rc4_functional_unit #(.KEY_BYTES(KEY_BYTES), .KA_W(KA_W)) u_fu (
      .clk       (clk),
      .rst_n     (rst_n),
      .ctrl      (ctrl),
      .key_in    (cur_key[n]),
      .ext_addr  (ext_addr),
      .k_byte    (k_byte[n]),
      .key_found (key_found[n])
    );
  end

  // First matching unit wins; its key and probed K-array byte are brought out.
  always_comb begin
    found_unit = '0;
    for (int n = NUM_FU - 1; n >= 0; n--)
      if (key_found[n]) found_unit = FU_W'(n);
  end

  assign found_key  = cur_key[found_unit];
  assign probe_byte = k_byte[found_unit];

endmodule
