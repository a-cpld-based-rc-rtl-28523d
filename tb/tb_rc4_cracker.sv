// tb_rc4_cracker: end-to-end key search with the default five units and
// 32-bit keys.
//
// The expected keystream bytes come from the reference model for a random
// secret key. Three searches are run, each from reset:
//   A  the key space is split as for a full 32-bit search
//      (keys_per_fu = ceil(2^32 / 5)); the base is placed so that unit 2 meets
//      the secret on its fourth key. Checks found/unit/key/probe bytes, the
//      number of keys tested and the cycle count (1 + 4 x 1304 - 1).
//   B  a two-key range per unit that does not hold the secret: the engine must
//      stop exhausted after 2 x 1304 cycles.
//   C  keys_per_fu = 0 (2^32 keys each), so every unit holds the same key
//      sequence and all five match at once: the lowest unit must be reported.
// The reference model also screens every key tested for an accidental match
// of the four bytes, so the expected outcome is exact. Each mechanism (fill,
// key schedule, keystream test, next key, match, exhaustion, simultaneous
// match, probe) is counted and must occur at least once.
module tb_rc4_cracker;
  import rc4_pkg::*;
  import rc4_ref_pkg::*;

  localparam int unsigned NUM_FU = 5;
  localparam logic [31:0] SPLIT  = 32'd858993460;   // ceil(2^32 / 5)

  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] key_base, keys_per_fu, found_key, keys_tested;
  byte_t       test_bytes [TEST_BYTES];
  logic [1:0]  ext_addr;
  logic        done, found, exhausted;
  logic [2:0]  found_unit;
  byte_t       probe_byte;
  state_t      state;
  int checks = 0, failures = 0;
  int n_fill = 0, n_ksa = 0, n_stream = 0, n_next = 0, n_found = 0,
      n_exhaust = 0, n_multi = 0, n_probe = 0;
  int cycles;

  rc4_cracker dut (
    .clk(clk), .rst_n(rst_n), .key_base(key_base), .keys_per_fu(keys_per_fu),
    .test_bytes(test_bytes), .ext_addr(ext_addr), .done(done), .found(found),
    .exhausted(exhausted), .found_unit(found_unit), .found_key(found_key),
    .probe_byte(probe_byte), .keys_tested(keys_tested), .state(state));

  always #5 clk = ~clk;

  state_t prev;
  always @(posedge clk) begin
    if (rst_n) begin
      if (state == ST_LOAD_RAM   && prev != ST_LOAD_RAM) n_fill++;
      if (state == ST_READ_SI    && prev == ST_LOAD_RAM) n_ksa++;
      if (state == ST_T_READ_SK) n_stream++;
      if (state == ST_NEXT_K)    n_next++;
    end
    prev <= state;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit key_matches(input logic [31:0] k, input byte_t ks [4]);
    byte_t r [4];
    rc4_keystream({32'd0, k}, 4, r);
    return r == ks;
  endfunction

  // Reset, start a search and count cycles until Done.
  task automatic search(input logic [31:0] base, input logic [31:0] kpf);
    key_base = base;
    keys_per_fu = kpf;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    logic [31:0] secret, base;
    byte_t ks [4];
    int expect_keys;
    ext_addr = '0;
    secret = $urandom;
    rc4_keystream({32'd0, secret}, 4, ks);
    test_bytes = ks;

    // A: full-range split, unit 2 hits on its fourth key
    base = secret - 2 * SPLIT - 3;
    expect_keys = 4;
    for (int k = 0; k < 4; k++)
      for (int u = 0; u < NUM_FU; u++)
        if (!(u == 2 && k == 3) && key_matches(base + u * SPLIT + k, ks) && k < expect_keys)
          expect_keys = k + 1;          // an accidental earlier match
    search(base, SPLIT);
    check(found && !exhausted, "A: key not found");
    check(keys_tested == 32'(expect_keys), $sformatf("A: %0d keys tested", keys_tested));
    if (expect_keys == 4) begin
      check(found_unit == 3'd2, $sformatf("A: unit %0d", found_unit));
      check(found_key == secret, $sformatf("A: key %h", found_key));
      check(cycles == 1 + 4 * 1304 - 1, $sformatf("A: %0d cycles", cycles));
      for (int a = 0; a < 4; a++) begin
        ext_addr = 2'(a);
        #1;
        check(probe_byte == secret[8*(4-a)-1 -: 8], "A: probe byte");
        n_probe++;
      end
    end
    if (found) n_found++;

    // B: two keys per unit, secret outside every range
    base = secret + 32'd1000;
    expect_keys = 0;
    for (int k = 0; k < 2; k++)
      for (int u = 0; u < NUM_FU; u++)
        if (key_matches(base + u * 2 + k, ks)) expect_keys = 1;
    search(base, 32'd2);
    if (expect_keys == 0) begin
      check(exhausted && !found, "B: no exhaustion stop");
      check(keys_tested == 32'd2, "B: keys tested");
      check(cycles == 1 + 2 * 1304 - 1, $sformatf("B: %0d cycles", cycles));
    end
    if (exhausted) n_exhaust++;

    // C: every unit runs the same keys; all match together on the second key
    search(secret - 32'd1, 32'd0);
    check(found && found_unit == 3'd0 && found_key == secret, "C: priority");
    check(&dut.key_found, "C: not all units matched");
    if (found && &dut.key_found) n_multi++;

    check(n_fill > 0,    "fill never ran");
    check(n_ksa > 0,     "key schedule never ran");
    check(n_stream > 0,  "keystream never generated");
    check(n_next > 0,    "never stepped to the next key");
    check(n_found > 0,   "never found a key");
    check(n_exhaust > 0, "never exhausted a range");
    check(n_multi > 0,   "never saw simultaneous matches");
    check(n_probe > 0,   "never probed the key");
    $display("mechanisms: fill %0d, key schedule %0d, keystream bytes %0d, next key %0d, found %0d, exhausted %0d, simultaneous %0d, probe %0d",
             n_fill, n_ksa, n_stream, n_next, n_found, n_exhaust, n_multi, n_probe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
