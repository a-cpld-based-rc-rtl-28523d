// rc4_workload_run: one key search on an rc4_cracker of a given size.
//
// Used by tb_rc4_workloads to exercise engine sizes other than the default.
// The key space of KEY_BYTES bytes is split evenly over NUM_FU units
// (keys_per_fu = ceil(2^KEY_W / NUM_FU)); the base is placed so that the last
// unit meets a random secret key on its second key. On `start` the instance
// resets the engine, waits for Done and checks the reported unit and key, the
// probe port and the pass length of 1304 cycles per key. `finished` rises
// when the checks are complete; `checks`/`failures` count them.
module rc4_workload_run
  import rc4_pkg::*;
  import rc4_ref_pkg::*;
#(
  parameter int unsigned NUM_FU    = 5,
  parameter int unsigned KEY_BYTES = 4
) (
  input  logic clk,
  input  logic start,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned KEY_W = 8 * KEY_BYTES;
  localparam int unsigned KA_W  = (KEY_BYTES > 1) ? $clog2(KEY_BYTES) : 1;
  localparam int unsigned FU_W  = (NUM_FU > 1) ? $clog2(NUM_FU) : 1;
  localparam logic [KEY_W:0] SPAN  = {1'b1, {KEY_W{1'b0}}};
  localparam logic [KEY_W-1:0] SPLIT = KEY_W'((SPAN + (KEY_W+1)'(NUM_FU) - 1) / (KEY_W+1)'(NUM_FU));

  logic             rst_n = 1'b0;
  logic [KEY_W-1:0] key_base, keys_per_fu, found_key, keys_tested;
  byte_t            test_bytes [TEST_BYTES];
  logic [KA_W-1:0]  ext_addr;
  logic             done, found, exhausted;
  logic [FU_W-1:0]  found_unit;
  byte_t            probe_byte;
  state_t           state;

  rc4_cracker #(.NUM_FU(NUM_FU), .KEY_BYTES(KEY_BYTES)) dut (
    .clk(clk), .rst_n(rst_n), .key_base(key_base), .keys_per_fu(keys_per_fu),
    .test_bytes(test_bytes), .ext_addr(ext_addr), .done(done), .found(found),
    .exhausted(exhausted), .found_unit(found_unit), .found_key(found_key),
    .probe_byte(probe_byte), .keys_tested(keys_tested), .state(state));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (%0d units, %0d-bit keys): %s", NUM_FU, KEY_W, msg);
    end
  endtask

  initial begin
    logic [63:0]      secret64;
    logic [KEY_W-1:0] secret;
    byte_t            ks [4];
    byte_t            r [4];
    int               cycles;
    bit               accidental;
    finished = 1'b0; checks = 0; failures = 0; ext_addr = '0; accidental = 1'b0;
    key_base = '0; keys_per_fu = '0;
    for (int n = 0; n < TEST_BYTES; n++) test_bytes[n] = '0;
    wait (start);
    secret64 = {$urandom, $urandom};
    secret   = secret64[KEY_W-1:0];
    rc4_keystream(64'(secret), KEY_BYTES, ks);
    test_bytes  = ks;
    keys_per_fu = SPLIT;
    key_base    = secret - KEY_W'(NUM_FU - 1) * SPLIT - KEY_W'(1);
    // screen the other keys of the search for an accidental match
    for (int k = 0; k < 2; k++)
      for (int u = 0; u < NUM_FU; u++)
        if (!(k == 1 && u == NUM_FU - 1)) begin
          rc4_keystream(64'(KEY_W'(key_base + KEY_W'(u) * SPLIT + KEY_W'(k))), KEY_BYTES, r);
          if (r == ks) accidental = 1'b1;
        end
    @(negedge clk);
    rst_n = 1'b1;
    cycles = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    check(found, "no key found");
    if (!accidental) begin
      check(found_unit == FU_W'(NUM_FU - 1), $sformatf("unit %0d", found_unit));
      check(found_key == secret, $sformatf("key %h, expected %h", found_key, secret));
      check(keys_tested == KEY_W'(2), "keys tested");
      check(cycles == 1 + 2 * 1304 - 1, $sformatf("%0d cycles", cycles));
      for (int a = 0; a < KEY_BYTES; a++) begin
        ext_addr = KA_W'(a);
        #1;
        check(probe_byte == secret[8*(KEY_BYTES-a)-1 -: 8], "probe byte");
      end
    end
    $display("%0d units, %0d-bit keys: found unit %0d key %h after %0d cycles",
             NUM_FU, KEY_W, found_unit, found_key, cycles);
    finished = 1'b1;
  end
endmodule
