// tb_rc4_control: cycle-by-cycle check of the shared state machine.
//
// The testbench builds the expected state sequence of one key pass (fill,
// 256 four-state swaps, test clear, four five-state keystream iterations,
// test done, decision) and compares the controller's state, i counter, write
// enable, S-array address source and compare strobes with it on every cycle.
// It checks the 1304-cycle pass length, the key space register load and step
// pulses, the expected-byte selection, the stop on a match and the stop when
// the key range is exhausted.
module tb_rc4_control;
  import rc4_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  byte_t       test_bytes [TEST_BYTES];
  logic [31:0] keys_per_fu, keys_tested;
  logic        any_found;
  fu_ctrl_t    ctrl;
  logic        ksr_load, ksr_inc, done, found, exhausted;
  state_t      state;
  int checks = 0, failures = 0;
  int n_load = 0, n_inc = 0;

  rc4_control dut (
    .clk(clk), .rst_n(rst_n), .test_bytes(test_bytes), .keys_per_fu(keys_per_fu),
    .any_found(any_found), .ctrl(ctrl), .ksr_load(ksr_load), .ksr_inc(ksr_inc),
    .state(state), .done(done), .found(found), .exhausted(exhausted),
    .keys_tested(keys_tested));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && ksr_load) n_load++;
    if (rst_n && ksr_inc)  n_inc++;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("t=%0t %s (state %s i=%0d)", $time, msg, state.name(), ctrl.i);
  endtask

  // Check one cycle: expected state and i; write enable and address source
  // follow from the state.
  task automatic expect_cycle(input state_t st, input int i_exp, input int cmp_byte);
    logic        we_exp;
    s_addr_sel_t as_exp;
    checks++;
    if (state !== st) fail($sformatf("state %s, expected %s", state.name(), st.name()));
    if (st inside {ST_LOAD_RAM, ST_READ_SI, ST_READ_SJ, ST_WRITE_SI_SJ, ST_WRITE_SJ_SI,
                   ST_T_READ_SI} && ctrl.i !== 8'(i_exp))
      fail($sformatf("i = %0d, expected %0d", ctrl.i, i_exp));
    we_exp = st inside {ST_LOAD_RAM, ST_WRITE_SI_SJ, ST_WRITE_SJ_SI,
                        ST_T_WRITE_SI_SJ, ST_T_WRITE_SJ_SI};
    if (ctrl.s_we !== we_exp) fail("write enable");
    case (st)
      ST_READ_SJ, ST_T_READ_SJ:         as_exp = SADDR_JNEW;
      ST_WRITE_SI_SJ, ST_T_WRITE_SI_SJ: as_exp = SADDR_J;
      ST_T_READ_SK:                     as_exp = SADDR_T;
      default:                          as_exp = SADDR_I;
    endcase
    if (st != ST_CLEAR && st != ST_TEST_CLEAR && st != ST_TEST_DONE &&
        st != ST_CHECK_FOUND && st != ST_NEXT_K && st != ST_DONE && ctrl.s_addr_sel !== as_exp)
      fail("address source");
    if (ctrl.k_add !== (st == ST_READ_SJ)) fail("key byte added outside the key schedule");
    if (cmp_byte < 0) begin
      if (ctrl.cmp_en) fail("unexpected compare");
    end else begin
      if (!ctrl.cmp_en) fail("missing compare");
      if (ctrl.test_byte !== test_bytes[cmp_byte]) fail("wrong expected byte");
    end
    @(negedge clk);
  endtask

  // One key pass from Load Ram to the decision state inclusive.
  task automatic expect_pass();
    for (int a = 0; a < 256; a++) expect_cycle(ST_LOAD_RAM, a, -1);
    for (int a = 0; a < 256; a++) begin
      expect_cycle(ST_READ_SI, a, -1);
      expect_cycle(ST_READ_SJ, a, -1);
      expect_cycle(ST_WRITE_SI_SJ, a, -1);
      expect_cycle(ST_WRITE_SJ_SI, a, -1);
    end
    expect_cycle(ST_TEST_CLEAR, 0, -1);
    for (int n = 0; n < 4; n++) begin
      expect_cycle(ST_T_READ_SI, n + 1, n - 1);
      expect_cycle(ST_T_READ_SJ, n + 1, -1);
      expect_cycle(ST_T_WRITE_SI_SJ, n + 1, -1);
      expect_cycle(ST_T_WRITE_SJ_SI, n + 1, -1);
      expect_cycle(ST_T_READ_SK, n + 2, -1);
    end
    expect_cycle(ST_TEST_DONE, 0, 3);
  endtask

  initial begin
    int t0, t1;
    for (int n = 0; n < TEST_BYTES; n++) test_bytes[n] = 8'($urandom);
    any_found = 1'b0;
    keys_per_fu = 32'd3;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    // run 1: three keys, no match, stops exhausted
    expect_cycle(ST_CLEAR, 0, -1);
    for (int k = 0; k < 3; k++) begin
      t0 = int'($time / 10);
      expect_pass();
      expect_cycle(ST_CHECK_FOUND, 0, -1);
      if (k < 2) begin
        expect_cycle(ST_NEXT_K, 0, -1);
        t1 = int'($time / 10);
        checks++;
        if (t1 - t0 != 1304) fail($sformatf("pass took %0d cycles", t1 - t0));
      end
    end
    expect_cycle(ST_DONE, 0, -1);
    checks++;
    if (!(done && exhausted && !found && keys_tested == 32'd3)) fail("exhausted stop");
    checks++;
    if (!ctrl.k_ext) fail("probe not selected in Done");
    repeat (5) expect_cycle(ST_DONE, 0, -1);
    checks++;
    if (n_load != 1 || n_inc != 2) fail($sformatf("key register pulses %0d/%0d", n_load, n_inc));

    // run 2: the second key matches
    keys_per_fu = 32'd0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    expect_cycle(ST_CLEAR, 0, -1);
    expect_pass();
    expect_cycle(ST_CHECK_FOUND, 0, -1);
    expect_cycle(ST_NEXT_K, 0, -1);
    expect_pass();
    any_found = 1'b1;
    expect_cycle(ST_CHECK_FOUND, 0, -1);
    any_found = 1'b0;
    expect_cycle(ST_DONE, 0, -1);
    checks++;
    if (!(done && found && !exhausted && keys_tested == 32'd2)) fail("found stop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
