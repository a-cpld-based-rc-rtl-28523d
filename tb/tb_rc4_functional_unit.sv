// tb_rc4_functional_unit: one functional unit driven by a scripted schedule.
//
// The testbench plays the control unit itself: cycle by cycle it issues the
// fill, key-schedule and keystream commands for a random 32-bit key, then
// checks (1) the state array after the key schedule against the reference
// model, (2) key_found for the true keystream bytes, (3) key_found low when
// any one of the four expected bytes is wrong, and (4) the key bytes read back
// through the probe port.
module tb_rc4_functional_unit;
  import rc4_pkg::*;
  import rc4_ref_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  fu_ctrl_t    ctrl;
  logic [31:0] key;
  logic [1:0]  ext_addr;
  byte_t       k_byte;
  logic        key_found;
  int checks = 0, failures = 0;

  rc4_functional_unit dut (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl), .key_in(key), .ext_addr(ext_addr),
    .k_byte(k_byte), .key_found(key_found));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fu_ctrl_t idle();
    fu_ctrl_t c = '0;
    c.s_addr_sel = SADDR_I;
    c.s_data_sel = SDATA_I;
    return c;
  endfunction

  task automatic step(input fu_ctrl_t c);
    ctrl = c;
    @(negedge clk);
  endtask

  // Swap S[i] and S[j]: read S[i], read S[j] with j updated, two writes.
  task automatic swap(input int i, input bit with_key);
    fu_ctrl_t c;
    c = idle(); c.i = 8'(i);
    step(c);                                         // address S[i]
    c = idle(); c.i = 8'(i); c.s_addr_sel = SADDR_JNEW;
    c.k_add = with_key; c.si_en = 1'b1; c.j_en = 1'b1;
    step(c);                                         // j update, address S[j]
    c = idle(); c.i = 8'(i); c.s_addr_sel = SADDR_J; c.s_data_sel = SDATA_SI;
    c.s_we = 1'b1; c.sj_en = 1'b1;
    step(c);                                         // S[j] = Si
    c = idle(); c.i = 8'(i); c.s_addr_sel = SADDR_I; c.s_data_sel = SDATA_SJ;
    c.s_we = 1'b1;
    step(c);                                         // S[i] = Sj
  endtask

  task automatic run_key(input logic [31:0] k, input byte_t expect_ks [4],
                         input bit check_state);
    fu_ctrl_t c;
    kbyte_t   ref_s [256];
    key = k;
    c = idle(); c.k_load = 1'b1; c.j_clr = 1'b1; c.cnt_clr = 1'b1;
    step(c);
    for (int a = 0; a < 256; a++) begin
      c = idle(); c.i = 8'(a); c.s_we = 1'b1;
      step(c);
    end
    for (int a = 0; a < 256; a++) swap(a, 1'b1);
    if (check_state) begin
      rc4_ksa({32'd0, k}, 4, ref_s);
      for (int a = 0; a < 256; a++) begin
        checks++;
        if (dut.u_s_array.mem[a] !== ref_s[a]) begin
          failures++;
          if (failures < 10)
            $display("key %h: S[%0d] = %h, expected %h", k, a, dut.u_s_array.mem[a], ref_s[a]);
        end
      end
    end
    c = idle(); c.j_clr = 1'b1; c.cnt_clr = 1'b1;
    step(c);
    for (int n = 0; n < 4; n++) begin
      swap(n + 1, 1'b0);
      c = idle(); c.s_addr_sel = SADDR_T;          // address S[Si + Sj]
      step(c);
      c = idle(); c.i = 8'(n + 2); c.cmp_en = 1'b1; c.test_byte = expect_ks[n];
      step(c);                                     // compare byte n
    end
    ctrl = idle();
  endtask

  initial begin
    byte_t ks [4];
    byte_t bad [4];
    logic [31:0] k;
    rst_n = 1'b0; ctrl = idle(); key = '0; ext_addr = '0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 12; n++) begin
      k = (n == 0) ? 32'h0102_0304 : $urandom;
      rc4_keystream({32'd0, k}, 4, ks);
      run_key(k, ks, 1'b1);
      checks++;
      if (key_found !== 1'b1) begin failures++; $display("key %h not recognised", k); end
      // probe the key bytes
      ctrl.k_ext = 1'b1;
      for (int a = 0; a < 4; a++) begin
        ext_addr = 2'(a);
        #1;
        checks++;
        if (k_byte !== k[8*(4-a)-1 -: 8]) begin
          failures++;
          $display("probe byte %0d: %h", a, k_byte);
        end
      end
      // the same key with one wrong expected byte must be rejected
      bad = ks;
      bad[n % 4] = ks[n % 4] ^ 8'(1 + $urandom % 255);
      run_key(k, bad, 1'b0);
      checks++;
      if (key_found !== 1'b0) begin failures++; $display("key %h: false match", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
