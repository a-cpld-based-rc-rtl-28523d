// tb_rc4_key_space_reg: load, increment, wrap-around and load priority.
module tb_rc4_key_space_reg;
  logic        clk = 1'b0;
  logic        rst_n, load, inc;
  logic [31:0] start_key, key, model;
  int checks = 0, failures = 0;

  rc4_key_space_reg dut (.clk(clk), .rst_n(rst_n), .load(load),
                         .start_key(start_key), .inc(inc), .key(key));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 1'b0; inc = 1'b0; start_key = 32'hffff_fffd;
    @(negedge clk);
    checks++;
    if (key !== '0) begin failures++; $display("reset value %h", key); end
    rst_n = 1'b1;
    model = '0;
    for (int n = 0; n < 3000; n++) begin
      load = ($urandom % 8) == 0;
      inc  = 1'($urandom);
      if (n < 8) begin load = (n == 0); inc = (n != 0); end  // wrap near 2^32
      else if (($urandom % 4) == 0) start_key = $urandom;
      if (load)     model = start_key;
      else if (inc) model = model + 1;
      @(negedge clk);
      checks++;
      if (key !== model) begin
        failures++;
        if (failures < 10) $display("step %0d: key %h != %h", n, key, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
