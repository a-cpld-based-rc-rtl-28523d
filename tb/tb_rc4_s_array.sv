// tb_rc4_s_array: random single-port traffic against an array model.
//
// Fills the RAM, then issues random reads and writes. Checks that a read
// returns the model word one cycle after the address is presented and that a
// write cycle leaves the read data of the previous read unchanged.
module tb_rc4_s_array;
  logic       clk = 1'b0;
  logic       we;
  logic [7:0] addr, wdata, rdata;
  logic [7:0] model [256];
  logic [7:0] expect_q;
  int checks = 0, failures = 0;

  rc4_s_array dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      we = 1'b1; addr = 8'(a); wdata = 8'($urandom);
      model[a] = wdata;
    end
    @(negedge clk);
    we = 1'b0; addr = 8'd17;
    expect_q = model[17];
    @(negedge clk);
    checks++;
    if (rdata !== expect_q) begin failures++; $display("read 17: %h != %h", rdata, expect_q); end
    for (int n = 0; n < 4000; n++) begin
      we    = 1'($urandom);
      addr  = 8'($urandom);
      wdata = 8'($urandom);
      if (we) model[addr] = wdata;
      else    expect_q    = model[addr];
      @(negedge clk);
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("cycle %0d: rdata %h != %h", n, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
