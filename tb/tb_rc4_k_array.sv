// tb_rc4_k_array: loads random keys and reads every byte back.
//
// Checks the byte order (byte 0 is the most significant key byte), that the
// read port is combinational, and that the array holds its key while `load`
// is low.
module tb_rc4_k_array;
  logic        clk = 1'b0;
  logic        load;
  logic [31:0] key_in, held;
  logic [1:0]  addr;
  logic [7:0]  rdata;
  int checks = 0, failures = 0;

  rc4_k_array dut (.clk(clk), .load(load), .key_in(key_in),
                   .addr(addr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0; key_in = '0; addr = '0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      load = 1'b1; key_in = $urandom; held = key_in;
      @(negedge clk);
      load = 1'b0; key_in = $urandom;   // must not be taken
      for (int a = 0; a < 4; a++) begin
        addr = 2'(a);
        #1;
        checks++;
        if (rdata !== held[8*(4-a)-1 -: 8]) begin
          failures++;
          $display("key %h byte %0d: %h", held, a, rdata);
        end
      end
      @(negedge clk);
      addr = 2'd3;
      #1;
      checks++;
      if (rdata !== held[7:0]) begin failures++; $display("key lost"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
