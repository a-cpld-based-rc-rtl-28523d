// rc4_key_space_reg: the key space register in front of one functional unit.
//
// Each functional unit searches its own range of the key space. This register
// holds the key the unit is testing: `load` sets it to the first key of the
// unit's range, `inc` steps it to the next key (wrapping modulo 2^WIDTH). The
// document names the register and says every unit tests a different set of
// keys; the load-and-count behaviour is this design's reading of that.
// Load takes priority over inc. Reset is synchronous and clears the register.
module rc4_key_space_reg #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] start_key,
  input  logic             inc,
  output logic [WIDTH-1:0] key
);

  always_ff @(posedge clk) begin
    if (!rst_n)    key <= '0;
    else if (load) key <= start_key;
    else if (inc)  key <= key + WIDTH'(1);
  end

endmodule
