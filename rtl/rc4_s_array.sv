// rc4_s_array: the 256 x 8 RC4 state memory of one functional unit.
//
// A single-port synchronous RAM: one access per clock, either a read or a
// write. The single port follows the document, which built the array in one
// embedded memory block of the target device. The address is sampled on the
// rising edge; on a read cycle the word appears on rdata in the next cycle and
// stays there until the next access. The one-cycle read latency is this
// design's choice; the whole controller schedule is built around it. A write
// cycle leaves rdata unchanged, so a value read just before a write can still
// be captured during the write. The contents are not reset: the controller
// fills the array before it reads it.
module rc4_s_array #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    else    rdata     <= mem[addr];
  end

endmodule
