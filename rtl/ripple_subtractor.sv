// ripple_subtractor: WIDTH-bit ripple-carry subtractor, diff = a - b.
//
// Two's-complement subtraction on a full-adder chain: b is inverted and the
// carry into bit 0 is 1. The chip uses a 9-bit one (sub9) so that the
// difference of two 8-bit signed pixels never overflows. en isolates the
// operands as in ripple_adder; while en is low diff reads 0. borrow is the
// inverted carry out (set when a < b unsigned). Ripple carry follows the
// chip; the a + ~b + 1 form is this design's choice. Combinational.
module ripple_subtractor #(
  parameter int unsigned WIDTH = 9
) (
  input  logic             en,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] diff,
  output logic             borrow
);
  logic [WIDTH-1:0] ag, bn;
  logic [WIDTH:0]   c;

  assign ag   = en ? a : '0;
  assign bn   = en ? ~b : '1;
  assign c[0] = 1'b1;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    assign diff[i] = ag[i] ^ bn[i] ^ c[i];
    assign c[i+1]  = (ag[i] & bn[i]) | (c[i] & (ag[i] ^ bn[i]));
  end

  assign borrow = ~c[WIDTH];
endmodule
