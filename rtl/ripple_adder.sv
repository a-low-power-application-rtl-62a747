// ripple_adder: WIDTH-bit ripple-carry adder with an operand-isolation enable.
//
// A chain of full adders, the structure the chip uses for its 8-, 9- and
// 10-bit adders (add8, add9, add10). The en input is the per-component
// control line of the low-power scheme: while en is low both operands are
// forced to zero, so the carry chain does not toggle when the inputs change,
// and sum/cout read 0. Ripple carry follows the chip; forcing the operands
// to zero is this design's rendering of its control lines. Purely
// combinational.
module ripple_adder #(
  parameter int unsigned WIDTH = 9
) (
  input  logic             en,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] ag, bg;
  logic [WIDTH:0]   c;

  assign ag   = en ? a : '0;
  assign bg   = en ? b : '0;
  assign c[0] = en & cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    assign sum[i] = ag[i] ^ bg[i] ^ c[i];
    assign c[i+1] = (ag[i] & bg[i]) | (c[i] & (ag[i] ^ bg[i]));
  end

  assign cout = c[WIDTH];
endmodule
