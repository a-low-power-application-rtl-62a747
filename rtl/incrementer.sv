// incrementer: WIDTH-bit increment by one (the chip's inc10 and inc19).
//
// A half-adder ripple chain: the carry into bit 0 is 1 and every stage only
// propagates it, which is all an increment needs. en is the operand-isolation
// control line; while it is low y reads 0. cout flags the wrap from all ones
// to zero. The chip's incrementer widths are followed; the half-adder
// structure is this design's choice. Combinational.
module incrementer #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             en,
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] y,
  output logic             cout
);
  logic [WIDTH-1:0] ag;
  logic [WIDTH:0]   c;

  assign ag   = en ? a : '0;
  assign c[0] = en;

  for (genvar i = 0; i < WIDTH; i++) begin : g_ha
    assign y[i]   = ag[i] ^ c[i];
    assign c[i+1] = ag[i] & c[i];
  end

  assign cout = c[WIDTH];
endmodule
