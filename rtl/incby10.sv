// incby10: 19-bit increment by a constant (ten by default).
//
// Adds the fixed start offset of the image in RAM to a pixel index. It is a
// ripple-carry adder with the second operand hard-wired, so the stages whose
// constant bit is 0 reduce to half adders. en isolates the input as on the
// other arithmetic components; y reads 0 while it is low. The chip has a
// dedicated increment-by-10 unit for this offset; its internal structure
// is this design's choice. The carry out of the top bit is not formed,
// since addresses never wrap. Combinational.
module incby10 #(
  parameter int unsigned WIDTH = 19,
  parameter int unsigned INC   = 10
) (
  input  logic             en,
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] y
);
  localparam logic [WIDTH-1:0] K = WIDTH'(INC);

  logic [WIDTH-1:0] ag;
  logic [WIDTH-1:0] c;     // carry into each bit; the carry out of the top is not needed

  assign ag   = en ? a : '0;
  assign c[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    if (K[i]) begin : g_one
      assign y[i] = en ? ~(ag[i] ^ c[i]) : 1'b0;
      if (i < WIDTH - 1) begin : g_c
        assign c[i+1] = en & (ag[i] | c[i]);
      end
    end else begin : g_zero
      assign y[i] = ag[i] ^ c[i];
      if (i < WIDTH - 1) begin : g_c
        assign c[i+1] = ag[i] & c[i];
      end
    end
  end
endmodule
