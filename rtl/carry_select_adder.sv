// carry_select_adder: WIDTH-bit carry-select adder (the chip's 19-bit add19).
//
// The operands are cut into BLOCK-bit slices. The lowest slice is a plain
// ripple adder; every higher slice holds two ripple adders, one assuming a
// carry-in of 0 and one of 1, and the real carry from the slice below picks
// the result with a multiplexer. This trades area for a shorter carry path,
// the reason the chip uses it for its widest adder. The slice width is this
// design's choice. en is the operand-isolation control line (outputs read 0
// while it is low). Combinational.
module carry_select_adder #(
  parameter int unsigned WIDTH = 19,
  parameter int unsigned BLOCK = 4
) (
  input  logic             en,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NBLK = (WIDTH + BLOCK - 1) / BLOCK;

  logic [WIDTH-1:0] ag, bg;
  logic [NBLK:0]    carry;

  assign ag       = en ? a : '0;
  assign bg       = en ? b : '0;
  assign carry[0] = en & cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int unsigned LO = k * BLOCK;
    localparam int unsigned W  = (LO + BLOCK > WIDTH) ? (WIDTH - LO) : BLOCK;
    logic [W-1:0] s0, s1;
    logic [W:0]   c0, c1;
    assign c0[0] = 1'b0;
    assign c1[0] = 1'b1;
    for (genvar i = 0; i < W; i++) begin : g_bit
      logic x;
      assign x       = ag[LO+i] ^ bg[LO+i];
      assign s0[i]   = x ^ c0[i];
      assign s1[i]   = x ^ c1[i];
      assign c0[i+1] = (ag[LO+i] & bg[LO+i]) | (c0[i] & x);
      assign c1[i+1] = (ag[LO+i] & bg[LO+i]) | (c1[i] & x);
    end
    assign sum[LO +: W] = carry[k] ? s1 : s0;
    assign carry[k+1]   = carry[k] ? c1[W] : c0[W];
  end

  assign cout = carry[NBLK];
endmodule
