// compare10: unsigned greater-or-equal comparator, ge = (a >= b).
//
// The highest bit where a and b differ decides: a is the larger exactly when
// that bit of a is 1; when no bit differs the operands are equal and ge is
// 1. The loop below walks from bit 0 upward so that a higher differing bit
// overrides a lower one. This is the loop-end test of the engines'
// row/column counters. The chip has a 10-bit comparator; which relation it
// tests and its gate structure are this design's choice. Combinational.
module compare10 #(
  parameter int unsigned WIDTH = 10
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             ge
);
  always_comb begin
    ge = 1'b1;
    for (int i = 0; i < WIDTH; i++) begin
      // the highest differing bit is visited last and decides
      if (a[i] ^ b[i]) ge = a[i];
    end
  end
endmodule
