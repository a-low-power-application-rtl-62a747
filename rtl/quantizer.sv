// quantizer: quantize/threshold step applied to column-transform outputs.
//
// Each coefficient is an 8-bit two's-complement value. The rule number (see
// wavelet_pkg::qrule_t) depends on the transform level and on the quadrant
// the coefficient lands in; the scaling coefficients always use rule Q0.
// For rule Qn the steps run in order:
//   1. a negative value whose low K bits are not all zero gets 2**K added
//      (so the next step rounds it toward zero instead of toward -inf),
//   2. the low K bits are cleared,
//   3. the result is clamped to [-L, +L] where the rule has a limit.
//   rule:  Q0  Q1  Q2  Q3  Q4  Q5  Q6
//   K:      0   1   2   2   3   3   4
//   L:      -   -   -  64  64   8   8
// The rounding addition runs on a ripple adder whose control line is only
// raised while en is high; with en low the adder stays quiet and y is 0.
// Combinational.
module quantizer
  import wavelet_pkg::*;
(
  input  logic   en,
  input  qrule_t rule,
  input  pixel_t x,
  output pixel_t y
);
  logic [2:0] k;        // number of low bits cleared
  logic [6:0] lim;      // clamp limit, 0 = none
  logic [7:0] lowmask;  // ones in the low k bits
  logic [7:0] rnd;      // 2**k
  logic       add_en;
  logic [7:0] sum;
  logic       cout_unused;
  pixel_t     t;

  always_comb begin
    unique case (rule)
      Q1:      begin k = 3'd1; lim = 7'd0;  end
      Q2:      begin k = 3'd2; lim = 7'd0;  end
      Q3:      begin k = 3'd2; lim = 7'd64; end
      Q4:      begin k = 3'd3; lim = 7'd64; end
      Q5:      begin k = 3'd3; lim = 7'd8;  end
      Q6:      begin k = 3'd4; lim = 7'd8;  end
      default: begin k = 3'd0; lim = 7'd0;  end
    endcase
    lowmask = 8'((9'd1 << k) - 9'd1);
    rnd     = 8'(9'd1 << k);
  end

  // step 1: only switch the adder when the value needs the offset
  assign add_en = en && (rule != Q0) && x[7] && ((x & lowmask) != '0);

  ripple_adder #(.WIDTH(8)) u_add8 (
    .en(add_en), .a(x), .b(rnd), .cin(1'b0), .sum(sum), .cout(cout_unused)
  );

  always_comb begin
    t = add_en ? pixel_t'(sum) : x;
    t = t & pixel_t'(~lowmask);                        // step 2
    if (lim != 7'd0) begin                             // steps 3 and 4
      if (t < -$signed({1'b0, lim})) t = -$signed({1'b0, lim});
      else if (t > $signed({1'b0, lim})) t = $signed({1'b0, lim});
    end
    y = en ? t : '0;
  end
endmodule
