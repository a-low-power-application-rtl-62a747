// col_transform: forward Haar transform of every column, with quantization.
//
// Runs after row_transform on the same N x N corner (N = IMG >> level). For
// each column it reads four pixels going down the column, forms scaling
// coefficients s = (a+b)>>>1 and wavelet coefficients w = (a-b)>>>1, passes
// both through the quantize/threshold rules (quantizer) and writes the
// scaling coefficients back to RAM in the top half of the column while the
// wavelet coefficients wait in the register file; at the end of the column
// the register file is copied into the bottom half. Folding quantization
// into this pass means the image never has to be read again for it.
//
// Quantization rule by quadrant (see wavelet_pkg::quad_rule): the top half
// of a column in the left half of the image is the low-low band and is
// left alone; the upper-right and lower-left bands use rules 5/3/1 and the
// lower-right band rules 6/4/2 at levels 0/1/2.
//
// Cycle budget (one state per clock):
//   per 4 pixels: ADDR RD0 RD1 RD2 RD3 LAT2 LAT3 QNT0 QNT1 WR0 WR1 NEXT = 12
//   per column end: FINIT, N/2 x (FRD FWR FINC), FEND1 FEND2 = 3 + 3N/2
// so a pass takes N*(12*N/4 + 3*N/2 + 3) cycles plus DONE. The 12-state
// group and the copy loop follow the chip; the split of the two extra
// states into two butterfly/quantize states is this design's choice.
// RAM reads return data two cycles after the request.
//
// Interface and reset as row_transform.
//
// Lint notes: the carry/borrow outputs of the adders, incrementer and the
// butterfly subtractor are left unused on purpose (addresses and counters
// never overflow for the supported sizes, and the 9-bit butterfly cannot
// overflow), and bit 0 of the butterfly sum and difference is the bit
// dropped by the halving. Verilator reports these as UNUSEDSIGNAL.
module col_transform
  import wavelet_pkg::*;
#(
  parameter int unsigned IMG    = 512,
  parameter int unsigned OFFSET = IMG_OFFSET
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               start,
  input  logic [1:0]         level,
  output logic               done,
  output logic               busy,
  output logic [STATE_W-1:0] state,
  output mem_req_t           mem_req,
  input  logic [DATA_W-1:0]  mem_rdata,
  output reg_req_t           reg_req,
  input  logic [DATA_W-1:0]  reg_rdata
);
  localparam int unsigned S = $clog2(IMG);

  typedef enum logic [STATE_W-1:0] {
    IDLE, ADDR, RD0, RD1, RD2, RD3, LAT2, LAT3, QNT0, QNT1, WR0, WR1, NEXT,
    FINIT, FRD, FWR, FINC, FEND1, FEND2, DONE
  } st_t;

  st_t st;

  logic [9:0]        n, n_half, n_quart;
  logic [9:0]        line, grp, ri;        // column, 4-pixel group, register index
  logic [ADDR_W-1:0] rd_addr, wr_addr;
  pixel_t            p0, p1, p2, p3;
  pixel_t            s0q, w0q, s1q, w1q;   // quantized coefficients

  assign n       = 10'(IMG >> level);
  assign n_half  = n >> 1;
  assign n_quart = n >> 2;

  // ---------------- arithmetic components ----------------
  // add19 forms the column start address and steps addresses by one row
  logic              add19_en, off_en, add19_co;
  logic [ADDR_W-1:0] add19_a, add19_b, add19_y, off_y;

  assign off_en   = (st == ADDR) || (st == FEND2);
  assign add19_en = off_en || (st inside {RD0, RD1, RD2, WR0, WR1, FINC});
  always_comb begin
    unique case (st)
      ADDR:          begin add19_a = ADDR_W'(line); add19_b = (ADDR_W'(grp) << 2) << S; end
      FEND2:         begin add19_a = ADDR_W'(line); add19_b = '0; end
      RD0, RD1, RD2: begin add19_a = rd_addr;       add19_b = ADDR_W'(IMG); end
      default:       begin add19_a = wr_addr;       add19_b = ADDR_W'(IMG); end
    endcase
  end
  carry_select_adder #(.WIDTH(ADDR_W)) u_add19 (
    .en(add19_en), .a(add19_a), .b(add19_b), .cin(1'b0), .sum(add19_y), .cout(add19_co)
  );
  incby10 #(.WIDTH(ADDR_W), .INC(OFFSET)) u_incby10 (.en(off_en), .a(add19_y), .y(off_y));

  logic       inc10_en, inc10_co;
  logic [9:0] inc10_a, inc10_y;
  assign inc10_en = (st inside {NEXT, WR0, WR1, FINC, FEND1});
  always_comb begin
    unique case (st)
      NEXT:    inc10_a = grp;
      FEND1:   inc10_a = line;
      default: inc10_a = ri;
    endcase
  end
  incrementer #(.WIDTH(10)) u_inc10 (.en(inc10_en), .a(inc10_a), .y(inc10_y), .cout(inc10_co));

  logic       cmp_ge, hi_col;
  logic [9:0] cmp_b;
  always_comb begin
    unique case (st)
      NEXT:    cmp_b = n_quart;
      FINC:    cmp_b = n_half;
      default: cmp_b = n;
    endcase
  end
  compare10 u_cmp (.a((st == FEND2) ? line : inc10_y), .b(cmp_b), .ge(cmp_ge));
  // right half of the image: a second comparator on the column counter
  compare10 u_cmp_half (.a(line), .b(n_half), .ge(hi_col));

  // Haar butterfly and the two quantizers
  logic       haar_en, add9_co, sub9_bo;
  pixel_t     ha, hb, s_raw, w_raw, s_q, w_q;
  logic [8:0] add9_y, sub9_y;
  qrule_t     s_rule, w_rule;
  assign haar_en = (st == QNT0) || (st == QNT1);
  assign ha      = (st == QNT1) ? p2 : p0;
  assign hb      = (st == QNT1) ? p3 : p1;
  ripple_adder #(.WIDTH(9)) u_add9 (
    .en(haar_en), .a({ha[7], ha}), .b({hb[7], hb}), .cin(1'b0), .sum(add9_y), .cout(add9_co)
  );
  ripple_subtractor #(.WIDTH(9)) u_sub9 (
    .en(haar_en), .a({ha[7], ha}), .b({hb[7], hb}), .diff(sub9_y), .borrow(sub9_bo)
  );
  assign s_raw  = add9_y[8:1];
  assign w_raw  = sub9_y[8:1];
  assign s_rule = quad_rule(level, hi_col, 1'b0);
  assign w_rule = quad_rule(level, hi_col, 1'b1);
  quantizer u_q_s (.en(haar_en), .rule(s_rule), .x(s_raw), .y(s_q));
  quantizer u_q_w (.en(haar_en), .rule(w_rule), .x(w_raw), .y(w_q));

  // ---------------- state machine ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      st      <= IDLE;
      line    <= '0;
      grp     <= '0;
      ri      <= '0;
      rd_addr <= '0;
      wr_addr <= '0;
      p0 <= '0; p1 <= '0; p2 <= '0; p3 <= '0;
      s0q <= '0; w0q <= '0; s1q <= '0; w1q <= '0;
    end else begin
      unique case (st)
        IDLE: if (start) begin
          line    <= '0;
          grp     <= '0;
          ri      <= '0;
          wr_addr <= ADDR_W'(OFFSET);
          st      <= ADDR;
        end
        ADDR: begin rd_addr <= off_y; st <= RD0; end
        RD0:  begin rd_addr <= add19_y; st <= RD1; end
        RD1:  begin rd_addr <= add19_y; st <= RD2; end
        RD2:  begin rd_addr <= add19_y; p0 <= mem_rdata; st <= RD3; end
        RD3:  begin p1 <= mem_rdata; st <= LAT2; end
        LAT2: begin p2 <= mem_rdata; st <= LAT3; end
        LAT3: begin p3 <= mem_rdata; st <= QNT0; end
        QNT0: begin s0q <= s_q; w0q <= w_q; st <= QNT1; end
        QNT1: begin s1q <= s_q; w1q <= w_q; st <= WR0; end
        WR0, WR1: begin
          wr_addr <= add19_y;
          ri      <= inc10_y;
          st      <= (st == WR0) ? WR1 : NEXT;
        end
        NEXT: begin
          grp <= inc10_y;
          st  <= cmp_ge ? FINIT : ADDR;
        end
        FINIT: begin ri <= '0; st <= FRD; end
        FRD:   st <= FWR;
        FWR:   st <= FINC;
        FINC: begin
          ri      <= inc10_y;
          wr_addr <= add19_y;
          st      <= cmp_ge ? FEND1 : FRD;
        end
        FEND1: begin line <= inc10_y; st <= FEND2; end
        FEND2: begin
          grp     <= '0;
          ri      <= '0;
          wr_addr <= off_y;
          st      <= cmp_ge ? DONE : ADDR;
        end
        DONE:    st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end

  // ---------------- bus requests ----------------
  always_comb begin
    mem_req = MEM_IDLE;
    reg_req = REG_IDLE;
    unique case (st)
      RD0, RD1, RD2, RD3: begin
        mem_req.strobe = 1'b1;
        mem_req.rd     = 1'b1;
        mem_req.addr   = rd_addr;
      end
      WR0, WR1: begin
        mem_req.strobe = 1'b1;
        mem_req.rd     = 1'b0;
        mem_req.addr   = wr_addr;
        mem_req.wdata  = (st == WR1) ? s1q : s0q;
        reg_req.en     = 1'b1;
        reg_req.we     = 1'b1;
        reg_req.addr   = ri;
        reg_req.wdata  = (st == WR1) ? w1q : w0q;
      end
      FRD: begin
        reg_req.en   = 1'b1;
        reg_req.addr = ri;
      end
      FWR: begin
        reg_req.en     = 1'b1;
        reg_req.addr   = ri;
        mem_req.strobe = 1'b1;
        mem_req.rd     = 1'b0;
        mem_req.addr   = wr_addr;
        mem_req.wdata  = reg_rdata;
      end
      default: ;
    endcase
  end

  assign done  = (st == DONE);
  assign busy  = (st != IDLE);
  assign state = st;
endmodule
