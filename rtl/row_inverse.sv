// row_inverse: inverse Haar transform of every row of the current image.
//
// Works on the N x N top-left corner, N = IMG >> level. A row holds N/2
// scaling coefficients s (left half) followed by N/2 wavelet coefficients w
// (right half). For each group the engine reads s[2k], s[2k+1], w[2k],
// w[2k+1] and rebuilds four pixels
//   x[4k]   = s[2k]   + w[2k]      x[4k+1] = s[2k]   - w[2k]
//   x[4k+2] = s[2k+1] + w[2k+1]    x[4k+3] = s[2k+1] - w[2k+1]
// (8-bit adder and 9-bit subtractor, results kept to 8 bits). Pixels that
// belong to the left half of the row would overwrite scaling coefficients
// that are still unread, so they go to the register file; pixels of the
// right half only overwrite wavelet coefficients already read and go
// straight to RAM. At the end of the row the register file is copied into
// the left half.
//
// Cycle budget (one state per clock):
//   per group: ADDR RD0 RD1 RD2 RD3 LAT2 LAT3 CALC WR0 WR1 WR2 WR3 NEXT = 13
//   per row end: FINIT, N/2 x (FRD FWR FINC), FEND1 FEND2 = 3 + 3N/2
// plus one FEND2 cycle at the start of a pass and the DONE cycle. The
// 13-state group follows the chip; the state order and the register-file
// routing of the first half of the row are this design's reading of it.
// RAM reads return data two cycles after the request.
//
// Interface and reset as row_transform.
//
// Lint notes: the carry/borrow outputs of the adders, incrementer and the
// butterfly subtractor are left unused on purpose (addresses and counters
// never overflow for the supported sizes; pixel results wrap to 8 bits),
// and bit 8 of the difference is dropped for the same 8-bit wrap.
// The lint run lists these as UNUSEDSIGNAL.
module row_inverse
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

  // distance in RAM words of i steps along a row, and start of line l
  function automatic logic [ADDR_W-1:0] units(input logic [9:0] i);
    return ADDR_W'(i);
  endfunction
  function automatic logic [ADDR_W-1:0] line_base(input logic [9:0] l);
    return ADDR_W'(l) << S;
  endfunction

  typedef enum logic [STATE_W-1:0] {
    IDLE, ADDR, RD0, RD1, RD2, RD3, LAT2, LAT3, CALC, WR0, WR1, WR2, WR3, NEXT,
    FINIT, FRD, FWR, FINC, FEND1, FEND2, DONE
  } st_t;

  st_t st;

  logic [9:0]        n, n_half, n_quart, n_eighth;
  logic [9:0]        line, grp, ri;
  logic [ADDR_W-1:0] rd_addr, wr_addr;
  pixel_t            s0, s1, w0, w1;        // coefficients read
  pixel_t            o0, o1, o2, o3;        // rebuilt pixels
  logic              to_reg;                // group lies in the left half

  assign n        = 10'(IMG >> level);
  assign n_half   = n >> 1;
  assign n_quart  = n >> 2;
  assign n_eighth = n >> 3;

  // ---------------- arithmetic components ----------------
  logic              add19_en, off_en, add19_co;
  logic [ADDR_W-1:0] add19_a, add19_b, add19_y, off_y;

  assign off_en   = (st inside {ADDR, FINIT, FEND2});
  assign add19_en = off_en || (st inside {RD0, RD1, RD2, WR0, WR1, WR2, WR3, FINC});
  always_comb begin
    unique case (st)
      ADDR:     begin add19_a = line_base(line); add19_b = units(grp << 1); end
      FINIT:    begin add19_a = line_base(line); add19_b = '0; end
      FEND2:    begin add19_a = line_base(line); add19_b = units(n_half); end
      RD0, RD2: begin add19_a = rd_addr;         add19_b = units(10'd1); end
      RD1:      begin add19_a = rd_addr;         add19_b = units(n_half - 10'd1); end
      default:  begin add19_a = wr_addr;         add19_b = units(10'd1); end
    endcase
  end
  carry_select_adder #(.WIDTH(ADDR_W)) u_add19 (
    .en(add19_en), .a(add19_a), .b(add19_b), .cin(1'b0), .sum(add19_y), .cout(add19_co)
  );
  incby10 #(.WIDTH(ADDR_W), .INC(OFFSET)) u_incby10 (.en(off_en), .a(add19_y), .y(off_y));

  logic       inc10_en, inc10_co;
  logic [9:0] inc10_a, inc10_y;
  assign inc10_en = (st inside {NEXT, WR0, WR1, WR2, WR3, FINC, FEND1});
  always_comb begin
    unique case (st)
      NEXT:    inc10_a = grp;
      FEND1:   inc10_a = line;
      default: inc10_a = ri;
    endcase
  end
  incrementer #(.WIDTH(10)) u_inc10 (.en(inc10_en), .a(inc10_a), .y(inc10_y), .cout(inc10_co));

  logic       cmp_ge;
  logic [9:0] cmp_a, cmp_b;
  always_comb begin
    unique case (st)
      ADDR:    begin cmp_a = grp;     cmp_b = n_eighth; end
      NEXT:    begin cmp_a = inc10_y; cmp_b = n_quart;  end
      FINC:    begin cmp_a = inc10_y; cmp_b = n_half;   end
      default: begin cmp_a = line;    cmp_b = n;        end
    endcase
  end
  compare10 u_cmp (.a(cmp_a), .b(cmp_b), .ge(cmp_ge));

  // inverse butterfly: x0 = s + w (add8), x1 = s - w (sub9)
  logic       bf_en, add8_co, sub9_bo;
  pixel_t     bs, bw, x_sum, x_dif;
  logic [8:0] sub9_y;
  logic [7:0] add8_y;
  assign bf_en = (st == CALC) || (st == WR0);
  assign bs    = (st == WR0) ? s1 : s0;
  assign bw    = (st == WR0) ? w1 : w0;
  ripple_adder #(.WIDTH(8)) u_add8 (
    .en(bf_en), .a(bs), .b(bw), .cin(1'b0), .sum(add8_y), .cout(add8_co)
  );
  ripple_subtractor #(.WIDTH(9)) u_sub9 (
    .en(bf_en), .a({bs[7], bs}), .b({bw[7], bw}), .diff(sub9_y), .borrow(sub9_bo)
  );
  assign x_sum = add8_y;
  assign x_dif = sub9_y[7:0];

  pixel_t wr_val;
  always_comb begin
    unique case (st)
      WR1:     wr_val = o1;
      WR2:     wr_val = o2;
      WR3:     wr_val = o3;
      default: wr_val = o0;
    endcase
  end

  // ---------------- state machine ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      st      <= IDLE;
      line    <= '0;
      grp     <= '0;
      ri      <= '0;
      rd_addr <= '0;
      wr_addr <= '0;
      to_reg  <= 1'b0;
      s0 <= '0; s1 <= '0; w0 <= '0; w1 <= '0;
      o0 <= '0; o1 <= '0; o2 <= '0; o3 <= '0;
    end else begin
      unique case (st)
        IDLE: if (start) begin
          line <= '0;
          st   <= FEND2;
        end
        ADDR: begin
          rd_addr <= off_y;
          to_reg  <= ~cmp_ge;
          st      <= RD0;
        end
        RD0:  begin rd_addr <= add19_y; st <= RD1; end
        RD1:  begin rd_addr <= add19_y; st <= RD2; end
        RD2:  begin rd_addr <= add19_y; s0 <= mem_rdata; st <= RD3; end
        RD3:  begin s1 <= mem_rdata; st <= LAT2; end
        LAT2: begin w0 <= mem_rdata; st <= LAT3; end
        LAT3: begin w1 <= mem_rdata; st <= CALC; end
        CALC: begin o0 <= x_sum; o1 <= x_dif; st <= WR0; end
        WR0, WR1, WR2, WR3: begin
          if (st == WR0) begin o2 <= x_sum; o3 <= x_dif; end
          if (to_reg) ri <= inc10_y;
          else        wr_addr <= add19_y;
          unique case (st)
            WR0:     st <= WR1;
            WR1:     st <= WR2;
            WR2:     st <= WR3;
            default: st <= NEXT;
          endcase
        end
        NEXT: begin
          grp <= inc10_y;
          st  <= cmp_ge ? FINIT : ADDR;
        end
        FINIT: begin ri <= '0; wr_addr <= off_y; st <= FRD; end
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
      WR0, WR1, WR2, WR3: begin
        if (to_reg) begin
          reg_req.en    = 1'b1;
          reg_req.we    = 1'b1;
          reg_req.addr  = ri;
          reg_req.wdata = wr_val;
        end else begin
          mem_req.strobe = 1'b1;
          mem_req.rd     = 1'b0;
          mem_req.addr   = wr_addr;
          mem_req.wdata  = wr_val;
        end
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
