// row_transform: forward Haar transform of every row of the current image.
//
// The current image is the N x N top-left corner of the IMG x IMG picture,
// N = IMG >> level. For each row the engine reads pixels four at a time,
// forms two scaling coefficients s = (a+b)>>>1 and two wavelet coefficients
// w = (a-b)>>>1 (9-bit add/subtract, arithmetic shift), writes the scaling
// coefficients straight back to RAM into the left half of the row and parks
// the wavelet coefficients in the register file. When the row is done the
// register file is copied to the right half of the row. Each pixel is thus
// read once and each coefficient written once; the scaling writes never
// overtake the reads, so the transform works in place.
//
// Cycle budget (one state per clock):
//   per 4 pixels: ADDR RD0 RD1 RD2 RD3 LAT2 LAT3 WR0 WR1 NEXT   = 10
//   per row end:  FINIT, N/2 x (FRD FWR FINC), FEND1 FEND2      = 3 + 3N/2
// so a pass takes N*(10*N/4 + 3*N/2 + 3) cycles plus the DONE cycle. The
// external RAM returns read data two cycles after the request: the read
// issued in RD0 is latched in RD2, and so on. The 10-state group and the
// 3-state copy loop follow the chip; the exact order of the states is this
// design's own.
//
// Interface: start (one cycle, in IDLE) with level held stable until done;
// done pulses for one cycle at the end. mem_req/reg_req are the requests for
// the RAM and register-file buses; state shows the FSM state (5 bits).
// Synchronous active-high reset.
//
// Lint notes: the carry/borrow outputs of the adders, incrementers and the
// butterfly subtractor are left unused on purpose (addresses and counters
// never overflow for the supported sizes, and the 9-bit butterfly cannot
// overflow), and bit 0 of the butterfly sum and difference is the bit
// dropped by the halving. Verilator reports these as UNUSEDSIGNAL.
module row_transform
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
    IDLE, ADDR, RD0, RD1, RD2, RD3, LAT2, LAT3, WR0, WR1, NEXT,
    FINIT, FRD, FWR, FINC, FEND1, FEND2, DONE
  } st_t;

  st_t st;

  logic [9:0]        n, n_half, n_quart;   // line length and its fractions
  logic [9:0]        line, grp, ri;        // row, 4-pixel group, register index
  logic [ADDR_W-1:0] rd_addr, wr_addr;
  pixel_t            p0, p1, p2, p3;

  assign n       = 10'(IMG >> level);
  assign n_half  = n >> 1;
  assign n_quart = n >> 2;

  // ---------------- arithmetic components ----------------
  // address adder (add19) + start offset (incby10): row base + pixel index
  logic              add19_en, inc19_en;
  logic [ADDR_W-1:0] add19_a, add19_b, add19_y, inc19_a, inc19_y, off_y;
  logic              add19_co, inc19_co;

  assign add19_en = (st == ADDR) || (st == FEND2);
  assign add19_a  = ADDR_W'(line) << S;
  assign add19_b  = (st == ADDR) ? ADDR_W'(grp) << 2 : '0;

  carry_select_adder #(.WIDTH(ADDR_W)) u_add19 (
    .en(add19_en), .a(add19_a), .b(add19_b), .cin(1'b0), .sum(add19_y), .cout(add19_co)
  );
  incby10 #(.WIDTH(ADDR_W), .INC(OFFSET)) u_incby10 (.en(add19_en), .a(add19_y), .y(off_y));

  // inc19 steps the read address during reads and the write address otherwise
  assign inc19_en = (st inside {RD0, RD1, RD2, RD3, WR0, WR1, FINC});
  assign inc19_a  = (st inside {RD0, RD1, RD2, RD3}) ? rd_addr : wr_addr;
  incrementer #(.WIDTH(ADDR_W)) u_inc19 (.en(inc19_en), .a(inc19_a), .y(inc19_y), .cout(inc19_co));

  // inc10: group counter in NEXT, register index in WR*/FINC, row in FEND1
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

  // loop-end comparator
  logic       cmp_ge;
  logic [9:0] cmp_b;
  always_comb begin
    unique case (st)
      NEXT:    cmp_b = n_quart;
      FINC:    cmp_b = n_half;
      default: cmp_b = n;
    endcase
  end
  compare10 u_cmp (.a((st == FEND2) ? line : inc10_y), .b(cmp_b), .ge(cmp_ge));

  // Haar butterfly: 2:1 operand multiplexer, 9-bit adder and subtractor
  logic         haar_en, add9_co, sub9_bo;
  pixel_t       ha, hb, s_out, w_out;
  logic [8:0]   add9_y, sub9_y;
  assign haar_en = (st == WR0) || (st == WR1);
  assign ha      = (st == WR1) ? p2 : p0;
  assign hb      = (st == WR1) ? p3 : p1;
  ripple_adder #(.WIDTH(9)) u_add9 (
    .en(haar_en), .a({ha[7], ha}), .b({hb[7], hb}), .cin(1'b0), .sum(add9_y), .cout(add9_co)
  );
  ripple_subtractor #(.WIDTH(9)) u_sub9 (
    .en(haar_en), .a({ha[7], ha}), .b({hb[7], hb}), .diff(sub9_y), .borrow(sub9_bo)
  );
  assign s_out = add9_y[8:1];   // arithmetic shift right by one
  assign w_out = sub9_y[8:1];

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
        RD0:  begin rd_addr <= inc19_y; st <= RD1; end
        RD1:  begin rd_addr <= inc19_y; st <= RD2; end
        RD2:  begin rd_addr <= inc19_y; p0 <= mem_rdata; st <= RD3; end
        RD3:  begin p1 <= mem_rdata; st <= LAT2; end
        LAT2: begin p2 <= mem_rdata; st <= LAT3; end
        LAT3: begin p3 <= mem_rdata; st <= WR0; end
        WR0, WR1: begin
          wr_addr <= inc19_y;
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
          wr_addr <= inc19_y;
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

  // ---------------- bus requests (Moore outputs) ----------------
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
        mem_req.wdata  = s_out;
        reg_req.en     = 1'b1;
        reg_req.we     = 1'b1;
        reg_req.addr   = ri;
        reg_req.wdata  = w_out;
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
