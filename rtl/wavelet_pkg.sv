// wavelet_pkg: types and constants shared by the Haar wavelet transform chip.
//
// The chip works on an 8-bit signed image held in an external RAM that is
// addressed by a 19-bit word address; the image starts at word IMG_OFFSET and
// is stored row by row. An internal 256 x 8 register file with a 10-bit
// address bus holds intermediate coefficients. The record types below are
// the request bundles one engine drives onto the shared RAM bus and onto the
// register-file bus; the controllers multiplex them the way the chip's
// tristate buses do.
//
// The sizes follow the chip (19-bit RAM address, 8-bit data, 10-bit
// register address, 5 state pins, image offset 10); the record layouts and
// the rule enumeration are this design's. A module that imports the package
// but not every constant gets UNUSEDPARAM notes from a lint run with -Wall;
// they are harmless.
package wavelet_pkg;

  localparam int unsigned ADDR_W     = 19;  // RAM address bus
  localparam int unsigned DATA_W     = 8;   // RAM and register data buses
  localparam int unsigned REGADDR_W  = 10;  // register-file address bus
  localparam int unsigned STATE_W    = 5;   // state display pins
  localparam int unsigned IMG_OFFSET = 10;  // first image word in RAM

  typedef logic signed [DATA_W-1:0] pixel_t;

  // Request from an engine to the external RAM. strobe marks an access
  // cycle, rd selects read (1) or write (0), matching the Memwrsel pin.
  typedef struct packed {
    logic              strobe;
    logic              rd;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } mem_req_t;

  // Request to the internal register file. en enables an access, we selects
  // a write; a read is combinational while en is high and we is low.
  typedef struct packed {
    logic                 en;
    logic                 we;
    logic [REGADDR_W-1:0] addr;
    logic [DATA_W-1:0]    wdata;
  } reg_req_t;

  localparam mem_req_t MEM_IDLE = '{strobe: 1'b0, rd: 1'b1, addr: '0, wdata: '0};
  localparam reg_req_t REG_IDLE = '{en: 1'b0, we: 1'b0, addr: '0, wdata: '0};

  // Quantize/threshold rule applied to a column-transform output. Q0 leaves
  // the value alone; Q1..Q6 are the per-quadrant rules.
  typedef enum logic [2:0] {Q0 = 3'd0, Q1, Q2, Q3, Q4, Q5, Q6} qrule_t;

  // Rule for a coefficient of the column pass at transform level lvl
  // (0 = first pass on the full image). hi_col: the column lies in the right
  // (row-wavelet) half; hi_row: the coefficient goes to the bottom half.
  function automatic qrule_t quad_rule(input logic [1:0] lvl, input logic hi_col,
                                       input logic hi_row);
    logic hh;
    hh = hi_col & hi_row;
    if (!hi_col && !hi_row) return Q0;
    unique case (lvl)
      2'd0:    return hh ? Q6 : Q5;
      2'd1:    return hh ? Q4 : Q3;
      default: return hh ? Q2 : Q1;
    endcase
  endfunction

endpackage
