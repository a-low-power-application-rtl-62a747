// regfile: the chip's internal 256 x 8 register file.
//
// Holds the wavelet coefficients of one row or column until they are copied
// to RAM. The array is 64 rows of four byte-wide locations; location n sits
// in row n/4, column n%4. A 10-bit address comes in on the register address
// bus: bits 9..2 drive the row decoder (a row is selected only when bits 9
// and 8 are zero, so addresses 256 and up reach nothing) and bits 1..0 drive
// the column decoder. Separate row decoders produce ReadEnableRow and
// WriteEnableRow; the column decoder produces WriteEnableColumn. A cell is
// written where a write-enabled row crosses a write-enabled column.
//
// Timing: a write (en=1, we=1) is stored at the rising clock edge. A read
// (en=1, we=0) is combinational, so a location can be read and the value
// driven to RAM in the same cycle. When no read is enabled rdata is 0 (the
// chip's register data bus is released instead). The decoder split follows
// the chip; the clocked write and the zero-when-idle read bus are this
// model's choices. No reset: the contents are always written before read.
module regfile
  import wavelet_pkg::*;
#(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 4
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic                 we,
  input  logic [REGADDR_W-1:0] addr,
  input  logic [DATA_W-1:0]    wdata,
  output logic [DATA_W-1:0]    rdata
);
  localparam int unsigned CB = $clog2(COLS);
  localparam int unsigned RB = REGADDR_W - CB;

  logic [DATA_W-1:0] cells [ROWS][COLS];
  logic [ROWS-1:0]   rd_row_en, wr_row_en;
  logic [COLS-1:0]   wr_col_en, col_sel;
  logic [RB-1:0]     row_addr;

  assign row_addr = addr[REGADDR_W-1:CB];

  // row decoders: one comparator per row line
  for (genvar r = 0; r < ROWS; r++) begin : g_rowdec
    logic hit;
    assign hit          = (row_addr == RB'(r));
    assign rd_row_en[r] = hit & en & ~we;
    assign wr_row_en[r] = hit & en &  we;
  end

  // column decoder on the low address bits
  for (genvar c = 0; c < COLS; c++) begin : g_coldec
    assign col_sel[c]   = (addr[CB-1:0] == CB'(c));
    assign wr_col_en[c] = col_sel[c] & en & we;
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (wr_row_en[r] && wr_col_en[c]) cells[r][c] <= wdata;
  end

  always_comb begin
    rdata = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (rd_row_en[r] && col_sel[c]) rdata = rdata | cells[r][c];
  end
endmodule
