// sram_model: behavioural model of the external image RAM.
//
// Word-addressed, 8 bits wide. A read requested in cycle t (strobe high,
// rd high, address valid at the rising edge that ends cycle t) returns its
// data on rdata during cycle t+2, the two-cycle read delay of the board the
// chip was made for. A write (strobe high, rd low) stores wdata at the
// rising edge that ends the cycle. Counts reads and writes for the tests.
module sram_model #(
  parameter int unsigned DEPTH = 1 << 19,
  parameter int unsigned AW    = 19
) (
  input  logic          clk,
  input  logic          strobe,
  input  logic          rd,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);
  logic [7:0] mem [DEPTH];
  logic [7:0] pipe = '0;
  longint     n_reads = 0, n_writes = 0;

  initial rdata = '0;

  always @(posedge clk) begin
    rdata <= pipe;
    pipe  <= '0;
    if (strobe && rd) begin
      pipe    <= mem[addr];
      n_reads <= n_reads + 1;
    end
    if (strobe && !rd) begin
      mem[addr] <= wdata;
      n_writes  <= n_writes + 1;
    end
  end
endmodule
