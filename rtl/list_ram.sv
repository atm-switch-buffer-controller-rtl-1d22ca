// list_ram: on-chip RAM holding the link fields of every buffer address.
//
// Single port, as the list controller drives one address bus and one data bus
// to it. One access per clock: with we=1 the fields selected by wmask are
// written at addr (the others keep their value); with we=0 the whole word at
// addr is read and appears on rdata in the next cycle (synchronous read,
// one cycle latency). rdata holds its value while no read is made.
// The word is NUM_FIELDS link fields of ADDR_W bits (see atm_buf_pkg). The
// per-field write mask is a choice of this design that saves read-modify-write
// cycles; the document only gives the RAM as an on-chip memory of the lists.
module list_ram
  import atm_buf_pkg::*;
#(
  parameter int unsigned DEPTH  = list_depth(DEF_NUM_CLASSES, DEF_CAPACITY),
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic                                 clk,
  input  logic [ADDR_W-1:0]                    addr,
  input  logic                                 we,
  input  logic [NUM_FIELDS-1:0]                wmask,
  input  logic [NUM_FIELDS-1:0][ADDR_W-1:0]    wdata,
  output logic [NUM_FIELDS-1:0][ADDR_W-1:0]    rdata
);

  logic [NUM_FIELDS-1:0][ADDR_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int f = 0; f < NUM_FIELDS; f++)
        if (wmask[f]) mem[addr][f] <= wdata[f];
    end else begin
      rdata <= mem[addr];
    end
  end

endmodule
