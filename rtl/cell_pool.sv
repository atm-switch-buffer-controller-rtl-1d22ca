// cell_pool: storage for the cells of the buffer, one slot per buffer address.
//
// The lists only hold addresses; the cells themselves sit in this pool, which
// in the switch is a memory outside the controller chip. Slot a occupies bytes
// {a, i} for i = 0..SLOT_BYTES-1, with SLOT_BYTES a power of two so that a byte
// address is the cell address with the byte index appended. The crossbar side
// writes one byte per clock (wr_en, wr_cell, wr_idx, wr_data). The transmit side
// reads one byte per clock: the byte addressed in one cycle is on rd_data in
// the next (synchronous read). Separate read and write ports are this design's
// choice; the document gives the pool only as the off-chip cell memory that the
// list controller addresses.
module cell_pool
  import atm_buf_pkg::*;
#(
  parameter int unsigned DEPTH      = list_depth(DEF_NUM_CLASSES, DEF_CAPACITY),
  parameter int unsigned ADDR_W     = $clog2(DEPTH),
  parameter int unsigned SLOT_BYTES = 64,
  parameter int unsigned IDX_W      = $clog2(SLOT_BYTES)
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_cell,
  input  logic [IDX_W-1:0]  wr_idx,
  input  logic [7:0]        wr_data,
  input  logic [ADDR_W-1:0] rd_cell,
  input  logic [IDX_W-1:0]  rd_idx,
  output logic [7:0]        rd_data
);

  logic [7:0] mem [DEPTH * SLOT_BYTES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_cell, wr_idx}] <= wr_data;
    rd_data <= mem[{rd_cell, rd_idx}];
  end

endmodule
