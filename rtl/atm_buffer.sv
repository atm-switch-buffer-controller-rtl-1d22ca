// atm_buffer: multi-class output buffer of one port of an ATM switch.
//
// Cells arrive from the crossbar, are stored in the cell pool and leave over
// UTOPIA towards the physical layer. The buffer serves classes by head-of-line
// priority (class 0 first, first come first served within a class, CLP
// ignored) and, when full, pushes out the most recent cell of the lowest-
// priority class present, preferring a CLP=1 cell. All of it rests on linked
// lists of cell addresses kept in an on-chip RAM, so every decision is a few
// direct RAM accesses and never a search.
//
// Blocks: rcube_if (crossbar side) writes each cell into the pool at the
// reserved address and makes link and allocate requests; list_controller with
// list_ram keeps the lists; ilf_if (UTOPIA transmit) asks the controller for
// the cell to send and reads it from the pool; cell_pool stores the cells.
// One clock drives everything. After reset the list RAM is initialised for
// DEPTH clocks (ready=0); cells offered before that are ignored.
// Defaults: 3 classes and 2000 cells, as in the document.
//
// Status outputs: cell_in / cell_out pulse per cell taken in / started out
// (cell_out_class is the class of the last cell chosen for sending);
// disc_valid pulses with the address, class and CLP of every pushed-out cell;
// class_nonempty shows which classes hold cells.
module atm_buffer
  import atm_buf_pkg::*;
#(
  parameter int unsigned NUM_CLASSES = DEF_NUM_CLASSES,
  parameter int unsigned CAPACITY    = DEF_CAPACITY,
  parameter int unsigned TAG_BYTES   = DEF_TAG_BYTES,
  parameter int unsigned DEPTH       = list_depth(NUM_CLASSES, CAPACITY),
  parameter int unsigned ADDR_W      = $clog2(DEPTH),
  parameter int unsigned CLASS_W     = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // crossbar link
  input  logic                   rc_valid,
  input  logic                   rc_soc,
  input  logic [7:0]             rc_data,
  output logic                   rc_ready,
  // UTOPIA level 1 transmit
  input  logic                   tx_clav,
  output logic                   tx_enb_n,
  output logic                   tx_soc,
  output logic [7:0]             tx_data,
  // status
  output logic                   cell_in,
  output logic                   cell_out,
  output logic [CLASS_W-1:0]     cell_out_class,
  output logic                   disc_valid,
  output logic [ADDR_W-1:0]      disc_addr,
  output logic [CLASS_W-1:0]     disc_class,
  output logic                   disc_lp,
  output logic [NUM_CLASSES-1:0] class_nonempty
);

  localparam int unsigned IDX_W = 6;   // 64-byte pool slots hold a 53-byte cell

  logic                              ready, next_valid;
  logic [ADDR_W-1:0]                 next_addr, deq_addr;
  logic                              enq_req, enq_clp, enq_ack, alloc_req, alloc_ack;
  logic [CLASS_W-1:0]                enq_class, deq_class;
  logic                              deq_req, deq_ack;
  logic [ADDR_W-1:0]                 ram_addr;
  logic                              ram_we;
  logic [NUM_FIELDS-1:0]             ram_wmask;
  logic [NUM_FIELDS-1:0][ADDR_W-1:0] ram_wdata, ram_rdata;
  logic                              pool_we;
  logic [ADDR_W-1:0]                 pool_wcell, pool_rcell;
  logic [IDX_W-1:0]                  pool_widx, pool_ridx;
  logic [7:0]                        pool_wdata, pool_rdata;

  assign rc_ready = ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       cell_out_class <= '0;
    else if (deq_ack) cell_out_class <= deq_class;

  rcube_if #(
    .NUM_CLASSES(NUM_CLASSES), .DEPTH(DEPTH), .ADDR_W(ADDR_W), .CLASS_W(CLASS_W),
    .TAG_BYTES(TAG_BYTES), .IDX_W(IDX_W)
  ) u_rcube_if (
    .clk, .rst_n,
    .rc_valid, .rc_soc, .rc_data,
    .ready, .next_addr, .next_valid,
    .enq_req, .enq_class, .enq_clp, .enq_ack,
    .alloc_req, .alloc_ack,
    .pool_we, .pool_cell(pool_wcell), .pool_idx(pool_widx), .pool_data(pool_wdata),
    .cell_in
  );

  list_controller #(
    .NUM_CLASSES(NUM_CLASSES), .CAPACITY(CAPACITY), .DEPTH(DEPTH), .ADDR_W(ADDR_W),
    .CLASS_W(CLASS_W)
  ) u_list_controller (
    .clk, .rst_n, .ready,
    .next_addr, .next_valid,
    .enq_req, .enq_class, .enq_clp, .enq_ack,
    .alloc_req, .alloc_ack,
    .deq_req, .deq_ack, .deq_addr, .deq_class, .class_nonempty,
    .disc_valid, .disc_addr, .disc_class, .disc_lp,
    .ram_addr, .ram_we, .ram_wmask, .ram_wdata, .ram_rdata
  );

  list_ram #(.DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_list_ram (
    .clk, .addr(ram_addr), .we(ram_we), .wmask(ram_wmask), .wdata(ram_wdata),
    .rdata(ram_rdata)
  );

  cell_pool #(.DEPTH(DEPTH), .ADDR_W(ADDR_W), .SLOT_BYTES(1 << IDX_W), .IDX_W(IDX_W)) u_cell_pool (
    .clk,
    .wr_en(pool_we), .wr_cell(pool_wcell), .wr_idx(pool_widx), .wr_data(pool_wdata),
    .rd_cell(pool_rcell), .rd_idx(pool_ridx), .rd_data(pool_rdata)
  );

  ilf_if #(.ADDR_W(ADDR_W), .IDX_W(IDX_W)) u_ilf_if (
    .clk, .rst_n,
    .tx_clav, .tx_enb_n, .tx_soc, .tx_data,
    .ready, .cells_avail(class_nonempty != '0),
    .deq_req, .deq_ack, .deq_addr,
    .rd_cell(pool_rcell), .rd_idx(pool_ridx), .rd_data(pool_rdata),
    .cell_out
  );

endmodule
