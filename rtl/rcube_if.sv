// rcube_if: receive side of the buffer, between the crossbar link and the
// cell pool / list controller.
//
// The crossbar delivers one byte per clock (rc_valid), rc_soc marking the first
// byte of a cell. A cell on this link is TAG_BYTES bytes of switch-internal tag
// followed by the 53-byte ATM cell; tag byte 0 carries the service class in its
// low bits (class 0 = highest priority; a value beyond the last class is
// treated as the last class). The CLP bit is bit 0 of ATM header octet 4.
//
// Arrival follows the buffer's order of work: the cell is written into the pool
// at the reserved address next_addr, it is linked into its class lists while it
// is being written (link request as soon as CLP has been written), and an
// allocate request for the next reserved address is made as soon as its last
// byte has arrived. So that back-to-back cells need no gap, the pool writes and
// the link request run WR_LAG clocks behind the link: the allocate for cell k
// (made undelayed) then completes before the first byte of cell k+1 reaches the
// pool, and no byte of a linked cell can be read from the pool before it was
// written. The address is latched per cell at its first pool write.
//
// The tag format, the lag and this handshake are this design's choices; the
// document names the crossbar interface without describing it. Cells that
// start while the list controller is still initialising (ready=0) are ignored.
module rcube_if
  import atm_buf_pkg::*;
#(
  parameter int unsigned NUM_CLASSES = DEF_NUM_CLASSES,
  parameter int unsigned DEPTH       = list_depth(DEF_NUM_CLASSES, DEF_CAPACITY),
  parameter int unsigned ADDR_W      = $clog2(DEPTH),
  parameter int unsigned CLASS_W     = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1,
  parameter int unsigned TAG_BYTES   = DEF_TAG_BYTES,
  parameter int unsigned IDX_W       = 6,
  parameter int unsigned WR_LAG      = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  // crossbar link
  input  logic               rc_valid,
  input  logic               rc_soc,
  input  logic [7:0]         rc_data,
  // list controller
  input  logic               ready,
  input  logic [ADDR_W-1:0]  next_addr,
  input  logic               next_valid,
  output logic               enq_req,
  output logic [CLASS_W-1:0] enq_class,
  output logic               enq_clp,
  input  logic               enq_ack,
  output logic               alloc_req,
  input  logic               alloc_ack,
  // cell pool write port
  output logic               pool_we,
  output logic [ADDR_W-1:0]  pool_cell,
  output logic [IDX_W-1:0]   pool_idx,
  output logic [7:0]         pool_data,
  // statistics
  output logic               cell_in        // one pulse per cell taken in
);

  localparam int unsigned LINK_BYTES = TAG_BYTES + ATM_CELL_BYTES;
  localparam int unsigned CNT_W      = $clog2(LINK_BYTES + 1);

  typedef struct packed {
    logic       valid;   // byte of an accepted cell
    logic       soc;
    logic [7:0] data;
  } lbyte_t;

  // ------------------------------------------------ undelayed side: allocate
  logic             in_active;
  logic [CNT_W-1:0] in_cnt;
  logic             last_byte;
  logic             accept;

  assign accept    = rc_valid && rc_soc && ready;
  assign last_byte = rc_valid && (accept || in_active) &&
                     ((accept ? CNT_W'(0) : in_cnt) == CNT_W'(LINK_BYTES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_active <= 1'b0;
      in_cnt    <= '0;
      alloc_req <= 1'b0;
      cell_in   <= 1'b0;
    end else begin
      cell_in <= 1'b0;
      if (alloc_ack) alloc_req <= 1'b0;
      if (accept) begin
        in_active <= 1'b1;
        in_cnt    <= CNT_W'(1);
      end else if (rc_valid && in_active) begin
        in_cnt <= in_cnt + CNT_W'(1);
      end
      if (last_byte) begin
        in_active <= 1'b0;
        alloc_req <= 1'b1;
        cell_in   <= 1'b1;
      end
    end
  end

  // ------------------------------------------------ delay line
  lbyte_t line [WR_LAG];
  lbyte_t cur;                      // byte leaving the delay line
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < WR_LAG; i++) line[i] <= '0;
    end else begin
      line[0] <= '{valid: rc_valid && (accept || (in_active && !rc_soc)),
                   soc:   rc_soc,
                   data:  rc_data};
      for (int i = 1; i < WR_LAG; i++) line[i] <= line[i-1];
    end
  end
  assign cur = line[WR_LAG-1];

  // ------------------------------------------------ delayed side: pool and link
  logic [CNT_W-1:0]  d_cnt;
  logic [CNT_W-1:0]  d_pos;           // position of cur within its cell
  logic [ADDR_W-1:0] cell_q;
  logic [CLASS_W-1:0] cls_q;

  assign d_pos = cur.soc ? '0 : d_cnt;

  always_comb begin
    pool_we   = cur.valid && (d_pos >= CNT_W'(TAG_BYTES));
    pool_idx  = IDX_W'(d_pos - CNT_W'(TAG_BYTES));
    pool_data = cur.data;
    pool_cell = (d_pos == CNT_W'(TAG_BYTES)) ? next_addr : cell_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_cnt     <= '0;
      cell_q    <= '0;
      cls_q     <= '0;
      enq_req   <= 1'b0;
      enq_class <= '0;
      enq_clp   <= 1'b0;
    end else begin
      if (enq_ack) enq_req <= 1'b0;
      if (cur.valid) begin
        d_cnt <= d_pos + CNT_W'(1);
        if (d_pos == '0)
          cls_q <= (int'(cur.data) < NUM_CLASSES) ? CLASS_W'(cur.data)
                                                  : CLASS_W'(NUM_CLASSES - 1);
        if (d_pos == CNT_W'(TAG_BYTES)) cell_q <= next_addr;
        if (d_pos == CNT_W'(TAG_BYTES + CLP_OCTET)) begin
          enq_req   <= 1'b1;
          enq_class <= cls_q;
          enq_clp   <= cur.data[0];
        end
      end
    end
  end

  // ------------------------------------------------ rules of the handshake
  always_ff @(posedge clk) begin
    if (cur.valid && d_pos == CNT_W'(TAG_BYTES))
      assert (next_valid) else $error("rcube_if: reserved address not ready for a new cell");
    if (cur.valid && d_pos == CNT_W'(TAG_BYTES + CLP_OCTET))
      assert (!enq_req || enq_ack) else $error("rcube_if: link request overrun");
    if (last_byte)
      assert (!alloc_req || alloc_ack) else $error("rcube_if: allocate request overrun");
  end

endmodule
