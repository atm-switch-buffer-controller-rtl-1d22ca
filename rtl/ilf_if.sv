// ilf_if: transmit side of the buffer, a UTOPIA level 1 transmit master
// (ATM-layer side, 8-bit, cell-level handshake) towards the physical-layer
// device.
//
// When the physical layer signals with tx_clav=1 that it can take a whole cell
// and the buffer holds a cell, the interface asks the list controller which cell
// to send (deq_req / deq_ack, deq_addr). It then reads the 53 bytes of that
// cell from the pool, one per clock, and drives them on tx_data with tx_enb_n=0,
// tx_soc=1 on the first byte. The pool has one cycle of read latency, so the
// bytes appear one clock after their read address; a cell leaves in 53
// consecutive clocks, and the next request is made when the last read has been
// issued and tx_clav is seen high again.
//
// That a cell leaves only when tx_clav=1, and that the list controller picks
// it, follows the document. The handshake details are those of UTOPIA level 1
// with one clock for the interface and the buffer, a simplification of this
// design (a physical-layer device normally has its own transmit clock).
module ilf_if
  import atm_buf_pkg::*;
#(
  parameter int unsigned ADDR_W = $clog2(list_depth(DEF_NUM_CLASSES, DEF_CAPACITY)),
  parameter int unsigned IDX_W  = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  // UTOPIA level 1 transmit
  input  logic              tx_clav,
  output logic              tx_enb_n,
  output logic              tx_soc,
  output logic [7:0]        tx_data,
  // list controller
  input  logic              ready,
  input  logic              cells_avail,
  output logic              deq_req,
  input  logic              deq_ack,
  input  logic [ADDR_W-1:0] deq_addr,
  // cell pool read port
  output logic [ADDR_W-1:0] rd_cell,
  output logic [IDX_W-1:0]  rd_idx,
  input  logic [7:0]        rd_data,
  // statistics
  output logic              cell_out        // one pulse per cell started
);

  typedef enum logic [1:0] {T_IDLE, T_REQ, T_SEND} tstate_e;
  tstate_e state;

  logic              rd_valid;      // a read was issued in the previous clock
  logic              rd_first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= T_IDLE;
      deq_req  <= 1'b0;
      rd_cell  <= '0;
      rd_idx   <= '0;
      rd_valid <= 1'b0;
      rd_first <= 1'b0;
      cell_out <= 1'b0;
    end else begin
      rd_valid <= (state == T_SEND);
      rd_first <= (state == T_SEND) && (rd_idx == '0);
      cell_out <= 1'b0;
      unique case (state)
        T_IDLE:
          if (ready && tx_clav && cells_avail) begin
            deq_req <= 1'b1;
            state   <= T_REQ;
          end
        T_REQ:
          if (deq_ack) begin
            deq_req  <= 1'b0;
            rd_cell  <= deq_addr;
            rd_idx   <= '0;
            cell_out <= 1'b1;
            state    <= T_SEND;
          end
        T_SEND: begin
          rd_idx <= rd_idx + IDX_W'(1);
          if (rd_idx == IDX_W'(ATM_CELL_BYTES - 1)) state <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // The pool read port is addressed by rd_cell/rd_idx; its data is registered.
  assign tx_enb_n = !rd_valid;
  assign tx_soc   = rd_first;
  assign tx_data  = rd_valid ? rd_data : 8'h00;

endmodule
