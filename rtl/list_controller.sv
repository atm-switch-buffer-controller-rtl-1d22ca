// list_controller: linked-list manager of a multi-class ATM output buffer.
//
// Cells are never searched for. Every address of the buffer is on exactly one
// of these lists, and the controller only touches the start and end of a list:
//  * the free list, singly linked through the FWD field, starts at register F
//    and ends at address 0 (address 0 never holds a cell);
//  * per class, an all-priorities list (FWD/BWD threads) and a low-priority
//    (CLP=1) sublist (LPF/LPB threads). Both start at the same start address,
//    which holds no cell; start, end and low-priority end are registers.
//  * next_addr, one address held in reserve: the next incoming cell is written
//    there, so the buffer has one more slot than its effective capacity.
//
// Three requests, each taken in S_IDLE with a one-cycle acknowledge:
//  * link (enq_req, enq_class, enq_clp), made while a cell is being written at
//    next_addr: the cell is linked at the end of its class list and, if CLP=1,
//    of its low-priority sublist.
//  * allocate (alloc_req), made once the cell has been completely received: a
//    new next_addr is taken from the top of the free list; if the free list is
//    empty a cell is pushed out instead: in the lowest-priority class that holds
//    cells, the most recent low-priority cell if there is one (unlinked from
//    both threads of the class list), else the most recent cell. Its address
//    becomes next_addr and disc_valid reports it. If the cell just received is
//    the worst one, it is the one that is dropped.
//  * dequeue (deq_req): in the highest-priority non-empty class the start
//    address goes to the free list and the first cell becomes the new start
//    address; that cell is the one to send (deq_addr, deq_class with deq_ack).
//    Its pool slot stays reserved as the class start until the next dequeue of
//    that class, so it can be read out while new cells arrive. deq_ack is a
//    registered one-clock pulse; the requester drops deq_req on seeing it.
// Allocate wins over link, link over dequeue.
//
// The list structure, the push-out rule and the dequeue by moving the start
// address follow the document. Class 0 is the highest priority. The free list
// is used as a stack (an address is pushed and popped at F), as the example
// states in the document show; its program text calls both ends "end of free".
// Splitting arrival into link and allocate requests, the per-field RAM write
// mask and the state sequence are this design's choices.
//
// Timing, single-port RAM with one access per clock and one cycle read latency:
// after reset the RAM is initialised in DEPTH cycles (ready=0). Counted in
// clocks after the acknowledge: a link takes 2 (CLP=0) or 3 (CLP=1); an
// allocate 2 from the free list or 2 to 4 with a push-out, and next_valid is low
// meanwhile; a dequeue gives deq_ack after 2 and takes 2 or 4 in all.
module list_controller
  import atm_buf_pkg::*;
#(
  parameter int unsigned NUM_CLASSES = DEF_NUM_CLASSES,
  parameter int unsigned CAPACITY    = DEF_CAPACITY,
  parameter int unsigned DEPTH       = list_depth(NUM_CLASSES, CAPACITY),
  parameter int unsigned ADDR_W      = $clog2(DEPTH),
  parameter int unsigned CLASS_W     = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  output logic                              ready,        // RAM initialised
  // reserved address for the next incoming cell
  output logic [ADDR_W-1:0]                 next_addr,
  output logic                              next_valid,
  // link: cell being written at next_addr
  input  logic                              enq_req,
  input  logic [CLASS_W-1:0]                enq_class,
  input  logic                              enq_clp,
  output logic                              enq_ack,
  // allocate: cell completely received, reserve the next address
  input  logic                              alloc_req,
  output logic                              alloc_ack,
  // dequeue: choose the cell to send
  input  logic                              deq_req,
  output logic                              deq_ack,
  output logic [ADDR_W-1:0]                 deq_addr,
  output logic [CLASS_W-1:0]                deq_class,
  output logic [NUM_CLASSES-1:0]            class_nonempty,
  // push-out report
  output logic                              disc_valid,
  output logic [ADDR_W-1:0]                 disc_addr,
  output logic [CLASS_W-1:0]                disc_class,
  output logic                              disc_lp,      // discarded cell had CLP=1
  // list RAM port
  output logic [ADDR_W-1:0]                 ram_addr,
  output logic                              ram_we,
  output logic [NUM_FIELDS-1:0]             ram_wmask,
  output logic [NUM_FIELDS-1:0][ADDR_W-1:0] ram_wdata,
  input  logic [NUM_FIELDS-1:0][ADDR_W-1:0] ram_rdata
);

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [CLASS_W-1:0] cls_t;

  typedef enum logic [3:0] {
    S_INIT,      // write the initial link words
    S_IDLE,
    S_E_LINKF,   // FWD[end]     <= n
    S_E_LINKB,   // BWD[n], LPB[n]
    S_E_LINKLP,  // LPF[lp_end]  <= n
    S_ALLOC,     // read top of free list or the victim
    S_A_FREE,    // pop free list
    S_A_DISC,    // unlink victim
    S_X_FWD,     // FWD[prev]    <= following
    S_X_BWD,     // BWD[follow]  <= preceding
    S_D_READ,    // read start word
    S_D_FREE,    // push old start on free list, new start
    S_D_LPF,     // LPF[new start] <= first low-priority cell
    S_D_LPB      // LPB[first low-priority cell] <= new start
  } state_e;

  state_e state;

  addr_t start_q  [NUM_CLASSES];
  addr_t end_q    [NUM_CLASSES];
  addr_t lpend_q  [NUM_CLASSES];
  addr_t free_q;                  // F
  addr_t next_q;
  addr_t init_a;

  cls_t  op_cls;                  // class being worked on
  logic  op_clp;
  addr_t op_n;                    // cell being linked / victim / old start
  addr_t op_p, op_f;              // preceding / following of the victim
  addr_t op_lp;                   // first low-priority cell (dequeue)
  logic  vict_lp;

  // ---------------------------------------------------------------- status
  logic [NUM_CLASSES-1:0] nonempty, lp_nonempty;
  always_comb
    for (int c = 0; c < NUM_CLASSES; c++) begin
      nonempty[c]    = (end_q[c]   != start_q[c]);
      lp_nonempty[c] = (lpend_q[c] != start_q[c]);
    end

  // highest-priority (lowest index) and lowest-priority (highest index)
  // non-empty classes
  cls_t hi_cls, lo_cls;
  always_comb begin
    hi_cls = '0;
    for (int c = NUM_CLASSES - 1; c >= 0; c--)
      if (nonempty[c]) hi_cls = cls_t'(c);
    lo_cls = '0;
    for (int c = 0; c < NUM_CLASSES; c++)
      if (nonempty[c]) lo_cls = cls_t'(c);
  end

  assign ready          = (state != S_INIT);
  assign next_addr      = next_q;
  assign next_valid     = ready && !(state inside {S_ALLOC, S_A_FREE, S_A_DISC,
                                                   S_X_FWD, S_X_BWD});
  assign class_nonempty = nonempty;
  assign alloc_ack      = (state == S_IDLE) && alloc_req;
  assign enq_ack        = (state == S_IDLE) && enq_req && !alloc_req;

  // Initial content of a word: free addresses chain downwards to 0.
  function automatic addr_t init_fwd(addr_t a);
    if (a > addr_t'(NUM_CLASSES + 1) && a < addr_t'(DEPTH - 1)) return a - addr_t'(1);
    return '0;
  endfunction

  // ---------------------------------------------------------------- RAM port
  always_comb begin
    ram_addr  = '0;
    ram_we    = 1'b0;
    ram_wmask = '0;
    ram_wdata = '0;
    unique case (state)
      S_INIT: begin
        ram_addr  = init_a;
        ram_we    = 1'b1;
        ram_wmask = WM_ALL;
        ram_wdata[FLD_FWD] = init_fwd(init_a);
      end
      S_E_LINKF: begin
        ram_addr  = end_q[op_cls];
        ram_we    = 1'b1;
        ram_wmask = WM_FWD;
        ram_wdata[FLD_FWD] = op_n;
      end
      S_E_LINKB: begin
        ram_addr  = op_n;
        ram_we    = 1'b1;
        ram_wmask = op_clp ? (WM_BWD | WM_LPB) : WM_BWD;
        ram_wdata[FLD_BWD] = end_q[op_cls];
        ram_wdata[FLD_LPB] = lpend_q[op_cls];
      end
      S_E_LINKLP: begin
        ram_addr  = lpend_q[op_cls];
        ram_we    = 1'b1;
        ram_wmask = WM_LPF;
        ram_wdata[FLD_LPF] = op_n;
      end
      S_ALLOC: begin
        if (free_q != '0)                ram_addr = free_q;
        else if (lp_nonempty[lo_cls])    ram_addr = lpend_q[lo_cls];
        else                             ram_addr = end_q[lo_cls];
      end
      S_X_FWD: begin
        ram_addr  = op_p;
        ram_we    = 1'b1;
        ram_wmask = WM_FWD;
        ram_wdata[FLD_FWD] = op_f;
      end
      S_X_BWD: begin
        ram_addr  = op_f;
        ram_we    = 1'b1;
        ram_wmask = WM_BWD;
        ram_wdata[FLD_BWD] = op_p;
      end
      S_D_READ: ram_addr = start_q[op_cls];
      S_D_FREE: begin
        ram_addr  = op_n;
        ram_we    = 1'b1;
        ram_wmask = WM_FWD;
        ram_wdata[FLD_FWD] = free_q;
      end
      S_D_LPF: begin
        ram_addr  = start_q[op_cls];
        ram_we    = 1'b1;
        ram_wmask = WM_LPF;
        ram_wdata[FLD_LPF] = op_lp;
      end
      S_D_LPB: begin
        ram_addr  = op_lp;
        ram_we    = 1'b1;
        ram_wmask = WM_LPB;
        ram_wdata[FLD_LPB] = start_q[op_cls];
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_INIT;
      init_a  <= '0;
      for (int c = 0; c < NUM_CLASSES; c++) begin
        start_q[c] <= addr_t'(c + 1);
        end_q[c]   <= addr_t'(c + 1);
        lpend_q[c] <= addr_t'(c + 1);
      end
      free_q     <= addr_t'(DEPTH - 2);
      next_q     <= addr_t'(DEPTH - 1);
      op_cls     <= '0;
      op_clp     <= 1'b0;
      op_n       <= '0;
      op_p       <= '0;
      op_f       <= '0;
      op_lp      <= '0;
      vict_lp    <= 1'b0;
      deq_ack    <= 1'b0;
      deq_addr   <= '0;
      deq_class  <= '0;
      disc_valid <= 1'b0;
      disc_addr  <= '0;
      disc_class <= '0;
      disc_lp    <= 1'b0;
    end else begin
      deq_ack    <= 1'b0;
      disc_valid <= 1'b0;
      unique case (state)
        S_INIT: begin
          init_a <= init_a + addr_t'(1);
          if (init_a == addr_t'(DEPTH - 1)) state <= S_IDLE;
        end

        S_IDLE: begin
          if (alloc_req) begin
            state <= S_ALLOC;
          end else if (enq_req) begin
            op_cls <= (int'(enq_class) < NUM_CLASSES) ? enq_class : cls_t'(NUM_CLASSES - 1);
            op_clp <= enq_clp;
            op_n   <= next_q;
            state  <= S_E_LINKF;
          end else if (deq_req && !deq_ack && (nonempty != '0)) begin
            // (a request seen together with its own acknowledge is the old one)
            op_cls <= hi_cls;
            state  <= S_D_READ;
          end
        end

        // ---- link the new cell at the end of its lists
        S_E_LINKF: state <= S_E_LINKB;
        S_E_LINKB: begin
          end_q[op_cls] <= op_n;
          state <= op_clp ? S_E_LINKLP : S_IDLE;
        end
        S_E_LINKLP: begin
          lpend_q[op_cls] <= op_n;
          state <= S_IDLE;
        end

        // ---- allocate: find the address for the next cell
        S_ALLOC: begin
          if (free_q != '0) begin
            state <= S_A_FREE;
          end else begin
            op_cls  <= lo_cls;
            vict_lp <= lp_nonempty[lo_cls];
            op_n    <= lp_nonempty[lo_cls] ? lpend_q[lo_cls] : end_q[lo_cls];
            state   <= S_A_DISC;
          end
        end
        S_A_FREE: begin
          next_q <= free_q;
          free_q <= ram_rdata[FLD_FWD];
          state  <= S_IDLE;
        end
        S_A_DISC: begin
          next_q     <= op_n;
          disc_valid <= 1'b1;
          disc_addr  <= op_n;
          disc_class <= op_cls;
          disc_lp    <= vict_lp;
          op_p       <= ram_rdata[FLD_BWD];
          op_f       <= ram_rdata[FLD_FWD];
          if (op_n == end_q[op_cls]) begin
            end_q[op_cls] <= ram_rdata[FLD_BWD];
            state <= S_IDLE;
          end else begin
            state <= S_X_FWD;   // only a low-priority victim can be inside the list
          end
          if (vict_lp) lpend_q[op_cls] <= ram_rdata[FLD_LPB];
        end
        S_X_FWD: state <= S_X_BWD;
        S_X_BWD: state <= S_IDLE;

        // ---- dequeue: first cell of the best class becomes its start address
        S_D_READ: begin
          op_n  <= start_q[op_cls];
          state <= S_D_FREE;
        end
        S_D_FREE: begin
          start_q[op_cls] <= ram_rdata[FLD_FWD];
          free_q          <= op_n;
          deq_ack         <= 1'b1;
          deq_addr        <= ram_rdata[FLD_FWD];
          deq_class       <= op_cls;
          op_lp           <= ram_rdata[FLD_LPF];
          if (lpend_q[op_cls] == op_n) begin
            lpend_q[op_cls] <= ram_rdata[FLD_FWD];     // sublist empty, follows the start
            state <= S_IDLE;
          end else if (ram_rdata[FLD_LPF] == ram_rdata[FLD_FWD]) begin
            state <= S_IDLE;                           // sent cell was the first CLP=1 cell
          end else begin
            state <= S_D_LPF;                          // carry the sublist head over
          end
        end
        S_D_LPF: state <= S_D_LPB;
        S_D_LPB: state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- checks
  // The reserved address must never also be the top of the free list.
  always_ff @(posedge clk)
    if (state == S_IDLE)
      assert (free_q != next_q || free_q == '0)
        else $error("list_controller: reserved address is also on the free list");

endmodule
