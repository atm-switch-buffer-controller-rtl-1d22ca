// abuf_env: stimulus, reference model and checks for the whole output buffer
// (atm_buffer), connected to it by its ports.
//
// Cells are numbered; the number is carried in the first three header octets
// and every payload byte is derived from it, so each cell leaving over UTOPIA
// can be identified and its 53 bytes checked.
//
// Phase 1 (exact): the physical layer holds tx_clav low while N1 cells arrive
// back to back at the full link rate (one 56-byte link cell per 56 clocks).
// A reference model applies the buffer rules: keep at most CAPACITY cells and
// push out the most recent cell of the lowest-priority class present,
// preferring CLP=1. Then tx_clav goes high and the cells must leave in exactly
// the order the model gives (class 0 first, arrival order within a class), with
// the push-out count equal to the model's.
// Phase 2 (properties): N2 cells with random classes, CLP and gaps (back-to-
// back included) while tx_clav toggles at random. Every cell that leaves must
// be one that was sent and not already sent out, with intact bytes; within a
// class, cells leave in arrival order; at the end, cells out plus push-outs
// equal cells in.
// Rate: while phase 1 drains with tx_clav held high, the clocks from one cell's
// first byte to the next must not exceed OUT_GAP_MAX = 58 (53 bytes, 1 clock to
// raise the dequeue request, 2 to its acknowledge, 2 to the first byte); 173 clocks, one cell per 2.89 us at 60 MHz, would be
// enough for a 155 Mb/s line.
// Mechanisms counted, each must occur: push-out of a CLP=1 cell, of a CLP=0
// cell, of the arriving cell itself; a higher class overtaking a lower one;
// back-to-back arrivals; a cell held back by tx_clav=0.
module abuf_env #(
  parameter int unsigned NUM_CLASSES = 3,
  parameter int unsigned CAPACITY    = 8,
  parameter int unsigned TAG_BYTES   = 3,
  parameter int unsigned N1          = 20,
  parameter int unsigned N2          = 300,
  parameter int unsigned ADDR_W      = 4,
  parameter int unsigned CLASS_W     = 2,
  parameter int unsigned SEED        = 5
) (
  input  logic                   clk,
  output logic                   rst_n,
  output logic                   rc_valid,
  output logic                   rc_soc,
  output logic [7:0]             rc_data,
  input  logic                   rc_ready,
  output logic                   tx_clav,
  input  logic                   tx_enb_n,
  input  logic                   tx_soc,
  input  logic [7:0]             tx_data,
  input  logic                   cell_in,
  input  logic                   cell_out,
  input  logic [CLASS_W-1:0]     cell_out_class,
  input  logic                   disc_valid,
  input  logic [ADDR_W-1:0]      disc_addr,
  input  logic [CLASS_W-1:0]     disc_class,
  input  logic                   disc_lp,
  input  logic [NUM_CLASSES-1:0] class_nonempty,
  output logic                   done,
  output int                     checks,
  output int                     failures
);

  localparam int unsigned ATM_BYTES  = 53;
  localparam int unsigned LINK_BYTES = TAG_BYTES + ATM_BYTES;
  localparam int unsigned MAXC       = N1 + N2 + 1;
  localparam int unsigned OUT_GAP_MAX = ATM_BYTES + 5;

  // what was sent, by cell number
  int  c_class [MAXC];
  bit  c_clp   [MAXC];
  bit  c_out   [MAXC];
  int  n_sent, n_out, n_disc, n_cell_in;
  int  last_out_of_class [NUM_CLASSES];

  // counted mechanisms
  int  m_disc_lp, m_disc_hp, m_disc_self, m_overtake, m_b2b, m_clav_hold;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("abuf_env FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [7:0] cell_byte(int id, int i);
    case (i)
      0: return id[23:16];
      1: return id[15:8];
      2: return id[7:0];
      3: return {7'(id * 3), c_clp[id]};
      default: return 8'(id * 7 + i);
    endcase
  endfunction

  // ------------------------------------------------------------ sender
  task automatic send_cell(int id, int cls, bit clp, bit back_to_back);
    c_class[id] = cls;
    c_clp[id]   = clp;
    c_out[id]   = 1'b0;
    if (back_to_back) m_b2b++;
    for (int i = 0; i < LINK_BYTES; i++) begin
      rc_valid = 1'b1;
      rc_soc   = (i == 0);
      rc_data  = (i == 0) ? 8'(cls) : (i < TAG_BYTES) ? 8'hA5 : cell_byte(id, i - TAG_BYTES);
      @(posedge clk); #1;
    end
    rc_valid = 1'b0;
    rc_soc   = 1'b0;
    n_sent++;
  endtask

  // ------------------------------------------------------------ receiver
  int  rx_id, rx_cnt, rx_bad;
  longint clk_n, last_soc_clk;     // clock count, and the clock of the last tx_soc
  int  gap_max;                    // longest start-to-start gap seen while measuring
  bit  measure_gap;
  always @(posedge clk) clk_n++;
  int  order [$];                 // cell numbers in the order they left
  always @(negedge clk) begin
    if (!tx_enb_n) begin
      if (tx_soc) begin
        if (measure_gap && last_soc_clk >= 0 && int'(clk_n - last_soc_clk) > gap_max)
          gap_max = int'(clk_n - last_soc_clk);
        last_soc_clk = clk_n;
        rx_cnt = 0;
        rx_bad = 0;
        rx_id  = 0;
      end
      if (rx_cnt < 3) rx_id = (rx_id << 8) | int'(tx_data);
      else if (rx_id < int'(MAXC) && tx_data != cell_byte(rx_id, rx_cnt)) rx_bad++;
      rx_cnt++;
      if (rx_cnt == ATM_BYTES) begin
        checks++;
        if (rx_id >= int'(MAXC) || rx_bad != 0 || c_out[rx_id]) begin
          failures++;
          $display("abuf_env FAIL cell %0d left damaged or twice at %0t", rx_id, $time);
        end else begin
          c_out[rx_id] = 1'b1;
          // FIFO within a class
          checks++;
          if (rx_id < last_out_of_class[c_class[rx_id]]) begin
            failures++;
            $display("abuf_env FAIL cell %0d of class %0d left out of order", rx_id,
                     c_class[rx_id]);
          end
          last_out_of_class[c_class[rx_id]] = rx_id;
          // an earlier arrival leaving after a later one was overtaken by class
          if (order.size() > 0 && rx_id < order[$]) m_overtake++;
        end
        order.push_back(rx_id);
        n_out++;
      end
    end else if (rx_cnt != 0 && rx_cnt != ATM_BYTES) begin
      failures++;   // a cell must leave in 53 consecutive clocks
      checks++;
      $display("abuf_env FAIL gap inside an outgoing cell at %0t", $time);
      rx_cnt = 0;
    end
  end

  always @(negedge clk) begin
    if (disc_valid) begin
      n_disc++;
      if (disc_lp) m_disc_lp++; else m_disc_hp++;
    end
    if (cell_in) n_cell_in++;
    if (!tx_clav && class_nonempty != '0) m_clav_hold++;
  end

  // ------------------------------------------------------------ model (phase 1)
  int q_id [NUM_CLASSES][$];

  function automatic int model_count();
    int n = 0;
    for (int c = 0; c < NUM_CLASSES; c++) n += q_id[c].size();
    return n;
  endfunction

  function automatic void model_arrive(int id);
    int v, idx;
    q_id[c_class[id]].push_back(id);
    if (model_count() > int'(CAPACITY)) begin
      v = 0;
      for (int c = 0; c < NUM_CLASSES; c++) if (q_id[c].size() > 0) v = c;
      idx = q_id[v].size() - 1;
      for (int i = 0; i < q_id[v].size(); i++) if (c_clp[q_id[v][i]]) idx = i;
      if (q_id[v][idx] == id) m_disc_self++;
      q_id[v].delete(idx);
    end
  endfunction

  task automatic wait_idle(int max_clocks);
    int k = 0;
    while (k < max_clocks && (class_nonempty != '0 || !tx_enb_n)) begin
      @(posedge clk); #1; k++;
    end
    repeat (200) @(posedge clk);
    #1;
  endtask

  // ------------------------------------------------------------ main
  initial begin
    int id, cls, gap, exp_order[$], disc_before, model_disc;
    bit clp;
    done = 1'b0; checks = 0; failures = 0;
    n_sent = 0; n_out = 0; n_disc = 0; n_cell_in = 0;
    m_disc_lp = 0; m_disc_hp = 0; m_disc_self = 0; m_overtake = 0; m_b2b = 0; m_clav_hold = 0;
    rx_cnt = 0; rx_id = 0; rx_bad = 0;
    clk_n = 0; last_soc_clk = -1; gap_max = 0; measure_gap = 1'b0;
    for (int c = 0; c < NUM_CLASSES; c++) last_out_of_class[c] = -1;
    rst_n = 1'b0; rc_valid = 1'b0; rc_soc = 1'b0; rc_data = '0; tx_clav = 1'b0;
    void'($urandom(SEED));
    repeat (5) @(posedge clk);
    #1 rst_n = 1'b1;
    while (!rc_ready) begin @(posedge clk); #1; end

    // ---- phase 1: fill with the output held, then drain and compare
    id = 1;
    for (int k = 0; k < int'(N1); k++) begin
      // a third of CLP=0 cells of the lowest class first, then a random mix, so
      // that push-out takes CLP=1 cells first and then CLP=0 cells
      if (k < int'(N1) / 3) begin
        cls = NUM_CLASSES - 1;
        clp = 1'b0;
      end else begin
        cls = $urandom_range(0, NUM_CLASSES - 1);
        clp = 1'($urandom_range(0, 2) == 0);
      end
      send_cell(id, cls, clp, k > 0);
      model_arrive(id);
      id++;
    end
    repeat (100) @(posedge clk);
    #1;
    model_disc = N1 - model_count();
    check(n_disc == model_disc, $sformatf("phase 1 push-outs %0d, expected %0d", n_disc, model_disc));
    check(n_cell_in == int'(N1), "every back-to-back cell taken in");
    for (int c = 0; c < NUM_CLASSES; c++)
      for (int i = 0; i < q_id[c].size(); i++) exp_order.push_back(q_id[c][i]);
    tx_clav = 1'b1;
    measure_gap = 1'b1;
    wait_idle(100 * LINK_BYTES * (CAPACITY + 2));
    measure_gap = 1'b0;
    check(gap_max > 0 && gap_max <= int'(OUT_GAP_MAX),
          $sformatf("output cell period %0d clocks, at most %0d allowed", gap_max, OUT_GAP_MAX));
    check(order.size() == exp_order.size(),
          $sformatf("phase 1 cells out %0d, expected %0d", order.size(), exp_order.size()));
    for (int i = 0; i < exp_order.size() && i < order.size(); i++)
      check(order[i] == exp_order[i],
            $sformatf("phase 1 output %0d is cell %0d, expected %0d", i, order[i], exp_order[i]));

    // ---- phase 2: random traffic, random tx_clav
    fork
      begin
        for (int k = 0; k < int'(N2); k++) begin
          gap = ($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 100);
          repeat (gap) @(posedge clk);
          #1;
          send_cell(id, $urandom_range(0, NUM_CLASSES - 1), 1'($urandom_range(0, 1)), gap == 0);
          id++;
        end
      end
      begin
        while (n_sent < int'(N1 + N2)) begin
          tx_clav = ($urandom_range(0, 2) != 0) ? 1'b0 : 1'b1;
          repeat ($urandom_range(1, 150)) @(posedge clk);
          #1;
        end
      end
    join
    tx_clav = 1'b1;
    wait_idle(100 * LINK_BYTES * (CAPACITY + 2));
    check(n_cell_in == int'(N1 + N2), "every cell taken in");
    check(n_out + n_disc == int'(N1 + N2),
          $sformatf("cells out %0d + pushed out %0d != cells in %0d", n_out, n_disc, N1 + N2));
    check(class_nonempty == '0, "buffer empty at the end");

    check(m_disc_lp   > 0, "push-out of a CLP=1 cell happened");
    check(m_disc_hp   > 0, "push-out of a CLP=0 cell happened");
    check(m_disc_self > 0, "arriving cell itself dropped");
    check(m_overtake  > 0, "a higher class overtook a lower one");
    check(m_b2b       > 0, "back-to-back arrivals happened");
    check(m_clav_hold > 0, "tx_clav=0 held cells back");
    $display("abuf_env: %0d cells in, %0d out, %0d pushed out (%0d CLP=1, %0d CLP=0, %0d arriving in phase 1), %0d overtakes, %0d back-to-back, output period %0d clocks",
             N1 + N2, n_out, n_disc, m_disc_lp, m_disc_hp, m_disc_self, m_overtake, m_b2b, gap_max);
    done = 1'b1;
  end

endmodule
