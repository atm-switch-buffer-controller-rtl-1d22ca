// ilf_if_tb: checks the UTOPIA transmit interface with a modelled list
// controller and pool. The controller model answers deq_req with the next
// address of a queue two clocks later; the pool model returns the byte of the
// address presented one clock earlier. Checked: cells leave in the order of
// the queue, each as 53 consecutive bytes with tx_enb_n low and tx_soc on the
// first, each byte the one stored for that cell; the first byte appears two
// clocks after deq_ack; no new cell starts while tx_clav is held low; none is
// requested while the buffer is empty.
module ilf_if_tb;
  import atm_buf_pkg::*;
  localparam int unsigned ADDR_W = 11;
  localparam int unsigned NCELLS = 150;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst_n, tx_clav, tx_enb_n, tx_soc, ready, cells_avail;
  logic              deq_req, deq_ack, cell_out;
  logic [7:0]        tx_data, rd_data;
  logic [ADDR_W-1:0] deq_addr, rd_cell;
  logic [5:0]        rd_idx;

  ilf_if dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("ilf_if_tb FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [7:0] pbyte(int a, int i);
    return 8'(a * 5 + i * 3 + 1);
  endfunction

  // pool model: registered read
  always @(posedge clk) rd_data <= pbyte(int'(rd_cell), int'(rd_idx));

  // controller model
  int q [$];        // addresses waiting
  int sent [$];     // addresses handed out, in order
  int ack_cyc [$];
  int pend = 0;
  assign cells_avail = (q.size() > 0);
  always @(posedge clk) begin
    deq_ack <= 1'b0;
    if (pend > 0) begin
      pend--;
      if (pend == 0) begin
        deq_ack  <= 1'b1;
        deq_addr <= ADDR_W'(q[0]);
        sent.push_back(q[0]);
        q.delete(0);
      end
    end else if (deq_req && !deq_ack && q.size() > 0) begin
      pend = 2;
    end
  end
  always @(negedge clk) if (deq_ack) ack_cyc.push_back(cyc);

  // receiver
  int rx_cnt = 0, n_rx = 0, rx_addr = 0, n_start_low = 0;
  logic clav_q = 1'b0;
  always @(negedge clk) begin
    if (!tx_enb_n) begin
      if (tx_soc) begin
        check(rx_cnt == 0, "tx_soc only at a cell boundary");
        check(sent.size() > n_rx, "a cell leaves only after it was handed out");
        rx_addr = (sent.size() > n_rx) ? sent[n_rx] : 0;
        check(ack_cyc.size() > n_rx && cyc - ack_cyc[n_rx] == 2,
              "first byte two clocks after deq_ack");
        rx_cnt = 0;
      end
      check(tx_data == pbyte(rx_addr, rx_cnt), $sformatf("byte %0d of cell at %0d", rx_cnt, rx_addr));
      rx_cnt++;
      if (rx_cnt == int'(ATM_CELL_BYTES)) begin
        rx_cnt = 0;
        n_rx++;
      end
    end else begin
      check(rx_cnt == 0, "53 consecutive bytes per cell");
      rx_cnt = 0;
    end
  end

  initial begin
    int n_req;
    rst_n = 1'b0; tx_clav = 1'b0; ready = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // empty buffer, tx_clav high: nothing requested
    tx_clav = 1'b1;
    repeat (50) @(posedge clk);
    #1;
    check(sent.size() == 0 && !deq_req, "no request while empty");
    // load cells, hold tx_clav low: nothing leaves
    tx_clav = 1'b0;
    for (int k = 0; k < int'(NCELLS); k++) q.push_back($urandom_range(4, 2004));
    repeat (300) @(posedge clk);
    #1;
    check(sent.size() == 0 && n_rx == 0, "nothing leaves while tx_clav=0");
    // random tx_clav
    while (n_rx < int'(NCELLS)) begin
      tx_clav = ($urandom_range(0, 2) != 0);
      n_req = sent.size();
      repeat ($urandom_range(1, 120)) @(posedge clk);
      #1;
      if (!tx_clav && dut.state == dut.T_IDLE)
        check(sent.size() == n_req || sent.size() == n_req + 1, "no new cell while tx_clav=0");
      if (cyc > 200000) break;
    end
    tx_clav = 1'b0;
    repeat (100) @(posedge clk);
    #1;
    check(n_rx == int'(NCELLS), $sformatf("%0d cells received", n_rx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("ilf_if_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
