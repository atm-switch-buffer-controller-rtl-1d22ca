// rcube_if_tb: checks the crossbar-side interface with a modelled list
// controller. Cells (3 tag bytes + 53 bytes) arrive back to back or with
// gaps; the model answers link and allocate requests after random delays and
// hands out a new random reserved address after each allocate. Checked: every
// byte of every cell is written to the pool at the address reserved for that
// cell; each cell makes one link request with its class and CLP, exactly
// WR_LAG + TAG_BYTES + 3 clocks after its first byte, and one allocate request
// LINK_BYTES - 1 clocks after it; a cell offered before ready is ignored; a
// class number beyond the last class is taken as the last class.
module rcube_if_tb;
  import atm_buf_pkg::*;
  localparam int unsigned NC        = DEF_NUM_CLASSES;
  localparam int unsigned DEPTH     = list_depth(NC, DEF_CAPACITY);
  localparam int unsigned ADDR_W    = $clog2(DEPTH);
  localparam int unsigned CLASS_W   = $clog2(NC);
  localparam int unsigned TAG       = DEF_TAG_BYTES;
  localparam int unsigned LINK      = TAG + ATM_CELL_BYTES;
  localparam int unsigned LAG       = 12;
  localparam int unsigned NCELLS    = 200;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst_n, rc_valid, rc_soc, ready, next_valid;
  logic [7:0]         rc_data, pool_data;
  logic [ADDR_W-1:0]  next_addr, pool_cell;
  logic               enq_req, enq_clp, enq_ack, alloc_req, alloc_ack, pool_we, cell_in;
  logic [CLASS_W-1:0] enq_class;
  logic [5:0]         pool_idx;

  rcube_if dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("rcube_if_tb FAIL %s at %0t", what, $time); end
  endtask

  // cells as sent
  int  s_class [NCELLS];
  bit  s_clp   [NCELLS];
  int  s_soc   [NCELLS];       // clock edge that took the first byte
  int  s_addr  [NCELLS + 1];   // reserved address handed out for cell k
  int  n_alloc = 0;

  function automatic logic [7:0] cbyte(int k, int i);
    if (i == CLP_OCTET) return {7'(k), s_clp[k]};
    return 8'(k * 13 + i);
  endfunction

  // ---- modelled list controller
  logic enq_busy, alloc_busy;
  assign enq_ack   = enq_req && !enq_busy && !alloc_ack;
  assign alloc_ack = alloc_req && !alloc_busy;
  initial begin
    ready = 1'b0; next_valid = 1'b1; enq_busy = 1'b0; alloc_busy = 1'b0;
    s_addr[0] = 17;
    next_addr = ADDR_W'(s_addr[0]);
  end
  always @(posedge clk) begin
    enq_busy   <= ($urandom_range(0, 3) == 0);
    alloc_busy <= ($urandom_range(0, 3) == 0);
  end
  always @(posedge clk)
    if (alloc_ack) begin
      n_alloc++;
      next_valid <= 1'b0;
      fork
        begin
          repeat (3) @(posedge clk);
          s_addr[n_alloc] = $urandom_range(NC + 1, DEPTH - 1);
          next_addr  <= ADDR_W'(s_addr[n_alloc]);
          next_valid <= 1'b1;
        end
      join_none
    end

  // ---- monitors
  int n_wr = 0, n_link = 0, n_alloc_req = 0, n_cell_in = 0;
  logic enq_req_q = 1'b0, alloc_req_q = 1'b0;
  always @(negedge clk) begin
    int k, i;
    if (pool_we) begin
      k = n_wr / ATM_CELL_BYTES;
      i = n_wr % ATM_CELL_BYTES;
      check(k < NCELLS && int'(pool_idx) == i && int'(pool_cell) == s_addr[k] &&
            pool_data == cbyte(k, i),
            $sformatf("pool write %0d of cell %0d: slot %0d idx %0d data %h", i, k, pool_cell,
                      pool_idx, pool_data));
      n_wr++;
    end
    if (enq_req && !enq_req_q) begin
      check(int'(enq_class) == s_class[n_link] && enq_clp == s_clp[n_link],
            $sformatf("link request of cell %0d", n_link));
      check(cyc - s_soc[n_link] == int'(LAG + TAG + CLP_OCTET),
            $sformatf("link request %0d clocks after the first byte", cyc - s_soc[n_link]));
      n_link++;
    end
    if (alloc_req && !alloc_req_q) begin
      check(cyc - s_soc[n_alloc_req] == int'(LINK - 1),
            $sformatf("allocate request %0d clocks after the first byte", cyc - s_soc[n_alloc_req]));
      n_alloc_req++;
    end
    if (cell_in) n_cell_in++;
    enq_req_q   = enq_req && !enq_ack;
    alloc_req_q = alloc_req && !alloc_ack;
  end

  task automatic send(int k, int cls_byte, bit clp);
    s_clp[k] = clp;
    for (int i = 0; i < int'(LINK); i++) begin
      rc_valid = 1'b1;
      rc_soc   = (i == 0);
      rc_data  = (i == 0) ? 8'(cls_byte) : (i < int'(TAG)) ? 8'h5A : cbyte(k, i - TAG);
      @(posedge clk);
      #1;
      if (i == 0) s_soc[k] = cyc;
    end
    rc_valid = 1'b0; rc_soc = 1'b0;
  endtask

  initial begin
    int cls;
    rst_n = 1'b0; rc_valid = 1'b0; rc_soc = 1'b0; rc_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // a cell before ready: ignored
    send(0, 0, 1'b0);
    repeat (LAG + 5) @(posedge clk);
    #1;
    check(n_wr == 0 && n_link == 0 && n_alloc_req == 0, "cell before ready ignored");
    ready = 1'b1;
    for (int k = 0; k < int'(NCELLS); k++) begin
      if ($urandom_range(0, 2) == 0) begin repeat ($urandom_range(1, 40)) @(posedge clk); #1; end
      cls = $urandom_range(0, NC);           // NC itself is out of range
      s_class[k] = (cls >= int'(NC)) ? NC - 1 : cls;
      send(k, cls, 1'($urandom_range(0, 1)));
    end
    repeat (LAG + 40) @(posedge clk);
    #1;
    check(n_wr == int'(NCELLS * ATM_CELL_BYTES), $sformatf("%0d pool writes", n_wr));
    check(n_link == int'(NCELLS), $sformatf("%0d link requests", n_link));
    check(n_alloc_req == int'(NCELLS), $sformatf("%0d allocate requests", n_alloc_req));
    check(n_cell_in == int'(NCELLS), "cell_in count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCELLS * 120) @(posedge clk);
    $display("rcube_if_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
