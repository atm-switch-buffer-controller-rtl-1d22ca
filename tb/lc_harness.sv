// lc_harness: drives one list_controller (with its list_ram) and compares it
// with a reference model of the buffer written from the specification: per
// class a FIFO of (address, CLP), a start address per class, the free list as
// a stack and the reserved next address. Every enqueue checks the new reserved
// address and any push-out (address, class); every dequeue checks the address
// and class of the cell to send. An arrival is a link request followed by an
// allocate request. Latencies are checked against the controller's stated
// bounds (next_valid back 2 to 4 clocks after the allocate is taken, deq_ack 2
// clocks after the dequeue is taken).
// With FIGURE_WALK=1 (2 classes, 4 cells) it first replays the example states:
// four arrivals, one departure, three more arrivals with two push-outs, and
// checks the exact addresses. Then it runs N_RANDOM random operations.
module lc_harness #(
  parameter int unsigned NUM_CLASSES = 2,
  parameter int unsigned CAPACITY    = 4,
  parameter bit          FIGURE_WALK = 1'b0,
  parameter int unsigned N_RANDOM    = 2000,
  parameter int unsigned SEED        = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import atm_buf_pkg::*;

  localparam int unsigned DEPTH   = list_depth(NUM_CLASSES, CAPACITY);
  localparam int unsigned ADDR_W  = $clog2(DEPTH);
  localparam int unsigned CLASS_W = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1;

  logic                              ready, next_valid, enq_req, enq_clp, enq_ack;
  logic                              alloc_req, alloc_ack;
  logic [ADDR_W-1:0]                 next_addr, deq_addr, disc_addr;
  logic [CLASS_W-1:0]                enq_class, deq_class, disc_class;
  logic                              deq_req, deq_ack, disc_valid, disc_lp;
  logic [NUM_CLASSES-1:0]            class_nonempty;
  logic [ADDR_W-1:0]                 ram_addr;
  logic                              ram_we;
  logic [NUM_FIELDS-1:0]             ram_wmask;
  logic [NUM_FIELDS-1:0][ADDR_W-1:0] ram_wdata, ram_rdata;

  list_controller #(.NUM_CLASSES(NUM_CLASSES), .CAPACITY(CAPACITY)) dut (.*);
  list_ram #(.DEPTH(DEPTH)) ram (.clk, .addr(ram_addr), .we(ram_we), .wmask(ram_wmask),
                                 .wdata(ram_wdata), .rdata(ram_rdata));

  // ---------------- reference model
  int m_start [NUM_CLASSES];
  int m_q     [NUM_CLASSES][$];
  bit m_lp    [NUM_CLASSES][$];
  int m_free  [$];
  int m_next;
  int exp_disc_addr, exp_disc_class;
  bit exp_disc;

  function automatic void model_reset();
    for (int c = 0; c < NUM_CLASSES; c++) begin
      m_start[c] = c + 1;
      m_q[c].delete();
      m_lp[c].delete();
    end
    m_free.delete();
    for (int a = DEPTH - 2; a > NUM_CLASSES; a--) m_free.push_back(a);
    m_next = DEPTH - 1;
  endfunction

  function automatic void model_enq(int d, bit clp);
    int v, idx;
    m_q[d].push_back(m_next);
    m_lp[d].push_back(clp);
    exp_disc = 1'b0;
    if (m_free.size() > 0) begin
      m_next = m_free.pop_front();
    end else begin
      v = 0;
      for (int c = 0; c < NUM_CLASSES; c++) if (m_q[c].size() > 0) v = c;
      idx = m_q[v].size() - 1;
      for (int i = 0; i < m_q[v].size(); i++) if (m_lp[v][i]) idx = i;
      m_next = m_q[v][idx];
      m_q[v].delete(idx);
      m_lp[v].delete(idx);
      exp_disc = 1'b1;
      exp_disc_addr = m_next;
      exp_disc_class = v;
    end
  endfunction

  function automatic int model_count();
    int n = 0;
    for (int c = 0; c < NUM_CLASSES; c++) n += m_q[c].size();
    return n;
  endfunction

  // ---------------- push-out monitor
  int  disc_seen, disc_seen_addr, disc_seen_class;
  int  n_disc, n_disc_lp, n_disc_self;
  always @(negedge clk)
    if (disc_valid) begin
      disc_seen++;
      disc_seen_addr  = int'(disc_addr);
      disc_seen_class = int'(disc_class);
      if (disc_lp) n_disc_lp++;
    end

  // advance one clock; stimulus changes and samples happen 1 time unit after the edge
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("lc_harness[%0d/%0d] FAIL %s at %0t", NUM_CLASSES, CAPACITY, what, $time);
    end
  endtask

  task automatic do_enq(int d, bit clp);
    int lat;
    int disc0 = disc_seen;
    int arr    = m_next;
    check(next_valid, "next_valid before enqueue");
    enq_req   = 1'b1;
    enq_class = CLASS_W'(d);
    enq_clp   = clp;
    do @(negedge clk); while (!enq_ack);   // sampled where the comb. ack is settled
    tick();
    enq_req   = 1'b0;
    alloc_req = 1'b1;
    do @(negedge clk); while (!alloc_ack);
    tick();
    alloc_req = 1'b0;
    lat = 0;
    do begin tick(); lat++; end while (!next_valid && lat < 20);
    @(negedge clk);                       // let the push-out monitor sample
    tick();
    model_enq(d, clp);
    check(lat >= 2 && lat <= 4, $sformatf("allocate latency %0d", lat));
    check(int'(next_addr) == m_next,
          $sformatf("next_addr %0d expected %0d", next_addr, m_next));
    check((disc_seen - disc0) == (exp_disc ? 1 : 0), "push-out reported");
    if (exp_disc) begin
      n_disc++;
      if (exp_disc_addr == arr) n_disc_self++;
      check(disc_seen_addr == exp_disc_addr && disc_seen_class == exp_disc_class,
            $sformatf("push-out %0d/%0d expected %0d/%0d", disc_seen_addr, disc_seen_class,
                      exp_disc_addr, exp_disc_class));
    end
  endtask

  task automatic do_deq(output int a, output int c);
    int lat, ec, ea;
    ec = -1;
    for (int k = NUM_CLASSES - 1; k >= 0; k--) if (m_q[k].size() > 0) ec = k;
    deq_req = 1'b1;
    lat = 0;
    do begin tick(); lat++; end while (!deq_ack && lat < 20);
    deq_req = 1'b0;
    a = int'(deq_addr);
    c = int'(deq_class);
    ea = m_q[ec].pop_front();
    void'(m_lp[ec].pop_front());
    m_free.push_front(m_start[ec]);
    m_start[ec] = ea;
    check(lat == 3, $sformatf("dequeue latency %0d", lat));
    check(a == ea && c == ec, $sformatf("dequeue %0d/%0d expected %0d/%0d", a, c, ea, ec));
    // let the controller return to idle before the next nonempty check
    repeat (3) tick();
  endtask

  task automatic check_nonempty();
    for (int c = 0; c < NUM_CLASSES; c++)
      check(class_nonempty[c] == (m_q[c].size() > 0), "class_nonempty");
  endtask

  int n_enq, n_deq;
  initial begin
    int a, c, r;
    done = 1'b0; checks = 0; failures = 0;
    enq_req = 1'b0; alloc_req = 1'b0; deq_req = 1'b0; enq_class = '0; enq_clp = 1'b0;
    disc_seen = 0; n_disc = 0; n_disc_lp = 0; n_disc_self = 0; n_enq = 0; n_deq = 0;
    model_reset();
    @(posedge rst_n);
    do tick(); while (!ready);
    tick();
    check(int'(next_addr) == DEPTH - 1, "initial reserved address");
    check(class_nonempty == '0, "empty after reset");

    if (FIGURE_WALK) begin
      // arrivals A0, A0, B0, A1 at 7, 6, 5, 4; next is 3
      do_enq(0, 0); do_enq(0, 0); do_enq(1, 0); do_enq(0, 1);
      check(int'(next_addr) == 3, "example: reserved address 3");
      // one departure: cell 7 of class A
      do_deq(a, c);
      check(a == 7 && c == 0, "example: address 7 sent");
      // A1 written at 3, next taken from the free list: 1 (the old class A start)
      do_enq(0, 1);
      check(int'(next_addr) == 1, "example: reserved address 1");
      // A0 written at 1, buffer full: last cell of class B (5) pushed out
      do_enq(0, 0);
      check(int'(next_addr) == 5 && disc_seen_addr == 5 && disc_seen_class == 1,
            "example: class B cell 5 pushed out");
      // A0 written at 5: last low-priority cell of class A (3) pushed out
      do_enq(0, 0);
      check(int'(next_addr) == 3 && disc_seen_addr == 3 && disc_seen_class == 0,
            "example: class A CLP=1 cell 3 pushed out");
      // class A now reads 6, 4, 1, 5
      do_deq(a, c); check(a == 6, "example: order 6");
      do_deq(a, c); check(a == 4, "example: order 4");
      do_deq(a, c); check(a == 1, "example: order 1");
      do_deq(a, c); check(a == 5, "example: order 5");
      check_nonempty();
    end

    void'($urandom(SEED));
    for (int i = 0; i < N_RANDOM; i++) begin
      r = $urandom_range(0, 99);
      // bias towards arrivals so that the buffer fills and push-out happens
      if (r < 58 || model_count() == 0) begin
        do_enq($urandom_range(0, NUM_CLASSES - 1), 1'($urandom_range(0, 1)));
        n_enq++;
      end else begin
        do_deq(a, c);
        n_deq++;
      end
      check_nonempty();
    end
    // drain
    while (model_count() > 0) begin do_deq(a, c); n_deq++; end
    check_nonempty();
    // every mechanism must have happened
    check(n_disc > 0,      "a push-out happened");
    check(n_disc_lp > 0,   "a low-priority push-out happened");
    check(n_disc > n_disc_lp, "a high-priority push-out happened");
    check(n_disc_self > 0, "an arriving cell was itself dropped");
    $display("lc_harness[%0d/%0d]: %0d enqueues, %0d dequeues, %0d push-outs (%0d CLP=1, %0d of the arriving cell)",
             NUM_CLASSES, CAPACITY, n_enq, n_deq, n_disc, n_disc_lp, n_disc_self);
    done = 1'b1;
  end

endmodule
