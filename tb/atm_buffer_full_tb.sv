// atm_buffer_full_tb: the output buffer at its default size (3 classes, 2000
// cells), taken end to end: 2200 cells arrive back to back while the output is
// held, so the buffer fills and pushes out 200 cells; the rest must leave in the
// order the reference model gives. Then random traffic. The checks are those
// of abuf_env.
module atm_buffer_full_tb;
  import atm_buf_pkg::*;
  localparam int unsigned NC      = 3;
  localparam int unsigned CAP     = 2000;
  localparam int unsigned DEPTH   = list_depth(NC, CAP);
  localparam int unsigned ADDR_W  = $clog2(DEPTH);
  localparam int unsigned CLASS_W = $clog2(NC);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                rst_n, rc_valid, rc_soc, rc_ready, tx_clav, tx_enb_n, tx_soc;
  logic [7:0]          rc_data, tx_data;
  logic                cell_in, cell_out, disc_valid, disc_lp;
  logic [CLASS_W-1:0]  cell_out_class, disc_class;
  logic [ADDR_W-1:0]   disc_addr;
  logic [NC-1:0]       class_nonempty;
  logic                done;
  int                  checks, failures;

  atm_buffer dut (.*);

  abuf_env #(.NUM_CLASSES(NC), .CAPACITY(CAP), .N1(2200), .N2(400),
             .ADDR_W(ADDR_W), .CLASS_W(CLASS_W)) env (.*);

  initial begin
    #1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (40 * (2200 + 400) * 60 + 100 * DEPTH) @(posedge clk);
    $display("atm_buffer_full_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
