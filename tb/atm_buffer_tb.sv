// atm_buffer_tb: end-to-end test of the output buffer at a reduced size (3
// classes, 8 cells), so that push-out happens often. Stimulus, reference model
// and checks are in abuf_env: a phase with the output held and an exact
// comparison of the departure order with the model, then random traffic with
// random tx_clav.
module atm_buffer_tb;
  import atm_buf_pkg::*;
  localparam int unsigned NC      = 3;
  localparam int unsigned CAP     = 8;
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

  atm_buffer #(.NUM_CLASSES(3), .CAPACITY(8)) dut (.*);

  abuf_env #(.NUM_CLASSES(NC), .CAPACITY(CAP), .N1(20), .N2(400),
             .ADDR_W(ADDR_W), .CLASS_W(CLASS_W)) env (.*);

  initial begin
    #1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (40 * (20 + 400) * 60 + 100 * DEPTH) @(posedge clk);
    $display("atm_buffer_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
