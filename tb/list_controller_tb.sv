// list_controller_tb: self-checking test of the linked-list controller.
// Three controllers run side by side, each with its own list RAM and reference
// model (lc_harness): the 2-class, 4-cell example configuration, replayed state
// by state and then driven at random; a 3-class, 12-cell configuration (the
// default class count) and a 5-class, 10-cell configuration (the largest class
// count foreseen) driven at random. Push-out of high- and low-priority cells and of the
// arriving cell itself must each be seen.
module list_controller_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic done_a, done_b, done_c;
  int   checks_a, failures_a, checks_b, failures_b, checks_c, failures_c;
  int   checks, failures;

  lc_harness #(.NUM_CLASSES(2), .CAPACITY(4),  .FIGURE_WALK(1'b1), .N_RANDOM(1500), .SEED(7))
    h_example (.clk, .rst_n, .done(done_a), .checks(checks_a), .failures(failures_a));
  lc_harness #(.NUM_CLASSES(3), .CAPACITY(12), .FIGURE_WALK(1'b0), .N_RANDOM(3000), .SEED(11))
    h_three   (.clk, .rst_n, .done(done_b), .checks(checks_b), .failures(failures_b));
  lc_harness #(.NUM_CLASSES(5), .CAPACITY(10), .FIGURE_WALK(1'b0), .N_RANDOM(3000), .SEED(23))
    h_five    (.clk, .rst_n, .done(done_c), .checks(checks_c), .failures(failures_c));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_a && done_b && done_c);
    checks   = checks_a + checks_b + checks_c;
    failures = failures_a + failures_b + failures_c;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    $display("list_controller_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b + checks_c,
             failures_a + failures_b + failures_c + 1);
    $finish;
  end
endmodule
