// list_ram_tb: checks the link RAM at its default size against a model array.
// Random masked writes and reads; a read returns the whole word one clock
// later, fields outside the write mask keep their old value, and rdata holds
// while writes go on.
module list_ram_tb;
  import atm_buf_pkg::*;
  localparam int unsigned DEPTH  = list_depth(DEF_NUM_CLASSES, DEF_CAPACITY);
  localparam int unsigned ADDR_W = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [ADDR_W-1:0]                 addr;
  logic                              we;
  logic [NUM_FIELDS-1:0]             wmask;
  logic [NUM_FIELDS-1:0][ADDR_W-1:0] wdata, rdata, expected;
  logic [NUM_FIELDS-1:0][ADDR_W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  list_ram dut (.*);

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic write(int a, logic [NUM_FIELDS-1:0] m, logic [NUM_FIELDS-1:0][ADDR_W-1:0] d);
    addr = ADDR_W'(a); we = 1'b1; wmask = m; wdata = d;
    tick();
    for (int f = 0; f < NUM_FIELDS; f++) if (m[f]) model[a][f] = d[f];
    we = 1'b0;
  endtask

  task automatic read_check(int a);
    addr = ADDR_W'(a); we = 1'b0;
    tick();
    expected = model[a];
    checks++;
    if (rdata !== expected) begin
      failures++;
      $display("list_ram_tb FAIL read %0d: %h expected %h", a, rdata, expected);
    end
  endtask

  initial begin
    logic [NUM_FIELDS-1:0][ADDR_W-1:0] d;
    we = 1'b0; addr = '0; wmask = '0; wdata = '0;
    // fill every word
    for (int a = 0; a < int'(DEPTH); a++) begin
      for (int f = 0; f < NUM_FIELDS; f++) d[f] = ADDR_W'($urandom_range(0, DEPTH - 1));
      write(a, WM_ALL, d);
    end
    for (int a = 0; a < int'(DEPTH); a += 7) read_check(a);
    // random masked writes and reads
    for (int i = 0; i < 20000; i++) begin
      int a = $urandom_range(0, DEPTH - 1);
      if ($urandom_range(0, 1) == 0) begin
        for (int f = 0; f < NUM_FIELDS; f++) d[f] = ADDR_W'($urandom_range(0, DEPTH - 1));
        write(a, NUM_FIELDS'($urandom_range(0, 15)), d);
      end else begin
        read_check(a);
      end
    end
    // rdata holds during writes
    read_check(5);
    for (int f = 0; f < NUM_FIELDS; f++) d[f] = ADDR_W'(f + 1);
    write(6, WM_ALL, d);
    checks++;
    if (rdata !== model[5]) begin failures++; $display("list_ram_tb FAIL rdata not held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("list_ram_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
