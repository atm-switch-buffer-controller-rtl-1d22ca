// cell_pool_tb: checks the cell pool at its default size. Whole cells are
// written byte by byte into random slots while other slots are read on the
// read port; every byte read one clock after its address must match a model.
module cell_pool_tb;
  import atm_buf_pkg::*;
  localparam int unsigned DEPTH  = list_depth(DEF_NUM_CLASSES, DEF_CAPACITY);
  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned IDX_W  = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              wr_en;
  logic [ADDR_W-1:0] wr_cell, rd_cell;
  logic [IDX_W-1:0]  wr_idx, rd_idx;
  logic [7:0]        wr_data, rd_data;
  logic [7:0]        model [DEPTH][64];
  bit                known [DEPTH];
  int checks = 0, failures = 0;

  cell_pool dut (.*);

  initial begin
    int wc, rc;
    wr_en = 1'b0; wr_cell = '0; wr_idx = '0; wr_data = '0; rd_cell = '0; rd_idx = '0;
    for (int a = 0; a < int'(DEPTH); a++) known[a] = 1'b0;
    for (int n = 0; n < 400; n++) begin
      wc = $urandom_range(0, DEPTH - 1);
      rc = $urandom_range(0, DEPTH - 1);
      for (int i = 0; i < int'(ATM_CELL_BYTES); i++) begin
        wr_en   = 1'b1;
        wr_cell = ADDR_W'(wc);
        wr_idx  = IDX_W'(i);
        wr_data = 8'($urandom);
        rd_cell = ADDR_W'(rc);
        rd_idx  = IDX_W'(i);
        @(posedge clk); #1;
        // the read addressed in the last clock is on rd_data now; it saw the
        // memory before that clock's write
        if (known[rc] && rc != wc) begin
          checks++;
          if (rd_data != model[rc][i]) begin
            failures++;
            $display("cell_pool_tb FAIL slot %0d byte %0d: %h expected %h", rc, i,
                     rd_data, model[rc][i]);
          end
        end
        model[wc][i] = wr_data;
      end
      known[wc] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("cell_pool_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
