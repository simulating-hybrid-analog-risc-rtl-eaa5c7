// tb_compute_array: drives one compute array (ARRAY_ID 1 of 2) through the
// array-side signals: programs a matrix, fills the input buffer, multiplies
// and reads the output buffer word by word. Every write is also sent once
// with the other array's ID, which the array must ignore. Checks the product
// against an integer reference and that done comes MVM_LATENCY+1 clocks after
// start, with the result already in the output buffer.
module tb_compute_array;
  import tb_rocc_pkg::*;
  localparam int unsigned DIM = 8, LAT = 4, ID = 1;
  logic clk = 0, rst_n = 0;
  logic [1:0] wr_id;
  logic in_we, prog_valid, start, busy, done;
  logic [$clog2(DIM)-1:0] in_idx, prog_row, prog_col, rd_idx;
  logic [63:0] in_wdata, prog_data, rd_data;
  int a [DIM][DIM];
  int x [DIM];
  int checks = 0, failures = 0;

  compute_array #(.DIM(DIM), .NUM_ARRAYS(2), .ARRAY_ID(ID), .MVM_LATENCY(LAT)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    wr_id = 0; in_we = 0; prog_valid = 0; start = 0;
    in_idx = 0; prog_row = 0; prog_col = 0; rd_idx = 0; in_wdata = 0; prog_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 4; trial++) begin
      for (int r = 0; r < DIM; r++)
        for (int c = 0; c < DIM; c++) begin
          a[r][c] = int'($urandom_range(30)) - 15;
          // decoy write to the other array, then the real one
          @(negedge clk);
          wr_id = 2'(1 - ID); prog_valid = 1;
          prog_row = r[$clog2(DIM)-1:0]; prog_col = c[$clog2(DIM)-1:0];
          prog_data = f64(999);
          @(negedge clk);
          wr_id = 2'(ID); prog_data = f64(a[r][c]);
        end
      @(negedge clk);
      prog_valid = 0;
      for (int c = 0; c < DIM; c++) begin
        x[c] = int'($urandom_range(30)) - 15;
        @(negedge clk);
        wr_id = 2'(1 - ID); in_we = 1; in_idx = c[$clog2(DIM)-1:0]; in_wdata = f64(777);
        @(negedge clk);
        wr_id = 2'(ID); in_wdata = f64(x[c]);
      end
      @(negedge clk);
      in_we = 0;
      // a start aimed at the other array must do nothing
      wr_id = 2'(1 - ID); start = 1;
      @(negedge clk);
      start = 0;
      check("other array's start ignored", !busy);
      wr_id = 2'(ID); start = 1;
      begin
        int n;
        n = 0;
        @(negedge clk);
        start = 0;
        n = 0;
        while (!done && n < 100) begin @(negedge clk); n++; end
        check($sformatf("latency %0d == %0d", n, LAT + 1), n == LAT + 1);
      end
      for (int r = 0; r < DIM; r++) begin
        int s;
        s = 0;
        for (int c = 0; c < DIM; c++) s += a[r][c] * x[c];
        rd_idx = r[$clog2(DIM)-1:0];
        #1;
        check($sformatf("y[%0d]=%f exp %0d", r, $bitstoreal(rd_data), s), rd_data == f64(s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
