// tb_analog_crossbar: programs a random small-integer matrix cell by cell,
// multiplies several random vectors and compares y with an integer
// matrix-vector product worked out here (small integers keep binary64 exact).
// Checks that done arrives exactly MVM_LATENCY clocks after start, that busy
// covers the multiply and that a start while busy is ignored.
module tb_analog_crossbar;
  import tb_rocc_pkg::*;
  localparam int unsigned DIM = 8, LAT = 5;
  logic clk = 0, rst_n = 0;
  logic prog_valid;
  logic [$clog2(DIM)-1:0] prog_row, prog_col;
  logic [63:0] prog_data;
  logic [DIM-1:0][63:0] x_vec;
  logic start, busy, done;
  logic [DIM-1:0][63:0] y_vec;
  int a [DIM][DIM];
  int x [DIM];
  int checks = 0, failures = 0;

  analog_crossbar #(.DIM(DIM), .MVM_LATENCY(LAT)) dut (.*);

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
    prog_valid = 0; prog_row = 0; prog_col = 0; prog_data = 0; start = 0; x_vec = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 6; trial++) begin
      // program (re-program the whole array every other trial)
      if (trial % 2 == 0) begin
        for (int r = 0; r < DIM; r++)
          for (int c = 0; c < DIM; c++) begin
            a[r][c] = int'($urandom_range(40)) - 20;
            @(negedge clk);
            prog_valid = 1; prog_row = r[$clog2(DIM)-1:0]; prog_col = c[$clog2(DIM)-1:0];
            prog_data = f64(a[r][c]);
          end
        @(negedge clk);
        prog_valid = 0;
      end
      for (int c = 0; c < DIM; c++) begin
        x[c] = int'($urandom_range(60)) - 30;
        x_vec[c] = f64(x[c]);
      end
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      check("busy after start", busy);
      // a second start during the multiply must not restart it
      x_vec[0] = f64(1000);
      start = 1;
      begin
        int n;
        n = 0;
        while (!done) begin
          @(negedge clk);
          start = 0;
          n++;
          if (n > 100) break;
        end
        check($sformatf("latency %0d == %0d", n, LAT), n == LAT);
      end
      for (int r = 0; r < DIM; r++) begin
        int s;
        s = 0;
        for (int c = 0; c < DIM; c++) s += a[r][c] * x[c];
        check($sformatf("y[%0d]=%f exp %0d", r, $bitstoreal(y_vec[r]), s), y_vec[r] == f64(s));
      end
      @(negedge clk);
      check("idle after done", !busy && !done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
