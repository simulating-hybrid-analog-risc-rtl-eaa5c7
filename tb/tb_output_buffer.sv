// tb_output_buffer: presents random result vectors, captures some of them and
// reads every word back by index, checking that a capture takes the whole
// vector in one clock and that nothing changes without capture.
module tb_output_buffer;
  localparam int unsigned DIM = 16;
  logic clk = 0, rst_n = 0;
  logic capture;
  logic [DIM-1:0][63:0] y_vec;
  logic [$clog2(DIM)-1:0] idx;
  logic [63:0] rdata;
  logic [63:0] ref_v [DIM];
  int checks = 0, failures = 0;

  output_buffer #(.DIM(DIM)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int i = 0; i < DIM; i++) begin
      idx = i[$clog2(DIM)-1:0];
      #1;
      checks++;
      if (rdata !== ref_v[i]) begin
        failures++;
        $display("mismatch word %0d: %h vs %h", i, rdata, ref_v[i]);
      end
    end
  endtask

  initial begin
    capture = 0; idx = 0; y_vec = '0;
    for (int i = 0; i < DIM; i++) ref_v[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    read_all();
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      for (int i = 0; i < DIM; i++) y_vec[i] = {$urandom, $urandom};
      capture = (n % 3 != 1);
      if (capture) for (int i = 0; i < DIM; i++) ref_v[i] = y_vec[i];
      @(negedge clk);
      capture = 0;
      for (int i = 0; i < DIM; i++) y_vec[i] = {$urandom, $urandom};
      read_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
