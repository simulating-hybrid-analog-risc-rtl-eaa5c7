// tb_input_buffer: writes random words at random positions of the input
// buffer and checks the whole parallel vector against a reference copy after
// every write; also checks that reset clears it and that we=0 writes nothing.
module tb_input_buffer;
  localparam int unsigned DIM = 16;
  logic clk = 0, rst_n = 0;
  logic we;
  logic [$clog2(DIM)-1:0] idx;
  logic [63:0] wdata;
  logic [DIM-1:0][63:0] vec;
  logic [63:0] ref_v [DIM];
  int checks = 0, failures = 0;

  input_buffer #(.DIM(DIM)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < DIM; i++) begin
      checks++;
      if (vec[i] !== ref_v[i]) begin
        failures++;
        $display("mismatch word %0d: %h vs %h", i, vec[i], ref_v[i]);
      end
    end
  endtask

  initial begin
    we = 0; idx = 0; wdata = 0;
    for (int i = 0; i < DIM; i++) ref_v[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we    = ($urandom_range(3) != 0);
      idx   = $urandom_range(DIM - 1);
      wdata = {$urandom, $urandom};
      if (we) ref_v[idx] = wdata;
      @(negedge clk);
      we = 0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
