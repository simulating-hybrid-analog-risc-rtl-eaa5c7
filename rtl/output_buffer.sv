// output_buffer: the compute array's result buffer.
//
// The array's ADCs deliver all DIM results of a multiply at once; a capture
// pulse copies them into the buffer in one clock. The buffer is then read one
// word at a time by index, for mvm.s (store to memory) and mvm.mv (forward to
// another array's input buffer). The buffer is what the architecture names;
// the parallel capture and the asynchronous word read are this design's
// choice.
//
// Timing: capture at a rising edge updates the contents after that edge;
// rdata follows idx combinationally. Reset clears the contents to +0.0.
module output_buffer #(
  parameter int unsigned DIM = 256
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                capture,
  input  logic [DIM-1:0][mvm_pkg::DATA_W-1:0] y_vec,
  input  logic [$clog2(DIM)-1:0]              idx,
  output logic [mvm_pkg::DATA_W-1:0]          rdata
);
  logic [DIM-1:0][mvm_pkg::DATA_W-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DIM; i++) mem[i] <= '0;
    end else if (capture) begin
      mem <= y_vec;
    end
  end

  assign rdata = mem[idx];
endmodule
