// input_buffer: the compute array's input operand buffer.
//
// It holds one operand vector of DIM floating-point words and presents all of
// them at once to the array's DACs (one DAC per wordline). Words are written
// one per clock, either from memory (mvm.l) or from another array's output
// buffer (mvm.mv); the write port is the only way in. The buffer itself is
// what the architecture names; the single write port and the parallel read
// are this design's choice.
//
// Timing: a write with we=1 at a rising edge is visible on vec after that
// edge. Reset clears every word to +0.0, so an array never multiplies stale
// data after reset.
module input_buffer #(
  parameter int unsigned DIM = 256
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               we,
  input  logic [$clog2(DIM)-1:0]             idx,
  input  logic [mvm_pkg::DATA_W-1:0]         wdata,
  output logic [DIM-1:0][mvm_pkg::DATA_W-1:0] vec
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DIM; i++) vec[i] <= '0;
    end else if (we) begin
      vec[idx] <= wdata;
    end
  end
endmodule
