// compute_array: one ISA-visible compute array of the analog coprocessor.
//
// It bundles the three parts software can see: the input buffer, the analog
// crossbar (with its DACs and ADCs) and the output buffer, plus its fixed
// array ID. The coprocessor broadcasts one set of control signals to all
// arrays; an array acts on a write, a programming step or a start only when
// the accompanying ID equals its own ARRAY_ID. The output buffer is always
// readable through rd_idx/rd_data; the coprocessor selects which array's
// word it uses. This decode-by-ID scheme is this design's choice.
//
// Timing: in_* and prog_* take effect at the clock edge they are presented
// at. start begins a multiply of the current input buffer; MVM_LATENCY clocks
// later done pulses for one clock and the result is already in the output
// buffer from that edge on (the buffer captures on the crossbar's done).
module compute_array #(
  parameter int unsigned DIM         = 256,
  parameter int unsigned NUM_ARRAYS  = 2,
  parameter int unsigned ARRAY_ID    = 0,
  parameter int unsigned MVM_LATENCY = 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // which array the write-side signals address
  input  logic [$clog2(NUM_ARRAYS+1)-1:0]   wr_id,
  input  logic                              in_we,
  input  logic [$clog2(DIM)-1:0]            in_idx,
  input  logic [mvm_pkg::DATA_W-1:0]        in_wdata,
  input  logic                              prog_valid,
  input  logic [$clog2(DIM)-1:0]            prog_row,
  input  logic [$clog2(DIM)-1:0]            prog_col,
  input  logic [mvm_pkg::DATA_W-1:0]        prog_data,
  input  logic                              start,
  output logic                              busy,
  output logic                              done,
  // output buffer read port
  input  logic [$clog2(DIM)-1:0]            rd_idx,
  output logic [mvm_pkg::DATA_W-1:0]        rd_data
);
  localparam int unsigned IDW = $clog2(NUM_ARRAYS + 1);

  logic                                hit;
  logic [DIM-1:0][mvm_pkg::DATA_W-1:0] x_vec;
  logic [DIM-1:0][mvm_pkg::DATA_W-1:0] y_vec;
  logic                                xb_done;

  assign hit = (wr_id == IDW'(ARRAY_ID));

  input_buffer #(.DIM(DIM)) u_in (
    .clk, .rst_n,
    .we    (hit && in_we),
    .idx   (in_idx),
    .wdata (in_wdata),
    .vec   (x_vec)
  );

  analog_crossbar #(.DIM(DIM), .MVM_LATENCY(MVM_LATENCY)) u_xbar (
    .clk, .rst_n,
    .prog_valid (hit && prog_valid),
    .prog_row, .prog_col, .prog_data,
    .x_vec,
    .start      (hit && start),
    .busy,
    .done       (xb_done),
    .y_vec
  );

  output_buffer #(.DIM(DIM)) u_out (
    .clk, .rst_n,
    .capture (xb_done),
    .y_vec,
    .idx     (rd_idx),
    .rdata   (rd_data)
  );

  // The output buffer captures on the edge after the ADC result appears.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= 1'b0;
    else        done <= xb_done;
  end
endmodule
