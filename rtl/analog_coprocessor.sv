// analog_coprocessor: the analog MVM coprocessor attached to one RISC-V core.
//
// It is organised as NUM_ARRAYS independent compute arrays of DIM x DIM, each
// with its own input buffer, analog crossbar and output buffer, and one
// controller that decodes the core's RoCC commands. All arrays share the
// coprocessor's single memory port; operands and results travel through
// memory (the tile's cache), not through the command port. mvm.mv forwards
// one array's result straight into another array's input buffer so that
// chained multiplies keep their intermediate vectors on chip.
//
// Interface: RoCC-style command/response/busy toward the core, and the
// request/response memory port described in mvm_pkg toward the tile's L1
// cache. Timing is that of mvm_controller; a multiply occupies the array for
// MVM_LATENCY+1 clocks from its start.
module analog_coprocessor #(
  parameter int unsigned DIM         = 256,
  parameter int unsigned NUM_ARRAYS  = 2,
  parameter int unsigned MVM_LATENCY = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  mvm_pkg::rocc_cmd_t   cmd,
  output logic                 resp_valid,
  input  logic                 resp_ready,
  output mvm_pkg::rocc_resp_t  resp,
  output logic                 busy,
  output logic                 mem_req_valid,
  input  logic                 mem_req_ready,
  output mvm_pkg::mem_req_t    mem_req,
  input  logic                 mem_resp_valid,
  input  mvm_pkg::mem_resp_t   mem_resp
);
  import mvm_pkg::*;

  localparam int unsigned IDW = $clog2(NUM_ARRAYS + 1);
  localparam int unsigned IXW = $clog2(DIM);

  logic [IDW-1:0]    wr_id, rd_id;
  logic              in_we, prog_valid, start;
  logic [IXW-1:0]    in_idx, prog_row, prog_col, rd_idx;
  logic [DATA_W-1:0] in_wdata, prog_data, rd_data;
  logic [NUM_ARRAYS-1:0]             arr_done, arr_busy;
  logic [NUM_ARRAYS-1:0][DATA_W-1:0] arr_rdata;

  mvm_controller #(.DIM(DIM), .NUM_ARRAYS(NUM_ARRAYS)) u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd,
    .resp_valid, .resp_ready, .resp, .busy,
    .mem_req_valid, .mem_req_ready, .mem_req,
    .mem_resp_valid, .mem_resp,
    .wr_id, .in_we, .in_idx, .in_wdata,
    .prog_valid, .prog_row, .prog_col, .prog_data,
    .start, .arr_done(|arr_done),
    .rd_id, .rd_idx, .rd_data
  );

  for (genvar a = 0; a < NUM_ARRAYS; a++) begin : g_array
    compute_array #(
      .DIM(DIM), .NUM_ARRAYS(NUM_ARRAYS), .ARRAY_ID(a), .MVM_LATENCY(MVM_LATENCY)
    ) u_array (
      .clk, .rst_n,
      .wr_id, .in_we, .in_idx, .in_wdata,
      .prog_valid, .prog_row, .prog_col, .prog_data,
      .start,
      .busy    (arr_busy[a]),
      .done    (arr_done[a]),
      .rd_idx,
      .rd_data (arr_rdata[a])
    );
  end

  // Output-buffer word of the array being read (mvm.s, mvm.mv source).
  assign rd_data = (rd_id < IDW'(NUM_ARRAYS)) ? arr_rdata[rd_id] : '0;

  // Only the addressed array can be multiplying.
  a_one_busy: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(arr_busy))
    else $error("more than one array busy");
endmodule
