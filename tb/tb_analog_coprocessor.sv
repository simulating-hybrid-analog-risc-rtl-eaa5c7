// tb_analog_coprocessor: the same end-to-end sequence as the tile test, run
// on the bare coprocessor with three 8 x 8 arrays (array numbers 0..2, so
// 3 is out of range) and a 7 x 7 problem held in one zero-padded array.
module tb_analog_coprocessor;
  import mvm_pkg::*;
  localparam int unsigned DIM = 8, NA = 3;
  logic clk, rst_n, cmd_valid, cmd_ready, resp_valid, resp_ready, busy;
  rocc_cmd_t cmd;
  rocc_resp_t resp;
  logic req_valid, req_ready, mresp_valid;
  mem_req_t req;
  mem_resp_t mresp;

  analog_coprocessor #(.DIM(DIM), .NUM_ARRAYS(NA), .MVM_LATENCY(2)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .resp_valid, .resp_ready, .resp, .busy,
    .mem_req_valid(req_valid), .mem_req_ready(req_ready), .mem_req(req),
    .mem_resp_valid(mresp_valid), .mem_resp(mresp));

  tile_driver #(.DIM(DIM), .NA(NA), .N_PROB(7), .ITERS(10), .STALL_PCT(40)) drv (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .resp_valid, .resp_ready, .resp, .busy,
    .mem_req_valid(req_valid), .mem_req_ready(req_ready), .mem_req(req),
    .mem_resp_valid(mresp_valid), .mem_resp(mresp));
endmodule
