// tb_hybrid_tile: end-to-end run of a reduced tile (four 8 x 8 arrays) under
// tile_driver: two-array chain, illegal commands, then CG and BiCG-Stab on a
// 13 x 13 problem, zero-padded to 16 x 16 and split into 2 x 2 array blocks.
module tb_hybrid_tile;
  import mvm_pkg::*;
  localparam int unsigned DIM = 8, NA = 4;
  logic clk, rst_n, cmd_valid, cmd_ready, resp_valid, resp_ready, busy;
  rocc_cmd_t cmd;
  rocc_resp_t resp;
  logic req_valid, req_ready, mresp_valid;
  mem_req_t req;
  mem_resp_t mresp;

  hybrid_tile #(.DIM(DIM), .NUM_ARRAYS(NA), .MVM_LATENCY(3)) dut (
    .clk, .rst_n,
    .rocc_cmd_valid(cmd_valid), .rocc_cmd_ready(cmd_ready), .rocc_cmd(cmd),
    .rocc_resp_valid(resp_valid), .rocc_resp_ready(resp_ready), .rocc_resp(resp),
    .rocc_busy(busy),
    .l1_req_valid(req_valid), .l1_req_ready(req_ready), .l1_req(req),
    .l1_resp_valid(mresp_valid), .l1_resp(mresp));

  tile_driver #(.DIM(DIM), .NA(NA), .N_PROB(13), .ITERS(10), .STALL_PCT(25)) drv (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .resp_valid, .resp_ready, .resp, .busy,
    .mem_req_valid(req_valid), .mem_req_ready(req_ready), .mem_req(req),
    .mem_resp_valid(mresp_valid), .mem_resp(mresp));
endmodule
