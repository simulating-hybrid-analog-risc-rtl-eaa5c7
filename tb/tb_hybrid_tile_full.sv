// tb_hybrid_tile_full: the end-to-end run with the tile at its default size
// (two 256 x 256 arrays): the two-array chain, illegal commands, and up to
// ten iterations each of CG and BiCG-Stab on dense problems of N = 4, 8, ...,
// 256, each held zero-padded in one array, as in the single-accelerator study.
module tb_hybrid_tile_full;
  import mvm_pkg::*;
  logic clk, rst_n, cmd_valid, cmd_ready, resp_valid, resp_ready, busy;
  rocc_cmd_t cmd;
  rocc_resp_t resp;
  logic req_valid, req_ready, mresp_valid;
  mem_req_t req;
  mem_resp_t mresp;

  hybrid_tile dut (
    .clk, .rst_n,
    .rocc_cmd_valid(cmd_valid), .rocc_cmd_ready(cmd_ready), .rocc_cmd(cmd),
    .rocc_resp_valid(resp_valid), .rocc_resp_ready(resp_ready), .rocc_resp(resp),
    .rocc_busy(busy),
    .l1_req_valid(req_valid), .l1_req_ready(req_ready), .l1_req(req),
    .l1_resp_valid(mresp_valid), .l1_resp(mresp));

  tile_driver #(.DIM(256), .NA(2), .N_PROB(256), .N_MIN(4), .ITERS(10), .STALL_PCT(20)) drv (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .resp_valid, .resp_ready, .resp, .busy,
    .mem_req_valid(req_valid), .mem_req_ready(req_ready), .mem_req(req),
    .mem_resp_valid(mresp_valid), .mem_resp(mresp));
endmodule
