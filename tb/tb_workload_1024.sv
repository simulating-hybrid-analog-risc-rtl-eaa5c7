// tb_workload_1024: the fixed-size study: ten iterations each of CG and
// BiCG-Stab on a dense 1024 x 1024 matrix held in 64 arrays of 128 x 128,
// all in one tile (the 1-core x 64-arrays mapping). The matrix is cut into
// 8 x 8 blocks, one per array; the per-block products are summed by the
// driver as the core would. Preceded by the two-array chain and the illegal
// command checks of tile_driver.
module tb_workload_1024;
  import mvm_pkg::*;
  logic clk, rst_n, cmd_valid, cmd_ready, resp_valid, resp_ready, busy;
  rocc_cmd_t cmd;
  rocc_resp_t resp;
  logic req_valid, req_ready, mresp_valid;
  mem_req_t req;
  mem_resp_t mresp;

  hybrid_tile #(.DIM(128), .NUM_ARRAYS(64)) dut (
    .clk, .rst_n,
    .rocc_cmd_valid(cmd_valid), .rocc_cmd_ready(cmd_ready), .rocc_cmd(cmd),
    .rocc_resp_valid(resp_valid), .rocc_resp_ready(resp_ready), .rocc_resp(resp),
    .rocc_busy(busy),
    .l1_req_valid(req_valid), .l1_req_ready(req_ready), .l1_req(req),
    .l1_resp_valid(mresp_valid), .l1_resp(mresp));

  tile_driver #(.DIM(128), .NA(64), .N_PROB(1024), .ITERS(10), .STALL_PCT(10)) drv (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .resp_valid, .resp_ready, .resp, .busy,
    .mem_req_valid(req_valid), .mem_req_ready(req_ready), .mem_req(req),
    .mem_resp_valid(mresp_valid), .mem_resp(mresp));

  // Backstop, well beyond the driver's own watchdog (which reports first).
  initial begin
    repeat (20_000_000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures + 1);
    $finish;
  end
endmodule
