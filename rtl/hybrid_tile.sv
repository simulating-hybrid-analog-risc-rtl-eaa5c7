// hybrid_tile: one tile of the hybrid analog + RISC-V accelerator.
//
// A tile pairs a general-purpose RISC-V core with an analog coprocessor that
// acts as one of the core's functional units, reached through RoCC custom
// instructions. The tile's local SRAM is a hardware-managed cache; the
// coprocessor has a memory port of its own into it, so vectors move between
// core and arrays through memory. Tiles are joined by a cache-coherent mesh.
//
// Only the coprocessor is built here. The core, the L1/L2 caches with their
// coherence directory, and the mesh router are existing components that this
// design does not define, so the tile brings their connection points out as
// ports: the RoCC command/response/busy signals (driven by the core) and the
// coprocessor's memory port (served by the L1 cache). All ports are plain
// signals or packed structs from mvm_pkg.
//
// Default size: one tile with two 256 x 256 arrays (two arrays as in the
// two-array chain of mvm.mv; 256 x 256 as in the single-accelerator study;
// the 1024 x 1024 study uses 128 x 128 arrays, 1 to 64 per tile).
module hybrid_tile #(
  parameter int unsigned DIM         = 256,
  parameter int unsigned NUM_ARRAYS  = 2,
  parameter int unsigned MVM_LATENCY = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // RoCC port toward the core
  input  logic                 rocc_cmd_valid,
  output logic                 rocc_cmd_ready,
  input  mvm_pkg::rocc_cmd_t   rocc_cmd,
  output logic                 rocc_resp_valid,
  input  logic                 rocc_resp_ready,
  output mvm_pkg::rocc_resp_t  rocc_resp,
  output logic                 rocc_busy,
  // coprocessor memory port toward the L1 cache
  output logic                 l1_req_valid,
  input  logic                 l1_req_ready,
  output mvm_pkg::mem_req_t    l1_req,
  input  logic                 l1_resp_valid,
  input  mvm_pkg::mem_resp_t   l1_resp
);
  analog_coprocessor #(
    .DIM(DIM), .NUM_ARRAYS(NUM_ARRAYS), .MVM_LATENCY(MVM_LATENCY)
  ) u_copro (
    .clk, .rst_n,
    .cmd_valid      (rocc_cmd_valid),
    .cmd_ready      (rocc_cmd_ready),
    .cmd            (rocc_cmd),
    .resp_valid     (rocc_resp_valid),
    .resp_ready     (rocc_resp_ready),
    .resp           (rocc_resp),
    .busy           (rocc_busy),
    .mem_req_valid  (l1_req_valid),
    .mem_req_ready  (l1_req_ready),
    .mem_req        (l1_req),
    .mem_resp_valid (l1_resp_valid),
    .mem_resp       (l1_resp)
  );
endmodule
