// tile_driver: plays the RISC-V core and the L1 cache around one analog
// coprocessor (bare or inside a tile) and runs the design end to end.
//
// It generates clock and reset, owns a memory model on the coprocessor's
// memory port (random back-pressure), and issues RoCC commands the way the
// solver software would:
//   1. a two-array chain: y = M1 (M0 x) with mvm.set, mvm.l, mvm, mvm.mv,
//      mvm, mvm.s on small-integer data, checked exactly;
//   2. illegal commands (array number out of range, unknown funct7);
//   3. ITERS iterations of conjugate gradient on a symmetric, diagonally
//      dominant N_PROB x N_PROB matrix, and then ITERS iterations of
//      BiCG-Stab on a non-symmetric one. The matrix is zero-padded to
//      BLK*DIM and cut into BLK x BLK blocks, one array each; every
//      matrix-vector product is done by the arrays (mvm.l, mvm, mvm.s per
//      block) and the block results are summed here, as the core would.
// With N_MIN < N_PROB step 3 is repeated for problem sizes N_MIN, 2*N_MIN,
// ... and N_PROB, each zero-padded into the same arrays.
// Each block product read back from memory is compared bit for bit with a
// product worked out here in the same summation order, each response with the
// status it should carry, and each solver's true residual ||b - A x||/||b||
// with a tolerance. It counts how often each mechanism happened and counts a
// failure for any that the configuration should exercise and never did.
module tile_driver #(
  parameter int unsigned DIM       = 256,
  parameter int unsigned NA        = 2,
  parameter int unsigned N_PROB    = 256,
  parameter int unsigned N_MIN     = N_PROB,  // sweep N_MIN, 2*N_MIN, ... up to N_PROB
  parameter int unsigned ITERS     = 10,
  parameter int unsigned STALL_PCT = 20
) (
  output logic                 clk,
  output logic                 rst_n,
  output logic                 cmd_valid,
  input  logic                 cmd_ready,
  output mvm_pkg::rocc_cmd_t   cmd,
  input  logic                 resp_valid,
  output logic                 resp_ready,
  input  mvm_pkg::rocc_resp_t  resp,
  input  logic                 busy,
  input  logic                 mem_req_valid,
  output logic                 mem_req_ready,
  input  mvm_pkg::mem_req_t    mem_req,
  output logic                 mem_resp_valid,
  output mvm_pkg::mem_resp_t   mem_resp
);
  import mvm_pkg::*;
  import tb_rocc_pkg::*;

  function automatic int unsigned blk_of(int unsigned na);
    int unsigned b = 1;
    while ((b + 1) * (b + 1) <= na) b++;
    return b;
  endfunction

  localparam int unsigned BLK      = blk_of(NA);
  localparam int unsigned NP       = BLK * DIM;            // padded size
  localparam int unsigned MAT_W    = 0;                    // word addresses
  localparam int unsigned VEC_W    = NA * DIM * DIM;
  localparam int unsigned OUT_W    = VEC_W + BLK * DIM;
  localparam int unsigned WORDS    = OUT_W + NA * DIM;
  localparam int unsigned N_SIZES = $clog2(N_PROB / N_MIN) + 1;
  localparam longint unsigned WATCHDOG = 6 * (2 + 2 * NA * N_SIZES) * DIM * DIM + 400000 * N_SIZES;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_fn [5];
  int n_cmd_wait = 0, n_resp_hold = 0, n_bad_array = 0, n_bad_funct = 0;
  int n_partial_sum = 0, n_padded = 0;

  mem_model #(.WORDS(WORDS), .LATENCY(4), .STALL_PCT(STALL_PCT)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .resp_valid(mem_resp_valid), .resp(mem_resp));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired busy=%0d pending=%0d ready=%0d valid=%0d", busy, exp_st.size(), cmd_ready, cmd_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---- command monitor and response handler ----
  mvm_status_e exp_st [$];
  always @(posedge clk) begin
    if (rst_n) begin
      if (cmd_valid && cmd_ready && cmd.inst.funct7 < 5) n_fn[cmd.inst.funct7]++;
      if (cmd_valid && !cmd_ready) n_cmd_wait++;
      if (resp_valid && !resp_ready) n_resp_hold++;
      if (resp_valid && resp_ready) begin
        check("response expected", exp_st.size() > 0);
        if (exp_st.size() > 0) begin
          mvm_status_e e;
          e = exp_st.pop_front();
          check($sformatf("status %0d == %0d", resp.data, e), resp.data == XLEN'(e));
          check("response rd", resp.rd == 5'd5);
        end
      end
    end
  end
  always @(negedge clk) resp_ready <= ($urandom_range(2) == 0);

  // Hand one command to the coprocessor (waits while it is busy).
  task automatic issue(logic [6:0] fn, longint unsigned rs1, longint unsigned rs2,
                       logic xd, mvm_status_e e = ST_OK);
    @(negedge clk);
    cmd       = mk_cmd(fn, rs1, rs2, xd, 5'd5);
    cmd_valid = 1'b1;
    if (xd) exp_st.push_back(e);
    // cmd_ready comes from a register, so it is settled at the falling edge;
    // the rising edge after a falling edge that saw it high takes the command.
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  // Wait until every command has finished and every response is in.
  task automatic sync();
    @(negedge clk);
    while (busy || exp_st.size() > 0) @(negedge clk);
  endtask

  // ---- matrix and vector helpers (the "core" side) ----
  real amat [NP][NP];     // padded matrix currently programmed
  int unsigned n_cur;     // problem size being solved

  task automatic program_matrix(int unsigned k, int unsigned bi, int unsigned bj);
    for (int unsigned r = 0; r < DIM; r++)
      for (int unsigned c = 0; c < DIM; c++)
        u_mem.mem[MAT_W + k * DIM * DIM + r * DIM + c] = $realtobits(amat[bi * DIM + r][bj * DIM + c]);
    issue(FN_MVM_SET, k, 8 * (MAT_W + k * DIM * DIM), 1'b0);
  endtask

  task automatic program_all();
    for (int unsigned bi = 0; bi < BLK; bi++)
      for (int unsigned bj = 0; bj < BLK; bj++)
        program_matrix(bi * BLK + bj, bi, bj);
    sync();
  endtask

  // y = A x through the arrays, block by block.
  task automatic mvm(input real x [NP], output real y [NP]);
    for (int unsigned i = 0; i < NP; i++) begin
      u_mem.mem[VEC_W + i] = $realtobits(x[i]);
      y[i] = 0.0;
    end
    for (int unsigned bi = 0; bi < BLK; bi++)
      for (int unsigned bj = 0; bj < BLK; bj++) begin
        automatic int unsigned k = bi * BLK + bj;
        issue(FN_MVM_LOAD, k, 8 * (VEC_W + bj * DIM), 1'b0);
        issue(FN_MVM, k, 0, 1'b0);
        issue(FN_MVM_STORE, k, 8 * (OUT_W + k * DIM), 1'b1);
      end
    sync();
    for (int unsigned bi = 0; bi < BLK; bi++)
      for (int unsigned bj = 0; bj < BLK; bj++) begin
        automatic int unsigned k = bi * BLK + bj;
        for (int unsigned r = 0; r < DIM; r++) begin
          automatic real s = 0.0;
          automatic logic [63:0] got = u_mem.mem[OUT_W + k * DIM + r];
          for (int unsigned c = 0; c < DIM; c++) s += amat[bi * DIM + r][bj * DIM + c] * x[bj * DIM + c];
          check($sformatf("block %0d row %0d: %g vs %g", k, r, $bitstoreal(got), s),
                got == $realtobits(s));
          y[bi * DIM + r] += $bitstoreal(got);
        end
        if (bj > 0) n_partial_sum++;
      end
  endtask

  function automatic real dot(real a [NP], real b [NP]);
    real s = 0.0;
    for (int unsigned i = 0; i < NP; i++) s += a[i] * b[i];
    return s;
  endfunction

  function automatic real true_resid(real x [NP], real b [NP]);
    real num = 0.0;
    for (int unsigned r = 0; r < NP; r++) begin
      real s = 0.0;
      for (int unsigned c = 0; c < NP; c++) s += amat[r][c] * x[c];
      num += (b[r] - s) * (b[r] - s);
    end
    return $sqrt(num / dot(b, b));
  endfunction

  task automatic make_matrix(bit symmetric);
    for (int unsigned r = 0; r < NP; r++)
      for (int unsigned c = 0; c < NP; c++) amat[r][c] = 0.0;
    for (int unsigned r = 0; r < n_cur; r++)
      for (int unsigned c = 0; c < n_cur; c++)
        if (r == c) amat[r][c] = real'(n_cur);
        else if (!symmetric || c > r) amat[r][c] = (real'($urandom_range(2000)) - 1000.0) / 1000.0;
        else amat[r][c] = amat[c][r];
  endtask

  task automatic make_rhs(output real b [NP]);
    for (int unsigned i = 0; i < NP; i++)
      b[i] = (i < n_cur) ? (real'($urandom_range(200)) - 100.0) / 10.0 : 0.0;
  endtask

  // ---- the run ----
  initial begin
    real b [NP], x [NP], r [NP], p [NP], ap [NP], rh [NP], v [NP], s [NP], t [NP];
    real rs, rsn, alpha, beta, omega, rho, rho_n, res;
    int  m0 [DIM][DIM], m1 [DIM][DIM], xi [DIM];

    cmd_valid = 1'b0; cmd = '0; rst_n = 1'b0;
    for (int i = 0; i < 5; i++) n_fn[i] = 0;
    for (int unsigned w = 0; w < WORDS; w++) u_mem.mem[w] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. two-array chain through mvm.mv
    if (NA >= 2) begin
      for (int unsigned rr = 0; rr < DIM; rr++) begin
        xi[rr] = int'($urandom_range(6)) - 3;
        u_mem.mem[VEC_W + rr] = f64(xi[rr]);
        for (int unsigned c = 0; c < DIM; c++) begin
          m0[rr][c] = int'($urandom_range(4)) - 2;
          m1[rr][c] = int'($urandom_range(4)) - 2;
          u_mem.mem[MAT_W + rr * DIM + c] = f64(m0[rr][c]);
          u_mem.mem[MAT_W + DIM * DIM + rr * DIM + c] = f64(m1[rr][c]);
        end
      end
      issue(FN_MVM_SET, 0, 8 * MAT_W, 1'b1);
      issue(FN_MVM_SET, 1, 8 * (MAT_W + DIM * DIM), 1'b0);
      issue(FN_MVM_LOAD, 0, 8 * VEC_W, 1'b1);
      issue(FN_MVM, 0, 0, 1'b1);
      issue(FN_MVM_MOVE, 0, 1, 1'b1);
      issue(FN_MVM, 1, 0, 1'b0);
      issue(FN_MVM_STORE, 1, 8 * OUT_W, 1'b1);
      issue(FN_MVM_STORE, 0, 8 * (OUT_W + DIM), 1'b0);
      sync();
      for (int unsigned rr = 0; rr < DIM; rr++) begin
        automatic int y0 = 0, y1 = 0;
        for (int unsigned c = 0; c < DIM; c++) y0 += m0[rr][c] * xi[c];
        check($sformatf("chain stage 0 row %0d", rr), u_mem.mem[OUT_W + DIM + rr] == f64(y0));
      end
      for (int unsigned rr = 0; rr < DIM; rr++) begin
        automatic int y1 = 0;
        for (int unsigned c = 0; c < DIM; c++) begin
          automatic int y0 = 0;
          for (int unsigned q = 0; q < DIM; q++) y0 += m0[c][q] * xi[q];
          y1 += m1[rr][c] * y0;
        end
        check($sformatf("chain stage 1 row %0d", rr), u_mem.mem[OUT_W + rr] == f64(y1));
      end
    end

    // 2. illegal commands
    issue(FN_MVM_LOAD, NA, 0, 1'b1, ST_BAD_ARRAY);
    n_bad_array++;
    issue(FN_MVM_MOVE, 0, NA + 3, 1'b1, ST_BAD_ARRAY);
    n_bad_array++;
    issue(7'd100, 0, 0, 1'b1, ST_BAD_FUNCT);
    n_bad_funct++;
    sync();

    n_cur = N_MIN;
    while (1) begin
    if (n_cur < NP) n_padded++;

    // 3a. conjugate gradient
    make_matrix(1'b1);
    program_all();
    make_rhs(b);
    for (int unsigned i = 0; i < NP; i++) begin x[i] = 0.0; r[i] = b[i]; p[i] = b[i]; end
    rs = dot(r, r);
    for (int it = 0; it < int'(ITERS) && rs > 1e-26 * dot(b, b); it++) begin
      mvm(p, ap);
      alpha = rs / dot(p, ap);
      for (int unsigned i = 0; i < NP; i++) begin
        x[i] += alpha * p[i];
        r[i] -= alpha * ap[i];
      end
      rsn = dot(r, r);
      for (int unsigned i = 0; i < NP; i++) p[i] = r[i] + (rsn / rs) * p[i];
      rs = rsn;
    end
    res = true_resid(x, b);
    $display("CG: N=%0d after up to %0d iterations, relative residual %g", n_cur, ITERS, res);
    check("CG converged", res < 1e-6);

    // 3b. BiCG-Stab
    make_matrix(1'b0);
    program_all();
    make_rhs(b);
    for (int unsigned i = 0; i < NP; i++) begin
      x[i] = 0.0; r[i] = b[i]; rh[i] = b[i]; p[i] = 0.0; v[i] = 0.0;
    end
    rho = 1.0; alpha = 1.0; omega = 1.0;
    for (int it = 0; it < int'(ITERS) && dot(r, r) > 1e-26 * dot(b, b); it++) begin
      rho_n = dot(rh, r);
      beta  = (rho_n / rho) * (alpha / omega);
      for (int unsigned i = 0; i < NP; i++) p[i] = r[i] + beta * (p[i] - omega * v[i]);
      mvm(p, v);
      alpha = rho_n / dot(rh, v);
      for (int unsigned i = 0; i < NP; i++) s[i] = r[i] - alpha * v[i];
      if (dot(s, s) <= 1e-26 * dot(b, b)) begin
        for (int unsigned i = 0; i < NP; i++) x[i] += alpha * p[i];
        break;
      end
      mvm(s, t);
      omega = dot(t, s) / dot(t, t);
      for (int unsigned i = 0; i < NP; i++) begin
        x[i] += alpha * p[i] + omega * s[i];
        r[i] = s[i] - omega * t[i];
      end
      rho = rho_n;
    end
    res = true_resid(x, b);
    $display("BiCG-Stab: N=%0d after up to %0d iterations, relative residual %g", n_cur, ITERS, res);
    check("BiCG-Stab converged", res < 1e-6);

    if (n_cur >= N_PROB) break;
    n_cur = (2 * n_cur > N_PROB) ? N_PROB : 2 * n_cur;
    end

    // ---- mechanism coverage ----
    $display("mvm.set=%0d mvm.l=%0d mvm=%0d mvm.s=%0d mvm.mv=%0d", n_fn[0], n_fn[1], n_fn[2], n_fn[3], n_fn[4]);
    $display("memory stalls=%0d max in flight=%0d, command waits=%0d, response holds=%0d",
             u_mem.stalls, u_mem.max_in_flight, n_cmd_wait, n_resp_hold);
    $display("bad array=%0d bad funct=%0d, block partial sums=%0d, zero-padded problems=%0d",
             n_bad_array, n_bad_funct, n_partial_sum, n_padded);
    check("mvm.set used", n_fn[FN_MVM_SET] > 0);
    check("mvm.l used", n_fn[FN_MVM_LOAD] > 0);
    check("mvm used", n_fn[FN_MVM] > 0);
    check("mvm.s used", n_fn[FN_MVM_STORE] > 0);
    if (NA >= 2) check("mvm.mv used", n_fn[FN_MVM_MOVE] > 0);
    check("memory back-pressure seen", u_mem.stalls > 0);
    check("several requests in flight", u_mem.max_in_flight > 1);
    check("command waited while busy", n_cmd_wait > 0);
    check("response held back", n_resp_hold > 0);
    check("bad array rejected", n_bad_array > 0);
    check("bad funct rejected", n_bad_funct > 0);
    if (BLK > 1) check("block results summed", n_partial_sum > 0);
    if (N_MIN < NP) check("zero padding used", n_padded > 0);
    check("no illegal memory address", u_mem.bad_addr == 0);
    check("all responses arrived", exp_st.size() == 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
