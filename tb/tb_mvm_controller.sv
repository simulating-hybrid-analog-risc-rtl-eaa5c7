// tb_mvm_controller: runs every instruction through the controller against a
// memory model with random back-pressure and a model of the arrays' side
// (it records programming and input-buffer writes per array, answers start
// with done after a random delay, and serves known output-buffer words).
// Checks what reached each array, what reached memory, the status responses
// (including bad array numbers and an unknown funct7), that cmd_ready/busy
// follow the command, and the cycle count of mvm.mv (one word per clock).
module tb_mvm_controller;
  import mvm_pkg::*;
  import tb_rocc_pkg::*;
  localparam int unsigned DIM = 4, NA = 3;
  localparam int unsigned IDW = $clog2(NA + 1), IXW = $clog2(DIM);

  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, resp_valid, resp_ready, busy;
  rocc_cmd_t cmd;
  rocc_resp_t resp;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  mem_req_t mem_req;
  mem_resp_t mem_resp;
  logic [IDW-1:0] wr_id, rd_id;
  logic in_we, prog_valid, start, arr_done;
  logic [IXW-1:0] in_idx, prog_row, prog_col, rd_idx;
  logic [63:0] in_wdata, prog_data, rd_data;

  int checks = 0, failures = 0;

  mvm_controller #(.DIM(DIM), .NUM_ARRAYS(NA)) dut (.*);
  mem_model #(.WORDS(256), .LATENCY(3), .STALL_PCT(30)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .resp_valid(mem_resp_valid), .resp(mem_resp));

  // ---- model of the arrays' side ----
  logic [63:0] prog_m [NA][DIM][DIM];
  logic [63:0] in_m   [NA][DIM];
  logic [63:0] out_m  [NA][DIM];
  int starts [NA];
  int done_delay;
  assign rd_data = (rd_id < NA) ? out_m[rd_id][rd_idx] : 64'hDEAD;
  always @(posedge clk) begin
    arr_done <= 1'b0;
    if (prog_valid) prog_m[wr_id][prog_row][prog_col] <= prog_data;
    if (in_we)      in_m[wr_id][in_idx] <= in_wdata;
    if (start) begin starts[wr_id]++; done_delay = 2 + $urandom_range(5); end
    else if (done_delay > 0) begin
      done_delay--;
      if (done_delay == 0) arr_done <= 1'b1;
    end
  end

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Issue one command; wait for its end; return status (or -1 if xd=0) and
  // the clocks from acceptance to the controller going idle.
  task automatic run(logic [6:0] fn, int rs1, int rs2, logic xd, output int st, output int cyc);
    @(negedge clk);
    cmd = mk_cmd(fn, 64'(rs1), 64'(rs2), xd, 5'd7);
    cmd_valid = 1;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 0;
    cyc = 0;
    st = -1;
    check("busy after accept", busy && !cmd_ready);
    while (busy) begin
      if (resp_valid) begin
        // hold the response back once before taking it
        @(negedge clk);
        check("response held", resp_valid && resp.rd == 5'd7);
        resp_ready = 1;
        st = int'(resp.data);
        @(negedge clk);
        resp_ready = 0;
        cyc++;
      end else begin
        @(negedge clk);
        cyc++;
      end
    end
    check("idle takes commands", cmd_ready);
  endtask

  initial begin
    int st, cyc;
    cmd_valid = 0; resp_ready = 0; cmd = '0; done_delay = 0;
    for (int a = 0; a < NA; a++) begin
      starts[a] = 0;
      for (int i = 0; i < DIM; i++) begin
        out_m[a][i] = {32'(a), 32'(i)} ^ 64'h5555;
        in_m[a][i] = '0;
      end
    end
    for (int w = 0; w < 256; w++) u_mem.mem[w] = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    rst_n = 1;

    // mvm.set array 2 from byte address 0x80 (word 16)
    run(FN_MVM_SET, 2, 'h80, 1, st, cyc);
    check("set status", st == ST_OK);
    for (int r = 0; r < DIM; r++)
      for (int c = 0; c < DIM; c++)
        check($sformatf("prog[2][%0d][%0d]", r, c), prog_m[2][r][c] == u_mem.mem[16 + r*DIM + c]);

    // mvm.l array 1 from 0x200 (word 64), no response requested
    run(FN_MVM_LOAD, 1, 'h200, 0, st, cyc);
    check("no response without xd", st == -1);
    for (int i = 0; i < DIM; i++)
      check($sformatf("in[1][%0d]", i), in_m[1][i] == u_mem.mem[64 + i]);

    // mvm on array 2
    run(FN_MVM, 2, 0, 1, st, cyc);
    check("mvm status", st == ST_OK);
    check("one start to array 2 only", starts[2] == 1 && starts[0] == 0 && starts[1] == 0);

    // mvm.s array 0 to 0x400 (word 128)
    run(FN_MVM_STORE, 0, 'h400, 1, st, cyc);
    check("store status", st == ST_OK);
    for (int i = 0; i < DIM; i++)
      check($sformatf("mem[%0d] from out[0]", 128 + i), u_mem.mem[128 + i] == out_m[0][i]);

    // mvm.mv array 2 -> array 0, one word per clock
    run(FN_MVM_MOVE, 2, 0, 0, st, cyc);
    check($sformatf("move takes DIM clocks (%0d)", cyc), cyc == DIM);
    for (int i = 0; i < DIM; i++)
      check($sformatf("in[0][%0d] from out[2]", i), in_m[0][i] == out_m[2][i]);

    // errors: bad array for load, bad destination for move, unknown funct7
    run(FN_MVM_LOAD, NA, 'h0, 1, st, cyc);
    check("bad array status", st == ST_BAD_ARRAY);
    run(FN_MVM_MOVE, 0, NA + 5, 1, st, cyc);
    check("bad move destination status", st == ST_BAD_ARRAY);
    run(7'd9, 0, 0, 1, st, cyc);
    check("bad funct status", st == ST_BAD_FUNCT);
    check("no stray starts", starts[0] == 0 && starts[1] == 0 && starts[2] == 1);
    check("memory saw stalls", u_mem.stalls > 0);
    check("several loads in flight", u_mem.max_in_flight > 1);
    check("all addresses legal", u_mem.bad_addr == 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
