// mvm_controller: command decoder and sequencer of the analog coprocessor.
//
// It accepts one RoCC command at a time and carries it out:
//   mvm.set  rs1=array, rs2=address : reads DIM*DIM words, row-major
//            (A[r][c] at rs2 + 8*(r*DIM + c)), and programs them into the array
//   mvm.l    rs1=array, rs2=address : reads DIM words into the input buffer
//   mvm      rs1=array              : starts the multiply, waits for its end
//   mvm.s    rs1=array, rs2=address : writes the DIM output-buffer words
//   mvm.mv   rs1=source, rs2=dest   : copies the source array's output buffer
//            into the destination array's input buffer, one word per clock,
//            with no memory traffic
// The five instructions, the meaning of rs1 and of rs2 as a start address,
// the dedicated memory port shared by all arrays and the use of memory rather
// than the command port for operands follow the architecture. The funct7
// codes, the row-major matrix layout, rs2 naming the destination of mvm.mv,
// one-command-at-a-time operation and the status response are this design's
// choices.
//
// Memory port: requests are issued back to back as long as mem_req_ready is
// high (several may be outstanding); every request returns one response in
// order, which the controller always accepts. A command ends when the last
// response (load data or store acknowledgement) has arrived, so memory holds
// the stored vector once the coprocessor reports completion.
//
// Command port: cmd_ready is high only when idle. busy is high from the
// clock after a command is accepted until it has completed and any response
// has been taken. If the instruction's xd bit is set, a response carrying rd
// and the status (0 ok, 1 bad array number, 2 unknown funct7) is sent when
// the command ends; a command with a bad array number or funct7 does nothing
// else.
module mvm_controller #(
  parameter int unsigned DIM        = 256,
  parameter int unsigned NUM_ARRAYS = 2
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // RoCC command / response
  input  logic                              cmd_valid,
  output logic                              cmd_ready,
  input  mvm_pkg::rocc_cmd_t                cmd,
  output logic                              resp_valid,
  input  logic                              resp_ready,
  output mvm_pkg::rocc_resp_t               resp,
  output logic                              busy,
  // dedicated memory port
  output logic                              mem_req_valid,
  input  logic                              mem_req_ready,
  output mvm_pkg::mem_req_t                 mem_req,
  input  logic                              mem_resp_valid,
  input  mvm_pkg::mem_resp_t                mem_resp,
  // compute-array side (broadcast; arrays decode wr_id)
  output logic [$clog2(NUM_ARRAYS+1)-1:0]   wr_id,
  output logic                              in_we,
  output logic [$clog2(DIM)-1:0]            in_idx,
  output logic [mvm_pkg::DATA_W-1:0]        in_wdata,
  output logic                              prog_valid,
  output logic [$clog2(DIM)-1:0]            prog_row,
  output logic [$clog2(DIM)-1:0]            prog_col,
  output logic [mvm_pkg::DATA_W-1:0]        prog_data,
  output logic                              start,
  input  logic                              arr_done,
  output logic [$clog2(NUM_ARRAYS+1)-1:0]   rd_id,
  output logic [$clog2(DIM)-1:0]            rd_idx,
  input  logic [mvm_pkg::DATA_W-1:0]        rd_data
);
  import mvm_pkg::*;

  localparam int unsigned IDW  = $clog2(NUM_ARRAYS + 1);
  localparam int unsigned IXW  = $clog2(DIM);
  localparam int unsigned CNTW = $clog2(DIM * DIM + 1);
  localparam logic [CNTW-1:0] N_VEC = CNTW'(DIM);
  localparam logic [CNTW-1:0] N_MAT = CNTW'(DIM * DIM);

  typedef enum logic [2:0] {
    S_IDLE, S_SET, S_LOAD, S_START, S_WAIT, S_STORE, S_MOVE, S_RESP
  } state_e;

  state_e            state;
  logic [XLEN-1:0]   base;
  logic [IDW-1:0]    id_a, id_b;
  logic [4:0]        rd_q;
  logic              xd_q;
  mvm_status_e       status;
  logic [CNTW-1:0]   iss;       // requests issued (or words moved)
  logic [CNTW-1:0]   rcv;       // responses received
  logic [IXW-1:0]    rcv_row, rcv_col;
  logic [CNTW-1:0]   total;

  // ---- command decode ------------------------------------------------------
  logic        cmd_fire;
  mvm_funct_e  fn;
  logic        a_ok, b_ok, fn_ok;

  assign cmd_ready = (state == S_IDLE);
  assign cmd_fire  = cmd_valid && cmd_ready;
  assign fn        = mvm_funct_e'(cmd.inst.funct7);
  assign a_ok      = cmd.rs1 < XLEN'(NUM_ARRAYS);
  assign b_ok      = cmd.rs2 < XLEN'(NUM_ARRAYS);
  assign fn_ok     = cmd.inst.funct7 <= 7'(FN_MVM_MOVE);

  // ---- memory streaming ----------------------------------------------------
  logic streaming, req_fire, last_rcv;

  assign total     = (state == S_SET) ? N_MAT : N_VEC;
  assign streaming = (state == S_SET) || (state == S_LOAD) || (state == S_STORE);
  assign mem_req_valid = streaming && (iss < total);
  assign req_fire  = mem_req_valid && mem_req_ready;
  assign mem_req.addr  = base + (XLEN'(iss) << $clog2(WORD_BYTES));
  assign mem_req.we    = (state == S_STORE);
  assign mem_req.wdata = rd_data;
  assign last_rcv  = mem_resp_valid && (rcv == total - 1'b1);

  // ---- array side ----------------------------------------------------------
  assign wr_id      = (state == S_MOVE) ? id_b : id_a;
  assign rd_id      = id_a;
  assign rd_idx     = IXW'(iss);
  assign prog_valid = (state == S_SET) && mem_resp_valid;
  assign prog_row   = rcv_row;
  assign prog_col   = rcv_col;
  assign prog_data  = mem_resp.rdata;
  assign in_we      = ((state == S_LOAD) && mem_resp_valid) || (state == S_MOVE);
  assign in_idx     = (state == S_MOVE) ? IXW'(iss) : rcv_col;
  assign in_wdata   = (state == S_MOVE) ? rd_data : mem_resp.rdata;
  assign start      = (state == S_START);

  assign busy       = (state != S_IDLE);
  assign resp_valid = (state == S_RESP);
  assign resp.rd    = rd_q;
  assign resp.data  = XLEN'(status);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      base    <= '0;
      id_a    <= '0;
      id_b    <= '0;
      rd_q    <= '0;
      xd_q    <= 1'b0;
      status  <= ST_OK;
      iss     <= '0;
      rcv     <= '0;
      rcv_row <= '0;
      rcv_col <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_fire) begin
          base    <= cmd.rs2;
          id_a    <= IDW'(cmd.rs1);
          id_b    <= IDW'(cmd.rs2);
          rd_q    <= cmd.inst.rd;
          xd_q    <= cmd.inst.xd;
          iss     <= '0;
          rcv     <= '0;
          rcv_row <= '0;
          rcv_col <= '0;
          if (!fn_ok) begin
            status <= ST_BAD_FUNCT;
            state  <= cmd.inst.xd ? S_RESP : S_IDLE;
          end else if (!a_ok || (fn == FN_MVM_MOVE && !b_ok)) begin
            status <= ST_BAD_ARRAY;
            state  <= cmd.inst.xd ? S_RESP : S_IDLE;
          end else begin
            status <= ST_OK;
            unique case (fn)
              FN_MVM_SET:   state <= S_SET;
              FN_MVM_LOAD:  state <= S_LOAD;
              FN_MVM:       state <= S_START;
              FN_MVM_STORE: state <= S_STORE;
              default:      state <= S_MOVE;
            endcase
          end
        end

        S_SET, S_LOAD, S_STORE: begin
          if (req_fire) iss <= iss + 1'b1;
          if (mem_resp_valid) begin
            rcv <= rcv + 1'b1;
            if (rcv_col == IXW'(DIM - 1)) begin
              rcv_col <= '0;
              rcv_row <= rcv_row + 1'b1;
            end else begin
              rcv_col <= rcv_col + 1'b1;
            end
          end
          if (last_rcv) state <= xd_q ? S_RESP : S_IDLE;
        end

        S_START: state <= S_WAIT;

        S_WAIT: if (arr_done) state <= xd_q ? S_RESP : S_IDLE;

        S_MOVE: begin
          iss <= iss + 1'b1;
          if (iss == N_VEC - 1'b1) state <= xd_q ? S_RESP : S_IDLE;
        end

        S_RESP: if (resp_ready) state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

  // ---- protocol rules ------------------------------------------------------
  // A memory response only ever answers a request that is still outstanding.
  a_resp_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    mem_resp_valid |-> (streaming && rcv < iss))
    else $error("memory response with no request outstanding");
  // A request held without ready keeps its address and data.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_req_valid && !mem_req_ready) |=> (mem_req_valid && $stable(mem_req)))
    else $error("memory request changed before it was accepted");
  // The response waits, unchanged, until it is taken.
  a_resp_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (resp_valid && !resp_ready) |=> (resp_valid && $stable(resp)))
    else $error("command response changed before it was taken");

endmodule
