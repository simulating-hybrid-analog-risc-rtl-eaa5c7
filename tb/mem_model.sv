// mem_model: behavioural model of the cache port the coprocessor talks to.
// Word-addressed storage of WORDS 64-bit words (byte address / 8). A request
// is accepted when req_ready is high; req_ready drops at random with
// probability STALL_PCT percent to model cache back-pressure. Every accepted
// request answers LATENCY clocks later with one response, in order; a load
// returns the word as it was when the request was accepted, a store writes at
// acceptance and is acknowledged likewise. Counts the clocks on which a
// request was held back (stalls) and the largest number of requests in flight.
module mem_model #(
  parameter int unsigned WORDS     = 4096,
  parameter int unsigned LATENCY   = 3,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  output logic               req_ready,
  input  mvm_pkg::mem_req_t  req,
  output logic               resp_valid,
  output mvm_pkg::mem_resp_t resp
);
  logic [63:0] mem [WORDS];
  logic [63:0] pipe_d [LATENCY];
  logic        pipe_v [LATENCY];
  int unsigned stalls, in_flight, max_in_flight, bad_addr;

  assign resp_valid = pipe_v[LATENCY-1];
  assign resp.rdata = pipe_d[LATENCY-1];

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LATENCY; i++) begin pipe_v[i] <= 1'b0; pipe_d[i] <= '0; end
      req_ready <= 1'b1;
      stalls <= 0; in_flight <= 0; max_in_flight <= 0; bad_addr <= 0;
    end else begin
      automatic int unsigned w = int'(req.addr >> 3);
      automatic logic fire = req_valid && req_ready;
      automatic int unsigned nf = in_flight + (fire ? 1 : 0) - (resp_valid ? 1 : 0);
      if (req_valid && !req_ready) stalls <= stalls + 1;
      for (int i = LATENCY - 1; i > 0; i--) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_d[i] <= pipe_d[i-1];
      end
      pipe_v[0] <= fire;
      pipe_d[0] <= '0;
      if (fire) begin
        if (w >= WORDS || req.addr[2:0] != 3'b0) bad_addr <= bad_addr + 1;
        else if (req.we) mem[w] <= req.wdata;
        else pipe_d[0] <= mem[w];
      end
      in_flight <= nf;
      if (nf > max_in_flight) max_in_flight <= nf;
      req_ready <= ($urandom_range(99) >= STALL_PCT);
    end
  end
endmodule
