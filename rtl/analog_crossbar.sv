// analog_crossbar: BEHAVIOURAL MODEL of one resistive-memory crossbar with its
// DACs and ADCs. It is not synthesizable logic: the real part is an analog
// array, and this model stands in for it in simulation.
//
// Function: each cell holds a programmed conductance. The input vector x is
// turned into wordline voltages by one DAC per wordline; by Ohm's law every
// cell multiplies its conductance by its wordline voltage, and by Kirchhoff's
// current law the currents add along each bitline. One ADC per bitline reads
// the sum, so the array delivers y = A x in one analog step. Wordline c carries
// x[c] and bitline r delivers y[r], so cell (c, r) holds A[r][c].
//
// Model choices (not fixed by the architecture):
//   * values are binary64 words; the conductances, DAC and ADC are ideal,
//     i.e. the model behaves as the floating-point interface the coprocessor
//     presents (the multi-array precision scheme behind it is not modelled);
//   * programming is one cell per clock through prog_* (row = output index r,
//     col = input index c); its real speed is deliberately not modelled;
//   * a multiply takes MVM_LATENCY clocks from start to a one-clock done pulse;
//     y is valid with done and held until the next multiply finishes;
//   * busy is high from the clock after start until done; a start while busy
//     is ignored. Reset clears the handshake state, not the conductances
//     (resistive cells are non-volatile).
module analog_crossbar #(
  parameter int unsigned DIM         = 256,  // rows = columns of the array
  parameter int unsigned MVM_LATENCY = 8     // clocks from start to done
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // programming port
  input  logic                          prog_valid,
  input  logic [$clog2(DIM)-1:0]        prog_row,
  input  logic [$clog2(DIM)-1:0]        prog_col,
  input  logic [mvm_pkg::DATA_W-1:0]    prog_data,
  // DAC inputs (from the input buffer) and multiply control
  input  logic [DIM-1:0][mvm_pkg::DATA_W-1:0] x_vec,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  // ADC outputs (to the output buffer)
  output logic [DIM-1:0][mvm_pkg::DATA_W-1:0] y_vec
);
  import mvm_pkg::*;

  localparam int unsigned CW = (MVM_LATENCY < 2) ? 1 : $clog2(MVM_LATENCY + 1);

  real             g [DIM][DIM];   // g[r][c] = A[r][c]
  real             v [DIM];        // wordline voltages latched at start
  logic [CW-1:0]   cnt;

  initial begin
    for (int r = 0; r < DIM; r++)
      for (int c = 0; c < DIM; c++)
        g[r][c] = 0.0;
    for (int c = 0; c < DIM; c++) v[c] = 0.0;
  end

  // Cell programming.
  always @(posedge clk) begin
    if (prog_valid)
      g[prog_row][prog_col] <= $bitstoreal(prog_data);
  end

  // DAC sampling, settling delay, bitline summation and ADC conversion.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      cnt   <= '0;
      for (int r = 0; r < DIM; r++) y_vec[r] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        for (int c = 0; c < DIM; c++) v[c] <= $bitstoreal(x_vec[c]);
        busy <= 1'b1;
        cnt  <= CW'(MVM_LATENCY > 1 ? MVM_LATENCY - 1 : 0);
      end else if (busy) begin
        if (cnt == '0) begin
          for (int r = 0; r < DIM; r++) begin
            real i_bl;
            i_bl = 0.0;
            for (int c = 0; c < DIM; c++) i_bl += g[r][c] * v[c];
            y_vec[r] <= $realtobits(i_bl);
          end
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end

endmodule
