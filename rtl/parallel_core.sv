// parallel_core: NUM_PE pipelined MAC lanes working side by side.
//
// All lanes share one coefficient and one set of control signals (enable,
// first, last) per cycle; each lane has its own sample input. With lane p
// given x[n+p-k] while the shared coefficient is c[k], k = 0..NUM_TAPS-1, the
// lanes compute NUM_PE consecutive FIR outputs y[n..n+NUM_PE-1] in NUM_TAPS
// cycles. All lanes finish together: out_valid pulses once per run, three
// cycles after the last operands (see mac_pipeline), with lane p's result in
// out_data[p].
//
// Several parallel execution units built from DSP slices follow the design
// description; the number of lanes and the shared-coefficient arrangement
// are this implementation's choices.
module parallel_core
  import sp_pkg::*;
#(
  parameter int unsigned NUM_PE = sp_pkg::DEF_NUM_PE,
  parameter int unsigned SHIFT  = FRAC_W
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    first,
  input  logic    last,
  input  coef_t   coef,
  input  sample_t sample   [NUM_PE],
  output logic    out_valid,
  output sample_t out_data [NUM_PE]
);

  logic [NUM_PE-1:0] lane_valid;

  for (genvar p = 0; p < NUM_PE; p++) begin : g_lane
    mac_pipeline #(.SHIFT(SHIFT)) u_mac (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .first    (first),
      .last     (last),
      .sample   (sample[p]),
      .coef     (coef),
      .out_valid(lane_valid[p]),
      .out_data (out_data[p])
    );
  end

  assign out_valid = lane_valid[0];

  // Lanes run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (lane_valid == '0) || (lane_valid == '1));

endmodule
