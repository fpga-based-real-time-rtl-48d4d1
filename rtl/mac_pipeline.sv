// mac_pipeline: three-stage pipelined multiply-accumulate unit (one DSP
// slice's worth of work).
//
//   Stage 1 (multiply):   prod  <= sample * coef          (pipeline register)
//   Stage 2 (accumulate): acc   <= (first ? 0 : acc) + prod
//   Stage 3 (output):     out   <= sat(acc >>> SHIFT)     (output register)
//
// A dot product is fed as a run of operand pairs, one per cycle while
// in_valid is high; the controller marks the first pair with 'first' (the
// accumulator restarts) and the last with 'last'. The result of a run whose
// last pair enters in cycle t is on out_data with out_valid high in cycle
// t+3, for exactly one cycle. A new run may start in the cycle after the last
// pair of the previous one, so back-to-back runs keep the multiplier busy
// every cycle. Idle cycles (in_valid low) inside a run are allowed and leave
// the accumulator unchanged.
//
// The three stages and their roles follow the design description. The
// operand widths, the 40-bit accumulator, the Q1.15 scaling with saturation
// to 16 bits and the first/last framing are this implementation's choices.
module mac_pipeline
  import sp_pkg::*;
#(
  parameter int unsigned SHIFT = FRAC_W
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,   // enable: operands present
  input  logic    first,      // first pair of a run
  input  logic    last,       // last pair of a run
  input  sample_t sample,
  input  coef_t   coef,
  output logic    out_valid,
  output sample_t out_data
);

  // stage 1
  prod_t prod_q;
  logic  v1_q, first1_q, last1_q;
  // stage 2
  acc_t  acc_q;
  logic  done2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q    <= '0;
      v1_q      <= 1'b0;
      first1_q  <= 1'b0;
      last1_q   <= 1'b0;
      acc_q     <= '0;
      done2_q   <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      // Stage 1: multiply
      v1_q     <= in_valid;
      first1_q <= in_valid && first;
      last1_q  <= in_valid && last;
      if (in_valid) prod_q <= sample * coef;

      // Stage 2: accumulate
      done2_q <= v1_q && last1_q;
      if (v1_q) acc_q <= (first1_q ? acc_t'(0) : acc_q) + acc_t'(prod_q);

      // Stage 3: output register
      out_valid <= done2_q;
      if (done2_q) out_data <= scale_sat(acc_q, SHIFT);
    end
  end

endmodule
