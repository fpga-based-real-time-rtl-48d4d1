// preproc_filter: pipelined pre-processing (signal conditioning) stage.
//
// In PRE_AVG mode each accepted sample x[n] produces
//     y[n] = (x[n] + x[n-1] + ... + x[n-LEN+1]) >>> LOG2_LEN,  LEN = 2**LOG2_LEN,
// a moving-average low-pass filter that suppresses wideband noise. It is kept
// as a running sum: sum += x[n] - x[n-LEN], with the last LEN inputs held in
// a shift register (reset to zero, so the filter starts from silence). In
// PRE_BYPASS mode y[n] = x[n]. The history is updated in both modes, so the
// mode can change between any two samples without a transient beyond the
// window itself.
//
// Interface: valid/ready on both sides. One register stage: a sample
// accepted in cycle t appears on out_data in cycle t+1; the stage holds its
// output while out_ready is low and then accepts no new input
// (in_ready = !out_valid || out_ready), so one sample per cycle flows when
// the consumer is ready.
//
// The design calls only for a pipelined digital filter in this position; the
// moving-average structure, its length and the bypass mode are this
// implementation's choices.
module preproc_filter
  import sp_pkg::*;
#(
  parameter int unsigned LOG2_LEN = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  pre_mode_e mode,
  input  logic      in_valid,
  input  sample_t   in_data,
  output logic      in_ready,
  output logic      out_valid,
  output sample_t   out_data,
  input  logic      out_ready
);

  localparam int unsigned LEN   = 1 << LOG2_LEN;
  localparam int unsigned SUM_W = DATA_W + LOG2_LEN;

  typedef logic signed [SUM_W-1:0] sum_t;

  sample_t hist [LEN];       // hist[0] = newest accepted input
  sum_t    sum;
  sum_t    sum_next;
  logic    accept;

  assign in_ready = !out_valid || out_ready;
  assign accept   = in_valid && in_ready;
  assign sum_next = sum + sum_t'(in_data) - sum_t'(hist[LEN-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LEN; i++) hist[i] <= '0;
      sum       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (accept) begin
      hist[0] <= in_data;
      for (int i = 1; i < LEN; i++) hist[i] <= hist[i-1];
      sum       <= sum_next;
      out_valid <= 1'b1;
      out_data  <= (mode == PRE_AVG) ? sample_t'(sum_next >>> LOG2_LEN) : in_data;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

endmodule
