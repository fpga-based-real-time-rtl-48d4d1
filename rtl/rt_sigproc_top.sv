// rt_sigproc_top: real-time streaming signal processor.
//
// Dataflow, one sample per clock at most, in a single direction:
//
//   adc_* --> input_fifo --> preproc_filter --> sample window (bram_memory)
//                                                     |   coefficients
//                                                     v   (bram_memory)
//                                          parallel_core: NUM_PE x mac_pipeline
//                                                     |
//                                                     v
//                                output_register --> out_* (valid/ready)
//
//   preproc_filter --> fft_unit --> spec_* (spectrum frames, side branch)
//
//   control_fsm drives the window writes, the memory addresses, the address
//   select of the coefficient port and the MAC enable/first/last strobes.
//
// Function: after the optional moving-average pre-filter (pre_mode), the
// core computes the FIR filter
//     y[n] = sat16( (sum_{k=0}^{NUM_TAPS-1} c[k] * x[n-k]) >>> 15 )
// with signed 16-bit Q1.15 coefficients c[k] loaded through the cfg_* port
// (accepted while cfg_ready is high, which needs enable low or the core
// idle). Samples before the first one count as zero. NUM_PE consecutive
// outputs are computed in parallel over NUM_TAPS cycles; with
// NUM_PE = NUM_TAPS (the default) the core sustains one output per clock.
//
// Input: adc_data is taken when adc_valid is high. A sample that arrives
// while the input FIFO is full is dropped and adc_overflow pulses in that
// cycle. adc_ready tells whether the sample offered now is accepted.
// Output: out_data/out_valid/out_ready, one sample per handshake, in order.
// Back-pressure on out_ready stalls the core and then fills the input FIFO.
// Spectrum: spec_* carries X[k]/N, k = 0..N-1 in order, of frames of
// N = 2**FFT_LOG2N consecutive pre-filtered samples (see fft_unit); frames
// are taken whenever the transform unit is free, and spec_ready only holds
// the spectrum stream.
//
// Latency of an isolated batch from the last of its NUM_PE samples entering
// the FIFO to its first output: NUM_TAPS + 7 cycles.
//
// The chain of input buffer, pre-processing (filter and FFT), parallel MAC
// core fed from BRAM, FSM control and output register follows the design
// description; the FIR batch schedule, the placement of the FFT as a
// spectrum side branch, the sizes and all handshakes are this
// implementation's choices.
module rt_sigproc_top
  import sp_pkg::*;
#(
  parameter int unsigned NUM_TAPS     = sp_pkg::DEF_NUM_TAPS,
  parameter int unsigned NUM_PE       = sp_pkg::DEF_NUM_PE,
  parameter int unsigned FIFO_DEPTH   = 16,
  parameter int unsigned PRE_LOG2_LEN = 2,
  parameter int unsigned OUT_DEPTH    = 4 * NUM_PE,
  parameter int unsigned FFT_LOG2N    = 4,
  localparam int unsigned SMP_DEPTH   = 1 << $clog2(2 * NUM_PE + NUM_TAPS),
  localparam int unsigned CAW         = (NUM_TAPS > 1) ? $clog2(NUM_TAPS) : 1,
  localparam int unsigned SAW         = $clog2(SMP_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // sample source (converter side)
  input  logic           adc_valid,
  input  sample_t        adc_data,
  output logic           adc_ready,
  output logic           adc_overflow,
  // configuration
  input  pre_mode_e      pre_mode,
  input  logic           enable,
  input  logic           cfg_we,
  input  logic [CAW-1:0] cfg_addr,
  input  coef_t          cfg_data,
  output logic           cfg_ready,
  // processed sample stream
  output logic           out_valid,
  output sample_t        out_data,
  input  logic           out_ready,
  // spectrum of pre-filtered frames (transform branch)
  output logic           spec_valid,
  output sample_t        spec_re,
  output sample_t        spec_im,
  output logic [FFT_LOG2N-1:0] spec_bin,
  input  logic           spec_ready,
  // status
  output logic           busy,          // a batch is being read or multiplied
  output logic           batch_start,   // a batch of NUM_PE outputs starts
  output logic           out_stall      // a batch waits for output space
);

  // input FIFO -> pre-processing
  logic    fifo_valid, fifo_ready;
  sample_t fifo_data;
  // pre-processing -> sample window
  logic    pre_valid, pre_ready;
  sample_t pre_data;
  // controller <-> memory
  logic           coef_addr_sel;
  logic [CAW-1:0] coef_raddr;
  coef_t          coef_rdata;
  logic           smp_we, smp_clear;
  logic [SAW-1:0] smp_waddr;
  logic [SAW-1:0] smp_raddr [NUM_PE];
  sample_t        smp_rdata [NUM_PE];
  // controller -> MAC lanes
  logic           mac_valid, mac_first, mac_last;
  // MAC lanes -> output storage
  logic           core_valid;
  sample_t        core_data [NUM_PE];
  logic           out_pop;

  input_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid (adc_valid),
    .in_data  (adc_data),
    .in_ready (adc_ready),
    .overflow (adc_overflow),
    .out_valid(fifo_valid),
    .out_data (fifo_data),
    .out_ready(fifo_ready),
    .count    ()
  );

  preproc_filter #(.LOG2_LEN(PRE_LOG2_LEN)) u_pre (
    .clk, .rst_n,
    .mode     (pre_mode),
    .in_valid (fifo_valid),
    .in_data  (fifo_data),
    .in_ready (fifo_ready),
    .out_valid(pre_valid),
    .out_data (pre_data),
    .out_ready(pre_ready)
  );

  control_fsm #(
    .NUM_TAPS(NUM_TAPS), .NUM_PE(NUM_PE),
    .SMP_DEPTH(SMP_DEPTH), .OUT_DEPTH(OUT_DEPTH)
  ) u_fsm (
    .clk, .rst_n,
    .enable       (enable),
    .cfg_we       (cfg_we),
    .cfg_ready    (cfg_ready),
    .coef_addr_sel(coef_addr_sel),
    .coef_raddr   (coef_raddr),
    .in_valid     (pre_valid),
    .in_ready     (pre_ready),
    .smp_we       (smp_we),
    .smp_clear    (smp_clear),
    .smp_waddr    (smp_waddr),
    .smp_raddr    (smp_raddr),
    .mac_valid    (mac_valid),
    .mac_first    (mac_first),
    .mac_last     (mac_last),
    .out_pop      (out_pop),
    .busy         (busy),
    .batch_start  (batch_start),
    .out_stall    (out_stall)
  );

  bram_memory #(
    .NUM_TAPS(NUM_TAPS), .NUM_PE(NUM_PE), .SMP_DEPTH(SMP_DEPTH)
  ) u_mem (
    .clk,
    .coef_addr_sel(coef_addr_sel),
    .cfg_we       (cfg_we),
    .cfg_addr     (cfg_addr),
    .cfg_data     (cfg_data),
    .coef_raddr   (coef_raddr),
    .coef_rdata   (coef_rdata),
    .smp_we       (smp_we),
    .smp_clear    (smp_clear),
    .smp_waddr    (smp_waddr),
    .smp_wdata    (pre_data),
    .smp_raddr    (smp_raddr),
    .smp_rdata    (smp_rdata)
  );

  parallel_core #(.NUM_PE(NUM_PE), .SHIFT(FRAC_W)) u_core (
    .clk, .rst_n,
    .in_valid (mac_valid),
    .first    (mac_first),
    .last     (mac_last),
    .coef     (coef_rdata),
    .sample   (smp_rdata),
    .out_valid(core_valid),
    .out_data (core_data)
  );

  output_register #(.NUM_PE(NUM_PE), .OUT_DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n,
    .load     (core_valid),
    .load_data(core_data),
    .out_valid(out_valid),
    .out_data (out_data),
    .out_ready(out_ready),
    .count    ()
  );

  assign out_pop = out_valid && out_ready;

  // The transform branch watches the samples entering the window. It takes
  // a frame of 2**FFT_LOG2N consecutive samples whenever it is free and
  // skips samples while it computes or delivers; it never stalls the
  // filter path.
  fft_unit #(.LOG2N(FFT_LOG2N)) u_fft (
    .clk, .rst_n,
    .in_valid (pre_valid && pre_ready),
    .in_data  (pre_data),
    .in_ready (),
    .out_valid(spec_valid),
    .out_re   (spec_re),
    .out_im   (spec_im),
    .out_bin  (spec_bin),
    .out_ready(spec_ready),
    .busy     ()
  );

endmodule
