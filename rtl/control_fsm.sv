// control_fsm: central controller of the processing core.
//
// It produces every control signal of the datapath: the write enable and
// address of the sample window, the coefficient/sample read addresses, the
// address select of the coefficient port, and the enable, accumulator reset
// ('first') and 'last' strobes of the MAC lanes.
//
// States:
//   S_INIT     after reset, writes zero to every sample address (SMP_DEPTH
//              cycles) so that outputs before the first NUM_TAPS-1 samples
//              see silence.
//   S_IDLE     waits until a batch can start.
//   S_COMPUTE  issues one tap per cycle, k = 0..NUM_TAPS-1: coefficient
//              address k, and for lane p the sample address base+p-k
//              (modulo SMP_DEPTH). Lane p therefore computes
//              y[base+p] = sum_k c[k] * x[base+p-k].
//
// A batch covers NUM_PE new samples. It starts when 'enable' is high, no
// coefficient write is requested, at least NUM_PE unprocessed samples are in
// the window, and the output storage has NUM_PE unreserved slots. Output
// slots are reserved at batch start and released by out_pop, so the output
// storage can never overflow. When a batch ends and the next can start, it
// starts in the following cycle: the MACs stay busy every cycle.
//
// Sample writes run alongside the computation: a new sample is accepted
// (in_ready) whenever fewer than 2*NUM_PE unprocessed samples are held, also
// during S_COMPUTE, and also in the last tap cycle of a batch, which frees
// NUM_PE of them. SMP_DEPTH >= 2*NUM_PE + NUM_TAPS guarantees that a write
// never lands on a sample a running batch still reads, nor on the address
// read in the same cycle. A sample written in cycle t already counts for a
// batch decided in cycle t, whose first read is in cycle t+1.
//
// Coefficient writes are accepted (cfg_ready) only in S_IDLE; with 'enable'
// low the controller finishes the running batch and stays idle, which is how
// coefficients are reloaded between batches.
//
// Timing: the MAC strobes are registered one cycle after the addresses, to
// line up with the one-cycle memory read. From batch start to its results
// leaving the lanes: NUM_TAPS + 4 cycles.
//
// The controller's role and signal kinds (enable, reset, address select)
// follow the design description; the states, the batch schedule and the
// flow control are this implementation's choices.
module control_fsm
  import sp_pkg::*;
#(
  parameter int unsigned NUM_TAPS  = sp_pkg::DEF_NUM_TAPS,
  parameter int unsigned NUM_PE    = sp_pkg::DEF_NUM_PE,
  parameter int unsigned SMP_DEPTH = 32,
  parameter int unsigned OUT_DEPTH = 4 * sp_pkg::DEF_NUM_PE,
  localparam int unsigned CAW      = (NUM_TAPS > 1) ? $clog2(NUM_TAPS) : 1,
  localparam int unsigned SAW      = $clog2(SMP_DEPTH),
  localparam int unsigned OCW      = $clog2(OUT_DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  // coefficient configuration request
  input  logic             cfg_we,
  output logic             cfg_ready,
  output logic             coef_addr_sel,
  output logic [CAW-1:0]   coef_raddr,
  // sample input stream
  input  logic             in_valid,
  output logic             in_ready,
  // sample window control
  output logic             smp_we,
  output logic             smp_clear,
  output logic [SAW-1:0]   smp_waddr,
  output logic [SAW-1:0]   smp_raddr [NUM_PE],
  // MAC lane control (aligned with memory read data)
  output logic             mac_valid,
  output logic             mac_first,
  output logic             mac_last,
  // output storage credit return
  input  logic             out_pop,
  // status
  output logic             busy,
  output logic             batch_start,
  output logic             out_stall      // batch ready but no output space
);

  typedef enum logic [1:0] {
    S_INIT    = 2'd0,
    S_IDLE    = 2'd1,
    S_COMPUTE = 2'd2
  } state_e;

  state_e         state_q;
  logic [SAW-1:0] clr_q;
  logic [SAW:0]   wr_cnt_q;     // samples written (mod 2*SMP_DEPTH)
  logic [SAW:0]   base_q;       // first sample of the current/next batch
  logic [CAW-1:0] k_q;          // current tap
  logic [OCW-1:0] reserved_q;   // output slots reserved or occupied

  logic [SAW:0]   avail;        // written but not yet batched samples
  logic [SAW:0]   avail_after;  // the same once the running batch retires
  logic           tap_last;
  logic           space_ok;
  logic           start_idle, start_next;
  logic           wr_fire;

  assign avail       = wr_cnt_q - base_q;
  assign avail_after = avail - (SAW+1)'(NUM_PE);   // used only when avail >= NUM_PE
  assign tap_last    = (k_q == CAW'(NUM_TAPS - 1));
  assign space_ok    = (32'(reserved_q) + NUM_PE) <= OUT_DEPTH;

  assign cfg_ready     = (state_q == S_IDLE);
  assign coef_addr_sel = cfg_we && cfg_ready;

  // A sample written in this cycle is readable from the next one, so it
  // counts towards a batch that starts reading then.
  assign start_idle = (state_q == S_IDLE) && enable && !cfg_we && space_ok &&
                      (avail + (SAW+1)'(wr_fire) >= (SAW+1)'(NUM_PE));
  assign start_next = (state_q == S_COMPUTE) && tap_last && enable && space_ok &&
                      (avail_after + (SAW+1)'(wr_fire) >= (SAW+1)'(NUM_PE));
  assign batch_start = start_idle || start_next;

  assign out_stall = enable && !space_ok &&
                     (((state_q == S_IDLE) && (avail >= (SAW+1)'(NUM_PE))) ||
                      ((state_q == S_COMPUTE) && tap_last &&
                       (avail_after >= (SAW+1)'(NUM_PE))));

  // Sample window writes
  // The window holds at most 2*NUM_PE unbatched samples; in the last tap
  // cycle the running batch retires and frees NUM_PE of them.
  assign in_ready  = (state_q != S_INIT) &&
                     ((avail < (SAW+1)'(2 * NUM_PE)) ||
                      ((state_q == S_COMPUTE) && tap_last));
  assign wr_fire   = in_valid && in_ready;
  assign smp_we    = (state_q == S_INIT) || wr_fire;
  assign smp_clear = (state_q == S_INIT);
  assign smp_waddr = (state_q == S_INIT) ? clr_q : wr_cnt_q[SAW-1:0];

  // Read addresses
  assign coef_raddr = k_q;
  for (genvar p = 0; p < NUM_PE; p++) begin : g_raddr
    assign smp_raddr[p] = SAW'(base_q[SAW-1:0] + SAW'(p) - SAW'(k_q));
  end

  assign busy = (state_q == S_COMPUTE) || mac_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_INIT;
      clr_q      <= '0;
      wr_cnt_q   <= '0;
      base_q     <= '0;
      k_q        <= '0;
      reserved_q <= '0;
      mac_valid  <= 1'b0;
      mac_first  <= 1'b0;
      mac_last   <= 1'b0;
    end else begin
      // MAC strobes follow the issued addresses by one cycle
      mac_valid <= (state_q == S_COMPUTE);
      mac_first <= (state_q == S_COMPUTE) && (k_q == '0);
      mac_last  <= (state_q == S_COMPUTE) && tap_last;

      if (wr_fire) wr_cnt_q <= wr_cnt_q + 1'b1;

      reserved_q <= reserved_q + (batch_start ? OCW'(NUM_PE) : OCW'(0))
                               - (out_pop ? OCW'(1) : OCW'(0));

      unique case (state_q)
        S_INIT: begin
          clr_q <= clr_q + 1'b1;
          if (clr_q == SAW'(SMP_DEPTH - 1)) state_q <= S_IDLE;
        end
        S_IDLE: begin
          if (start_idle) begin
            state_q <= S_COMPUTE;
            k_q     <= '0;
          end
        end
        S_COMPUTE: begin
          if (tap_last) begin
            base_q <= base_q + (SAW+1)'(NUM_PE);
            k_q    <= '0;
            if (!start_next) state_q <= S_IDLE;
          end else begin
            k_q <= k_q + 1'b1;
          end
        end
        default: state_q <= S_INIT;
      endcase
    end
  end

  // Rules of the schedule
  a_window_bound: assert property (@(posedge clk) disable iff (!rst_n)
    avail <= (SAW+1)'(2 * NUM_PE));
  a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
    32'(reserved_q) <= OUT_DEPTH);
  a_no_cfg_in_compute: assert property (@(posedge clk) disable iff (!rst_n)
    coef_addr_sel |-> (state_q == S_IDLE));

  initial begin
    assert (SMP_DEPTH >= 2 * NUM_PE + NUM_TAPS && (1 << SAW) == SMP_DEPTH)
      else $error("control_fsm: SMP_DEPTH must be a power of two >= 2*NUM_PE+NUM_TAPS");
    assert (OUT_DEPTH >= NUM_PE)
      else $error("control_fsm: OUT_DEPTH must hold one batch");
  end

endmodule
