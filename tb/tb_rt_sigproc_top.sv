// tb_rt_sigproc_top: end-to-end test of the streaming processor at its
// default sizes (8 taps, 8 lanes).
//
// A reference model in this file follows every accepted input sample through
// the moving-average/bypass pre-filter and the FIR sum, with the coefficient
// set that was loaded when the sample's batch ran, and compares every output
// sample. The test runs in phases that each set the pre-filter mode and load
// a coefficient set (with 'enable' low), then stream samples with random
// valid/ready patterns:
//   1. average mode, full rate in and out: checks one output per clock and
//      back-to-back batches;
//   2. bypass, slow consumer: output back-pressure, full sample window,
//      full input FIFO and dropped samples;
//   3. bypass, large gains: saturation of the result;
//   4. average, random traffic;
//   5. padding to a whole batch, then one isolated batch whose latency is
//      checked (NUM_TAPS + 7 cycles from the last sample entering to the
//      first result leaving).
// Alongside, every spectrum frame of the transform branch is compared with a
// floating-point DFT of the 16 window samples it took (within 6 LSBs).
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_rt_sigproc_top;
  import sp_pkg::*;

  localparam int K = DEF_NUM_TAPS;
  localparam int P = DEF_NUM_PE;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      adc_valid = 1'b0;
  sample_t   adc_data = '0;
  logic      adc_ready, adc_overflow;
  pre_mode_e pre_mode = PRE_BYPASS;
  logic      enable = 1'b0;
  logic      cfg_we = 1'b0;
  logic [$clog2(K)-1:0] cfg_addr = '0;
  coef_t     cfg_data = '0;
  logic      cfg_ready;
  logic      out_valid;
  sample_t   out_data;
  logic      out_ready = 1'b0;
  logic      busy, batch_start, out_stall;
  logic      spec_valid;
  sample_t   spec_re, spec_im;
  logic [3:0] spec_bin;
  logic      spec_ready = 1'b1;

  rt_sigproc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  // reference state
  int        raw_q[$];      // accepted raw samples
  int        pre_q[$];      // pre-filter outputs
  int        coefs[$];      // coefficient sets, K entries each
  int        set_first_batch[$];
  int        accepted = 0, received = 0, batches = 0;
  int        ready_pct = 100;

  // mechanism counters
  int n_overflow = 0, n_out_stall = 0, n_win_full = 0, n_back2back = 0;
  int n_clear = 0, n_sat = 0, n_reload = 0, n_avg = 0, n_bypass = 0;
  int n_fifo_full = 0;

  // phase-1 throughput bookkeeping
  bit  meas_on = 0;
  int  meas_first = -1, meas_last = -1, meas_pops = 0;
  int  last_pop_cycle = -1;

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int expected_y(int n);
    longint acc = 0;
    int b = n / P;
    int s = 0;
    for (int i = 0; i < set_first_batch.size(); i++)
      if (set_first_batch[i] <= b) s = i;
    for (int k = 0; k < K; k++)
      if (n - k >= 0) acc += longint'(coefs[s*K + k]) * longint'(pre_q[n-k]);
    return sat16(acc >>> 15);
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (adc_valid && !adc_overflow) begin
        int pre_v;
        int n;
        int s;
        n = raw_q.size();
        raw_q.push_back(int'(adc_data));
        if (pre_mode == PRE_AVG) begin
          s = 0;
          for (int i = 0; i < 4; i++) if (n - i >= 0) s += raw_q[n-i];
          pre_v = s >>> 2;
          n_avg++;
        end else begin
          pre_v = int'(adc_data);
          n_bypass++;
        end
        pre_q.push_back(pre_v);
        accepted++;
      end
      if (adc_overflow) n_overflow++;
      if (dut.u_fifo.count == 16) n_fifo_full++;
      if (out_stall) n_out_stall++;
      if (dut.pre_valid && !dut.pre_ready && dut.u_fsm.state_q != 2'd0) n_win_full++;
      if (dut.u_fsm.start_next) n_back2back++;
      if (dut.smp_clear) n_clear++;
      if (batch_start) batches++;
      if (out_valid && out_ready) begin
        int exp_v;
        exp_v = expected_y(received);
        checks++;
        if (int'(out_data) != exp_v) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH y[%0d]: got %0d expected %0d", received, out_data, exp_v);
        end
        if (exp_v == 32767 || exp_v == -32768) n_sat++;
        received++;
        last_pop_cycle = cycle;
        if (meas_on) begin
          if (meas_first < 0) meas_first = cycle;
          meas_last = cycle;
          meas_pops++;
        end
      end
    end
  end

  // consumer
  always @(negedge clk) out_ready <= ($urandom_range(99) < ready_pct);
  always @(negedge clk) spec_ready <= ($urandom_range(99) < ready_pct);

  // Spectrum branch: frames of 16 consecutive window samples taken while
  // the transform unit is free, compared with a floating-point DFT / 16.
  localparam int FN = 16;
  int  win_idx = 0;
  int  cap[$];
  real spec_exp_re[$], spec_exp_im[$];
  int  n_frames = 0, n_skipped = 0, spec_bins = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.pre_valid && dut.pre_ready) begin
      if (dut.u_fft.in_ready) cap.push_back(pre_q[win_idx]);
      else n_skipped++;
      win_idx++;
      if (cap.size() == FN) begin
        for (int k = 0; k < FN; k++) begin
          real er, ei, a;
          er = 0.0; ei = 0.0;
          for (int m = 0; m < FN; m++) begin
            a = 2.0 * 3.14159265358979323846 * real'(k * m) / real'(FN);
            er += real'(cap[m]) * $cos(a);
            ei -= real'(cap[m]) * $sin(a);
          end
          spec_exp_re.push_back(er / real'(FN));
          spec_exp_im.push_back(ei / real'(FN));
        end
        cap.delete();
        n_frames++;
      end
    end
    if (spec_valid && spec_ready) begin
      real dr, di;
      checks++;
      if (spec_exp_re.size() == 0) begin
        failures++; $display("unexpected spectrum bin");
      end else begin
        dr = real'(spec_re) - spec_exp_re.pop_front();
        di = real'(spec_im) - spec_exp_im.pop_front();
        if (int'(spec_bin) != spec_bins % FN || dr > 6.0 || dr < -6.0 || di > 6.0 || di < -6.0) begin
          failures++;
          if (failures < 10) $display("SPECTRUM mismatch bin %0d", spec_bin);
        end
      end
      spec_bins++;
    end
  end

  task automatic load_coefs(input int c[K]);
    @(negedge clk);
    enable = 1'b0;
    while (!cfg_ready) @(negedge clk);
    for (int k = 0; k < K; k++) begin
      cfg_we = 1'b1; cfg_addr = k[$clog2(K)-1:0]; cfg_data = coef_t'(c[k]);
      @(negedge clk);
      if (!cfg_ready) begin failures++; $display("cfg write refused"); end
    end
    cfg_we = 1'b0;
    for (int k = 0; k < K; k++) coefs.push_back(c[k]);
    set_first_batch.push_back(batches);
    n_reload++;
  endtask

  task automatic stream(input int n, input int valid_pct, input bit big);
    int sent = 0;
    enable = 1'b1;
    while (sent < n) begin
      @(negedge clk);
      adc_valid = ($urandom_range(99) < valid_pct);
      if (big) adc_data = ($urandom_range(1) != 0) ? 16'sd30000 - sample_t'($urandom_range(500))
                                                  : -16'sd30000 + sample_t'($urandom_range(500));
      else     adc_data = sample_t'($urandom);
      if (adc_valid) sent++;
    end
    @(negedge clk);
    adc_valid = 1'b0;
    // wait for all samples to reach the window and all whole batches to leave
    while (dut.fifo_valid || dut.pre_valid || received < (accepted / P) * P) @(negedge clk);
  endtask

  int c_lp[K], c_hp[K], c_big[K], c_rnd[K];
  int lat_start, lat;

  initial begin
    for (int k = 0; k < K; k++) begin
      c_lp[k]  = 4096;                                   // 1/8 each: average
      c_hp[k]  = (k == 0) ? 16384 : ((k == 1) ? -16384 : 0);
      c_big[k] = 32767;
      c_rnd[k] = int'($signed(16'($urandom))) / 8;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1: average, full rate
    ready_pct = 100;
    load_coefs(c_lp);
    pre_mode = PRE_AVG;
    meas_on = 1;
    stream(400, 100, 0);
    meas_on = 0;
    // 2: bypass, slow consumer
    load_coefs(c_hp);
    pre_mode = PRE_BYPASS;
    ready_pct = 15;
    stream(200, 100, 0);
    // 3: saturation
    load_coefs(c_big);
    ready_pct = 70;
    stream(64, 60, 1);
    // 4: average, random
    load_coefs(c_rnd);
    pre_mode = PRE_AVG;
    ready_pct = 60;
    stream(300, 50, 0);
    // 5: pad to a whole batch
    ready_pct = 100;
    while (accepted % P != 0) stream(1, 100, 0);
    // isolated batch latency
    repeat (20) @(negedge clk);
    for (int i = 0; i < P; i++) begin
      @(negedge clk);
      adc_valid = 1'b1; adc_data = sample_t'($urandom);
    end
    @(posedge clk); lat_start = cycle;   // cycle in which the last sample is taken
    @(negedge clk); adc_valid = 1'b0;
    while (received < accepted) @(negedge clk);
    lat = (last_pop_cycle - (P - 1)) - lat_start;
    checks++;
    if (lat != K + 7) begin
      failures++;
      $display("latency %0d cycles, expected %0d", lat, K + 7);
    end

    // throughput at full rate: one output per clock in steady state
    checks++;
    if (meas_pops < 400 || (meas_last - meas_first + 1) != meas_pops) begin
      failures++;
      $display("throughput: %0d outputs in %0d cycles", meas_pops, meas_last - meas_first + 1);
    end

    // all outputs delivered
    checks++;
    if (received != accepted) begin failures++; $display("received %0d of %0d", received, accepted); end

    $display("mechanisms: overflow=%0d fifo_full=%0d out_stall=%0d window_full=%0d back2back=%0d clear=%0d sat=%0d reload=%0d avg=%0d bypass=%0d",
             n_overflow, n_fifo_full, n_out_stall, n_win_full, n_back2back, n_clear, n_sat, n_reload, n_avg, n_bypass);
    $display("spectrum: %0d frames, %0d bins checked, %0d samples skipped", n_frames, spec_bins, n_skipped);
    $display("throughput: %0d outputs in %0d cycles; latency %0d cycles", meas_pops,
             meas_last - meas_first + 1, lat);
    checks++; if (n_frames < 2 || n_skipped == 0) begin failures++; $display("spectrum frames %0d, skipped %0d", n_frames, n_skipped); end
    checks++; if (n_overflow == 0)  begin failures++; $display("no overflow seen"); end
    checks++; if (n_fifo_full == 0) begin failures++; $display("FIFO never full"); end
    checks++; if (n_out_stall == 0) begin failures++; $display("no output stall seen"); end
    checks++; if (n_win_full == 0)  begin failures++; $display("window never full"); end
    checks++; if (n_back2back == 0) begin failures++; $display("no back-to-back batch"); end
    checks++; if (n_clear == 0)     begin failures++; $display("no window clear"); end
    checks++; if (n_sat == 0)       begin failures++; $display("no saturation"); end
    checks++; if (n_avg == 0 || n_bypass == 0) begin failures++; $display("a pre-filter mode unused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
