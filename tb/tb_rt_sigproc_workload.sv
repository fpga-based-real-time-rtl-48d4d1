// tb_rt_sigproc_workload: the design at its default sizes under the two
// input rates that matter for a 200 MHz clock.
//   A. 1 Gbps of 16-bit samples = 62.5 MSPS = 5 samples in every 16 clocks,
//      moving-average pre-filter on, 4000 samples.
//   B. one sample per clock (200 MSPS), bypass, 4000 samples.
// The consumer is always ready. Every output is compared with a reference
// FIR model; no sample may be dropped; in B the outputs must leave at one
// per clock once the stream is running, and in A every output must leave
// within a bounded time of its batch's last input.
module tb_rt_sigproc_workload;
  import sp_pkg::*;

  localparam int K = DEF_NUM_TAPS;
  localparam int P = DEF_NUM_PE;
  localparam int N = 4000;

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  logic      adc_valid = 1'b0;
  sample_t   adc_data = '0;
  logic      adc_ready, adc_overflow;
  pre_mode_e pre_mode = PRE_AVG;
  logic      enable = 1'b0;
  logic      cfg_we = 1'b0;
  logic [$clog2(K)-1:0] cfg_addr = '0;
  coef_t     cfg_data = '0;
  logic      cfg_ready;
  logic      out_valid;
  sample_t   out_data;
  logic      out_ready = 1'b1;
  logic      busy, batch_start, out_stall;
  logic      spec_valid;
  sample_t   spec_re, spec_im;
  logic [3:0] spec_bin;
  logic      spec_ready = 1'b1;

  rt_sigproc_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int raw_q[$];
  int pre_q[$];
  int c[K];
  int accepted = 0, received = 0, drops = 0;
  int in_cycle[$];            // acceptance cycle of each sample
  int max_wait = 0;
  bit meas = 0;
  int m_first = -1, m_last = -1, m_pops = 0;

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int expected_y(int n);
    longint acc = 0;
    for (int k = 0; k < K; k++)
      if (n - k >= 0) acc += longint'(c[k]) * longint'(pre_q[n-k]);
    return sat16(acc >>> 15);
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (adc_overflow) drops++;
      if (adc_valid && !adc_overflow) begin
        int n;
        int s;
        n = raw_q.size();
        raw_q.push_back(int'(adc_data));
        if (pre_mode == PRE_AVG) begin
          s = 0;
          for (int i = 0; i < 4; i++) if (n - i >= 0) s += raw_q[n-i];
          pre_q.push_back(s >>> 2);
        end else pre_q.push_back(int'(adc_data));
        in_cycle.push_back(cycle);
        accepted++;
      end
      if (out_valid && out_ready) begin
        int last_in;
        int w;
        checks++;
        if (int'(out_data) != expected_y(received)) begin
          failures++;
          if (failures < 10) $display("MISMATCH y[%0d]", received);
        end
        // wait from the last input of this output's batch
        last_in = in_cycle[(received / P) * P + P - 1];
        w = cycle - last_in;
        if (w > max_wait) max_wait = w;
        received++;
        if (meas) begin
          if (m_first < 0) m_first = cycle;
          m_last = cycle;
          m_pops++;
        end
      end
    end
  end

  task automatic stream(input int n, input int num, input int den);
    int sent = 0;
    int ph = 0;
    while (sent < n) begin
      @(negedge clk);
      adc_valid = (ph < num);
      adc_data  = sample_t'($urandom);
      if (adc_valid) sent++;
      ph = (ph + 1) % den;
    end
    @(negedge clk);
    adc_valid = 1'b0;
    while (received < (accepted / P) * P) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < K; k++) c[k] = int'($signed(16'($urandom))) / 8;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (!cfg_ready) @(negedge clk);
    for (int k = 0; k < K; k++) begin
      cfg_we = 1'b1; cfg_addr = k[$clog2(K)-1:0]; cfg_data = coef_t'(c[k]);
      @(negedge clk);
    end
    cfg_we = 1'b0;
    enable = 1'b1;

    // A: 1 Gbps
    pre_mode = PRE_AVG;
    stream(N, 5, 16);
    $display("A: %0d samples in, %0d out, %0d dropped, worst wait %0d cycles", accepted, received, drops, max_wait);
    checks++;
    if (drops != 0 || received != N) begin failures++; $display("A: rate not sustained"); end
    checks++;
    if (max_wait > K + 7 + P) begin failures++; $display("A: outputs fall behind"); end

    // B: one sample per clock (N is a multiple of P, so the window is empty)
    pre_mode = PRE_BYPASS;
    meas = 1;
    stream(N, 1, 1);
    meas = 0;
    $display("B: %0d outputs in %0d cycles, %0d dropped", m_pops, m_last - m_first + 1, drops);
    checks++;
    if (drops != 0 || received != 2 * N) begin failures++; $display("B: samples lost"); end
    checks++;
    if (m_last - m_first + 1 != m_pops) begin failures++; $display("B: not one output per clock"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
