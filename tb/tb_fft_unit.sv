// tb_fft_unit: frames of random noise, single tones and full-scale inputs.
// Each output bin is compared with a floating-point DFT of the frame divided
// by N; the fixed-point result must be within TOL LSBs in both parts. Also
// checks the bin order, the frame timing (N load, (N/2)*LOG2N compute
// cycles) and that output back-pressure holds the current bin.
module tb_fft_unit;
  import sp_pkg::*;

  localparam int LOG2N = 4;
  localparam int N = 1 << LOG2N;
  localparam int TOL = 6;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_ready = 0;
  sample_t in_data = '0;
  logic in_ready, out_valid, busy;
  sample_t out_re, out_im;
  logic [LOG2N-1:0] out_bin;

  fft_unit #(.LOG2N(LOG2N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  real exp_re[N], exp_im[N];
  int frame[N];
  int max_err = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0d", what, cycle); end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  task automatic dft();
    for (int k = 0; k < N; k++) begin
      exp_re[k] = 0.0; exp_im[k] = 0.0;
      for (int m = 0; m < N; m++) begin
        real a;
        a = 2.0 * 3.14159265358979323846 * real'(k * m) / real'(N);
        exp_re[k] += real'(frame[m]) * $cos(a);
        exp_im[k] -= real'(frame[m]) * $sin(a);
      end
      exp_re[k] /= real'(N); exp_im[k] /= real'(N);
    end
  endtask

  task automatic run_frame(input int kind, input int ready_pct);
    int t_last_in, t_first_out, held_bin;
    sample_t held_re;
    for (int m = 0; m < N; m++) begin
      case (kind)
        0: frame[m] = int'($signed(16'($urandom)));
        1: frame[m] = $rtoi(20000.0 * $cos(2.0 * 3.14159265358979323846 * 3.0 * real'(m) / real'(N)));
        2: frame[m] = (m % 2 == 0) ? 32767 : -32768;
        default: frame[m] = 32767;
      endcase
    end
    dft();
    // load
    @(negedge clk);
    check(in_ready && !busy, "ready for a frame");
    for (int m = 0; m < N; m++) begin
      in_valid = 1; in_data = sample_t'(frame[m]);
      @(negedge clk);
    end
    in_valid = 0;
    t_last_in = cycle - 1;
    // wait for results
    while (!out_valid) @(negedge clk);
    t_first_out = cycle;
    check(t_first_out - t_last_in == (N / 2) * LOG2N + 1, "compute time");
    for (int k = 0; k < N; k++) begin
      out_ready = ($urandom_range(99) < ready_pct);
      while (!out_ready) begin
        held_bin = out_bin; held_re = out_re;
        @(negedge clk);
        check(out_valid && out_bin == held_bin && out_re == held_re, "hold under back-pressure");
        out_ready = ($urandom_range(99) < ready_pct);
      end
      begin
        int er, ei;
        check(out_valid, "out_valid");
        check(int'(out_bin) == k, "bin order");
        er = $rtoi(real'(out_re) - exp_re[k]); if (er < 0) er = -er;
        ei = $rtoi(real'(out_im) - exp_im[k]); if (ei < 0) ei = -ei;
        if (er > max_err) max_err = er;
        if (ei > max_err) max_err = ei;
        check(er <= TOL && ei <= TOL, "bin value");
        if (er > TOL || ei > TOL)
          $display("  bin %0d: got (%0d,%0d) expected (%f,%f)", k, out_re, out_im, exp_re[k], exp_im[k]);
      end
      @(negedge clk);
    end
    out_ready = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) run_frame(f % 4, (f < 20) ? 100 : 50);
    $display("worst error %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
