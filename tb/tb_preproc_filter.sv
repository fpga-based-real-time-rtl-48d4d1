// tb_preproc_filter: drives random samples with random valid/ready and
// random mode changes, and compares every output with a moving-average /
// bypass model kept from the accepted inputs. Also checks the one-cycle
// latency (an accepted sample's result is valid in the next cycle) and that
// the output holds while out_ready is low.
module tb_preproc_filter;
  import sp_pkg::*;

  localparam int L2 = 2;
  localparam int LEN = 1 << L2;

  logic clk = 0, rst_n = 0;
  pre_mode_e mode = PRE_AVG;
  logic in_valid = 0, out_ready = 0;
  sample_t in_data = '0;
  logic in_ready, out_valid;
  sample_t out_data;

  preproc_filter #(.LOG2_LEN(L2)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hist[$];
  int exp_q[$];
  int n_avg = 0, n_byp = 0, n_hold = 0;
  bit prev_stall = 0;
  sample_t prev_data;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    // held output while stalled
    if (prev_stall) begin
      check(out_valid && out_data == prev_data, "hold while stalled");
      n_hold++;
    end
    prev_stall = out_valid && !out_ready;
    prev_data  = out_data;
    check(in_ready == (!out_valid || out_ready), "in_ready");
    if (out_valid && out_ready) begin
      check(exp_q.size() > 0, "unexpected output");
      if (exp_q.size() > 0) check(int'(out_data) == exp_q.pop_front(), "data");
    end
    if (in_valid && in_ready) begin
      int s;
      int n;
      hist.push_front(int'(in_data));
      s = 0;
      for (int i = 0; i < LEN; i++) if (i < hist.size()) s += hist[i];
      if (mode == PRE_AVG) begin exp_q.push_back(s >>> L2); n_avg++; end
      else begin exp_q.push_back(int'(in_data)); n_byp++; end
      n = exp_q.size();
      // one-cycle latency: the value must be presented next cycle
      check(n <= 2, "queue depth");
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3000) begin
      @(negedge clk);
      in_valid  = ($urandom_range(99) < 70);
      in_data   = sample_t'($urandom);
      out_ready = ($urandom_range(99) < 70);
      if ($urandom_range(99) < 3) mode = pre_mode_e'(!mode);
    end
    @(negedge clk);
    in_valid = 0; out_ready = 1;
    repeat (3) @(negedge clk);
    check(exp_q.size() == 0, "all outputs delivered");
    check(n_avg > 0 && n_byp > 0 && n_hold > 0, "both modes and stalls seen");
    $display("avg=%0d bypass=%0d hold=%0d", n_avg, n_byp, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
