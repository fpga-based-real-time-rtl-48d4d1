// tb_mac_pipeline: feeds runs of random operand pairs (random lengths, idle
// cycles inside runs, back-to-back runs) and compares each result with a
// model dot product, scaled by 2^-15 and saturated to 16 bits. Checks that a
// result appears exactly 3 cycles after the last pair of its run, and that
// saturation at both limits happens.
module tb_mac_pipeline;
  import sp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, first = 0, last = 0;
  sample_t sample = '0;
  coef_t coef = '0;
  logic out_valid;
  sample_t out_data;

  mac_pipeline #(.SHIFT(15)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  longint acc_m = 0;
  int exp_val[$];
  int exp_cyc[$];
  int n_pos_sat = 0, n_neg_sat = 0, n_b2b = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0d", what, cycle); end
  endtask

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (out_valid) begin
        check(exp_val.size() > 0, "unexpected result");
        if (exp_val.size() > 0) begin
          check(int'(out_data) == exp_val.pop_front(), "result value");
          check(cycle == exp_cyc.pop_front(), "result 3 cycles after last pair");
        end
      end
      if (in_valid) begin
        longint pr;
        pr = longint'(sample) * longint'(coef);
        acc_m = first ? pr : acc_m + pr;
        if (last) begin
          int v;
          v = sat16(acc_m >>> 15);
          if (v == 32767) n_pos_sat++;
          if (v == -32768) n_neg_sat++;
          exp_val.push_back(v);
          exp_cyc.push_back(cycle + 3);
        end
      end
    end
  end

  task automatic run(input int len, input int big);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      while ($urandom_range(99) < 15) begin   // idle cycles inside the run
        in_valid = 0;
        @(negedge clk);
      end
      in_valid = 1;
      first = (i == 0);
      last  = (i == len - 1);
      if (big == 1)      begin sample = 16'sh7fff; coef = 16'sh7fff; end
      else if (big == 2) begin sample = 16'sh7fff; coef = 16'sh8000; end
      else begin sample = sample_t'($urandom); coef = coef_t'($urandom); end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 300; r++) begin
      run($urandom_range(1, 12), (r % 25 == 3) ? 1 : ((r % 25 == 7) ? 2 : 0));
      if ($urandom_range(1) != 0) begin
        @(negedge clk); in_valid = 0; first = 0; last = 0;
      end else n_b2b++;
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    check(exp_val.size() == 0, "all results delivered");
    check(n_pos_sat > 0 && n_neg_sat > 0 && n_b2b > 0, "saturation and back-to-back runs seen");
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
