// tb_parallel_core: runs of NUM_TAPS operand cycles with one shared
// coefficient and a different sample per lane, back to back or with gaps.
// Every lane's result is compared with a model dot product (Q1.15 scaling,
// 16-bit saturation), the results must arrive 3 cycles after the last
// operands, and all lanes must report together.
module tb_parallel_core;
  import sp_pkg::*;

  localparam int P = DEF_NUM_PE;
  localparam int K = DEF_NUM_TAPS;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, first = 0, last = 0;
  coef_t coef = '0;
  sample_t sample [P];
  logic out_valid;
  sample_t out_data [P];

  parallel_core #(.NUM_PE(P), .SHIFT(15)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  longint acc_m[P];
  int exp_val[$];   // P entries per run, lane 0 first
  int exp_cyc[$];
  int n_b2b = 0;

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
        check(exp_cyc.size() > 0, "unexpected result");
        if (exp_cyc.size() > 0) begin
          check(cycle == exp_cyc.pop_front(), "latency 3");
          for (int p = 0; p < P; p++) check(int'(out_data[p]) == exp_val.pop_front(), "lane result");
        end
      end
      if (in_valid) begin
        for (int p = 0; p < P; p++) begin
          longint pr;
          pr = longint'(sample[p]) * longint'(coef);
          acc_m[p] = first ? pr : acc_m[p] + pr;
        end
        if (last) begin
          for (int p = 0; p < P; p++) exp_val.push_back(sat16(acc_m[p] >>> 15));
          exp_cyc.push_back(cycle + 3);
        end
      end
    end
  end

  initial begin
    for (int p = 0; p < P; p++) sample[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 200; r++) begin
      for (int k = 0; k < K; k++) begin
        @(negedge clk);
        in_valid = 1; first = (k == 0); last = (k == K - 1);
        coef = (r % 20 == 5) ? 16'sh7fff : coef_t'($urandom);
        for (int p = 0; p < P; p++)
          sample[p] = (r % 20 == 5) ? 16'sh7fff : sample_t'($urandom);
      end
      if ($urandom_range(1) != 0) begin
        @(negedge clk); in_valid = 0; first = 0; last = 0;
      end else n_b2b++;
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    check(exp_cyc.size() == 0 && n_b2b > 0, "all results delivered, back-to-back runs seen");
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
