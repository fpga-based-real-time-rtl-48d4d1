// tb_output_register: parallel loads of NUM_PE results (only when they fit,
// as the controller guarantees) and random out_ready. Every output word is
// compared with a queue model in lane order; out_valid and count are checked
// every cycle, and the storage must become completely full at least once.
module tb_output_register;
  import sp_pkg::*;

  localparam int P = DEF_NUM_PE;
  localparam int D = 4 * DEF_NUM_PE;

  logic clk = 0, rst_n = 0;
  logic load = 0, out_ready = 0;
  sample_t load_data [P];
  logic out_valid;
  sample_t out_data;
  logic [$clog2(D+1)-1:0] count;

  output_register #(.NUM_PE(P), .OUT_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int model[$];
  int n_full = 0, n_loadpop = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    bit pop;
    check(count == model.size(), "count");
    check(out_valid == (model.size() > 0), "out_valid");
    pop = out_valid && out_ready;
    if (pop) begin
      check(model.size() > 0 && int'(out_data) == model[0], "data order");
      void'(model.pop_front());
    end
    if (load) begin
      if (pop) n_loadpop++;
      for (int p = 0; p < P; p++) model.push_back(int'(load_data[p]));
    end
    if (model.size() == D) n_full++;
  end

  initial begin
    int lp, rp;
    for (int p = 0; p < P; p++) load_data[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 3; ph++) begin
      lp = (ph == 0) ? 40 : ((ph == 1) ? 12 : 5);
      rp = (ph == 0) ? 20 : ((ph == 1) ? 90 : 100);
      repeat (1000) begin
        @(negedge clk);
        out_ready = ($urandom_range(99) < rp);
        // a load must fit: free space, counting the pop of this cycle
        load = ($urandom_range(99) < lp) &&
               (int'(count) + P <= D + ((out_valid && out_ready) ? 1 : 0));
        for (int p = 0; p < P; p++) load_data[p] = sample_t'($urandom);
      end
    end
    @(negedge clk); load = 0; out_ready = 1;
    repeat (D + 2) @(negedge clk);
    check(model.size() == 0, "drained");
    check(n_full > 0 && n_loadpop > 0, "full storage and load-with-pop seen");
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
