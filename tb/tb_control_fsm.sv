// tb_control_fsm: checks the controller's schedule without the datapath.
//
// The testbench keeps its own picture of the sample window: each write puts
// the sample's sequence number at the write address (a clear puts -1). Every
// cycle it records what each lane's read address and the coefficient
// address point at; when the MAC strobes arrive one cycle later it collects
// the (tap, sample) pairs of each lane. At the 'last' strobe it requires, for
// batch b and lane p, exactly the taps 0..NUM_TAPS-1 in order, each paired
// with sample b*NUM_PE+p-k (or a cleared entry where that is negative). This
// catches wrong addresses, overwritten samples, wrong strobes and batches
// started too early. It also checks the clearing after reset, the write
// addresses, that output credits are never exceeded, that coefficient
// writes only happen between batches, and that back-to-back batches,
// output stalls and a full window all occur.
module tb_control_fsm;
  import sp_pkg::*;

  localparam int K = DEF_NUM_TAPS;
  localparam int P = DEF_NUM_PE;
  localparam int D = 32;
  localparam int OD = 4 * DEF_NUM_PE;
  localparam int CAW = $clog2(K);
  localparam int SAW = $clog2(D);

  logic clk = 0, rst_n = 0;
  logic enable = 0, cfg_we = 0, in_valid = 0, out_pop = 0;
  logic cfg_ready, coef_addr_sel, in_ready, smp_we, smp_clear;
  logic [CAW-1:0] coef_raddr;
  logic [SAW-1:0] smp_waddr;
  logic [SAW-1:0] smp_raddr [P];
  logic mac_valid, mac_first, mac_last, busy, batch_start, out_stall;

  control_fsm #(.NUM_TAPS(K), .NUM_PE(P), .SMP_DEPTH(D), .OUT_DEPTH(OD)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  int win[D];
  int written = 0, batches_done = 0, out_held = 0, reserved = 0;
  int rd_prev_k;
  int rd_prev_s[P];
  int run_k[P][$];
  int run_s[P][$];
  bit in_run = 0;
  bit cfg_prev = 0;
  int clear_seen = 0;
  int n_b2b = 0, n_stall = 0, n_winfull = 0, n_cfg = 0;
  int last_cycle = -10;
  int ready_pct = 100, valid_pct = 100;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s at %0d", what, cycle); end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      // MAC strobes: pair with what was addressed in the previous cycle
      // the cycle before a strobe issued a tap read: no configuration then
      if (mac_valid) check(!cfg_prev, "coefficient write during a tap read");
      cfg_prev = coef_addr_sel;
      if (mac_valid) begin
        if (mac_first) begin
          check(!in_run, "first inside a run");
          in_run = 1;
          if (cycle == last_cycle + 1) n_b2b++;
          for (int p = 0; p < P; p++) begin run_k[p].delete(); run_s[p].delete(); end
        end
        check(in_run, "strobe outside a run");
        for (int p = 0; p < P; p++) begin
          run_k[p].push_back(rd_prev_k);
          run_s[p].push_back(rd_prev_s[p]);
        end
        if (mac_last) begin
          for (int p = 0; p < P; p++) begin
            check(run_k[p].size() == K, "run length");
            for (int k = 0; k < K && k < run_k[p].size(); k++) begin
              int n;
              n = batches_done * P + p - k;
              check(run_k[p][k] == k, "tap order");
              check(run_s[p][k] == ((n < 0) ? -1 : n), "sample of tap");
            end
          end
          batches_done++;
          out_held += P;          // results reach the output storage
          in_run = 0;
          last_cycle = cycle;
        end
      end else begin
        check(!mac_first && !mac_last, "first/last without valid");
      end
      // record this cycle's reads (before this cycle's write)
      rd_prev_k = int'(coef_raddr);
      for (int p = 0; p < P; p++) rd_prev_s[p] = win[smp_raddr[p]];
      // writes
      if (smp_we) begin
        if (smp_clear) begin
          check(int'(smp_waddr) == clear_seen % D, "clear address");
          win[smp_waddr] = -1;
          clear_seen++;
          check(!in_ready, "no input while clearing");
        end else begin
          check(in_valid && in_ready, "write without handshake");
          check(int'(smp_waddr) == written % D, "write address");
          win[smp_waddr] = written;
          written++;
        end
      end
      if (in_valid && !in_ready && clear_seen >= D) n_winfull++;
      // configuration only between batches
      if (coef_addr_sel) n_cfg++;
      // output credits
      if (batch_start) reserved += P;
      if (out_pop) begin reserved--; out_held--; end
      check(reserved <= OD && reserved >= 0, "credit bound");
      if (out_stall) n_stall++;
    end
  end

  always @(negedge clk) begin
    in_valid <= ($urandom_range(99) < valid_pct);
    out_pop  <= (out_held > 0) && ($urandom_range(99) < ready_pct);
  end

  initial begin
    for (int a = 0; a < D; a++) win[a] = $urandom;   // unknown before the clear
    repeat (2) @(negedge clk);
    rst_n = 1;
    enable = 1;
    repeat (D + 2) @(negedge clk);
    check(clear_seen == D, "whole window cleared once");
    // full rate
    repeat (600) @(negedge clk);
    // slow consumer
    ready_pct = 10;
    repeat (600) @(negedge clk);
    // random traffic with coefficient writes between batches
    ready_pct = 60; valid_pct = 50;
    repeat (30) begin
      repeat ($urandom_range(50, 150)) @(negedge clk);
      enable = 0;
      while (!cfg_ready) @(negedge clk);
      cfg_we = 1;
      repeat (K) @(negedge clk);
      cfg_we = 0;
      enable = 1;
    end
    valid_pct = 0; ready_pct = 100;
    repeat (100) @(negedge clk);
    check(batches_done == written / P, "every whole batch computed");
    check(n_b2b > 0 && n_stall > 0 && n_winfull > 0 && n_cfg > 0,
          "back-to-back, output stall, full window and configuration seen");
    $display("batches=%0d written=%0d b2b=%0d stall=%0d winfull=%0d cfg=%0d",
             batches_done, written, n_b2b, n_stall, n_winfull, n_cfg);
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
