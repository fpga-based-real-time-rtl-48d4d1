// tb_bram_memory: random traffic on both memory areas against array models.
// Coefficients: writes through the configuration address, reads through the
// controller address, and the address select choosing between them.
// Samples: one write (or clear) per cycle to all lane copies and an
// independent random read address per lane. Every read is checked one cycle
// after its address, which also checks the read latency and that a write is
// visible to the next cycle's read.
module tb_bram_memory;
  import sp_pkg::*;

  localparam int K = DEF_NUM_TAPS;
  localparam int P = DEF_NUM_PE;
  localparam int D = 32;
  localparam int CAW = $clog2(K);
  localparam int SAW = $clog2(D);

  logic clk = 0;
  logic coef_addr_sel = 0, cfg_we = 0;
  logic [CAW-1:0] cfg_addr = '0, coef_raddr = '0;
  coef_t cfg_data = '0, coef_rdata;
  logic smp_we = 0, smp_clear = 0;
  logic [SAW-1:0] smp_waddr = '0;
  sample_t smp_wdata = '0;
  logic [SAW-1:0] smp_raddr [P];
  sample_t smp_rdata [P];

  bram_memory #(.NUM_TAPS(K), .NUM_PE(P), .SMP_DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cmodel[K];
  int smodel[D];
  int exp_c;
  int exp_s[P];
  bit have_exp = 0;
  bit armed = 0;   // reads are compared once both areas are initialised
  int n_clear = 0, n_sel_read = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    // check the reads addressed in the previous cycle
    if (have_exp) begin
      if (armed) check(int'(coef_rdata) == exp_c, "coefficient read");
      if (armed)
        for (int p = 0; p < P; p++) check(int'(smp_rdata[p]) == exp_s[p], "sample read");
    end
    // expected data of this cycle's reads (read-before-write on the same address)
    if (coef_addr_sel) begin exp_c = cmodel[cfg_addr]; if (!cfg_we) n_sel_read++; end
    else exp_c = cmodel[coef_raddr];
    for (int p = 0; p < P; p++) exp_s[p] = smodel[smp_raddr[p]];
    have_exp = 1;
    if (coef_addr_sel && cfg_we) cmodel[cfg_addr] = int'(cfg_data);
    if (smp_we) begin
      smodel[smp_waddr] = smp_clear ? 0 : int'(smp_wdata);
      if (smp_clear) n_clear++;
    end
  end

  initial begin
    for (int p = 0; p < P; p++) smp_raddr[p] = SAW'(p);
    // initialise both areas through the ports
    @(negedge clk);
    for (int k = 0; k < K; k++) begin
      coef_addr_sel = 1; cfg_we = 1; cfg_addr = CAW'(k); cfg_data = coef_t'($urandom);
      @(negedge clk);
    end
    coef_addr_sel = 0; cfg_we = 0;
    for (int a = 0; a < D; a++) begin
      smp_we = 1; smp_clear = 1; smp_waddr = SAW'(a);
      @(negedge clk);
    end
    smp_clear = 0; smp_we = 0;
    @(negedge clk);
    armed = 1;
    // random traffic
    repeat (2000) begin
      coef_addr_sel = ($urandom_range(99) < 20);
      cfg_we        = ($urandom_range(99) < 50);
      cfg_addr      = CAW'($urandom);
      cfg_data      = coef_t'($urandom);
      coef_raddr    = CAW'($urandom);
      smp_we        = ($urandom_range(99) < 60);
      smp_clear     = ($urandom_range(99) < 5);
      smp_waddr     = SAW'($urandom);
      smp_wdata     = sample_t'($urandom);
      for (int p = 0; p < P; p++)
        smp_raddr[p] = ($urandom_range(99) < 30) ? smp_waddr : SAW'($urandom);
      @(negedge clk);
    end
    coef_addr_sel = 0; cfg_we = 0; smp_we = 0;
    @(negedge clk);
    check(n_clear > 0 && n_sel_read > 0, "clear and selected-address read seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
