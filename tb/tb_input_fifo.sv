// tb_input_fifo: random push/pop traffic against a queue model. Checks the
// data order, the occupancy count, in_ready, out_valid and the overflow flag
// (a sample offered while full and not popping is dropped), including runs
// that fill the FIFO completely and push and pop at once when full.
module tb_input_fifo;
  import sp_pkg::*;

  localparam int DEPTH = 16;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_ready = 0;
  logic [DATA_W-1:0] in_data = '0;
  logic in_ready, overflow, out_valid;
  logic [DATA_W-1:0] out_data;
  logic [$clog2(DEPTH):0] count;

  input_fifo #(.WIDTH(DATA_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [DATA_W-1:0] model[$];
  int n_full = 0, n_drop = 0, n_fullpush = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s (model size %0d)", what, model.size());
    end
  endtask

  // compare at the clock edge, before the model update
  always @(posedge clk) if (rst_n) begin
    bit full_m;
    bit pop_m;
    bit push_m;
    full_m = (model.size() == DEPTH);
    pop_m  = out_ready && model.size() > 0;
    push_m = in_valid && (!full_m || pop_m);
    check(count == model.size(), "count");
    check(out_valid == (model.size() > 0), "out_valid");
    check(in_ready == (!full_m || pop_m), "in_ready");
    check(overflow == (in_valid && !push_m), "overflow");
    if (pop_m) check(out_data == model[0], "data");
    if (full_m) n_full++;
    if (overflow) n_drop++;
    if (full_m && push_m) n_fullpush++;
    if (pop_m) void'(model.pop_front());
    if (push_m) model.push_back(in_data);
  end

  initial begin
    int pin, pout;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 4; phase++) begin
      // phase 0: fill; 1: balanced; 2: drain; 3: full with simultaneous pops
      case (phase)
        0: begin pin = 90; pout = 10; end
        1: begin pin = 50; pout = 50; end
        2: begin pin = 10; pout = 90; end
        default: begin pin = 100; pout = 50; end
      endcase
      repeat (400) begin
        @(negedge clk);
        in_valid  = ($urandom_range(99) < pin);
        in_data   = DATA_W'($urandom);
        out_ready = ($urandom_range(99) < pout);
      end
    end
    @(negedge clk);
    in_valid = 0; out_ready = 1;
    repeat (DEPTH + 2) @(negedge clk);
    check(model.size() == 0 && !out_valid, "drained");
    check(n_full > 0 && n_drop > 0 && n_fullpush > 0, "full, drop and full-push all seen");
    $display("full=%0d drop=%0d fullpush=%0d", n_full, n_drop, n_fullpush);
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
