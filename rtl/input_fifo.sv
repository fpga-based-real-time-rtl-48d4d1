// input_fifo: input register / FIFO buffer between the sample source and
// the processing chain.
//
// Samples are written when in_valid is high and the FIFO is not full; a
// sample offered while the FIFO is full is dropped and flagged on the
// overflow output for that cycle (a converter cannot be stalled, so the loss
// is reported rather than hidden). The read side is first-word fall-through:
// out_data shows the oldest entry whenever out_valid is high and is removed
// when out_ready is also high. A push and a pop may happen in the same cycle,
// also when the FIFO is full (the pop frees the slot).
//
// Timing: a sample written in cycle t is visible on out_data in cycle t+1.
// Storage is a register array with binary pointers one bit wider than the
// address, so DEPTH must be a power of two.
//
// The 16-bit width and the buffering role come from the design description;
// the depth, the drop-on-full policy and the handshake are this design's
// choices.
module input_fifo
  import sp_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // write side
  input  logic                     in_valid,
  input  logic [WIDTH-1:0]         in_data,
  output logic                     in_ready,   // not full
  output logic                     overflow,   // in_valid while full: dropped
  // read side
  output logic                     out_valid,
  output logic [WIDTH-1:0]         out_data,
  input  logic                     out_ready,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             full, empty, push, pop;

  assign count     = wr_ptr - rd_ptr;
  assign empty     = (wr_ptr == rd_ptr);
  assign full      = (count == (AW+1)'(DEPTH));
  assign pop       = out_ready && !empty;
  assign push      = in_valid && (!full || pop);
  assign in_ready  = !full || pop;
  assign overflow  = in_valid && !push;
  assign out_valid = !empty;
  assign out_data  = mem[rd_ptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  // The occupancy never exceeds DEPTH.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    count <= (AW+1)'(DEPTH));

  initial begin
    assert (DEPTH >= 2 && (1 << AW) == DEPTH)
      else $error("input_fifo: DEPTH must be a power of two >= 2");
  end

endmodule
