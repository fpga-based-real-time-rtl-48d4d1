// output_register: final output storage in front of the downstream link.
//
// The MAC lanes deliver NUM_PE results in one cycle (load high, lane p's
// result in load_data[p]); this block stores them and hands them out one per
// cycle, lane 0 first, on a valid/ready stream, so parallel results leave
// as one sample stream in time order. It is a circular buffer of OUT_DEPTH
// registers that is written NUM_PE words at a time and read one word at a
// time (first-word fall-through: out_data is valid in the cycle after the
// load). The writer must never load more than the free space: the
// controller ensures this by reserving slots, and an assertion checks it.
//
// Output storage with registered data before transmission follows the
// design description; the depth, the serialisation order and the handshake
// are this implementation's choices.
module output_register
  import sp_pkg::*;
#(
  parameter int unsigned NUM_PE    = sp_pkg::DEF_NUM_PE,
  parameter int unsigned OUT_DEPTH = 4 * sp_pkg::DEF_NUM_PE,
  localparam int unsigned AW       = $clog2(OUT_DEPTH),
  localparam int unsigned OCW      = $clog2(OUT_DEPTH + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  sample_t        load_data [NUM_PE],
  output logic           out_valid,
  output sample_t        out_data,
  input  logic           out_ready,
  output logic [OCW-1:0] count
);

  sample_t        mem [OUT_DEPTH];
  logic [AW-1:0]  wr_q, rd_q;
  logic [OCW-1:0] cnt_q;
  logic           pop;

  assign out_valid = (cnt_q != '0);
  assign out_data  = mem[rd_q];
  assign pop       = out_valid && out_ready;
  assign count     = cnt_q;

  always_ff @(posedge clk) begin
    if (load) begin
      for (int p = 0; p < NUM_PE; p++) mem[AW'(wr_q + AW'(p))] <= load_data[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q  <= '0;
      rd_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (load) wr_q <= AW'(wr_q + AW'(NUM_PE));
      if (pop)  rd_q <= rd_q + 1'b1;
      cnt_q <= cnt_q + (load ? OCW'(NUM_PE) : OCW'(0)) - (pop ? OCW'(1) : OCW'(0));
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> (32'(cnt_q) + NUM_PE <= OUT_DEPTH + (pop ? 1 : 0)));

  initial begin
    assert ((1 << AW) == OUT_DEPTH && OUT_DEPTH % NUM_PE == 0)
      else $error("output_register: OUT_DEPTH must be a power of two and a multiple of NUM_PE");
  end

endmodule
