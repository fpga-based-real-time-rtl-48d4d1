// bram_memory: on-chip block RAM partitioned into a coefficient area and a
// sample area.
//
// Coefficient area: NUM_TAPS signed coefficients behind one port whose
// address is chosen by the controller's address-select signal: when
// coef_addr_sel is high the port takes the configuration address and writes
// cfg_data (when cfg_we is also high); otherwise it reads coef_raddr.
//
// Sample area: a circular window of SMP_DEPTH samples. It is replicated once
// per MAC lane (NUM_PE copies, all written together through one write port)
// so that every lane has its own read port and all lanes read in the same
// cycle. smp_clear writes zero instead of smp_wdata, which the controller
// uses to clear the window after reset.
//
// Timing: synchronous read, one cycle. An address presented in cycle t gives
// data in cycle t+1. A write in cycle t is visible to a read issued in t+1.
//
// The coefficient/sample split, the address select and the feeding of
// coefficients to the multipliers and samples to the pipeline follow the
// design description; the per-lane replication, the sizes and the clear
// port are this implementation's choices.
module bram_memory
  import sp_pkg::*;
#(
  parameter int unsigned NUM_TAPS  = sp_pkg::DEF_NUM_TAPS,
  parameter int unsigned NUM_PE    = sp_pkg::DEF_NUM_PE,
  parameter int unsigned SMP_DEPTH = 32,
  localparam int unsigned CAW      = (NUM_TAPS > 1) ? $clog2(NUM_TAPS) : 1,
  localparam int unsigned SAW      = $clog2(SMP_DEPTH)
) (
  input  logic             clk,
  // coefficient port
  input  logic             coef_addr_sel,           // 1: configuration access
  input  logic             cfg_we,
  input  logic [CAW-1:0]   cfg_addr,
  input  coef_t            cfg_data,
  input  logic [CAW-1:0]   coef_raddr,
  output coef_t            coef_rdata,
  // sample write port (all copies)
  input  logic             smp_we,
  input  logic             smp_clear,
  input  logic [SAW-1:0]   smp_waddr,
  input  sample_t          smp_wdata,
  // one sample read port per lane
  input  logic [SAW-1:0]   smp_raddr [NUM_PE],
  output sample_t          smp_rdata [NUM_PE]
);

  coef_t          coef_mem [NUM_TAPS];
  logic [CAW-1:0] coef_addr;

  assign coef_addr = coef_addr_sel ? cfg_addr : coef_raddr;

  always_ff @(posedge clk) begin
    if (coef_addr_sel && cfg_we) coef_mem[coef_addr] <= cfg_data;
    coef_rdata <= coef_mem[coef_addr];
  end

  for (genvar p = 0; p < NUM_PE; p++) begin : g_copy
    sample_t smp_mem [SMP_DEPTH];
    always_ff @(posedge clk) begin
      if (smp_we) smp_mem[smp_waddr] <= smp_clear ? '0 : smp_wdata;
      smp_rdata[p] <= smp_mem[smp_raddr[p]];
    end
  end

  initial begin
    assert ((1 << SAW) == SMP_DEPTH)
      else $error("bram_memory: SMP_DEPTH must be a power of two");
  end

endmodule
