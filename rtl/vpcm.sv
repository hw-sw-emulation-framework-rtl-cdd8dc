// vpcm: virtual platform clock manager.
//
// It derives, from the single physical clock, one virtual clock per emulated
// processing subsystem. The virtual clocks are produced as clock enables
// (vclk_en_o[i] high = subsystem i gets a clock edge in this physical cycle),
// which is how gated clocks are built safely on an FPGA. A subsystem's
// virtual clock is stopped when
//   * its memory controller raises suppress_i[i] (a physical memory cannot
//     meet the configured latency, so the extra cycles are hidden), or
//   * eth_stall_i is high (the Ethernet link is saturated and the statistics
//     of the finished period have not left yet): every virtual clock stops,
//     and emu_en_o, which advances emulated time, is low.
// With slow_i high (frequency scaling requested by the thermal policy) the
// virtual clocks only tick on one emulated cycle out of DFS_DIV (5: 500 MHz
// down to 100 MHz). The memory controllers, memories and interconnect stay
// on the physical clock.
//
// Origin: per-subsystem virtual clocks that are stopped by suppression
// requests and by Ethernet saturation, and the 500/100 MHz frequency pair,
// follow the framework description; producing the virtual clocks as clock
// enables, and DFS as one enable every DFS_DIV emulated cycles, are this
// design's own.
module vpcm #(
  parameter int unsigned NSUB    = 4,
  parameter int unsigned DFS_DIV = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NSUB-1:0] suppress_i,
  input  logic            eth_stall_i,
  input  logic            slow_i,
  output logic [NSUB-1:0] vclk_en_o,
  output logic            emu_en_o,
  output logic            dfs_tick_o
);
  localparam int unsigned DW = (DFS_DIV < 2) ? 1 : $clog2(DFS_DIV);

  logic [DW-1:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0;
    end else if (!eth_stall_i) begin
      div <= (div == DW'(DFS_DIV - 1)) ? '0 : div + 1'b1;
    end
  end

  assign emu_en_o   = !eth_stall_i;
  assign dfs_tick_o = !slow_i || (div == '0);

  always_comb begin
    for (int i = 0; i < NSUB; i++)
      vclk_en_o[i] = emu_en_o && dfs_tick_o && !suppress_i[i];
  end

endmodule
