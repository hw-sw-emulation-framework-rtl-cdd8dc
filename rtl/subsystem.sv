// subsystem: one processing subsystem of the emulated MPSoC, without its
// processing core (the core is attached to the cpu_* port).
//
// It holds the memory controller, a D-cache and an I-cache (direct-mapped,
// write-through), the non-cacheable private memory and the cacheable private
// memory that backs both caches. The two caches share the cacheable memory
// through a two-master fixed-priority arbiter (D-cache first). Shared-memory
// accesses leave on sh_req_o/sh_rsp_i toward the shared interconnect.
//
// The core runs on the virtual clock cpu_ce_i (a clock enable from the clock
// manager); everything here runs on the physical clock. suppress_o asks the
// clock manager to stop the core's virtual clock. ev_o carries the event
// lines for the count-logging sniffer (bit meanings in mpsoc_pkg::EV_*):
// core cycles are classified on virtual clock edges only, so cycles hidden by
// suppression are not seen by the emulated core and are counted apart.
//
// Origin: the set of parts (memory controller, I- and D-cache, non-cacheable
// and cacheable private memory) follows the framework description; the fixed-
// priority sharing of the cacheable memory between the two caches and the
// active/stalled/idle classification rules are this design's own.
module subsystem
  import mpsoc_pkg::*;
#(
  parameter int unsigned DC_BYTES   = 8192,
  parameter int unsigned IC_BYTES   = 8192,
  parameter int unsigned LINE_BYTES = 32,
  parameter int unsigned PRIV_BYTES = 32768,   // non-cacheable private memory
  parameter int unsigned CPRV_BYTES = 32768,   // cacheable private memory
  parameter int unsigned LAT_PRIV   = 2,
  parameter int unsigned LAT_HIT    = 1,
  parameter int unsigned LAT_MISS   = 8,
  parameter int unsigned LAT_SHARED = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cpu_ce_i,
  input  logic               cpu_idle_i,
  input  core_req_t          cpu_req_i,
  output core_rsp_t          cpu_rsp_o,
  output logic               suppress_o,
  output mem_req_t           sh_req_o,
  input  mem_rsp_t           sh_rsp_i,
  output logic [NEV_SUB-1:0] ev_o
);
  mem_req_t priv_req, dc_req, ic_req, dc_mreq, ic_mreq, cprv_req;
  mem_rsp_t priv_rsp, dc_rsp, ic_rsp, dc_mrsp, ic_mrsp, cprv_rsp;
  logic     dc_hit, dc_miss, ic_hit, ic_miss, busy;
  logic     ev_priv, ev_cached, ev_shared, ev_error;

  mem_ctrl #(
    .LAT_PRIV(LAT_PRIV), .LAT_HIT(LAT_HIT), .LAT_MISS(LAT_MISS), .LAT_SHARED(LAT_SHARED)
  ) u_mc (
    .clk, .rst_n, .cpu_ce_i, .cpu_req_i, .cpu_rsp_o, .suppress_o, .busy_o(busy),
    .priv_req_o(priv_req), .priv_rsp_i(priv_rsp),
    .dc_req_o(dc_req), .dc_rsp_i(dc_rsp), .dc_miss_i(dc_miss),
    .ic_req_o(ic_req), .ic_rsp_i(ic_rsp), .ic_miss_i(ic_miss),
    .sh_req_o, .sh_rsp_i,
    .ev_priv_o(ev_priv), .ev_cached_o(ev_cached), .ev_shared_o(ev_shared), .ev_error_o(ev_error)
  );

  dm_cache #(.SIZE_BYTES(DC_BYTES), .LINE_BYTES(LINE_BYTES)) u_dc (
    .clk, .rst_n, .up_req_i(dc_req), .up_rsp_o(dc_rsp), .hit_o(dc_hit), .miss_o(dc_miss),
    .mem_req_o(dc_mreq), .mem_rsp_i(dc_mrsp)
  );

  dm_cache #(.SIZE_BYTES(IC_BYTES), .LINE_BYTES(LINE_BYTES)) u_ic (
    .clk, .rst_n, .up_req_i(ic_req), .up_rsp_o(ic_rsp), .hit_o(ic_hit), .miss_o(ic_miss),
    .mem_req_o(ic_mreq), .mem_rsp_i(ic_mrsp)
  );

  bram_mem #(.SIZE_BYTES(PRIV_BYTES)) u_priv (
    .clk, .rst_n, .req_i(priv_req), .rsp_o(priv_rsp)
  );

  // D-cache and I-cache refills share the cacheable private memory.
  mem_rsp_t [1:0] arb_rsp;
  logic     [1:0] arb_gnt;
  logic     [3*XLEN-1:0] arb_lines;

  shared_bus #(.NM(2), .ROUND_ROBIN(1'b0), .ARB_LAT(1)) u_carb (
    .clk, .rst_n, .m_req_i({ic_mreq, dc_mreq}), .m_rsp_o(arb_rsp),
    .s_req_o(cprv_req), .s_rsp_i(cprv_rsp), .grant_o(arb_gnt), .bus_lines_o(arb_lines)
  );
  assign dc_mrsp = arb_rsp[0];
  assign ic_mrsp = arb_rsp[1];

  bram_mem #(.SIZE_BYTES(CPRV_BYTES)) u_cprv (
    .clk, .rst_n, .req_i(cprv_req), .rsp_o(cprv_rsp)
  );

  always_comb begin
    ev_o              = '0;
    ev_o[EV_ACTIVE]   = cpu_ce_i && !busy && !cpu_idle_i;
    ev_o[EV_STALLED]  = cpu_ce_i && busy;
    ev_o[EV_IDLE]     = cpu_ce_i && !busy && cpu_idle_i;
    ev_o[EV_PRIV]     = ev_priv;
    ev_o[EV_IC_HIT]   = ic_hit;
    ev_o[EV_IC_MISS]  = ic_miss;
    ev_o[EV_DC_HIT]   = dc_hit;
    ev_o[EV_DC_MISS]  = dc_miss;
    ev_o[EV_SHARED]   = ev_shared;
    ev_o[EV_SUPPRESS] = suppress_o;
  end

endmodule
