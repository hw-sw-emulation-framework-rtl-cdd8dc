// sniffer_energy: energy-estimating hardware sniffer of one processing
// subsystem.
//
// It turns the activity of a subsystem into the energy burnt by each of its
// four floorplan cells during a sampling period: the processor core, the
// I-cache, the D-cache and the private memory. Every physical cycle it adds
// to one accumulator per cell
//   * a dynamic energy for each event of that cell in this cycle:
//       core    E_CORE_DYN  per active core cycle (EV_ACTIVE)
//       I-cache E_CACHE_DYN per access (EV_IC_HIT or EV_IC_MISS)
//       D-cache E_CACHE_DYN per access (EV_DC_HIT or EV_DC_MISS)
//       memory  E_MEM_DYN   per non-cacheable access (EV_PRIV), plus
//               REFILL_WORDS * E_MEM_DYN per cache miss (a line refill)
//   * a leakage energy E_*_LEAK for every emulated target cycle (emu_en_i),
//     whether or not the cell is used.
// Energies are in picojoules. The defaults are the maximum powers of an
// ARM11-class core, 8 KB direct-mapped caches and a 32 KB memory at 500 MHz,
// divided by the frequency to give energy per cycle (the same energy per
// cycle results at 100 MHz), split 90% dynamic and 10% leakage. For example
// the core: 1.5 W / 500 MHz = 3000 pJ, 2700 dynamic + 300 leakage.
//
// On a sample pulse the four accumulators (including the events of the
// sample cycle) are copied and cleared, and the copies are written, scaled to
// units of 2^SHIFT pJ (default 1024 pJ, about 1 nJ), over the statistics bus
// to buffer words BASE .. BASE+3 in the order core, I-cache, D-cache, memory.
// done_o is high when nothing is waiting to be written.
//
// Interface: ev_i is the subsystem's event vector (mpsoc_pkg::EV_* order),
// emu_en_i is high in cycles where emulated time advances; write-only
// statistics-bus master (request held until granted).
//
// Origin: sniffers that compute the energy of each floorplan cell, the use of
// each component's maximum power as the worst case, the power figures
// themselves and the fixed 10% leakage share follow the framework
// description. Charging energy per event, charging a cache miss as a whole
// line refill from memory, the picojoule accumulators and the output scaling
// are this design's own.
module sniffer_energy
  import mpsoc_pkg::*;
#(
  parameter int unsigned BASE         = 10,
  parameter int unsigned E_CORE_DYN   = 2700,
  parameter int unsigned E_CORE_LEAK  = 300,
  parameter int unsigned E_CACHE_DYN  = 1278,
  parameter int unsigned E_CACHE_LEAK = 142,
  parameter int unsigned E_MEM_DYN    = 495,
  parameter int unsigned E_MEM_LEAK   = 55,
  parameter int unsigned REFILL_WORDS = 8,
  parameter int unsigned SHIFT        = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NEV_SUB-1:0] ev_i,
  input  logic               emu_en_i,
  input  logic               sample_i,
  output stats_req_t         stats_req_o,
  input  logic               stats_gnt_i,
  output logic               done_o
);
  localparam int unsigned AW = 48;   // accumulator width
  localparam int unsigned NC = 4;    // cells: core, I-cache, D-cache, memory

  logic [AW-1:0] acc    [NC];
  logic [AW-1:0] shadow [NC];
  logic [AW-1:0] add    [NC];
  logic [1:0]    widx;
  logic          wr;

  // energy of this cycle, per cell
  always_comb begin
    logic [AW-1:0] leak;
    leak   = emu_en_i ? AW'(E_CORE_LEAK) : '0;
    add[0] = leak + (ev_i[EV_ACTIVE] ? AW'(E_CORE_DYN) : '0);
    leak   = emu_en_i ? AW'(E_CACHE_LEAK) : '0;
    add[1] = leak + ((ev_i[EV_IC_HIT] || ev_i[EV_IC_MISS]) ? AW'(E_CACHE_DYN) : '0);
    add[2] = leak + ((ev_i[EV_DC_HIT] || ev_i[EV_DC_MISS]) ? AW'(E_CACHE_DYN) : '0);
    leak   = emu_en_i ? AW'(E_MEM_LEAK) : '0;
    add[3] = leak + (ev_i[EV_PRIV] ? AW'(E_MEM_DYN) : '0)
                  + (ev_i[EV_IC_MISS] ? AW'(REFILL_WORDS * E_MEM_DYN) : '0)
                  + (ev_i[EV_DC_MISS] ? AW'(REFILL_WORDS * E_MEM_DYN) : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NC; i++) begin
        acc[i]    <= '0;
        shadow[i] <= '0;
      end
      widx <= '0;
      wr   <= 1'b0;
    end else begin
      for (int i = 0; i < NC; i++) begin
        if (sample_i) begin
          shadow[i] <= acc[i] + add[i];
          acc[i]    <= '0;
        end else begin
          acc[i] <= acc[i] + add[i];
        end
      end
      if (sample_i) begin
        widx <= '0;
        wr   <= 1'b1;
      end else if (wr && stats_gnt_i) begin
        if (widx == 2'(NC - 1)) wr <= 1'b0;
        widx <= widx + 1'b1;
      end
    end
  end

  assign stats_req_o.req   = wr;
  assign stats_req_o.we    = 1'b1;
  assign stats_req_o.addr  = STATS_AW'(BASE) + STATS_AW'(widx);
  assign stats_req_o.wdata = shadow[widx][SHIFT +: XLEN];
  assign done_o            = !wr;

endmodule
