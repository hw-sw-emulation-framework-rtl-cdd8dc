// mpsoc_emu_top: FPGA emulation platform for thermal exploration of an
// MPSoC, with its statistics extraction subsystem.
//
// Emulated MPSoC: NSUB processing subsystems (memory controller, I-/D-cache,
// private memories), each with its processing core attached at the cpu_*
// ports, share the off-chip main memory through the shared bus and the
// external memory bridge (sram_* pins). Shared addresses 0x2Fxx_xxxx reach
// a bank of NSEM hardware test-and-set semaphores instead of the SRAM.
//
// Statistics: each subsystem has a count-logging sniffer and an energy
// sniffer (energy of its core, I-cache, D-cache and memory); the shared bus has
// a transition-counting sniffer and an event-logging sniffer that logs bus
// grants. Every SAMPLE_CYCLES emulated cycles the dispatcher closes a period,
// the sniffers write their results into the Ethernet buffer over the
// dedicated statistics bus, and the dispatcher sends the buffer as one packet
// on the eth_tx_* byte stream (to an Ethernet MAC). Temperature packets that
// come back on eth_rx_* update the virtual temperature sensors.
//
// Clocking: the clock manager turns the physical clock into one virtual
// clock per core (cpu_ce_o, a clock enable the core must obey). It stops a
// core's clock while its memory controller hides a slow physical memory,
// stops all cores while the Ethernet link is saturated, and divides them by
// DFS_DIV while the thermal policy (enabled by dfs_enable_i) asks for the
// low frequency.
//
// Buffer layout (32-bit words): subsystem i counters at 16*i .. 16*i+9
// (mpsoc_pkg::EV_* order) and its cell energies (core, I-cache, D-cache,
// memory, in units of 1024 pJ) at 16*i+10 .. 16*i+13, bus transition
// count at 16*NSUB, event log header and records at 16*NSUB+16 ..
// 16*NSUB+63. A packet carries words
// 0 .. 16*NSUB+63.
//
// The statistics-side processing core is attached at host_*: it is one more
// master of the statistics bus (buffer at word addresses 0..2047, sensors at
// 2048 + sensor index, thresholds at 2048+NS and 2048+NS+1).
//
// Origin: the partition into an emulated MPSoC and a statistics extraction
// subsystem with sniffers, buffer, dispatcher, sensors and clock manager, and
// the default sizes (4 subsystems, 8 KB caches, 32 KB memories, 10-cycle
// shared memory, 500/100 MHz, 350/340 K), follow the framework description.
// The shared bus standing in for a network-on-chip, the sniffer placement,
// the buffer layout and the number of sensors are this design's own.
module mpsoc_emu_top
  import mpsoc_pkg::*;
#(
  parameter int unsigned NSUB          = 4,
  parameter int unsigned CACHE_BYTES   = 8192,
  parameter int unsigned LINE_BYTES    = 32,
  parameter int unsigned PRIV_BYTES    = 32768,
  parameter int unsigned CPRV_BYTES    = 32768,
  parameter int unsigned LAT_PRIV      = 2,
  parameter int unsigned LAT_HIT       = 1,
  parameter int unsigned LAT_MISS      = 8,
  parameter int unsigned LAT_SHARED    = 10,
  parameter bit          ROUND_ROBIN   = 1'b1,
  parameter int unsigned ARB_LAT       = 1,
  parameter int unsigned SRAM_AW       = 18,
  parameter int unsigned SRAM_WAIT     = 2,
  parameter int unsigned NSEM          = 32,
  parameter int unsigned NS            = 8,
  parameter int unsigned DFS_DIV       = 5,
  parameter int unsigned SAMPLE_CYCLES = 5_000_000,
  parameter int unsigned BUF_WORDS     = 512
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // processing cores
  input  core_req_t [NSUB-1:0]  cpu_req_i,
  output core_rsp_t [NSUB-1:0]  cpu_rsp_o,
  output logic      [NSUB-1:0]  cpu_ce_o,
  input  logic      [NSUB-1:0]  cpu_idle_i,
  // off-chip shared memory (SRAM)
  output logic [SRAM_AW-1:0]    sram_addr_o,
  output logic [XLEN-1:0]       sram_dout_o,
  input  logic [XLEN-1:0]       sram_din_i,
  output logic                  sram_ce_n_o,
  output logic                  sram_we_n_o,
  output logic                  sram_oe_n_o,
  // Ethernet MAC byte streams
  output logic [7:0]            eth_tx_data_o,
  output logic                  eth_tx_valid_o,
  output logic                  eth_tx_last_o,
  input  logic                  eth_tx_ready_i,
  input  logic [7:0]            eth_rx_data_i,
  input  logic                  eth_rx_valid_i,
  input  logic                  eth_rx_last_i,
  // statistics-side processing core
  input  stats_req_t            host_req_i,
  output logic                  host_gnt_o,
  output logic                  host_rvalid_o,
  output logic [XLEN-1:0]       host_rdata_o,
  // thermal management and status
  input  logic                  dfs_enable_i,
  output logic                  slow_o,
  output logic [NS-1:0][15:0]   temp_o,
  output logic [31:0]           frames_sent_o,
  output logic [31:0]           frames_rcvd_o,
  output logic [31:0]           stall_cycles_o,
  output logic                  dfs_switch_o,
  output logic [15:0]           rx_drop_o
);
  localparam int unsigned NM      = 2 * NSUB + 5;
  localparam int unsigned M_NRG   = NSUB;          // energy sniffers NSUB .. 2*NSUB-1
  localparam int unsigned M_TOG   = 2 * NSUB;
  localparam int unsigned M_EVT   = 2 * NSUB + 1;
  localparam int unsigned M_TX    = 2 * NSUB + 2;
  localparam int unsigned M_RX    = 2 * NSUB + 3;
  localparam int unsigned M_HOST  = 2 * NSUB + 4;
  localparam int unsigned TOG_BASE = 16 * NSUB;
  localparam int unsigned EVT_BASE = 16 * NSUB + 16;
  localparam int unsigned NWORDS   = 16 * NSUB + 64;

  // ------------------------------------------------------------ emulated MPSoC
  logic     [NSUB-1:0] suppress;
  mem_req_t [NSUB-1:0] sh_req;
  mem_rsp_t [NSUB-1:0] sh_rsp;
  logic     [NSUB-1:0][NEV_SUB-1:0] sub_ev;
  mem_req_t            mem_req;
  mem_rsp_t            mem_rsp;
  logic     [NSUB-1:0] bus_grant;
  logic     [3*XLEN-1:0] bus_lines;

  for (genvar i = 0; i < NSUB; i++) begin : g_sub
    subsystem #(
      .DC_BYTES(CACHE_BYTES), .IC_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES),
      .PRIV_BYTES(PRIV_BYTES), .CPRV_BYTES(CPRV_BYTES),
      .LAT_PRIV(LAT_PRIV), .LAT_HIT(LAT_HIT), .LAT_MISS(LAT_MISS), .LAT_SHARED(LAT_SHARED)
    ) u_sub (
      .clk, .rst_n, .cpu_ce_i(cpu_ce_o[i]), .cpu_idle_i(cpu_idle_i[i]),
      .cpu_req_i(cpu_req_i[i]), .cpu_rsp_o(cpu_rsp_o[i]), .suppress_o(suppress[i]),
      .sh_req_o(sh_req[i]), .sh_rsp_i(sh_rsp[i]), .ev_o(sub_ev[i])
    );
  end

  shared_bus #(.NM(NSUB), .ROUND_ROBIN(ROUND_ROBIN), .ARB_LAT(ARB_LAT)) u_bus (
    .clk, .rst_n, .m_req_i(sh_req), .m_rsp_o(sh_rsp), .s_req_o(mem_req), .s_rsp_i(mem_rsp),
    .grant_o(bus_grant), .bus_lines_o(bus_lines)
  );

  // shared address space: 0x2F.. is the semaphore bank, the rest the SRAM
  mem_req_t br_req, sem_req;
  mem_rsp_t br_rsp, sem_rsp;
  logic     sel_sem;

  always_comb begin
    sel_sem     = (mem_req.addr[27:24] == 4'hF);
    br_req      = mem_req;
    sem_req     = mem_req;
    br_req.req  = mem_req.req && !sel_sem;
    sem_req.req = mem_req.req && sel_sem;
    mem_rsp     = sel_sem ? sem_rsp : br_rsp;
  end

  hw_sem #(.NSEM(NSEM)) u_sem (.clk, .rst_n, .req_i(sem_req), .rsp_o(sem_rsp));

  ext_mem_bridge #(.SRAM_AW(SRAM_AW), .SRAM_WAIT(SRAM_WAIT)) u_bridge (
    .clk, .rst_n, .req_i(br_req), .rsp_o(br_rsp),
    .sram_addr_o, .sram_dout_o, .sram_din_i, .sram_ce_n_o, .sram_we_n_o, .sram_oe_n_o
  );

  // ---------------------------------------------------------- clock manager
  logic eth_stall, emu_en, dfs_tick;

  vpcm #(.NSUB(NSUB), .DFS_DIV(DFS_DIV)) u_vpcm (
    .clk, .rst_n, .suppress_i(suppress), .eth_stall_i(eth_stall), .slow_i(slow_o),
    .vclk_en_o(cpu_ce_o), .emu_en_o(emu_en), .dfs_tick_o(dfs_tick)
  );

  // ---------------------------------------------------- statistics subsystem
  stats_req_t [NM-1:0] st_req;
  logic       [NM-1:0] st_gnt, st_rvalid;
  logic       [XLEN-1:0] st_rdata;
  logic       [NM-1:0] done;
  logic                sample;

  for (genvar i = 0; i < NSUB; i++) begin : g_snf
    sniffer_count #(.NEV(NEV_SUB), .BASE(16 * i)) u_cnt (
      .clk, .rst_n, .ev_i(sub_ev[i]), .sample_i(sample),
      .stats_req_o(st_req[i]), .stats_gnt_i(st_gnt[i]), .done_o(done[i])
    );
    sniffer_energy #(.BASE(16 * i + NEV_SUB), .REFILL_WORDS(LINE_BYTES / 4)) u_nrg (
      .clk, .rst_n, .ev_i(sub_ev[i]), .emu_en_i(emu_en), .sample_i(sample),
      .stats_req_o(st_req[M_NRG + i]), .stats_gnt_i(st_gnt[M_NRG + i]),
      .done_o(done[M_NRG + i])
    );
  end

  sniffer_toggle #(.W(3 * XLEN), .BASE(TOG_BASE)) u_tog (
    .clk, .rst_n, .lines_i(bus_lines), .sample_i(sample),
    .stats_req_o(st_req[M_TOG]), .stats_gnt_i(st_gnt[M_TOG]), .done_o(done[M_TOG])
  );

  sniffer_event #(.NEV(NSUB), .BASE(EVT_BASE), .REGION(48)) u_evt (
    .clk, .rst_n, .ev_i(bus_grant), .sample_i(sample),
    .stats_req_o(st_req[M_EVT]), .stats_gnt_i(st_gnt[M_EVT]), .done_o(done[M_EVT])
  );

  logic            buf_en, buf_we, sen_en, sen_we, sen_upd;
  logic [STATS_AW-2:0] buf_addr, sen_addr;
  logic [XLEN-1:0] buf_wdata, buf_rdata, sen_wdata, sen_rdata;
  logic [NS-1:0]   hot, cool;

  eth_dispatcher #(.SAMPLE_CYCLES(SAMPLE_CYCLES), .NWORDS(NWORDS), .NS(NS)) u_disp (
    .clk, .rst_n, .emu_en_i(emu_en), .done_i(&done[M_EVT:0]), .sample_o(sample),
    .stall_o(eth_stall),
    .tx_data_o(eth_tx_data_o), .tx_valid_o(eth_tx_valid_o), .tx_last_o(eth_tx_last_o),
    .tx_ready_i(eth_tx_ready_i),
    .rx_data_i(eth_rx_data_i), .rx_valid_i(eth_rx_valid_i), .rx_last_i(eth_rx_last_i),
    .txm_req_o(st_req[M_TX]), .txm_gnt_i(st_gnt[M_TX]), .txm_rvalid_i(st_rvalid[M_TX]),
    .rdata_i(st_rdata), .rxm_req_o(st_req[M_RX]), .rxm_gnt_i(st_gnt[M_RX]),
    .frames_sent_o, .frames_rcvd_o, .stall_cycles_o, .rx_drop_o
  );
  assign done[NM-1:M_TX] = '1;

  assign st_req[M_HOST] = host_req_i;
  assign host_gnt_o     = st_gnt[M_HOST];
  assign host_rvalid_o  = st_rvalid[M_HOST];
  assign host_rdata_o   = st_rdata;

  stats_bus #(.NM(NM)) u_sbus (
    .clk, .rst_n, .m_req_i(st_req), .gnt_o(st_gnt), .rvalid_o(st_rvalid), .rdata_o(st_rdata),
    .buf_en_o(buf_en), .buf_we_o(buf_we), .buf_addr_o(buf_addr), .buf_wdata_o(buf_wdata),
    .buf_rdata_i(buf_rdata),
    .sen_en_o(sen_en), .sen_we_o(sen_we), .sen_addr_o(sen_addr), .sen_wdata_o(sen_wdata),
    .sen_rdata_i(sen_rdata)
  );

  eth_buffer #(.DEPTH(BUF_WORDS), .AW(STATS_AW - 1)) u_buf (
    .clk, .en_i(buf_en), .we_i(buf_we), .addr_i(buf_addr), .wdata_i(buf_wdata),
    .rdata_o(buf_rdata)
  );

  temp_sensors #(.NS(NS)) u_sen (
    .clk, .rst_n, .en_i(sen_en), .we_i(sen_we), .addr_i(sen_addr), .wdata_i(sen_wdata),
    .rdata_o(sen_rdata), .temp_o, .hot_o(hot), .cool_o(cool), .upd_o(sen_upd)
  );

  dtm_fsm #(.NS(NS)) u_dtm (
    .clk, .rst_n, .enable_i(dfs_enable_i), .hot_i(hot), .cool_i(cool),
    .slow_o, .switch_o(dfs_switch_o)
  );

  initial begin
    assert (NSUB <= 8) else $error("event-logging sniffer takes at most 8 bus masters");
    assert (NWORDS <= BUF_WORDS) else $error("Ethernet buffer too small for one packet");
  end

endmodule
