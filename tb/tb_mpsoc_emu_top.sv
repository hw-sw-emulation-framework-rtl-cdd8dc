// tb_mpsoc_emu_top: end-to-end run of the emulation platform with four
// behavioural cores running the matrix kernel, a behavioural board SRAM as
// shared memory, and a behavioural host on the Ethernet side that receives
// the statistics packets and answers with temperature packets.
//
// The host raises one sensor above the upper threshold after the second
// packet and drops all sensors below the lower threshold after the fourth,
// so the thermal policy switches the cores to the low frequency and back.
// The transmit side is slowed down for a while so that the link saturates
// and the emulation is stalled.
//
// Checks: the product matrices in SRAM; per-core access counts summed over
// all packets against the cores' own counts; packet headers and sequence
// numbers; cell energies against the counters of the same packet; sensor
// values read back through the statistics-side host port; the virtual clock
// rate while slow. Each mechanism (latency suppression, cache hits and
// misses, shared-bus contention, a semaphore refusing a lock (the cores
// write their results back holding one shared lock), event log, bus
// transitions, energy reports, Ethernet stall, frequency switch both ways,
// temperature download) is counted and must have happened.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_mpsoc_emu_top;
  import mpsoc_pkg::*;
  localparam int NSUB = 4, N = 4, NS = 8, SC = 4000, AW = 14;
  localparam int LP = 2, LH = 1, LM = 8, LS = 10;
  localparam int NWORDS = 16 * NSUB + 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  core_req_t [NSUB-1:0] creq;
  core_rsp_t [NSUB-1:0] crsp;
  logic [NSUB-1:0] ce, idle, cdone;
  int cchk [NSUB], cfail [NSUB], cacc [NSUB], cspin [NSUB];
  logic [AW-1:0] sa;
  logic [31:0] sdo, sdi;
  logic ce_n, we_n, oe_n;
  logic [7:0] txd, rxd;
  logic txv, txl, txr, rxv, rxl;
  stats_req_t hreq;
  logic hgnt, hrv;
  logic [31:0] hrd, fs, fr, sc;
  logic dfs_en, slow, dsw;
  logic [NS-1:0][15:0] temp;
  logic [15:0] rx_drop;

  mpsoc_emu_top #(.NSUB(NSUB), .CACHE_BYTES(512), .LINE_BYTES(16), .PRIV_BYTES(4096), .CPRV_BYTES(65536),
    .LAT_PRIV(LP), .LAT_HIT(LH), .LAT_MISS(LM), .LAT_SHARED(LS), .SRAM_AW(AW), .SRAM_WAIT(2),
    .NS(NS), .SAMPLE_CYCLES(SC)) dut (
    .clk, .rst_n, .cpu_req_i(creq), .cpu_rsp_o(crsp), .cpu_ce_o(ce), .cpu_idle_i(idle),
    .sram_addr_o(sa), .sram_dout_o(sdo), .sram_din_i(sdi), .sram_ce_n_o(ce_n), .sram_we_n_o(we_n),
    .sram_oe_n_o(oe_n), .eth_tx_data_o(txd), .eth_tx_valid_o(txv), .eth_tx_last_o(txl),
    .eth_tx_ready_i(txr), .eth_rx_data_i(rxd), .eth_rx_valid_i(rxv), .eth_rx_last_i(rxl),
    .host_req_i(hreq), .host_gnt_o(hgnt), .host_rvalid_o(hrv), .host_rdata_o(hrd),
    .dfs_enable_i(dfs_en), .slow_o(slow), .temp_o(temp), .frames_sent_o(fs), .frames_rcvd_o(fr),
    .stall_cycles_o(sc), .dfs_switch_o(dsw), .rx_drop_o(rx_drop));

  for (genvar i = 0; i < NSUB; i++) begin : g_core
    tb_core_model #(.ID(i), .N(N), .ITER(1), .USE_SEM(1), .LAT_PRIV(LP), .LAT_HIT(LH), .LAT_MISS(LM), .LAT_SHARED(LS)) core (
      .clk, .rst_n, .ce(ce[i]), .req(creq[i]), .rsp(crsp[i]), .idle(idle[i]), .done(cdone[i]),
      .checks(cchk[i]), .fails(cfail[i]), .n_acc(cacc[i]), .n_spin(cspin[i]));
  end

  // board SRAM, initialised with {~byte_addr[15:0], byte_addr[15:0]}
  logic [31:0] sram [1 << AW];
  function automatic logic [31:0] init_word(int wa);
    logic [15:0] ba = 16'(wa * 4);
    return {~ba, ba};
  endfunction
  initial for (int i = 0; i < (1 << AW); i++) sram[i] = init_word(i);
  assign sdi = (!ce_n && !oe_n) ? sram[sa] : 32'h0;
  always @(posedge clk) if (!ce_n && !we_n) sram[sa] <= sdo;

  // mechanism counters
  int n_sup = 0, n_stall = 0, n_slow_edges = 0, n_slow_cyc = 0, n_sw = 0, n_contend = 0;
  always @(posedge clk) if (rst_n) begin
    if (|dut.suppress) n_sup++;
    if (dut.eth_stall) n_stall++;
    if (dsw) n_sw++;
    if ($countones({dut.sh_req[0].req, dut.sh_req[1].req, dut.sh_req[2].req, dut.sh_req[3].req}) > 1) n_contend++;
    if (slow && !dut.eth_stall) begin n_slow_cyc++; if (dut.dfs_tick) n_slow_edges++; end
  end

  // host: receive packets
  byte q[$];
  int npk = 0, slow_tx = 0;
  longint acc_sum [NSUB];
  longint ev_logged = 0, toggles = 0;
  longint ev_sum [NSUB][NEV_SUB];
  longint e_sum [4] = '{0, 0, 0, 0};
  always @(posedge clk) begin
    txr <= slow_tx ? ($urandom_range(31) == 0) : 1'b1;
    if (rst_n && txv && txr) begin
      q.push_back(txd);
      if (txl) begin
        logic [31:0] w [NWORDS];
        longint e_ref [4];
        chk(q.size() == 18 + 4 * NWORDS, $sformatf("packet length %0d", q.size()));
        chk({q[12], q[13]} == 16'h88B5, "EtherType");
        chk({q[14], q[15], q[16], q[17]} == 32'(npk), "sequence number");
        for (int j = 0; j < NWORDS; j++) w[j] = {q[18 + 4*j], q[19 + 4*j], q[20 + 4*j], q[21 + 4*j]};
        for (int i = 0; i < NSUB; i++) begin
          for (int e = 0; e < NEV_SUB; e++) ev_sum[i][e] += w[16 * i + e];
          acc_sum[i] += w[16*i + EV_PRIV] + w[16*i + EV_IC_HIT] + w[16*i + EV_IC_MISS]
                      + w[16*i + EV_DC_HIT] + w[16*i + EV_DC_MISS] + w[16*i + EV_SHARED];
          // cell energies against the counters of the same period (one
          // period = SC emulated cycles, 1024 pJ units, one unit of slack)
          e_ref[0] = (longint'(w[16*i + EV_ACTIVE]) * 2700 + SC * 300) >> 10;
          e_ref[1] = (longint'(w[16*i + EV_IC_HIT] + w[16*i + EV_IC_MISS]) * 1278 + SC * 142) >> 10;
          e_ref[2] = (longint'(w[16*i + EV_DC_HIT] + w[16*i + EV_DC_MISS]) * 1278 + SC * 142) >> 10;
          e_ref[3] = (longint'(w[16*i + EV_PRIV]) * 495
                      + longint'(w[16*i + EV_IC_MISS] + w[16*i + EV_DC_MISS]) * 4 * 495 + SC * 55) >> 10;
          for (int c = 0; c < 4; c++) begin
            chk(longint'(w[16*i + NEV_SUB + c]) <= e_ref[c] + 1 && longint'(w[16*i + NEV_SUB + c]) + 1 >= e_ref[c],
                $sformatf("packet %0d core %0d cell %0d energy %0d, expected %0d", npk, i, c, w[16*i + NEV_SUB + c], e_ref[c]));
            e_sum[c] += w[16*i + NEV_SUB + c];
          end
        end
        toggles += w[16 * NSUB];
        ev_logged += w[16 * NSUB + 16][15:0];
        q.delete();
        npk++;
      end
    end
  end

  // host: send temperature packets
  byte rxq[$];
  always @(posedge clk) begin
    if (rxq.size() > 0) begin
      rxv <= 1'b1; rxd <= rxq.pop_front(); rxl <= (rxq.size() == 0);
    end else begin
      rxv <= 1'b0; rxl <= 1'b0;
    end
  end
  task automatic send_temps(input int kelvin0, input int kelvin_rest);
    logic [15:0] t;
    for (int i = 5; i >= 0; i--) rxq.push_back(8'(48'h02_00_00_00_00_01 >> (8 * i)));
    for (int i = 5; i >= 0; i--) rxq.push_back(8'(48'h02_00_00_00_00_02 >> (8 * i)));
    rxq.push_back(8'h88); rxq.push_back(8'hB5);
    for (int s = 0; s < NS; s++) begin
      t = 16'(16 * ((s == 0) ? kelvin0 : kelvin_rest + s));
      rxq.push_back(t[15:8]); rxq.push_back(t[7:0]);
    end
  endtask

  task automatic host_read(input int a, output logic [31:0] d);
    hreq <= '{req: 1'b1, we: 1'b0, addr: STATS_AW'(a), wdata: '0};
    do @(posedge clk); while (!hgnt);
    hreq <= '0;
    do @(posedge clk); while (!hrv);
    d = hrd;
  endtask

  initial begin
    logic [31:0] d;
    hreq = '0; dfs_en = 1;
    for (int i = 0; i < NSUB; i++) begin acc_sum[i] = 0; for (int e = 0; e < NEV_SUB; e++) ev_sum[i][e] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (npk == 1); send_temps(320, 315);
    wait (npk == 2); send_temps(362, 318);            // sensor 0 hot: go slow
    slow_tx = 1;
    wait (npk == 3);
    slow_tx = 0;
    chk(slow, "not at low frequency after a hot sensor");
    host_read(2048, d);
    chk(d == 32'(362 * 16), $sformatf("sensor 0 read back %h", d));
    wait (npk == 4); send_temps(330, 320);            // all cool: back to full speed
    wait (npk == 5);
    chk(!slow, "still at low frequency after all sensors cooled");
    wait (&cdone);
    begin
      int target;
      target = npk + 2;
      wait (npk == target);
    end
    for (int i = 0; i < NSUB; i++) begin
      checks += cchk[i];
      failures += cfail[i];
      chk(acc_sum[i] == longint'(cacc[i]), $sformatf("core %0d: %0d accesses in packets, %0d made", i, acc_sum[i], cacc[i]));
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
        logic [31:0] acc, ca;
        acc = 0;
        for (int k = 0; k < N; k++) acc += init_word(i * 256 + r * N + k) * 32'(i * 1000 + k * 10 + c + 1);
        ca = 32'(i * 256 + 128 + r * N + c);
        chk(sram[ca[AW-1:0]] == acc, $sformatf("core %0d C[%0d][%0d] wrong", i, r, c));
      end
    end
    chk(n_sup > 0, "latency suppression never happened");
    chk(ev_sum[0][EV_SUPPRESS] > 0, "suppression not reported in the statistics");
    chk(ev_sum[0][EV_DC_MISS] > 0 && ev_sum[0][EV_DC_HIT] > 0 && ev_sum[0][EV_IC_HIT] > 0, "cache hits and misses");
    chk(n_contend > 0, "shared bus never contended");
    chk(cspin[0] + cspin[1] + cspin[2] + cspin[3] > 0, "semaphore never refused a lock");
    chk(ev_logged > 0, "event log empty");
    chk(toggles > 0, "no bus transitions counted");
    chk(e_sum[0] > 0 && e_sum[1] > 0 && e_sum[2] > 0 && e_sum[3] > 0, "cell energies reported");
    chk(n_stall > 0 && sc > 0, "Ethernet saturation never stalled the emulation");
    chk(n_sw >= 2, $sformatf("%0d frequency switches", n_sw));
    chk(n_slow_cyc > 0 && n_slow_edges * 5 <= n_slow_cyc + 5, "virtual clock not divided while slow");
    chk(fr == 3 && rx_drop == 0, "temperature packets");
    $display("packets %0d, suppressed cycles %0d, stall cycles %0d, switches %0d, contention cycles %0d, logged events %0d, toggles %0d, core energy %0d, refused locks %0d",
             npk, n_sup, n_stall, n_sw, n_contend, ev_logged, toggles, e_sum[0], cspin[0] + cspin[1] + cspin[2] + cspin[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog: %0d packets", npk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
