// tb_mpsoc_full: the platform at its default configuration (four
// subsystems, 8 KB caches, 32 KB private memories, 1 MB shared SRAM, a
// sampling period of 5,000,000 cycles, i.e. 10 ms of a 500 MHz target)
// through one complete statistics period: the four behavioural cores run
// the matrix kernel, the period closes, the sniffers fill the buffer and the
// dispatcher sends the packet. The packet's per-core counters must add up to
// the accesses the cores made, and the product matrices must be in SRAM.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_mpsoc_full;
  import mpsoc_pkg::*;
  localparam int NSUB = 4, N = 4, AW = 18, NWORDS = 16 * NSUB + 64;

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
  logic [7:0] txd;
  logic txv, txl;
  stats_req_t hreq;
  logic hgnt, hrv, slow, dsw;
  logic [31:0] hrd, fs, fr, sc;
  logic [7:0][15:0] temp;
  logic [15:0] rx_drop;

  mpsoc_emu_top dut (
    .clk, .rst_n, .cpu_req_i(creq), .cpu_rsp_o(crsp), .cpu_ce_o(ce), .cpu_idle_i(idle),
    .sram_addr_o(sa), .sram_dout_o(sdo), .sram_din_i(sdi), .sram_ce_n_o(ce_n), .sram_we_n_o(we_n),
    .sram_oe_n_o(oe_n), .eth_tx_data_o(txd), .eth_tx_valid_o(txv), .eth_tx_last_o(txl),
    .eth_tx_ready_i(1'b1), .eth_rx_data_i(8'h00), .eth_rx_valid_i(1'b0), .eth_rx_last_i(1'b0),
    .host_req_i(hreq), .host_gnt_o(hgnt), .host_rvalid_o(hrv), .host_rdata_o(hrd),
    .dfs_enable_i(1'b1), .slow_o(slow), .temp_o(temp), .frames_sent_o(fs), .frames_rcvd_o(fr),
    .stall_cycles_o(sc), .dfs_switch_o(dsw), .rx_drop_o(rx_drop));

  for (genvar i = 0; i < NSUB; i++) begin : g_core
    tb_core_model #(.ID(i), .N(N), .ITER(2)) core (
      .clk, .rst_n, .ce(ce[i]), .req(creq[i]), .rsp(crsp[i]), .idle(idle[i]), .done(cdone[i]),
      .checks(cchk[i]), .fails(cfail[i]), .n_acc(cacc[i]), .n_spin(cspin[i]));
  end

  logic [31:0] sram [1 << AW];
  function automatic logic [31:0] init_word(int wa);
    logic [15:0] ba = 16'(wa * 4);
    return {~ba, ba};
  endfunction
  initial for (int i = 0; i < (1 << AW); i++) sram[i] = init_word(i);
  assign sdi = (!ce_n && !oe_n) ? sram[sa] : 32'h0;
  always @(posedge clk) if (!ce_n && !we_n) sram[sa] <= sdo;

  byte q[$];
  int npk = 0;
  longint cyc = 0, pk_cyc = 0;
  always @(posedge clk) begin
    if (rst_n) cyc++;
    if (rst_n && txv) begin
      q.push_back(txd);
      if (txl) begin npk++; pk_cyc = cyc; end
    end
  end

  initial begin
    hreq = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (npk == 1);
    chk(&cdone, "cores did not finish within the first period");
    chk(q.size() == 18 + 4 * NWORDS, $sformatf("packet length %0d", q.size()));
    chk(pk_cyc > 5_000_000 && pk_cyc < 5_000_000 + 4000, $sformatf("packet finished at cycle %0d", pk_cyc));
    for (int i = 0; i < NSUB; i++) begin
      longint s;
      logic [31:0] w [NEV_SUB + 4];
      longint e_core;
      for (int e = 0; e < NEV_SUB + 4; e++) begin
        int b;
        b = 18 + 4 * (16 * i + e);
        w[e] = {q[b], q[b + 1], q[b + 2], q[b + 3]};
      end
      s = w[EV_PRIV] + w[EV_IC_HIT] + w[EV_IC_MISS] + w[EV_DC_HIT] + w[EV_DC_MISS] + w[EV_SHARED];
      chk(s == longint'(cacc[i]), $sformatf("core %0d: %0d accesses counted, %0d made", i, s, cacc[i]));
      chk(w[EV_ACTIVE] + w[EV_STALLED] + w[EV_IDLE] > 0, "core cycles counted");
      // core energy of the period: 2700 pJ per active cycle plus 300 pJ of
      // leakage per emulated cycle, in 1024 pJ units
      e_core = (longint'(w[EV_ACTIVE]) * 2700 + 64'd5_000_000 * 300) >> 10;
      chk(longint'(w[NEV_SUB]) <= e_core + 1 && longint'(w[NEV_SUB]) + 1 >= e_core,
          $sformatf("core %0d energy %0d, expected %0d", i, w[NEV_SUB], e_core));
      chk(w[NEV_SUB + 1] > 0 && w[NEV_SUB + 2] > 0 && w[NEV_SUB + 3] > 0, "cache and memory energies");
      checks += cchk[i];
      failures += cfail[i];
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
        logic [31:0] acc;
        acc = 0;
        for (int k = 0; k < N; k++) acc += init_word(i * 256 + r * N + k) * 32'(i * 1000 + k * 10 + c + 1);
        chk(sram[i * 256 + 128 + r * N + c] == acc, $sformatf("core %0d C[%0d][%0d] wrong", i, r, c));
      end
    end
    $display("packet after %0d cycles", pk_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_200_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
