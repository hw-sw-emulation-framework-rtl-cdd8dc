// tb_workload_matrix_tm: the pipelined matrix workload with the thermal
// feedback loop closed, on the platform at its default configuration (four
// subsystems, 8 KB caches, 32 KB private memories, 1 MB SRAM, 5,000,000-cycle
// sampling period, dual-threshold frequency policy enabled). Four cores form
// a pipeline of 4x4 matrix multiplications synchronised through the hardware
// semaphores. The testbench plays the host thermal model:
//   * after the first statistics packet it reports sensor 0 at 360 K (above
//     the 350 K threshold): the policy must switch to the low frequency;
//   * after the second packet it reports every sensor below 340 K: the
//     policy must switch back;
//   * after the third packet it stops the input stream and lets the
//     pipeline drain.
// It checks every final product against A_m * B0 * B1 * B2 * B3 computed
// here, that the pipeline finished fewer than half as many iterations in the
// slow period as in the fast one, that the core's active cycles and energy
// reported for the slow period are lower, that each packet arrives one
// sampling period after the previous one, and the latency and read-back
// checks of the core models. The frequency ratio is 5, but the throughput
// ratio is smaller: cycles in which a core's clock is suppressed while the
// shared bus and SRAM serve it cost the same physical time at either
// frequency, and the sampling period counts physical (emulated) cycles.
//
// Origin: the workload (a pipeline of matrix multiplications over shared
// memory kept in step by semaphores, run with a 500/100 MHz dual-threshold
// policy at 350/340 K) is the framework's thermal case study, there on a
// network-on-chip and for 100,000 iterations; the bus, the matrix size, the
// temperatures sent and the check list are this testbench's own. Timing:
// 10 ns clock; a watchdog counts a failure and ends the run if it does not
// finish in time.
module tb_workload_matrix_tm;
  import mpsoc_pkg::*;
  localparam int NSUB = 4, N = 4, NIN = 16, NS = 8, AW = 18, NWORDS = 16 * NSUB + 64;

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
  int cchk [NSUB], cfail [NSUB], citer [NSUB];
  logic stop;
  logic [AW-1:0] sa;
  logic [31:0] sdo, sdi;
  logic ce_n, we_n, oe_n;
  logic [7:0] txd, rxd;
  logic txv, txl, rxv, rxl;
  stats_req_t hreq;
  logic hgnt, hrv, slow, dsw;
  logic [31:0] hrd, fs, fr, sc;
  logic [NS-1:0][15:0] temp;
  logic [15:0] rx_drop;

  mpsoc_emu_top dut (
    .clk, .rst_n, .cpu_req_i(creq), .cpu_rsp_o(crsp), .cpu_ce_o(ce), .cpu_idle_i(idle),
    .sram_addr_o(sa), .sram_dout_o(sdo), .sram_din_i(sdi), .sram_ce_n_o(ce_n), .sram_we_n_o(we_n),
    .sram_oe_n_o(oe_n), .eth_tx_data_o(txd), .eth_tx_valid_o(txv), .eth_tx_last_o(txl),
    .eth_tx_ready_i(1'b1), .eth_rx_data_i(rxd), .eth_rx_valid_i(rxv), .eth_rx_last_i(rxl),
    .host_req_i(hreq), .host_gnt_o(hgnt), .host_rvalid_o(hrv), .host_rdata_o(hrd),
    .dfs_enable_i(1'b1), .slow_o(slow), .temp_o(temp), .frames_sent_o(fs), .frames_rcvd_o(fr),
    .stall_cycles_o(sc), .dfs_switch_o(dsw), .rx_drop_o(rx_drop));

  for (genvar i = 0; i < NSUB; i++) begin : g_core
    tb_pipe_core #(.ID(i), .NCORE(NSUB), .N(N), .NIN(NIN)) core (
      .clk, .rst_n, .ce(ce[i]), .stop, .req(creq[i]), .rsp(crsp[i]), .idle(idle[i]), .done(cdone[i]),
      .checks(cchk[i]), .fails(cfail[i]), .n_iter(citer[i]));
  end

  function automatic logic [31:0] a_val(int m, int r, int c); return 32'(m * 37 + r * 5 + c + 3); endfunction
  function automatic logic [31:0] b_val(int i, int r, int c); return 32'(i * 100 + r * 10 + c + 1); endfunction

  logic [31:0] sram [1 << AW];
  initial begin
    for (int i = 0; i < (1 << AW); i++) sram[i] = '0;
    for (int m = 0; m < NIN; m++) for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
      sram[m * N * N + r * N + c] = a_val(m, r, c);
  end
  assign sdi = (!ce_n && !oe_n) ? sram[sa] : 32'h0;
  always @(posedge clk) if (!ce_n && !we_n) sram[sa] <= sdo;

  // host: receive statistics packets
  byte q[$];
  int npk = 0;
  longint cyc = 0;
  longint pk_cyc [8];
  int pk_iter [8];
  longint pk_act0 [8], pk_e0 [8];
  always @(posedge clk) begin
    if (rst_n) cyc++;
    if (rst_n && txv) begin
      q.push_back(txd);
      if (txl) begin
        logic [31:0] w [NWORDS];
        chk(q.size() == 18 + 4 * NWORDS, $sformatf("packet length %0d", q.size()));
        for (int j = 0; j < NWORDS; j++) w[j] = {q[18 + 4*j], q[19 + 4*j], q[20 + 4*j], q[21 + 4*j]};
        if (npk < 8) begin
          pk_cyc[npk] = cyc;
          pk_iter[npk] = citer[NSUB - 1];
          pk_act0[npk] = w[EV_ACTIVE];
          pk_e0[npk] = w[NEV_SUB];
        end
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
      t = 16'(16 * ((s == 0) ? kelvin0 : kelvin_rest));
      rxq.push_back(t[15:8]); rxq.push_back(t[7:0]);
    end
  endtask

  initial begin
    int fast_it, slow_it, total;
    logic [31:0] m1 [N][N];
    logic [31:0] m2 [N][N];
    hreq = '0; stop = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (npk == 1);
    chk(!slow, "low frequency before any hot report");
    send_temps(360, 320);
    wait (npk == 2);
    chk(slow, "not at low frequency after sensor 0 reported 360 K");
    send_temps(335, 320);
    wait (npk == 3);
    chk(!slow, "still at low frequency after every sensor reported below 340 K");
    stop = 1;
    wait (&cdone);
    total = citer[NSUB - 1];
    chk(citer[0] == total && citer[1] == total && citer[2] == total, "stages finished different numbers of iterations");
    for (int m = 0; m < NIN && m < total; m++) begin
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) m1[r][c] = a_val(m, r, c);
      for (int i = 0; i < NSUB; i++) begin
        for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
          m2[r][c] = '0;
          for (int k = 0; k < N; k++) m2[r][c] += m1[r][k] * b_val(i, k, c);
        end
        m1 = m2;
      end
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
        chk(sram['h8000 + m * N * N + r * N + c] == m1[r][c], $sformatf("product %0d [%0d][%0d] wrong", m, r, c));
    end
    slow_it = pk_iter[1] - pk_iter[0];
    fast_it = pk_iter[2] - pk_iter[1];
    chk(total > NIN, "pipeline ran fewer iterations than input matrices");
    chk(slow_it > 0 && 2 * slow_it < fast_it, $sformatf("iterations: %0d slow, %0d fast", slow_it, fast_it));
    chk(pk_act0[1] * 2 < pk_act0[2], "core 0 active cycles not reduced at low frequency");
    chk(pk_e0[1] < pk_e0[2], "core 0 energy not reduced at low frequency");
    for (int p = 1; p < 3; p++)
      chk(pk_cyc[p] - pk_cyc[p - 1] > 4_990_000 && pk_cyc[p] - pk_cyc[p - 1] < 5_010_000,
          $sformatf("packet %0d after %0d cycles", p, pk_cyc[p] - pk_cyc[p - 1]));
    for (int i = 0; i < NSUB; i++) begin
      checks += cchk[i];
      failures += cfail[i];
    end
    $display("%0d iterations; per period: %0d fast, %0d slow, %0d fast; core 0 active %0d / %0d / %0d, energy %0d / %0d / %0d (1024 pJ)",
             total, pk_iter[0], slow_it, fast_it, pk_act0[0], pk_act0[1], pk_act0[2], pk_e0[0], pk_e0[1], pk_e0[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (16_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
