// tb_workload_dither: the dithering workload on the platform at its default
// configuration (four subsystems, 8 KB caches, 32 KB private memories, 1 MB
// shared SRAM on the shared bus, 5,000,000-cycle sampling period). Four
// behavioural cores each dither their quarter (32 rows) of two 128x128 grey
// images held in the shared SRAM, with Floyd-Steinberg error diffusion.
// When all are done the testbench waits for the next statistics packet and
// checks:
//   * every dithered pixel against a reference computed here directly from
//     the initial images, with the same integer rounding;
//   * that each core's accesses, summed over all packets, equal the
//     accesses it made, and that its shared-memory accesses equal the four
//     per pixel (two per image pixel, read and write) plus none else;
//   * the latency and read-back checks of the core models.
//
// Origin: the application (Floyd dithering of two 128x128 grey images split
// into 4 segments in shared memory, 4 cores on a bus) is the framework's
// evaluation workload; the pixel values (a fixed arithmetic pattern), the
// data layout and the check list are this testbench's own. Timing: 10 ns
// clock; a watchdog counts a failure and ends the run if it does not finish
// in time.
module tb_workload_dither;
  import mpsoc_pkg::*;
  localparam int NSUB = 4, W = 128, H = 128, AW = 18, NWORDS = 16 * NSUB + 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  core_req_t [NSUB-1:0] creq;
  core_rsp_t [NSUB-1:0] crsp;
  logic [NSUB-1:0] ce, cdone;
  int cchk [NSUB], cfail [NSUB], cacc [NSUB];
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
    .clk, .rst_n, .cpu_req_i(creq), .cpu_rsp_o(crsp), .cpu_ce_o(ce), .cpu_idle_i('0),
    .sram_addr_o(sa), .sram_dout_o(sdo), .sram_din_i(sdi), .sram_ce_n_o(ce_n), .sram_we_n_o(we_n),
    .sram_oe_n_o(oe_n), .eth_tx_data_o(txd), .eth_tx_valid_o(txv), .eth_tx_last_o(txl),
    .eth_tx_ready_i(1'b1), .eth_rx_data_i(8'h00), .eth_rx_valid_i(1'b0), .eth_rx_last_i(1'b0),
    .host_req_i(hreq), .host_gnt_o(hgnt), .host_rvalid_o(hrv), .host_rdata_o(hrd),
    .dfs_enable_i(1'b1), .slow_o(slow), .temp_o(temp), .frames_sent_o(fs), .frames_rcvd_o(fr),
    .stall_cycles_o(sc), .dfs_switch_o(dsw), .rx_drop_o(rx_drop));

  for (genvar i = 0; i < NSUB; i++) begin : g_core
    tb_dither_core #(.ID(i), .NCORE(NSUB), .W(W), .H(H)) core (
      .clk, .rst_n, .ce(ce[i]), .req(creq[i]), .rsp(crsp[i]), .done(cdone[i]),
      .checks(cchk[i]), .fails(cfail[i]), .n_acc(cacc[i]));
  end

  // shared SRAM; image k at word 0x4000 * k, pixel (r, c) at r * W + c
  function automatic int pix0(int k, int r, int c);
    return ((r * 7 + c * 13 + k * 91) ^ (r * c)) & 255;
  endfunction
  logic [31:0] sram [1 << AW];
  initial begin
    for (int i = 0; i < (1 << AW); i++) sram[i] = '0;
    for (int k = 0; k < 2; k++)
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) sram[k * 'h4000 + r * W + c] = 32'(pix0(k, r, c));
  end
  assign sdi = (!ce_n && !oe_n) ? sram[sa] : 32'h0;
  always @(posedge clk) if (!ce_n && !we_n) sram[sa] <= sdo;

  // host side: count accesses reported in every packet
  byte q[$];
  int npk = 0;
  longint cyc = 0, done_cyc = 0;
  longint acc_sum [NSUB], sh_sum [NSUB];
  always @(posedge clk) begin
    if (rst_n) cyc++;
    if (rst_n && txv) begin
      q.push_back(txd);
      if (txl) begin
        logic [31:0] w [NWORDS];
        chk(q.size() == 18 + 4 * NWORDS, $sformatf("packet length %0d", q.size()));
        for (int j = 0; j < NWORDS; j++) w[j] = {q[18 + 4*j], q[19 + 4*j], q[20 + 4*j], q[21 + 4*j]};
        for (int i = 0; i < NSUB; i++) begin
          acc_sum[i] += w[16*i + EV_PRIV] + w[16*i + EV_IC_HIT] + w[16*i + EV_IC_MISS]
                      + w[16*i + EV_DC_HIT] + w[16*i + EV_DC_MISS] + w[16*i + EV_SHARED];
          sh_sum[i] += w[16*i + EV_SHARED];
        end
        q.delete();
        npk++;
      end
    end
  end

  // reference Floyd-Steinberg on one segment, same rounding as the cores
  int img [H][W];
  task automatic dither_ref(input int k);
    int er [2][W + 2];
    int v, o, e, carry;
    for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = pix0(k, r, c);
    for (int s = 0; s < NSUB; s++) begin
      for (int c = 0; c < W + 2; c++) er[(s * H / NSUB) % 2][c] = 0;
      for (int r = s * H / NSUB; r < (s + 1) * H / NSUB; r++) begin
        for (int c = 0; c < W + 2; c++) er[(r + 1) % 2][c] = 0;
        carry = 0;
        for (int c = 0; c < W; c++) begin
          v = img[r][c] + er[r % 2][c + 1] + carry;
          o = (v >= 128) ? 255 : 0;
          e = v - o;
          img[r][c] = o;
          carry = (e * 7) >>> 4;
          er[(r + 1) % 2][c]     += (e * 3) >>> 4;
          er[(r + 1) % 2][c + 1] += (e * 5) >>> 4;
          er[(r + 1) % 2][c + 2] += e >>> 4;
        end
      end
    end
  endtask

  initial begin
    int target, nbad, nwhite;
    hreq = '0;
    for (int i = 0; i < NSUB; i++) begin acc_sum[i] = 0; sh_sum[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (&cdone);
    done_cyc = cyc;
    target = npk + 1;
    wait (npk == target);
    nwhite = 0;
    for (int k = 0; k < 2; k++) begin
      dither_ref(k);
      nbad = 0;
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        checks++;
        if (sram[k * 'h4000 + r * W + c] != 32'(img[r][c])) begin
          failures++;
          nbad++;
          if (nbad < 5) $display("FAIL: image %0d pixel (%0d,%0d) = %0d, expected %0d",
                                 k, r, c, sram[k * 'h4000 + r * W + c], img[r][c]);
        end
        if (img[r][c] == 255) nwhite++;
      end
    end
    chk(nwhite > 0 && nwhite < 2 * H * W, "dithered images are not all one colour");
    for (int i = 0; i < NSUB; i++) begin
      checks += cchk[i];
      failures += cfail[i];
      chk(acc_sum[i] == longint'(cacc[i]), $sformatf("core %0d: %0d accesses in packets, %0d made", i, acc_sum[i], cacc[i]));
      chk(sh_sum[i] == longint'(2 * 2 * W * (H / NSUB)), $sformatf("core %0d: %0d shared accesses", i, sh_sum[i]));
    end
    $display("dithering done after %0d cycles, %0d packets, %0d white pixels", done_cyc, npk, nwhite);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
