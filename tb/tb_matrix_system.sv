// tb_matrix_system: the platform with NSUB subsystems, NSUB behavioural
// cores running the matrix kernel, a behavioural SRAM and a host that
// collects the statistics packets; used by tb_workload_matrix to run the
// matrix workload at several core counts. When every core is done it waits
// for the next packet and checks each core's product matrices in SRAM and
// each core's access count summed over all packets against the core's own
// count. checks/failures include those of the core models; finished rises
// when the checks are complete.
//
// Origin: the matrix workload on 1, 4 and 8 cores is the framework's
// evaluation workload; the kernel size, the sampling period used here and
// the check list are this testbench's own. Runs on the clock it is given.
module tb_matrix_system
  import mpsoc_pkg::*;
#(
  parameter int NSUB = 4,
  parameter int N = 4,
  parameter int ITER = 2,
  parameter int SC = 20000
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int AW = 18, NWORDS = 16 * NSUB + 64;

  core_req_t [NSUB-1:0] creq;
  core_rsp_t [NSUB-1:0] crsp;
  logic [NSUB-1:0] ce, idle, cdone;
  int cchk [NSUB], cfail [NSUB], cacc [NSUB], cspin [NSUB];
  logic [AW-1:0] sa;
  logic [31:0] sdo, sdi;
  logic ce_n, we_n, oe_n;
  logic [7:0] txd;
  logic txv, txl, hgnt, hrv, slow, dsw;
  logic [31:0] hrd, fs, fr, sc;
  logic [7:0][15:0] temp;
  logic [15:0] rx_drop;

  mpsoc_emu_top #(.NSUB(NSUB), .SAMPLE_CYCLES(SC)) dut (
    .clk, .rst_n, .cpu_req_i(creq), .cpu_rsp_o(crsp), .cpu_ce_o(ce), .cpu_idle_i(idle),
    .sram_addr_o(sa), .sram_dout_o(sdo), .sram_din_i(sdi), .sram_ce_n_o(ce_n), .sram_we_n_o(we_n),
    .sram_oe_n_o(oe_n), .eth_tx_data_o(txd), .eth_tx_valid_o(txv), .eth_tx_last_o(txl),
    .eth_tx_ready_i(1'b1), .eth_rx_data_i(8'h00), .eth_rx_valid_i(1'b0), .eth_rx_last_i(1'b0),
    .host_req_i('0), .host_gnt_o(hgnt), .host_rvalid_o(hrv), .host_rdata_o(hrd),
    .dfs_enable_i(1'b1), .slow_o(slow), .temp_o(temp), .frames_sent_o(fs), .frames_rcvd_o(fr),
    .stall_cycles_o(sc), .dfs_switch_o(dsw), .rx_drop_o(rx_drop));

  for (genvar i = 0; i < NSUB; i++) begin : g_core
    tb_core_model #(.ID(i), .N(N), .ITER(ITER)) core (
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

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("%0d cores FAIL: %s", NSUB, msg); end
  endtask

  byte q[$];
  int npk = 0;
  longint acc_sum [NSUB];
  always @(posedge clk) begin
    if (rst_n && txv) begin
      q.push_back(txd);
      if (txl) begin
        logic [31:0] w [NWORDS];
        chk(q.size() == 18 + 4 * NWORDS, $sformatf("packet length %0d", q.size()));
        for (int j = 0; j < NWORDS; j++) w[j] = {q[18 + 4*j], q[19 + 4*j], q[20 + 4*j], q[21 + 4*j]};
        for (int i = 0; i < NSUB; i++)
          acc_sum[i] += w[16*i + EV_PRIV] + w[16*i + EV_IC_HIT] + w[16*i + EV_IC_MISS]
                      + w[16*i + EV_DC_HIT] + w[16*i + EV_DC_MISS] + w[16*i + EV_SHARED];
        q.delete();
        npk++;
      end
    end
  end

  initial begin
    int target;
    finished = 0; checks = 0; failures = 0;
    for (int i = 0; i < NSUB; i++) acc_sum[i] = 0;
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    wait (&cdone);
    target = npk + 1;
    wait (npk == target);
    for (int i = 0; i < NSUB; i++) begin
      chk(acc_sum[i] == longint'(cacc[i]), $sformatf("core %0d: %0d accesses in packets, %0d made", i, acc_sum[i], cacc[i]));
      checks += cchk[i];
      failures += cfail[i];
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
        logic [31:0] acc;
        acc = 0;
        for (int k = 0; k < N; k++) acc += init_word(i * 256 + r * N + k) * 32'(i * 1000 + k * 10 + c + 1);
        chk(sram[i * 256 + 128 + r * N + c] == acc, $sformatf("core %0d C[%0d][%0d] wrong", i, r, c));
      end
    end
    $display("matrix on %0d cores: %0d packets", NSUB, npk);
    finished = 1;
  end
endmodule
