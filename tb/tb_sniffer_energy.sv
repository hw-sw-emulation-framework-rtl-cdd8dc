// tb_sniffer_energy: random subsystem events and random emulated-time
// enables over several periods of random length, with a statistics bus that
// grants at random. The testbench counts, per period, how many active
// cycles, I-cache and D-cache accesses, non-cacheable accesses, cache misses
// and emulated cycles occurred, multiplies the counts by the per-event and
// per-cycle energies, and checks each of the four written words (core,
// I-cache, D-cache, memory) against the scaled sum, at its address. It also
// checks that done drops after a sample and rises again after the write-out.
//
// Origin: the energy figures are the design's defaults (maximum powers at
// 500 MHz with a 10% leakage share); the stimulus, the output scaling used
// here (SHIFT=4) and the check list are this testbench's own. Timing: 10 ns
// clock; a watchdog counts a failure and ends the run if it does not finish
// in time.
module tb_sniffer_energy;
  import mpsoc_pkg::*;
  localparam int BASE = 42, SHIFT = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [NEV_SUB-1:0] ev;
  logic emu_en, sample, gnt, done;
  stats_req_t sreq;
  logic [31:0] buf_mem [64];
  longint n_act, n_emu, n_ic, n_dc, n_priv, n_miss;
  longint e_exp [4];

  sniffer_energy #(.BASE(BASE), .SHIFT(SHIFT)) dut (
    .clk, .rst_n, .ev_i(ev), .emu_en_i(emu_en), .sample_i(sample),
    .stats_req_o(sreq), .stats_gnt_i(gnt), .done_o(done));

  always @(posedge clk) begin
    gnt <= ($urandom_range(2) == 0);
    if (sreq.req && gnt) begin
      chk(sreq.we, "sniffer must only write");
      buf_mem[sreq.addr[5:0]] <= sreq.wdata;
    end
  end

  initial begin
    ev = '0; emu_en = 0; sample = 0; gnt = 0;
    for (int i = 0; i < 64; i++) buf_mem[i] = '0;
    n_act = 0; n_emu = 0; n_ic = 0; n_dc = 0; n_priv = 0; n_miss = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < 8; p++) begin
      int len;
      len = 50 + int'($urandom_range(400));
      // the last period is long enough to need more than 32 bits of pJ
      if (p == 7) len = 3_000_000;
      for (int c = 0; c < len; c++) begin
        ev <= NEV_SUB'($urandom);
        emu_en <= ($urandom_range(3) != 0);
        sample <= (c == len - 1);
        @(posedge clk);
        if (ev[EV_ACTIVE]) n_act++;
        if (emu_en) n_emu++;
        if (ev[EV_IC_HIT] || ev[EV_IC_MISS]) n_ic++;
        if (ev[EV_DC_HIT] || ev[EV_DC_MISS]) n_dc++;
        if (ev[EV_PRIV]) n_priv++;
        n_miss += longint'(ev[EV_IC_MISS]) + longint'(ev[EV_DC_MISS]);
      end
      e_exp[0] = n_act * 2700 + n_emu * 300;
      e_exp[1] = n_ic * 1278 + n_emu * 142;
      e_exp[2] = n_dc * 1278 + n_emu * 142;
      e_exp[3] = n_priv * 495 + n_miss * 8 * 495 + n_emu * 55;
      n_act = 0; n_emu = 0; n_ic = 0; n_dc = 0; n_priv = 0; n_miss = 0;
      ev <= '0; emu_en <= 0; sample <= 0;
      @(posedge clk);
      chk(!done, "done still high after sample");
      while (!done) @(posedge clk);
      @(posedge clk);
      for (int i = 0; i < 4; i++)
        chk(buf_mem[BASE + i] == 32'(e_exp[i] >> SHIFT),
            $sformatf("period %0d cell %0d: %0d expected %0d", p, i, buf_mem[BASE + i], e_exp[i] >> SHIFT));
      chk(p < 7 || e_exp[0] > 64'h1_0000_0000, "long period exceeds 32 bits of pJ");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
