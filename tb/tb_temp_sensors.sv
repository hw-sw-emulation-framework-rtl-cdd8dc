// tb_temp_sensors: writes temperatures and thresholds, reads them back, and
// checks the hot and cool flags of every sensor against the thresholds,
// including the 350 K / 340 K reset thresholds.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_temp_sensors;
  import mpsoc_pkg::*;
  localparam int NS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic en, we, upd;
  logic [STATS_AW-2:0] addr;
  logic [31:0] wd, rd;
  logic [NS-1:0][15:0] temp;
  logic [NS-1:0] hot, cool;
  logic [15:0] ref_t [NS];
  logic [15:0] hi, lo;

  temp_sensors #(.NS(NS)) dut (.clk, .rst_n, .en_i(en), .we_i(we), .addr_i(addr), .wdata_i(wd),
    .rdata_o(rd), .temp_o(temp), .hot_o(hot), .cool_o(cool), .upd_o(upd));

  task automatic wr(input int a, input logic [15:0] v);
    en = 1; we = 1; addr = 11'(a); wd = {16'hFFFF, v};
    @(posedge clk); #1;
    chk(upd == (a < NS), "update pulse");
    en = 0; we = 0;
  endtask

  task automatic rd_chk(input int a, input logic [15:0] v);
    en = 1; we = 0; addr = 11'(a);
    @(posedge clk); #1;
    en = 0;
    chk(rd == {16'd0, v}, $sformatf("read %0d: %h expected %h", a, rd, v));
  endtask

  task automatic flags();
    for (int i = 0; i < NS; i++) begin
      chk(hot[i] == (ref_t[i] > hi), $sformatf("hot flag %0d", i));
      chk(cool[i] == (ref_t[i] < lo), $sformatf("cool flag %0d", i));
      chk(temp[i] == ref_t[i], "temperature output");
    end
  endtask

  initial begin
    en = 0; we = 0; addr = '0; wd = '0;
    hi = 16'(350 * 16); lo = 16'(340 * 16);
    for (int i = 0; i < NS; i++) ref_t[i] = 16'(300 * 16);
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    flags();
    rd_chk(NS, hi); rd_chk(NS + 1, lo);
    for (int k = 0; k < 300; k++) begin
      int s;
      logic [15:0] v;
      s = int'($urandom_range(NS - 1));
      v = 16'(16 * (330 + $urandom_range(30)) + $urandom_range(15));
      if (k == 150) begin hi = 16'(345 * 16); lo = 16'(335 * 16); wr(NS, hi); wr(NS + 1, lo); end
      wr(s, v); ref_t[s] = v;
      flags();
      rd_chk(s, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
