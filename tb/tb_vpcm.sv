// tb_vpcm: random suppression, stall and frequency requests; every virtual
// clock enable is checked against a reference model, and at low frequency
// the number of virtual edges per emulated cycle must be 1 in DFS_DIV.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_vpcm;
  localparam int NSUB = 3, DIV = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [NSUB-1:0] sup, en;
  logic stall, slow, emu, tick;
  int div, nslow_emu, nslow_edges;

  vpcm #(.NSUB(NSUB), .DFS_DIV(DIV)) dut (.clk, .rst_n, .suppress_i(sup), .eth_stall_i(stall),
    .slow_i(slow), .vclk_en_o(en), .emu_en_o(emu), .dfs_tick_o(tick));

  initial begin
    sup = '0; stall = 0; slow = 0; div = 0; nslow_emu = 0; nslow_edges = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      logic [NSUB-1:0] e;
      sup = ($urandom_range(3) == 0) ? NSUB'($urandom) : '0;
      stall = ($urandom_range(9) == 0);
      if (k % 700 == 0) slow = !slow;
      #1;
      e = '0;
      for (int i = 0; i < NSUB; i++) e[i] = !stall && (!slow || div == 0) && !sup[i];
      chk(en == e, $sformatf("cycle %0d: enables %b expected %b", k, en, e));
      chk(emu == !stall, "emulated time enable");
      if (slow && !stall) begin
        nslow_emu++;
        if (!sup[0] && tick) nslow_edges++;
        else if (tick) nslow_edges++;
      end
      @(posedge clk); #1;
      if (!stall) div = (div + 1) % DIV;
    end
    chk(nslow_edges * DIV >= nslow_emu - DIV * 4 && nslow_edges * DIV <= nslow_emu + DIV * 4,
        $sformatf("low frequency: %0d edges in %0d emulated cycles", nslow_edges, nslow_emu));
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
