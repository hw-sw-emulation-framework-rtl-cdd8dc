// tb_dtm_fsm: random sensor flag sequences against a reference model of the
// two-threshold policy: to SLOW when any sensor is hot, back to FAST only
// when all are cool, nothing while disabled. Checks the switch pulse too.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_dtm_fsm;
  localparam int NS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nsw = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic en, slow, sw;
  logic [NS-1:0] hot, cool;
  bit ref_slow, prev_slow;

  dtm_fsm #(.NS(NS)) dut (.clk, .rst_n, .enable_i(en), .hot_i(hot), .cool_i(cool), .slow_o(slow), .switch_o(sw));

  initial begin
    en = 1; hot = '0; cool = '1; ref_slow = 0; prev_slow = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      logic [NS-1:0] h, c;
      h = ($urandom_range(7) == 0) ? NS'($urandom) : '0;
      c = ($urandom_range(3) == 0) ? '1 : NS'($urandom) & ~h;
      if (k % 500 == 499) en = !en;
      hot = h; cool = c;
      @(posedge clk); #1;
      prev_slow = ref_slow;
      if (!ref_slow && en && (|h)) ref_slow = 1;
      else if (ref_slow && (!en || (&c))) ref_slow = 0;
      chk(slow == ref_slow, $sformatf("step %0d: slow %0d expected %0d", k, slow, ref_slow));
      chk(sw == (ref_slow != prev_slow), "switch pulse");
      if (sw) nsw++;
    end
    chk(nsw > 20, "too few switches");
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
