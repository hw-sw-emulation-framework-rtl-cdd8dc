// tb_sniffer_toggle: random line activity; the written count must equal the
// reference number of bit transitions in the sampled period.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_sniffer_toggle;
  import mpsoc_pkg::*;
  localparam int W = 40, BASE = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [W-1:0] lines, prev;
  logic sample, gnt, done;
  stats_req_t sreq;
  logic [31:0] got;
  int acc, expv;

  sniffer_toggle #(.W(W), .BASE(BASE)) dut (
    .clk, .rst_n, .lines_i(lines), .sample_i(sample), .stats_req_o(sreq), .stats_gnt_i(gnt), .done_o(done));

  always @(posedge clk) begin
    gnt <= ($urandom_range(1) == 0);
    if (sreq.req && gnt) begin
      chk(sreq.addr == STATS_AW'(BASE), "wrong address");
      got <= sreq.wdata;
    end
  end

  initial begin
    lines = '0; prev = '0; sample = 0; gnt = 0; acc = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int p = 0; p < 10; p++) begin
      int len;
      len = 20 + int'($urandom_range(100));
      for (int c = 0; c < len; c++) begin
        logic [W-1:0] nl;
        nl = (p % 2) ? {$urandom, $urandom} : (lines ^ (W'(1) << $urandom_range(W - 1)));
        lines <= nl;
        sample <= (c == len - 1);
        @(posedge clk);
        acc += $countones(lines ^ prev);
        prev = lines;
      end
      expv = acc; acc = 0;
      sample <= 0;
      @(posedge clk);
      acc += $countones(lines ^ prev); prev = lines;
      while (!done) begin @(posedge clk); acc += $countones(lines ^ prev); prev = lines; end
      @(posedge clk); acc += $countones(lines ^ prev); prev = lines;
      chk(got == 32'(expv), $sformatf("period %0d: %0d transitions, expected %0d", p, got, expv));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
