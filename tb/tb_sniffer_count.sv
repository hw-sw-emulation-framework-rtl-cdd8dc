// tb_sniffer_count: random event streams, several sample pulses, a bus that
// grants at random. Each written word must equal the reference count of its
// event over the period, at the right address, and done must follow the
// write-out.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_sniffer_count;
  import mpsoc_pkg::*;
  localparam int NEV = 6, BASE = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [NEV-1:0] ev;
  logic sample, gnt, done;
  stats_req_t sreq;
  logic [31:0] buf_mem [64];
  int ref_cnt [NEV];
  int exp_cnt [NEV];

  sniffer_count #(.NEV(NEV), .BASE(BASE)) dut (
    .clk, .rst_n, .ev_i(ev), .sample_i(sample), .stats_req_o(sreq), .stats_gnt_i(gnt), .done_o(done));

  always @(posedge clk) begin
    gnt <= ($urandom_range(2) == 0);
    if (sreq.req && gnt) begin
      chk(sreq.we, "sniffer must only write");
      buf_mem[sreq.addr[5:0]] <= sreq.wdata;
    end
  end

  initial begin
    ev = '0; sample = 0; gnt = 0;
    for (int i = 0; i < NEV; i++) ref_cnt[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < 8; p++) begin
      int len;
      len = 50 + int'($urandom_range(200));
      for (int c = 0; c < len; c++) begin
        ev <= NEV'($urandom);
        sample <= (c == len - 1);
        @(posedge clk);
        for (int i = 0; i < NEV; i++) if (ev[i]) ref_cnt[i]++;
      end
      for (int i = 0; i < NEV; i++) begin exp_cnt[i] = ref_cnt[i]; ref_cnt[i] = 0; end
      ev <= '0; sample <= 0;
      @(posedge clk);
      chk(!done, "done still high after sample");
      while (!done) @(posedge clk);
      @(posedge clk);
      for (int i = 0; i < NEV; i++)
        chk(buf_mem[BASE + i] == 32'(exp_cnt[i]), $sformatf("period %0d event %0d: %0d expected %0d", p, i, buf_mem[BASE + i], exp_cnt[i]));
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
