// tb_sniffer_event: sparse random events over several periods. The log
// records (timestamp and event mask) written to the buffer window and the
// header (logged / dropped counts) are checked against a reference list,
// including periods with more events than the window holds.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_sniffer_event;
  import mpsoc_pkg::*;
  localparam int NEV = 4, BASE = 100, REGION = 16;

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
  logic [31:0] buf_mem [256];
  logic [31:0] exp_rec [$];
  int tsr, nover = 0;

  sniffer_event #(.NEV(NEV), .BASE(BASE), .REGION(REGION), .FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .ev_i(ev), .sample_i(sample), .stats_req_o(sreq), .stats_gnt_i(gnt), .done_o(done));

  always @(posedge clk) begin
    gnt <= ($urandom_range(1) == 0);
    if (sreq.req && gnt) buf_mem[sreq.addr[7:0]] <= sreq.wdata;
  end

  initial begin
    ev = '0; sample = 0; gnt = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    tsr = 0;
    for (int p = 0; p < 12; p++) begin
      int len;
      len = 40 + int'($urandom_range(150));
      exp_rec.delete();
      for (int c = 0; c < len; c++) begin
        logic [NEV-1:0] e;
        e = ($urandom_range(9) == 0) ? NEV'($urandom_range(15, 1)) : '0;
        ev <= e;
        sample <= (c == len - 1);
        @(posedge clk);
        if (e != 0) exp_rec.push_back({24'(tsr), 8'(e)});
        tsr++;
      end
      ev <= '0; sample <= 0;
      tsr = 1;
      @(posedge clk);
      while (!done) begin @(posedge clk); tsr++; end
      @(posedge clk); tsr++;
      begin
        int nl, nd;
        nl = (exp_rec.size() < REGION - 1) ? exp_rec.size() : REGION - 1;
        nd = exp_rec.size() - nl;
        if (nd > 0) nover++;
        chk(buf_mem[BASE] == {16'(nd), 16'(nl)}, $sformatf("period %0d header %h expected logged %0d dropped %0d", p, buf_mem[BASE], nl, nd));
        for (int k = 0; k < nl; k++)
          chk(buf_mem[BASE + 1 + k] == exp_rec[k], $sformatf("period %0d record %0d: %h expected %h", p, k, buf_mem[BASE + 1 + k], exp_rec[k]));
      end
    end
    chk(nover > 0, "window overflow never exercised");
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
