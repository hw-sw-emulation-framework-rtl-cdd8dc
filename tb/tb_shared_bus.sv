// tb_shared_bus: four masters issue random reads and writes to one slave
// through the bus, once with round-robin and once with fixed-priority
// arbitration. Checks data and routing, the one-hot grant, the round-robin
// order and fixed-priority order under contention, and the one-cycle
// arbitration latency.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_shared_bus;
  import mpsoc_pkg::*;
  localparam int NM = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  mem_req_t [NM-1:0] rq_rr, rq_fp;
  mem_rsp_t [NM-1:0] rs_rr, rs_fp;
  mem_req_t s_rr, s_fp;
  mem_rsp_t a_rr, a_fp;
  logic [NM-1:0] g_rr, g_fp;
  logic [95:0] l_rr, l_fp;
  int n_rr, n_fp;

  shared_bus #(.NM(NM), .ROUND_ROBIN(1'b1), .ARB_LAT(1)) dut_rr (
    .clk, .rst_n, .m_req_i(rq_rr), .m_rsp_o(rs_rr), .s_req_o(s_rr), .s_rsp_i(a_rr),
    .grant_o(g_rr), .bus_lines_o(l_rr));
  shared_bus #(.NM(NM), .ROUND_ROBIN(1'b0), .ARB_LAT(1)) dut_fp (
    .clk, .rst_n, .m_req_i(rq_fp), .m_rsp_o(rs_fp), .s_req_o(s_fp), .s_rsp_i(a_fp),
    .grant_o(g_fp), .bus_lines_o(l_fp));
  tb_mem_slave #(.DMIN(1), .DMAX(3)) m_rr (.clk, .req_i(s_rr), .rsp_o(a_rr), .n_acc(n_rr));
  tb_mem_slave #(.DMIN(1), .DMAX(3)) m_fp (.clk, .req_i(s_fp), .rsp_o(a_fp), .n_acc(n_fp));

  // Masters: each keeps requesting (saturated bus); the order of service is
  // recorded.
  int order_rr[$], order_fp[$];
  logic [NM-1:0] act;   // masters allowed to request

  always @(posedge clk) begin
    for (int i = 0; i < NM; i++) begin
      if (!rst_n) begin
        rq_rr[i] <= '0; rq_fp[i] <= '0;
      end else begin
        if (rs_rr[i].ack) begin
          chk(rs_rr[i].rdata == ({~rq_rr[i].addr[15:0], rq_rr[i].addr[15:0]}), "rr read data");
          order_rr.push_back(i);
          rq_rr[i] <= '0;
        end else if (!rq_rr[i].req && act[i])
          rq_rr[i] <= '{req: 1'b1, we: 1'b0, addr: {8'h20, 6'(i), 16'($urandom), 2'b00}, wdata: '0};
        if (rs_fp[i].ack) begin
          chk(rs_fp[i].rdata == ({~rq_fp[i].addr[15:0], rq_fp[i].addr[15:0]}), "fp read data");
          order_fp.push_back(i);
          rq_fp[i] <= '0;
        end else if (!rq_fp[i].req && act[i])
          rq_fp[i] <= '{req: 1'b1, we: 1'b0, addr: {8'h20, 6'(i), 16'($urandom), 2'b00}, wdata: '0};
      end
    end
    if (rst_n) begin
      chk($onehot0(g_rr) && $onehot0(g_fp), "grant not one-hot");
      // slave only ever sees the owner's address
      if (s_rr.req) chk(g_rr[s_rr.addr[23:18]], "rr slave request not from granted master");
    end
  end

  // Arbitration latency: from a request on an idle bus to the slave request.
  task automatic lat_test();
    int n = 0;
    act = '0;
    repeat (20) @(posedge clk);
    act = 4'b0100;
    @(posedge clk);                 // request registered at this edge
    act = '0;
    while (!s_rr.req) begin @(posedge clk); n++; end
    chk(n == 2, $sformatf("request to slave after %0d cycles (1 to see it + 1 arbitration)", n));
  endtask

  initial begin
    act = '1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (400) @(posedge clk);
    act = '0;
    repeat (30) @(posedge clk);
    // round robin: in steady saturation each window of 4 serves all masters
    for (int k = 4; k + 4 <= order_rr.size(); k += 4) begin
      logic [NM-1:0] seen = '0;
      for (int j = 0; j < 4; j++) seen[order_rr[k + j]] = 1'b1;
      chk(seen == '1, $sformatf("round robin window %0d not fair", k));
    end
    // fixed priority under saturation: master 3 never served after start-up
    begin
      int n3 = 0;
      for (int k = 8; k < order_fp.size() - 3; k++) if (order_fp[k] == 3) n3++;
      if (n3 != 0) foreach (order_fp[k]) $write("%0d", order_fp[k]);
      chk(n3 == 0, "fixed priority served the lowest-priority master under saturation");
      chk(order_fp.size() > 50 && order_rr.size() > 50, "too few transfers");
    end
    lat_test();
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
