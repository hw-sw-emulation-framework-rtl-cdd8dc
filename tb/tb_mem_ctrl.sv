// tb_mem_ctrl: checks that every access takes exactly the configured number
// of virtual clock edges, whatever the physical delay of the memory behind,
// that slow memories are hidden by clock suppression, that cache misses
// switch to the miss latency, and that data is routed from the right port.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_mem_ctrl;
  import mpsoc_pkg::*;
  localparam int LP = 3, LH = 2, LM = 9, LS = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  core_req_t req;
  core_rsp_t rsp;
  logic      ce, ce_pat, suppress, busy;
  mem_req_t  priv_req, dc_req, ic_req, sh_req;
  mem_rsp_t  priv_rsp, dc_rsp, ic_rsp, sh_rsp;
  logic      dc_miss, ic_miss;
  logic      e0, e1, e2, e3;
  int        n0, n1, n2, n3;

  mem_ctrl #(.LAT_PRIV(LP), .LAT_HIT(LH), .LAT_MISS(LM), .LAT_SHARED(LS)) dut (
    .clk, .rst_n, .cpu_ce_i(ce), .cpu_req_i(req), .cpu_rsp_o(rsp), .suppress_o(suppress),
    .busy_o(busy), .priv_req_o(priv_req), .priv_rsp_i(priv_rsp), .dc_req_o(dc_req),
    .dc_rsp_i(dc_rsp), .dc_miss_i(dc_miss), .ic_req_o(ic_req), .ic_rsp_i(ic_rsp),
    .ic_miss_i(ic_miss), .sh_req_o(sh_req), .sh_rsp_i(sh_rsp),
    .ev_priv_o(e0), .ev_cached_o(e1), .ev_shared_o(e2), .ev_error_o(e3)
  );

  tb_mem_slave #(.DMIN(1), .DMAX(4))  m_priv (.clk, .req_i(priv_req), .rsp_o(priv_rsp), .n_acc(n0));
  tb_mem_slave #(.DMIN(1), .DMAX(14)) m_dc   (.clk, .req_i(dc_req),   .rsp_o(dc_rsp),   .n_acc(n1));
  tb_mem_slave #(.DMIN(1), .DMAX(14)) m_ic   (.clk, .req_i(ic_req),   .rsp_o(ic_rsp),   .n_acc(n2));
  tb_mem_slave #(.DMIN(4), .DMAX(20)) m_sh   (.clk, .req_i(sh_req),   .rsp_o(sh_rsp),   .n_acc(n3));

  // The virtual clock: a random enable pattern, stopped by suppression.
  assign ce = ce_pat && !suppress;

  // Miss model: addresses with bit 9 set miss in the cache; the cache raises
  // its miss pulse in the cycle after the request appears.
  logic dc_req_d, ic_req_d;
  always @(posedge clk) begin
    dc_req_d <= dc_req.req;
    ic_req_d <= ic_req.req;
    ce_pat   <= ($urandom_range(3) != 0);
  end
  assign dc_miss = dc_req.req && !dc_req_d && dc_req.addr[9];
  assign ic_miss = ic_req.req && !ic_req_d && ic_req.addr[9];

  int checks = 0, failures = 0;
  int vedges, nsup = 0, ndone = 0;
  int exp_lat;
  logic [31:0] exp_data;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [31:0] def_data(logic [31:0] a);
    return {~a[15:0], a[15:0]};
  endfunction

  function automatic core_req_t rand_req();
    core_req_t r;
    int k = int'($urandom_range(4));
    r.req   = 1'b1;
    r.we    = 1'b0;
    r.fetch = 1'b0;
    r.wdata = $urandom;
    unique case (k)
      0: r.addr = {4'h0, 16'h0, 10'($urandom), 2'b00};
      1: r.addr = {4'h1, 16'h0, 10'($urandom), 2'b00};
      2: begin r.addr = {4'h1, 16'h0, 10'($urandom), 2'b00}; r.fetch = 1'b1; end
      3: r.addr = {4'h2, 16'h0, 10'($urandom), 2'b00};
      default: r.addr = {4'h7, 28'h0};
    endcase
    return r;
  endfunction

  function automatic int lat_of(core_req_t r);
    unique case (r.addr[31:28])
      4'h0: return LP;
      4'h1: return r.addr[9] ? LM : LH;
      4'h2: return LS;
      default: return 1;
    endcase
  endfunction

  always @(posedge clk) if (suppress) nsup++;

  // Core model: one outstanding access, advanced only on virtual edges.
  initial begin
    req = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    while (ndone < 400) begin
      @(posedge clk);
      if (ce) begin
        if (req.req) begin
          vedges++;
          if (rsp.ack) begin
            chk(vedges == exp_lat, $sformatf("addr %h: %0d virtual cycles, expected %0d", req.addr, vedges, exp_lat));
            exp_data = (req.addr[31:28] > 4'h2) ? 32'h0 : def_data(req.addr);
            chk(rsp.rdata == exp_data, $sformatf("addr %h: data %h, expected %h", req.addr, rsp.rdata, exp_data));
            ndone++;
            req <= '0;
          end
        end else begin
          core_req_t r;
          r        = rand_req();
          req     <= r;
          exp_lat  = lat_of(r);
          vedges   = 0;
        end
      end else if (req.req && rsp.ack == 1'b0) begin
        // nothing: the core is frozen between virtual edges
      end
    end
    chk(nsup > 0, "suppression never happened");
    chk(n0 > 0 && n1 > 0 && n2 > 0 && n3 > 0, "a downstream port was never used");
    $display("suppressed cycles %0d, accesses priv %0d dc %0d ic %0d shared %0d", nsup, n0, n1, n2, n3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
