// tb_stats_bus: three masters write and read random addresses of two slave
// models (buffer and sensor windows). Checks one grant per cycle, fairness
// (no master waits more than NM grants), routing of writes, and read data
// returned one cycle after the grant to the master that asked.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_stats_bus;
  import mpsoc_pkg::*;
  localparam int NM = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  stats_req_t [NM-1:0] rq;
  logic [NM-1:0] gnt, rv;
  logic [31:0] rdata, bwd, swd, brd, srd;
  logic ben, bwe, sen, swe;
  logic [STATS_AW-2:0] ba, sa;
  logic [31:0] bmem [2048];
  logic [31:0] smem [2048];
  logic [31:0] ref_mem [4096];
  int wait_c [NM];
  logic [NM-1:0] pend_rd;
  logic [31:0] pend_exp [NM];
  int nrd = 0;

  stats_bus #(.NM(NM)) dut (
    .clk, .rst_n, .m_req_i(rq), .gnt_o(gnt), .rvalid_o(rv), .rdata_o(rdata),
    .buf_en_o(ben), .buf_we_o(bwe), .buf_addr_o(ba), .buf_wdata_o(bwd), .buf_rdata_i(brd),
    .sen_en_o(sen), .sen_we_o(swe), .sen_addr_o(sa), .sen_wdata_o(swd), .sen_rdata_i(srd));

  always @(posedge clk) begin
    if (ben) begin if (bwe) bmem[ba] <= bwd; brd <= bmem[ba]; end
    if (sen) begin if (swe) smem[sa] <= swd; srd <= smem[sa]; end
  end

  initial begin
    for (int i = 0; i < 2048; i++) begin bmem[i] = 0; smem[i] = 0; end
    for (int i = 0; i < 4096; i++) ref_mem[i] = 0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      chk($onehot0(gnt), "more than one grant");
      chk(!(ben && sen), "both slaves selected");
      for (int i = 0; i < NM; i++) begin
        if (rv[i]) begin
          chk(pend_rd[i] && rdata == pend_exp[i], $sformatf("master %0d read %h expected %h", i, rdata, pend_exp[i]));
          nrd++;
        end
        pend_rd[i] <= 1'b0;
        if (rq[i].req && !gnt[i]) begin
          wait_c[i]++;
          chk(wait_c[i] <= NM, "master starved");
        end
        if (!rq[i].req || gnt[i]) begin
          if (gnt[i]) begin
            if (rq[i].we) ref_mem[rq[i].addr] = rq[i].wdata;
            else begin pend_rd[i] <= 1'b1; pend_exp[i] <= ref_mem[rq[i].addr]; end
          end
          wait_c[i] = 0;
          rq[i] <= ($urandom_range(3) != 0)
                 ? '{req: 1'b1, we: 1'($urandom), addr: STATS_AW'($urandom_range(15)) | {1'($urandom), 11'd0}, wdata: $urandom}
                 : '0;
        end
      end
    end
  end

  initial begin
    rq = '0; pend_rd = '0;
    for (int i = 0; i < NM; i++) wait_c[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (3000) @(posedge clk);
    chk(nrd > 500, "too few reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
