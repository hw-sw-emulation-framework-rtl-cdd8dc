// tb_subsystem: one processing subsystem driven by the behavioural core
// running the matrix kernel, with a behavioural shared memory behind its
// shared port and a clock manager model (random enable pattern, stopped by
// suppression). At the end the product matrix in shared memory is compared
// with a reference product computed here, and the event lines are checked
// against the core's own counts.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_subsystem;
  import mpsoc_pkg::*;
  localparam int N = 4, LP = 2, LH = 1, LM = 8, LS = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  core_req_t creq;
  core_rsp_t crsp;
  logic ce, ce_pat, sup, idle, cdone;
  mem_req_t sh_req;
  mem_rsp_t sh_rsp;
  logic [NEV_SUB-1:0] ev;
  int cchk, cfail, cacc, n_sh;
  int evc [NEV_SUB];

  subsystem #(.DC_BYTES(1024), .IC_BYTES(512), .LINE_BYTES(16), .PRIV_BYTES(4096), .CPRV_BYTES(65536),
    .LAT_PRIV(LP), .LAT_HIT(LH), .LAT_MISS(LM), .LAT_SHARED(LS)) dut (
    .clk, .rst_n, .cpu_ce_i(ce), .cpu_idle_i(idle), .cpu_req_i(creq), .cpu_rsp_o(crsp),
    .suppress_o(sup), .sh_req_o(sh_req), .sh_rsp_i(sh_rsp), .ev_o(ev));

  int cspin;
  tb_core_model #(.ID(1), .N(N), .ITER(2), .LAT_PRIV(LP), .LAT_HIT(LH), .LAT_MISS(LM), .LAT_SHARED(LS)) core (
    .clk, .rst_n, .ce, .req(creq), .rsp(crsp), .idle, .done(cdone), .checks(cchk), .fails(cfail), .n_acc(cacc), .n_spin(cspin));

  tb_mem_slave #(.DMIN(3), .DMAX(18)) shm (.clk, .req_i(sh_req), .rsp_o(sh_rsp), .n_acc(n_sh));

  always @(posedge clk) ce_pat <= ($urandom_range(4) != 0);
  assign ce = ce_pat && !sup;

  always @(posedge clk) if (rst_n) for (int i = 0; i < NEV_SUB; i++) if (ev[i]) evc[i]++;

  initial begin
    for (int i = 0; i < NEV_SUB; i++) evc[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (cdone);
    repeat (5) @(posedge clk);
    checks += cchk;
    failures += cfail;
    // reference product: A comes from the memory's default contents
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      logic [31:0] acc, av, aa, ca;
      acc = 0;
      for (int k = 0; k < N; k++) begin
        aa = 32'h2000_0000 + 32'('h400 + (r * N + k) * 4);
        av = {~aa[15:0], aa[15:0]};
        acc = acc + av * 32'(1000 + k * 10 + c + 1);
      end
      ca = 32'h2000_0200 + 32'('h400 + (r * N + c) * 4);
      chk(shm.store.exists(ca) && shm.store[ca] == acc, $sformatf("C[%0d][%0d] wrong", r, c));
    end
    chk(evc[EV_SHARED] == n_sh, $sformatf("shared events %0d, accesses %0d", evc[EV_SHARED], n_sh));
    chk(evc[EV_IC_HIT] + evc[EV_IC_MISS] + evc[EV_DC_HIT] + evc[EV_DC_MISS] + evc[EV_PRIV] + evc[EV_SHARED] == cacc,
        "sum of access events differs from the core's access count");
    chk(evc[EV_IC_MISS] > 0 && evc[EV_IC_HIT] > evc[EV_IC_MISS], "I-cache hit/miss mix");
    chk(evc[EV_DC_MISS] > 0 && evc[EV_DC_HIT] > 0, "D-cache hit/miss mix");
    chk(evc[EV_SUPPRESS] > 0 && evc[EV_IDLE] > 0 && evc[EV_STALLED] > 0 && evc[EV_ACTIVE] > 0, "processor state events");
    $display("events: %p", evc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
