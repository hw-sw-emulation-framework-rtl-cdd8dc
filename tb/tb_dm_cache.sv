// tb_dm_cache: drives a small direct-mapped cache with random reads and
// writes over a region four times its size, with a behavioural backing
// memory. Checks read data against a reference memory, hit/miss pulses
// against a reference tag model, write-through, and the hit latency.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_dm_cache;
  import mpsoc_pkg::*;
  localparam int SZ = 256, LB = 16, LINES = SZ / LB;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mem_req_t up_req, m_req;
  mem_rsp_t up_rsp, m_rsp;
  logic     hit, miss;
  int       n_acc;
  int checks = 0, failures = 0, nhit = 0, nmiss = 0;

  dm_cache #(.SIZE_BYTES(SZ), .LINE_BYTES(LB)) dut (
    .clk, .rst_n, .up_req_i(up_req), .up_rsp_o(up_rsp), .hit_o(hit), .miss_o(miss),
    .mem_req_o(m_req), .mem_rsp_i(m_rsp)
  );
  tb_mem_slave #(.DMIN(1), .DMAX(3)) mem (.clk, .req_i(m_req), .rsp_o(m_rsp), .n_acc(n_acc));

  logic [31:0] ref_mem [logic [31:0]];
  logic [31:0] ref_tag [LINES];
  bit          ref_v   [LINES];

  function automatic logic [31:0] rd_ref(logic [31:0] a);
    if (ref_mem.exists(a)) return ref_mem[a];
    return {~a[15:0], a[15:0]};
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic access(input logic we, input logic [31:0] a, input logic [31:0] d);
    int n = 0;
    bit saw_hit = 0, saw_miss = 0;
    int li = int'(a[7:4]);
    bit exp_hit = ref_v[li] && ref_tag[li] == a[31:8];
    up_req <= '{req: 1'b1, we: we, addr: a, wdata: d};
    do begin
      @(posedge clk); n++;
      if (hit) saw_hit = 1;
      if (miss) saw_miss = 1;
    end while (!up_rsp.ack);
    chk(saw_hit == exp_hit, $sformatf("%h: hit pulse %0d expected %0d", a, saw_hit, exp_hit));
    chk(saw_miss == !exp_hit, $sformatf("%h: miss pulse %0d", a, saw_miss));
    if (exp_hit && !we) begin
      chk(n == 3, $sformatf("read hit took %0d cycles", n));
      nhit++;
    end
    if (!exp_hit && !we) nmiss++;
    if (!we) chk(up_rsp.rdata == rd_ref(a), $sformatf("read %h: %h expected %h", a, up_rsp.rdata, rd_ref(a)));
    if (we) begin
      ref_mem[a] = d;
      chk(mem.store.exists(a) && mem.store[a] == d, "write not written through");
    end else begin
      ref_v[li] = 1; ref_tag[li] = a[31:8];
    end
    up_req <= '0;
    @(posedge clk);
  endtask

  initial begin
    up_req = '0;
    for (int i = 0; i < LINES; i++) ref_v[i] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 1500; i++)
      access($urandom_range(3) == 0, {22'h0, 8'($urandom_range(255)) , 2'b00} & 32'h3FC, $urandom);
    chk(nhit > 100 && nmiss > 50, $sformatf("hits %0d misses %0d", nhit, nmiss));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
