// tb_bram_mem: random writes and reads against a reference array; checks
// the data and that every access is acknowledged exactly PHYS_LAT cycles
// after its request first appears.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_bram_mem;
  import mpsoc_pkg::*;
  localparam int SZ = 1024, PL = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mem_req_t req;
  mem_rsp_t rsp;
  logic [31:0] ref_mem [SZ/4];
  logic [SZ/4-1:0] written;
  int checks = 0, failures = 0;

  bram_mem #(.SIZE_BYTES(SZ), .PHYS_LAT(PL)) dut (.clk, .rst_n, .req_i(req), .rsp_o(rsp));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic access(input logic we, input logic [31:0] a, input logic [31:0] d);
    int n = 0;
    req <= '{req: 1'b1, we: we, addr: a, wdata: d};
    do begin @(posedge clk); n++; end while (!rsp.ack);
    chk(n == PL + 1, $sformatf("latency %0d cycles, expected %0d", n - 1, PL));
    if (!we && written[a[9:2]])
      chk(rsp.rdata == ref_mem[a[9:2]], $sformatf("read %h: %h expected %h", a, rsp.rdata, ref_mem[a[9:2]]));
    if (we) begin ref_mem[a[9:2]] = d; written[a[9:2]] = 1'b1; end
    req <= '0;
    @(posedge clk);
  endtask

  initial begin
    req = '0;
    written = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 600; i++) begin
      logic [31:0] a;
      a = {22'h0, 8'($urandom), 2'b00};
      access(($urandom_range(1) == 1) || i < 50, a, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
