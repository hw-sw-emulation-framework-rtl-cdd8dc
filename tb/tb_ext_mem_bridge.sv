// tb_ext_mem_bridge: the bridge in front of a behavioural asynchronous SRAM.
// Random writes and reads are checked against a reference array; the access
// time and the strobes are checked each cycle.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_ext_mem_bridge;
  import mpsoc_pkg::*;
  localparam int AW = 10, WAITC = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  mem_req_t req;
  mem_rsp_t rsp;
  logic [AW-1:0] sa;
  logic [31:0] sdo, sdi;
  logic ce_n, we_n, oe_n;
  logic [31:0] sram [1 << AW];
  logic [31:0] ref_mem [1 << AW];

  ext_mem_bridge #(.SRAM_AW(AW), .SRAM_WAIT(WAITC)) dut (
    .clk, .rst_n, .req_i(req), .rsp_o(rsp), .sram_addr_o(sa), .sram_dout_o(sdo),
    .sram_din_i(sdi), .sram_ce_n_o(ce_n), .sram_we_n_o(we_n), .sram_oe_n_o(oe_n));

  // asynchronous SRAM: read data follows the address while selected
  assign sdi = (!ce_n && !oe_n) ? sram[sa] : 32'hDEAD_BEEF;
  always @(posedge clk) if (!ce_n && !we_n) sram[sa] <= sdo;
  always @(posedge clk) if (rst_n) chk(!(!we_n && !oe_n), "write and output enable together");

  task automatic access(input logic we, input logic [AW-1:0] wa, input logic [31:0] d);
    int n = 0;
    req <= '{req: 1'b1, we: we, addr: {20'h2000_0, wa, 2'b00}, wdata: d};
    do begin @(posedge clk); n++; end while (!rsp.ack);
    chk(n == WAITC + 2, $sformatf("access took %0d cycles", n));
    if (!we) chk(rsp.rdata == ref_mem[wa], $sformatf("read %h got %h expected %h", wa, rsp.rdata, ref_mem[wa]));
    else ref_mem[wa] = d;
    req <= '0;
    @(posedge clk);
  endtask

  initial begin
    req = '0;
    for (int i = 0; i < (1 << AW); i++) begin sram[i] = 32'(i * 7); ref_mem[i] = 32'(i * 7); end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 500; i++) access($urandom_range(1), AW'($urandom), $urandom);
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
