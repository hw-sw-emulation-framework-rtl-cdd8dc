// tb_eth_buffer: random writes and reads against a reference array; read
// data must appear in the cycle after the enabled read, and a disabled cycle
// must leave both contents and output alone.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_eth_buffer;
  localparam int DEPTH = 128;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic en, we;
  logic [10:0] addr;
  logic [31:0] wd, rd;
  logic [31:0] ref_mem [DEPTH];

  eth_buffer #(.DEPTH(DEPTH), .AW(11)) dut (.clk, .en_i(en), .we_i(we), .addr_i(addr), .wdata_i(wd), .rdata_o(rd));

  initial begin
    en = 1; we = 1;
    for (int i = 0; i < DEPTH; i++) begin
      addr = 11'(i); wd = 32'(i * 3 + 1); ref_mem[i] = wd;
      @(posedge clk); #1;
    end
    for (int k = 0; k < 2000; k++) begin
      logic [31:0] exp_rd;
      en = ($urandom_range(3) != 0); we = 1'($urandom);
      addr = 11'($urandom_range(DEPTH - 1)); wd = $urandom;
      exp_rd = en ? ref_mem[addr] : rd;
      @(posedge clk); #1;
      if (en && we) ref_mem[addr] = wd;
      chk(rd == exp_rd, $sformatf("read %0d: %h expected %h", addr, rd, exp_rd));
    end
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
