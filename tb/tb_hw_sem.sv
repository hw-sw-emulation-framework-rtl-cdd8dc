// tb_hw_sem: random reads and writes to random semaphores, issued with the
// mem_req_t handshake after random gaps. A reference model (one bit per
// semaphore, read = test-and-set) predicts every read value; each answer
// must come exactly one cycle after the request is raised and last one
// cycle. A final pass checks that a lock is granted once and then refused
// until it is released.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_hw_sem;
  import mpsoc_pkg::*;
  localparam int NSEM = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  mem_req_t req;
  mem_rsp_t rsp;
  bit model [NSEM];

  hw_sem #(.NSEM(NSEM)) dut (.clk, .rst_n, .req_i(req), .rsp_o(rsp));

  task automatic xfer(input logic we, input int i, input logic [31:0] d, output logic [31:0] q);
    int n = 0;
    req <= '{req: 1'b1, we: we, addr: 32'h2F00_0000 + 32'(i * 4), wdata: d};
    do begin @(posedge clk); n++; end while (!rsp.ack && n < 10);
    chk(n == 2, $sformatf("ack after %0d cycles", n));
    q = rsp.rdata;
    req <= '0;
    @(posedge clk);
    chk(!rsp.ack, "ack longer than one cycle");
  endtask

  initial begin
    logic [31:0] q, d;
    int i;
    logic we;
    req = '0;
    for (int k = 0; k < NSEM; k++) model[k] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      i = $urandom_range(NSEM - 1);
      we = $urandom_range(1);
      if (we) begin
        d = 32'($urandom);
        xfer(1'b1, i, d, q);
        model[i] = d[0];
      end else begin
        xfer(1'b0, i, '0, q);
        chk(q == 32'(model[i]), $sformatf("semaphore %0d read %0d, expected %0d", i, q, model[i]));
        model[i] = 1;
      end
      repeat ($urandom_range(2)) @(posedge clk);
    end
    // lock protocol on semaphore 3
    xfer(1'b1, 3, 0, q);
    xfer(1'b0, 3, 0, q); chk(q == 0, "free lock not granted");
    xfer(1'b0, 3, 0, q); chk(q == 1, "taken lock granted twice");
    xfer(1'b0, 3, 0, q); chk(q == 1, "taken lock granted twice");
    xfer(1'b1, 3, 0, q);
    xfer(1'b0, 3, 0, q); chk(q == 0, "released lock not granted");
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
