// tb_workload_matrix: the matrix workload at the core counts the framework
// was evaluated with beyond the default four: one platform with a single
// subsystem and one with eight, side by side, each running the matrix
// kernel on every core (the four-core case runs at full size in
// tb_mpsoc_full). Each platform keeps its other parameters at their
// defaults except the sampling period, shortened to 20,000 cycles so that
// the statistics packets come quickly. Every product matrix and every
// core's access count reported in the packets is checked.
//
// Origin: the 1- and 8-core matrix runs are the framework's evaluation
// configurations; the kernel size, sampling period and checks are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and
// ends the run if it does not finish in time.
module tb_workload_matrix;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fin1, fin8;
  int chk1, fail1, chk8, fail8;

  tb_matrix_system #(.NSUB(1)) sys1 (.clk, .rst_n, .finished(fin1), .checks(chk1), .failures(fail1));
  tb_matrix_system #(.NSUB(8)) sys8 (.clk, .rst_n, .finished(fin8), .checks(chk8), .failures(fail8));

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (fin1 && fin8);
    $display("TB_RESULT checks=%0d failures=%0d", chk1 + chk8, fail1 + fail8);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk1 + chk8, fail1 + fail8 + 1);
    $finish;
  end
endmodule
