// tb_core_model: behavioural processing core for testbenches. It stands in
// for the processor of one subsystem and advances only on its virtual clock
// (ce). It runs a matrix kernel in the style of a pipelined matrix workload:
//   1. write its operand matrix B into non-cacheable private memory,
//   2. copy the input matrix A from its slot in shared memory into
//      cacheable private memory (through the D-cache),
//   3. multiply the copy by B, reading both from memory,
//   4. write the product C back to its output slot in shared memory,
// repeated ITER times, with an instruction fetch from a small code loop
// (I-cache) before every data access and short idle spells in between.
// Every read of a word it wrote itself is checked, and so is the number of
// virtual cycles each access takes against the configured latencies. With
// USE_SEM set, step 3 and 4 are done holding hardware semaphore 0 (read at
// 0x2F00_0000 until it returns 0, write 0 to release); n_spin counts the
// refused attempts.
//
// Origin: a behavioural stand-in for a processing core (the real cores are
// vendor processors); the matrix kernel it runs mirrors the matrix workload
// used to evaluate the framework, the access pattern and sizes are this
// model's own. It runs on its virtual clock enable.
module tb_core_model
  import mpsoc_pkg::*;
#(
  parameter int ID = 0,
  parameter int N = 4,
  parameter int ITER = 2,
  parameter bit USE_SEM = 0,
  parameter int LAT_PRIV = 2, LAT_HIT = 1, LAT_MISS = 8, LAT_SHARED = 10
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,
  output core_req_t req,
  input  core_rsp_t rsp,
  output logic      idle,
  output logic      done,
  output int        checks,
  output int        fails,
  output int        n_acc,
  output int        n_spin
);
  logic [31:0] wrote [logic [31:0]];
  int pc = 0;

  function automatic logic [31:0] a_addr(int r, int c); return 32'h2000_0000 + 32'(ID * 'h400 + (r * N + c) * 4); endfunction
  function automatic logic [31:0] c_addr(int r, int c); return 32'h2000_0200 + 32'(ID * 'h400 + (r * N + c) * 4); endfunction
  function automatic logic [31:0] b_addr(int r, int c); return 32'h0000_0100 + 32'((r * N + c) * 4); endfunction
  function automatic logic [31:0] p_addr(int r, int c); return 32'h1000_0000 + 32'((r * N + c) * 4); endfunction
  function automatic logic [31:0] b_val(int r, int c);  return 32'(ID * 1000 + r * 10 + c + 1); endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin fails++; $display("core %0d FAIL: %s", ID, msg); end
  endtask

  task automatic vedge();
    do @(posedge clk); while (!ce);
  endtask

  task automatic access(input logic we, input logic fetch, input logic [31:0] a,
                        input logic [31:0] d, output logic [31:0] q);
    int v = 0;
    vedge();
    req <= '{req: 1'b1, we: we, fetch: fetch, addr: a, wdata: d};
    do begin
      @(posedge clk);
      if (ce) v++;
    end while (!(ce && rsp.ack));
    q = rsp.rdata;
    req <= '0;
    n_acc++;
    unique case (a[31:28])
      4'h0: chk(v == LAT_PRIV, $sformatf("private access %h took %0d cycles", a, v));
      4'h1: chk(v == LAT_HIT || v == LAT_MISS, $sformatf("cached access %h took %0d cycles", a, v));
      default: chk(v == LAT_SHARED, $sformatf("shared access %h took %0d cycles", a, v));
    endcase
    if (!we && !fetch && a[31:24] != 8'h2F && wrote.exists(a))
      chk(q == wrote[a], $sformatf("read %h = %h, wrote %h", a, q, wrote[a]));
    if (we) wrote[a] = d;
  endtask

  task automatic op(input logic we, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q);
    logic [31:0] dummy;
    access(1'b0, 1'b1, 32'h1000_4000 + 32'((pc % 48) * 4), '0, dummy);
    pc++;
    access(we, 1'b0, a, d, q);
    if ($urandom_range(15) == 0) begin
      idle <= 1'b1;
      repeat (1 + $urandom_range(4)) vedge();
      idle <= 1'b0;
    end
  endtask

  initial begin
    logic [31:0] q, acc, x, y;
    req = '0; idle = 0; done = 0; checks = 0; fails = 0; n_acc = 0; n_spin = 0;
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    repeat (3) @(posedge clk);
    for (int it = 0; it < ITER; it++) begin
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) op(1'b1, b_addr(r, c), b_val(r, c), q);
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
        op(1'b0, a_addr(r, c), '0, x);
        op(1'b1, p_addr(r, c), x, q);
      end
      // with USE_SEM, the write-back phase holds semaphore 0 (a shared lock)
      if (USE_SEM) begin
        op(1'b0, 32'h2F00_0000, '0, q);
        while (q != 0) begin
          n_spin++;
          op(1'b0, 32'h2F00_0000, '0, q);
        end
      end
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
        acc = '0;
        for (int k = 0; k < N; k++) begin
          op(1'b0, p_addr(r, k), '0, x);
          op(1'b0, b_addr(k, c), '0, y);
          acc = acc + x * y;
        end
        op(1'b1, c_addr(r, c), acc, q);
      end
      if (USE_SEM) op(1'b1, 32'h2F00_0000, '0, q);
    end
    done = 1;
  end
endmodule
