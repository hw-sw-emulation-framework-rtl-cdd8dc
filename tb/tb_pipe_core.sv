// tb_pipe_core: behavioural processing core running one stage of the
// pipelined matrix workload ("Matrix-TM"). Core ID takes an N x N input
// matrix, multiplies it by its private operand matrix B_ID and hands the
// product to core ID+1; the last core writes the final products out.
//
// Per iteration: (i) wait until its input link holds a matrix (core 0 reads
// the next of NIN input matrices instead), copy it from shared memory into
// cacheable private memory and mark the link empty; (ii) wait until its
// output link is empty, multiply the copy by B_ID (held in non-cacheable
// private memory), writing the product into the shared output slot; (iii)
// mark the output link full. Each link has a full flag in shared memory,
// read and written only while holding the link's hardware semaphore
// (test-and-set read of 0x2F00_0000 + 4*link, write 0 to release). While
// polling, the core raises idle for a few cycles. Core 0 stops taking inputs
// when stop is high; done rises when it has stopped and its last product is
// delivered. n_iter counts finished iterations.
//
// Shared layout (byte addresses): input matrix m at 0x2000_0000 + 4*N*N*m,
// link k's slot at 0x2001_0000 + 0x100*k and its flag at 0x2001_1000 + 4*k
// (0 empty, 1 full, 2 end of stream), final product m at 0x2002_0000 +
// 4*N*N*m; iteration i uses input and product i mod NIN. Every access's
// virtual cycle count is checked against the configured latencies and every
// private read against what was written.
//
// Origin: the pipeline of matrix multiplications, with each core copying an
// input matrix from shared to private memory, multiplying by a private
// operand matrix and copying the result back to shared memory, kept in step
// through semaphore slaves, is the framework's thermal benchmark; the
// matrix size, flag protocol and layouts are this model's own. Runs on the
// clock of the testbench that instantiates it.
module tb_pipe_core
  import mpsoc_pkg::*;
#(
  parameter int ID = 0,
  parameter int NCORE = 4,
  parameter int N = 4,
  parameter int NIN = 16,
  parameter int LAT_PRIV = 2, LAT_HIT = 1, LAT_MISS = 8, LAT_SHARED = 10
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,
  input  logic      stop,
  output core_req_t req,
  input  core_rsp_t rsp,
  output logic      idle,
  output logic      done,
  output int        checks,
  output int        fails,
  output int        n_iter
);
  logic [31:0] wrote [logic [31:0]];
  int pc = 0;

  function automatic logic [31:0] in_addr(int m, int r, int c);   return 32'h2000_0000 + 32'((m * N * N + r * N + c) * 4); endfunction
  function automatic logic [31:0] out_addr(int m, int r, int c);  return 32'h2002_0000 + 32'((m * N * N + r * N + c) * 4); endfunction
  function automatic logic [31:0] slot_addr(int k, int r, int c); return 32'h2001_0000 + 32'(k * 'h100 + (r * N + c) * 4); endfunction
  function automatic logic [31:0] flag_addr(int k);               return 32'h2001_1000 + 32'(k * 4); endfunction
  function automatic logic [31:0] sem_addr(int k);                return 32'h2F00_0000 + 32'(k * 4); endfunction
  function automatic logic [31:0] b_addr(int r, int c);           return 32'h0000_0100 + 32'((r * N + c) * 4); endfunction
  function automatic logic [31:0] p_addr(int r, int c);           return 32'h1000_0000 + 32'((r * N + c) * 4); endfunction

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
    unique case (a[31:28])
      4'h0: chk(v == LAT_PRIV, $sformatf("private access %h took %0d cycles", a, v));
      4'h1: chk(v == LAT_HIT || v == LAT_MISS, $sformatf("cached access %h took %0d cycles", a, v));
      default: chk(v == LAT_SHARED, $sformatf("shared access %h took %0d cycles", a, v));
    endcase
    // shared words are also written by the other cores: check private ones only
    if (!we && !fetch && a[31:28] != 4'h2 && wrote.exists(a))
      chk(q == wrote[a], $sformatf("read %h = %h, wrote %h", a, q, wrote[a]));
    if (we) wrote[a] = d;
  endtask

  task automatic op(input logic we, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q);
    logic [31:0] dummy;
    access(1'b0, 1'b1, 32'h1000_4000 + 32'((pc % 32) * 4), '0, dummy);
    pc++;
    access(we, 1'b0, a, d, q);
  endtask

  task automatic pause();
    idle <= 1'b1;
    repeat (4) vedge();
    idle <= 1'b0;
  endtask

  task automatic lock(input int k);
    logic [31:0] q;
    forever begin
      op(1'b0, sem_addr(k), '0, q);
      if (q == 0) break;
      pause();
    end
  endtask

  task automatic unlock(input int k);
    logic [31:0] q;
    op(1'b1, sem_addr(k), '0, q);
  endtask

  task automatic wait_flag(input int k, input logic [31:0] v);
    logic [31:0] f, q;
    forever begin
      lock(k);
      op(1'b0, flag_addr(k), '0, f);
      unlock(k);
      if (f == v) break;
      pause();
    end
  endtask

  task automatic set_flag(input int k, input logic [31:0] v);
    logic [31:0] q;
    lock(k);
    op(1'b1, flag_addr(k), v, q);
    unlock(k);
  endtask

  initial begin
    logic [31:0] q, x, y, acc;
    int it;
    req = '0; idle = 0; done = 0; checks = 0; fails = 0; n_iter = 0;
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    repeat (3) @(posedge clk);
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
      op(1'b1, b_addr(r, c), 32'(ID * 100 + r * 10 + c + 1), q);
    it = 0;
    forever begin
      // (i) input
      if (ID == 0) begin
        if (stop) begin
          // tell the next stage that the stream ended: a full flag of 2
          wait_flag(0, 0);
          set_flag(0, 2);
          break;
        end
      end else begin
        lock(ID - 1);
        op(1'b0, flag_addr(ID - 1), '0, x);
        unlock(ID - 1);
        while (x == 0) begin
          pause();
          lock(ID - 1);
          op(1'b0, flag_addr(ID - 1), '0, x);
          unlock(ID - 1);
        end
        if (x == 2) begin
          if (ID < NCORE - 1) begin
            wait_flag(ID, 0);
            set_flag(ID, 2);
          end
          break;
        end
      end
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
        op(1'b0, (ID == 0) ? in_addr(it % NIN, r, c) : slot_addr(ID - 1, r, c), '0, x);
        op(1'b1, p_addr(r, c), x, q);
      end
      if (ID > 0) set_flag(ID - 1, 0);
      // (ii) multiply into the output slot
      if (ID < NCORE - 1) wait_flag(ID, 0);
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
        acc = '0;
        for (int k = 0; k < N; k++) begin
          op(1'b0, p_addr(r, k), '0, x);
          op(1'b0, b_addr(k, c), '0, y);
          acc = acc + x * y;
        end
        op(1'b1, (ID == NCORE - 1) ? out_addr(it % NIN, r, c) : slot_addr(ID, r, c), acc, q);
      end
      // (iii) hand over
      if (ID < NCORE - 1) set_flag(ID, 1);
      it++;
      n_iter = it;
    end
    done = 1;
  end
endmodule
