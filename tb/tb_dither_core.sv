// tb_dither_core: behavioural processing core that runs the dithering
// workload: Floyd-Steinberg error diffusion of its segment of each of two
// grey images kept in shared memory. It stands in for the processor of one
// subsystem and advances only on its virtual clock (ce).
//
// Images are W x H pixels, one 8-bit value per 32-bit word, image k at
// shared byte address 0x2000_0000 + k * 0x1_0000, row-major. Core ID
// owns rows ID*H/NCORE .. (ID+1)*H/NCORE-1 of each image and diffuses
// error only inside its segment. Per pixel it reads the pixel and the error
// carried down from the row above, adds the error carried from the left,
// writes 255 if the sum is at least 128 and 0 otherwise, and spreads the
// remainder e as 7/16 to the right (kept in a variable), 3/16, 5/16 and
// 1/16 to the row below (read-modify-write of an error row in cacheable
// private memory, through the D-cache). Every data access is preceded by an
// instruction fetch from a small code loop (I-cache). Every access's number
// of virtual cycles is checked against the configured latencies, and every
// read of a word it wrote itself is checked.
//
// Origin: the dithering application with the Floyd algorithm on two 128x128
// grey images divided into 4 segments in shared memory is the framework's
// evaluation workload; the pixel and error layouts, the integer rounding
// (arithmetic shift right by 4) and the access sequence are this model's
// own. Runs on the clock of the testbench that instantiates it.
module tb_dither_core
  import mpsoc_pkg::*;
#(
  parameter int ID = 0,
  parameter int NCORE = 4,
  parameter int W = 128,
  parameter int H = 128,
  parameter int LAT_PRIV = 2, LAT_HIT = 1, LAT_MISS = 8, LAT_SHARED = 10
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      ce,
  output core_req_t req,
  input  core_rsp_t rsp,
  output logic      done,
  output int        checks,
  output int        fails,
  output int        n_acc
);
  logic [31:0] wrote [logic [31:0]];
  int pc = 0;

  function automatic logic [31:0] pix_addr(int k, int r, int c);
    return 32'h2000_0000 + 32'(k * 'h1_0000 + (r * W + c) * 4);
  endfunction
  // error rows: two of W+2 entries, index c+1 so that c-1 and c+1 exist
  function automatic logic [31:0] err_addr(int row, int c);
    return 32'h1000_0000 + 32'(((row % 2) * (W + 2) + c + 1) * 4);
  endfunction

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
    if (!we && !fetch && wrote.exists(a))
      chk(q == wrote[a], $sformatf("read %h = %h, wrote %h", a, q, wrote[a]));
    if (we) wrote[a] = d;
  endtask

  task automatic op(input logic we, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q);
    logic [31:0] dummy;
    access(1'b0, 1'b1, 32'h1000_4000 + 32'((pc % 24) * 4), '0, dummy);
    pc++;
    access(we, 1'b0, a, d, q);
  endtask

  task automatic add_err(input int row, input int c, input int e);
    logic [31:0] q, x;
    op(1'b0, err_addr(row, c), '0, x);
    op(1'b1, err_addr(row, c), 32'(int'(x) + e), q);
  endtask

  initial begin
    logic [31:0] q, x, ec;
    int v, o, e, carry, r0, r1;
    req = '0; done = 0; checks = 0; fails = 0; n_acc = 0;
    @(posedge clk);
    while (!rst_n) @(posedge clk);
    repeat (3) @(posedge clk);
    r0 = ID * H / NCORE;
    r1 = (ID + 1) * H / NCORE;
    for (int k = 0; k < 2; k++) begin
      for (int c = -1; c <= W; c++) op(1'b1, err_addr(r0, c), '0, q);
      for (int r = r0; r < r1; r++) begin
        for (int c = -1; c <= W; c++) op(1'b1, err_addr(r + 1, c), '0, q);
        carry = 0;
        for (int c = 0; c < W; c++) begin
          op(1'b0, pix_addr(k, r, c), '0, x);
          op(1'b0, err_addr(r, c), '0, ec);
          v = int'(x) + int'(ec) + carry;
          o = (v >= 128) ? 255 : 0;
          e = v - o;
          op(1'b1, pix_addr(k, r, c), 32'(o), q);
          carry = (e * 7) >>> 4;
          add_err(r + 1, c - 1, (e * 3) >>> 4);
          add_err(r + 1, c,     (e * 5) >>> 4);
          add_err(r + 1, c + 1, e >>> 4);
        end
      end
    end
    done = 1;
  end
endmodule
