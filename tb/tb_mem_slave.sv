// tb_mem_slave: behavioural memory for testbenches. Answers the mem_req_t
// handshake after a random delay of DMIN..DMAX cycles (counted from the first
// cycle req is seen), with one-cycle ack. Words never written read as
// {~addr[15:0], addr[15:0]}. n_acc counts completed accesses.
//
// Origin: a stand-in for a physical memory or bus slave with a random
// response delay; it is a test model, not part of the design, and runs on the
// clock of the testbench that instantiates it.
module tb_mem_slave
  import mpsoc_pkg::*;
#(
  parameter int DMIN = 1,
  parameter int DMAX = 6
) (
  input  logic     clk,
  input  mem_req_t req_i,
  output mem_rsp_t rsp_o,
  output int       n_acc
);
  logic [31:0] store [logic [31:0]];
  int          cnt = -1;

  function automatic logic [31:0] peek(logic [31:0] a);
    if (store.exists(a)) return store[a];
    return {~a[15:0], a[15:0]};
  endfunction

  initial begin
    rsp_o = '0;
    n_acc = 0;
  end

  always @(posedge clk) begin
    rsp_o.ack <= 1'b0;
    if (req_i.req && !rsp_o.ack) begin
      if (cnt < 0) cnt = DMIN + int'($urandom_range(DMAX - DMIN)) - 1;
      if (cnt == 0) begin
        rsp_o.ack   <= 1'b1;
        rsp_o.rdata <= peek(req_i.addr);
        if (req_i.we) store[req_i.addr] = req_i.wdata;
        n_acc <= n_acc + 1;
        cnt = -1;
      end else begin
        cnt--;
      end
    end
  end
endmodule
