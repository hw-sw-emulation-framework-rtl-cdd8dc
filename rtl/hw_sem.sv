// hw_sem: bank of hardware semaphores, a slave on the shared interconnect
// used by the processing cores to synchronise.
//
// NSEM one-bit semaphores, one per 32-bit word. A read returns the current
// value in bit 0 (0 = free, 1 = taken) and sets the semaphore to 1 in the
// same access (test-and-set), so a core acquires a lock by reading until it
// gets 0. A write stores bit 0 of the write data (writing 0 releases).
// Word index = addr[SW+1:2]; higher address bits are ignored, the
// interconnect decodes the slave.
//
// Interface and timing: mem_req_t/mem_rsp_t slave. A request is answered
// with a one-cycle ack in the cycle after it is first seen; the requester
// drops req the cycle after the ack. Accesses are atomic because only one
// is served at a time. Semaphores reset to 0 (free).
//
// Origin: the framework's pipelined matrix benchmark keeps its cores in step
// by querying semaphore slaves on the interconnect; the document names them
// but gives no details, so their number, the test-and-set read, the
// one-bit value and the one-cycle answer are this design's own.
module hw_sem
  import mpsoc_pkg::*;
#(
  parameter int unsigned NSEM = 32
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req_i,
  output mem_rsp_t rsp_o
);
  localparam int unsigned SW = (NSEM < 2) ? 1 : $clog2(NSEM);

  logic [NSEM-1:0] sem;
  logic [SW-1:0]   idx;
  logic            ack;
  logic            rbit;

  assign idx = req_i.addr[SW+1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sem  <= '0;
      ack  <= 1'b0;
      rbit <= 1'b0;
    end else begin
      ack <= 1'b0;
      if (req_i.req && !ack) begin
        ack <= 1'b1;
        if (req_i.we) begin
          sem[idx] <= req_i.wdata[0];
        end else begin
          rbit     <= sem[idx];
          sem[idx] <= 1'b1;
        end
      end
    end
  end

  assign rsp_o.ack   = ack;
  assign rsp_o.rdata = {{(XLEN - 1){1'b0}}, rbit};

endmodule
