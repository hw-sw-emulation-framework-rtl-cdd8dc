// bram_mem: private main memory of one processing subsystem, built from
// on-chip block RAM. The same module serves as the non-cacheable private
// memory and as the cacheable private memory behind the I- and D-caches.
//
// Its size is a parameter (32 KB by default, the private memory of the
// four-core case study). Its physical latency is PHYS_LAT clock cycles from
// the cycle req is first seen to the ack pulse; the latency the emulated
// processor sees is set separately in the memory controller, which hides the
// difference. Accesses are whole 32-bit words; the byte address is used,
// modulo the memory size.
//
// Interface: mem_req_t / mem_rsp_t handshake (req held until a one-cycle ack).
// Reads return rdata together with ack. The contents are not reset.
//
// Origin: private memories built from on-chip block RAM with configurable
// size follow the framework description; the word-wide port without byte
// enables and the PHYS_LAT answer delay are this design's own. The latency
// the emulated core sees is not set here but in mem_ctrl.
module bram_mem
  import mpsoc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 32768,
  parameter int unsigned PHYS_LAT   = 1
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t req_i,
  output mem_rsp_t rsp_o
);
  localparam int unsigned WORDS = SIZE_BYTES / 4;
  localparam int unsigned IW    = $clog2(WORDS);
  localparam int unsigned CW    = (PHYS_LAT < 2) ? 1 : $clog2(PHYS_LAT + 1);

  logic [XLEN-1:0] mem [WORDS];
  logic [IW-1:0]   idx;
  logic [CW-1:0]   cnt;
  logic            ack_q;
  logic [XLEN-1:0] rdata_q;

  assign idx = req_i.addr[IW+1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      ack_q <= 1'b0;
    end else begin
      ack_q <= 1'b0;
      if (req_i.req && !ack_q) begin
        if (cnt == CW'(PHYS_LAT - 1)) begin
          cnt   <= '0;
          ack_q <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end else begin
        cnt <= '0;
      end
    end
  end

  // Storage access happens in the cycle the ack is generated.
  always_ff @(posedge clk) begin
    if (req_i.req && !ack_q && cnt == CW'(PHYS_LAT - 1)) begin
      if (req_i.we) mem[idx] <= req_i.wdata;
      rdata_q <= mem[idx];
    end
  end

  assign rsp_o.ack   = ack_q;
  assign rsp_o.rdata = rdata_q;

endmodule
