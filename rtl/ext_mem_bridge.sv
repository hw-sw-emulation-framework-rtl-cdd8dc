// ext_mem_bridge: main memory bridge between the shared interconnect and the
// off-chip shared memory, including a simple SRAM controller.
//
// The interconnect side is a mem_req_t slave port. The memory side drives a
// generic asynchronous SRAM with separate data-in and data-out buses and
// active-low chip enable, write enable and output enable. Each access holds
// address, data and strobes for SRAM_WAIT cycles (the access time of the
// board's SRAM in clock cycles) and then acknowledges; a read samples the
// data bus in its last wait cycle. The shared-memory latency seen by the
// emulated cores is enforced by their memory controllers, so this bridge only
// has to be correct, not fast. Word addresses are the byte address bits
// [SRAM_AW+1:2].
//
// Origin: a bridge from the shared bus to an off-chip SRAM through a custom
// SRAM controller follows the framework description; the SRAM pin protocol
// (separate data in/out, active-low CE/WE/OE, fixed wait count) is this
// design's own, as the description gives none.
module ext_mem_bridge
  import mpsoc_pkg::*;
#(
  parameter int unsigned SRAM_AW   = 18,   // 1 MB of 32-bit words
  parameter int unsigned SRAM_WAIT = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  mem_req_t           req_i,
  output mem_rsp_t           rsp_o,
  output logic [SRAM_AW-1:0] sram_addr_o,
  output logic [XLEN-1:0]    sram_dout_o,
  input  logic [XLEN-1:0]    sram_din_i,
  output logic               sram_ce_n_o,
  output logic               sram_we_n_o,
  output logic               sram_oe_n_o
);
  localparam int unsigned WW = (SRAM_WAIT < 2) ? 1 : $clog2(SRAM_WAIT + 1);

  typedef enum logic [1:0] {M_IDLE, M_ACC, M_ACK} mstate_e;
  mstate_e         state;
  logic [WW-1:0]   wcnt;
  logic [XLEN-1:0] rdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= M_IDLE;
      wcnt    <= '0;
      rdata_q <= '0;
    end else begin
      unique case (state)
        M_IDLE: if (req_i.req) begin
          wcnt  <= '0;
          state <= M_ACC;
        end
        M_ACC: begin
          if (wcnt == WW'(SRAM_WAIT - 1)) begin
            rdata_q <= sram_din_i;
            state   <= M_ACK;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
        M_ACK: state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

  assign sram_addr_o = req_i.addr[SRAM_AW+1:2];
  assign sram_dout_o = req_i.wdata;
  assign sram_ce_n_o = !(state == M_ACC);
  assign sram_we_n_o = !(state == M_ACC && req_i.we);
  assign sram_oe_n_o = !(state == M_ACC && !req_i.we);

  assign rsp_o.ack   = (state == M_ACK);
  assign rsp_o.rdata = rdata_q;

endmodule
