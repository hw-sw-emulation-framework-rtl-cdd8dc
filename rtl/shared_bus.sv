// shared_bus: the design's own 32-bit shared data/address bus between the
// memory controllers of the processing subsystems and the main memory
// bridge. It is a stripped-down AHB-style bus: no split/retry, no parking,
// one transfer at a time, and the arbitration policy fixed at elaboration
// (ROUND_ROBIN = 0: fixed priority, master 0 highest; ROUND_ROBIN = 1: the
// search starts after the last master served).
//
// Timing: arbitration takes ARB_LAT cycles (1 in the case study) after the
// bus becomes idle with a request pending; the granted master's request is
// then driven to the slave until the slave's ack, which is routed back to
// that master only. A master must hold its request until its ack.
//
// Interfaces: m_req_i[i]/m_rsp_o[i] per master and s_req_o/s_rsp_i to the
// slave, all with the mem_req_t handshake. grant_o is the one-hot grant
// (for the event-logging sniffer) and bus_lines_o exposes address, write
// data and read data for the transition-counting sniffer.
//
// Origin: a 32-bit shared bus loosely modelled on a simple high-performance
// on-chip bus, with priority or round-robin arbitration chosen at build time
// and a one-cycle arbitration latency, follows the framework description; the
// single-transfer request/acknowledge protocol and the state machine are this
// design's own.
module shared_bus
  import mpsoc_pkg::*;
#(
  parameter int unsigned NM          = 4,
  parameter bit          ROUND_ROBIN = 1'b1,
  parameter int unsigned ARB_LAT     = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  mem_req_t [NM-1:0]    m_req_i,
  output mem_rsp_t [NM-1:0]    m_rsp_o,
  output mem_req_t             s_req_o,
  input  mem_rsp_t             s_rsp_i,
  output logic     [NM-1:0]    grant_o,
  output logic     [3*XLEN-1:0] bus_lines_o
);
  localparam int unsigned MW = (NM < 2) ? 1 : $clog2(NM);
  localparam int unsigned AW = (ARB_LAT < 2) ? 1 : $clog2(ARB_LAT + 1);

  typedef enum logic [1:0] {B_IDLE, B_ARB, B_XFER, B_END} bstate_e;
  bstate_e       state;
  logic [MW-1:0] owner, last, pick;
  logic          any;
  logic [AW-1:0] acnt;

  // Arbitration decision (combinational).
  always_comb begin
    pick = '0;
    any  = 1'b0;
    if (ROUND_ROBIN) begin
      for (int k = NM; k >= 1; k--) begin
        int unsigned c;
        c = (int'(last) + k) % NM;
        if (m_req_i[c].req) begin
          pick = MW'(c);
          any  = 1'b1;
        end
      end
    end else begin
      for (int c = NM - 1; c >= 0; c--) begin
        if (m_req_i[c].req) begin
          pick = MW'(c);
          any  = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= B_IDLE;
      owner <= '0;
      last  <= MW'(NM - 1);
      acnt  <= '0;
    end else begin
      unique case (state)
        B_IDLE: if (any) begin
          acnt  <= '0;
          state <= B_ARB;
        end
        B_ARB: begin
          if (acnt == AW'(ARB_LAT - 1)) begin
            if (any) begin
              owner <= pick;
              last  <= pick;
              state <= B_XFER;
            end else begin
              state <= B_IDLE;
            end
          end else begin
            acnt <= acnt + 1'b1;
          end
        end
        B_XFER: if (s_rsp_i.ack) state <= B_END;
        B_END:  state <= B_IDLE;   // master drops its request this cycle
        default: state <= B_IDLE;
      endcase
    end
  end

  always_comb begin
    s_req_o     = m_req_i[owner];
    s_req_o.req = (state == B_XFER) && m_req_i[owner].req;
    grant_o     = '0;
    if (state == B_XFER) grant_o[owner] = 1'b1;
    for (int i = 0; i < NM; i++) begin
      m_rsp_o[i].rdata = s_rsp_i.rdata;
      m_rsp_o[i].ack   = s_rsp_i.ack && (state == B_XFER) && (owner == MW'(i));
    end
  end

  assign bus_lines_o = {s_req_o.addr, s_req_o.wdata, s_rsp_i.rdata};

  a_onehot_grant: assert property (@(posedge clk) $onehot0(grant_o));

endmodule
