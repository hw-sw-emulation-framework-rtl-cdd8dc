// mem_ctrl: memory controller of one processing subsystem.
//
// It captures every request of the processing core on the local bus, decodes
// the address into one of three ranges (non-cacheable private memory,
// cacheable private memory through the I-/D-cache, shared memory over the
// interconnect) and forwards it. Its job in the emulator is to make each
// access take exactly the latency the user configured for that kind of
// memory, counted in cycles of the core's virtual clock, whatever the
// physical memory needs:
//   * a counter counts the core's virtual clock edges since the request;
//   * if the physical access finishes early, the answer is held back until
//     the configured latency has elapsed;
//   * if the configured latency has elapsed and the physical access is still
//     running, suppress_o asks the clock manager to stop the core's virtual
//     clock until the data is there, so the extra cycles are invisible.
// Cached accesses use LAT_HIT until the cache reports a miss, then LAT_MISS.
// The controller itself runs on the free-running physical clock.
//
// Interface: cpu_req_i/cpu_rsp_o is the core side; the core holds its request
// until it samples ack on an edge where cpu_ce_i is high. ack is only
// presented when it may be consumed, and stays high until such an edge. The
// four downstream ports use the mem_req_t handshake. ev_* are one-cycle
// event pulses for the hardware sniffers; busy_o is high while an access is
// outstanding (the core is stalled on memory).
//
// Origin: address decoding into memory ranges, per-memory user latencies
// counted against the elapsed time, and clock suppression when a physical
// memory is too slow follow the framework description. Holding back early
// answers, the one-access-at-a-time counter, the latency values other than
// the 10-cycle shared-memory default, and suppressing the decode cycle are
// this design's own.
module mem_ctrl
  import mpsoc_pkg::*;
#(
  parameter int unsigned LAT_PRIV   = 2,   // non-cacheable private memory
  parameter int unsigned LAT_HIT    = 1,   // cache hit
  parameter int unsigned LAT_MISS   = 8,   // cache miss
  parameter int unsigned LAT_SHARED = 10   // shared main memory
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cpu_ce_i,
  input  core_req_t cpu_req_i,
  output core_rsp_t cpu_rsp_o,
  output logic      suppress_o,
  output logic      busy_o,
  // downstream
  output mem_req_t  priv_req_o,
  input  mem_rsp_t  priv_rsp_i,
  output mem_req_t  dc_req_o,
  input  mem_rsp_t  dc_rsp_i,
  input  logic      dc_miss_i,
  output mem_req_t  ic_req_o,
  input  mem_rsp_t  ic_rsp_i,
  input  logic      ic_miss_i,
  output mem_req_t  sh_req_o,
  input  mem_rsp_t  sh_rsp_i,
  // sniffer events
  output logic      ev_priv_o,
  output logic      ev_cached_o,
  output logic      ev_shared_o,
  output logic      ev_error_o
);
  typedef enum logic [1:0] {T_PRIV, T_DC, T_IC, T_SH} target_e;
  typedef enum logic [1:0] {C_IDLE, C_BUSY, C_DONE} cstate_e;

  localparam int unsigned VW = 16;

  cstate_e         state;
  target_e         tgt;
  logic            dreq;     // downstream req
  logic [VW-1:0]   vcnt;     // virtual cycles elapsed since the request
  logic [VW-1:0]   lat;      // latency currently in force
  logic [XLEN-1:0] rdata_q;
  logic            phys_ack;
  logic [XLEN-1:0] phys_rdata;
  logic            reached;
  region_e         rgn;

  assign rgn = decode_region(cpu_req_i.addr[31:28]);

  always_comb begin
    unique case (tgt)
      T_PRIV:  begin phys_ack = priv_rsp_i.ack; phys_rdata = priv_rsp_i.rdata; end
      T_DC:    begin phys_ack = dc_rsp_i.ack;   phys_rdata = dc_rsp_i.rdata;   end
      T_IC:    begin phys_ack = ic_rsp_i.ack;   phys_rdata = ic_rsp_i.rdata;   end
      default: begin phys_ack = sh_rsp_i.ack;   phys_rdata = sh_rsp_i.rdata;   end
    endcase
  end

  // The configured latency is reached at the next virtual edge.
  assign reached = (vcnt + 1'b1 >= lat);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= C_IDLE;
      tgt     <= T_PRIV;
      dreq    <= 1'b0;
      vcnt    <= '0;
      lat     <= '0;
      rdata_q <= '0;
      ev_priv_o   <= 1'b0;
      ev_cached_o <= 1'b0;
      ev_shared_o <= 1'b0;
      ev_error_o  <= 1'b0;
    end else begin
      ev_priv_o   <= 1'b0;
      ev_cached_o <= 1'b0;
      ev_shared_o <= 1'b0;
      ev_error_o  <= 1'b0;
      unique case (state)
        C_IDLE: if (cpu_req_i.req) begin
          vcnt <= '0;
          unique case (rgn)
            RGN_PRIV: begin
              tgt <= T_PRIV; lat <= VW'(LAT_PRIV); dreq <= 1'b1; state <= C_BUSY;
              ev_priv_o <= 1'b1;
            end
            RGN_CACHED: begin
              tgt <= cpu_req_i.fetch ? T_IC : T_DC;
              lat <= VW'(LAT_HIT); dreq <= 1'b1; state <= C_BUSY;
              ev_cached_o <= 1'b1;
            end
            RGN_SHARED: begin
              tgt <= T_SH; lat <= VW'(LAT_SHARED); dreq <= 1'b1; state <= C_BUSY;
              ev_shared_o <= 1'b1;
            end
            default: begin
              rdata_q <= '0; lat <= VW'(1); state <= C_DONE;
              ev_error_o <= 1'b1;
            end
          endcase
        end
        C_BUSY: begin
          if (cpu_ce_i) vcnt <= vcnt + 1'b1;
          if ((tgt == T_DC && dc_miss_i) || (tgt == T_IC && ic_miss_i))
            lat <= VW'(LAT_MISS);
          if (phys_ack) begin
            dreq    <= 1'b0;
            rdata_q <= phys_rdata;
            state   <= C_DONE;
          end
        end
        C_DONE: begin
          if (cpu_ce_i) begin
            if (reached) state <= C_IDLE;
            else         vcnt  <= vcnt + 1'b1;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  assign cpu_rsp_o.ack   = (state == C_DONE) && reached;
  assign cpu_rsp_o.rdata = rdata_q;
  // Stop the core's clock when its next edge would be past the configured
  // latency while the physical memory is still working.
  // The decode cycle (request seen in C_IDLE) is hidden the same way.
  assign suppress_o = ((state == C_BUSY) && reached) ||
                      ((state == C_IDLE) && cpu_req_i.req);
  assign busy_o     = (state != C_IDLE) || cpu_req_i.req;

  always_comb begin
    priv_req_o = '{req: dreq && tgt == T_PRIV, we: cpu_req_i.we, addr: cpu_req_i.addr, wdata: cpu_req_i.wdata};
    dc_req_o   = '{req: dreq && tgt == T_DC,   we: cpu_req_i.we, addr: cpu_req_i.addr, wdata: cpu_req_i.wdata};
    ic_req_o   = '{req: dreq && tgt == T_IC,   we: 1'b0,         addr: cpu_req_i.addr, wdata: cpu_req_i.wdata};
    sh_req_o   = '{req: dreq && tgt == T_SH,   we: cpu_req_i.we, addr: cpu_req_i.addr, wdata: cpu_req_i.wdata};
  end

  // The core must hold its request stable while it is being served.
  property p_req_held;
    @(posedge clk) disable iff (!rst_n) (state == C_BUSY) |-> cpu_req_i.req;
  endproperty
  a_req_held: assert property (p_req_held);

endmodule
