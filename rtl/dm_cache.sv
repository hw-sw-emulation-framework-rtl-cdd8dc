// dm_cache: direct-mapped, write-through L1 cache used as both the D-cache
// and the I-cache of a processing subsystem (the I-cache simply never sees a
// write).
//
// Total size and line size are parameters; the default is the 8 KB cache of
// the four-core case study. A read hit is acknowledged two cycles after the request
// appears. A read miss raises miss_o for one cycle, refills the whole line
// word by word from the backing (cacheable private) memory and then answers.
// A write updates the line if it hits (no allocation on a write miss) and is
// always written through to memory; it is acknowledged after the memory's
// ack. hit_o pulses for a read or write that hits, miss_o for one that
// misses. The hit/miss latency that
// the emulated processor sees is enforced by the memory controller, not here.
//
// Interfaces: up_req_i/up_rsp_o toward the memory controller, mem_req_o/
// mem_rsp_i toward the backing memory, both with the mem_req_t handshake.
// Valid bits are cleared by reset; tags and data are not.
//
// Origin: direct mapping, write-through and the 8 KB default size follow the
// framework description; the 32-byte line, no allocation on a write miss,
// word-by-word refill and the state machine are this design's own.
module dm_cache
  import mpsoc_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 8192,
  parameter int unsigned LINE_BYTES = 32
) (
  input  logic     clk,
  input  logic     rst_n,
  input  mem_req_t up_req_i,
  output mem_rsp_t up_rsp_o,
  output logic     hit_o,
  output logic     miss_o,
  output mem_req_t mem_req_o,
  input  mem_rsp_t mem_rsp_i
);
  localparam int unsigned LINES = SIZE_BYTES / LINE_BYTES;
  localparam int unsigned LW    = LINE_BYTES / 4;       // words per line
  localparam int unsigned OW    = $clog2(LW);           // word offset bits
  localparam int unsigned IXW   = $clog2(LINES);        // index bits
  localparam int unsigned TW    = XLEN - IXW - OW - 2;  // tag bits

  typedef enum logic [2:0] {S_IDLE, S_REFILL, S_WRITE, S_RESP} state_e;
  state_e state;

  logic [XLEN-1:0] data  [LINES*LW];
  logic [TW-1:0]   tags  [LINES];
  logic [LINES-1:0] valid;

  logic [IXW-1:0] idx;
  logic [OW-1:0]  off;
  logic [TW-1:0]  tag;
  logic           hit;
  logic [OW-1:0]  rcnt;       // refill word counter
  logic           mreq;
  logic [XLEN-1:0] rdata_q;
  logic           ack_q;

  assign off = up_req_i.addr[OW+1:2];
  assign idx = up_req_i.addr[OW+IXW+1:OW+2];
  assign tag = up_req_i.addr[XLEN-1:OW+IXW+2];
  assign hit = valid[idx] && (tags[idx] == tag);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      valid  <= '0;
      rcnt   <= '0;
      mreq   <= 1'b0;
      ack_q  <= 1'b0;
      hit_o  <= 1'b0;
      miss_o <= 1'b0;
    end else begin
      ack_q  <= 1'b0;
      hit_o  <= 1'b0;
      miss_o <= 1'b0;
      unique case (state)
        S_IDLE: if (up_req_i.req && !ack_q) begin
          if (up_req_i.we) begin
            hit_o  <= hit;
            miss_o <= !hit;
            mreq  <= 1'b1;
            state <= S_WRITE;
          end else if (hit) begin
            hit_o <= 1'b1;
            state <= S_RESP;
          end else begin
            miss_o     <= 1'b1;
            valid[idx] <= 1'b0;
            rcnt       <= '0;
            mreq       <= 1'b1;
            state      <= S_REFILL;
          end
        end
        S_REFILL: if (mem_rsp_i.ack) begin
          if (rcnt == OW'(LW - 1)) begin
            mreq       <= 1'b0;
            valid[idx] <= 1'b1;
            state      <= S_RESP;
          end else begin
            // drop req for one cycle between words (handshake rule)
            mreq <= 1'b0;
          end
          rcnt <= rcnt + 1'b1;
        end else if (!mreq) begin
          mreq <= 1'b1;
        end
        S_WRITE: if (mem_rsp_i.ack) begin
          mreq  <= 1'b0;
          ack_q <= 1'b1;
          state <= S_IDLE;
        end
        S_RESP: begin
          ack_q <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Array updates (no reset on storage).
  always_ff @(posedge clk) begin
    if (state == S_REFILL && mem_rsp_i.ack) begin
      data[{idx, rcnt}] <= mem_rsp_i.rdata;
      if (rcnt == OW'(LW - 1)) tags[idx] <= tag;
    end
    if (state == S_IDLE && up_req_i.req && !ack_q && up_req_i.we && hit)
      data[{idx, off}] <= up_req_i.wdata;
    if (state == S_RESP) rdata_q <= data[{idx, off}];
  end

  always_comb begin
    mem_req_o.req   = mreq;
    mem_req_o.we    = (state == S_WRITE);
    mem_req_o.wdata = up_req_i.wdata;
    mem_req_o.addr  = (state == S_REFILL)
                    ? {up_req_i.addr[XLEN-1:OW+2], rcnt, 2'b00}
                    : up_req_i.addr;
  end

  assign up_rsp_o.ack   = ack_q;
  assign up_rsp_o.rdata = rdata_q;

endmodule
