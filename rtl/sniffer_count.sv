// sniffer_count: count-logging hardware sniffer.
//
// It counts NEV event inputs (for a processing subsystem: cycles the core is
// active, stalled on memory or idle, and the number and kind of memory
// accesses and cache misses). Each input that is high in a cycle adds one to
// its counter. On a sample pulse all counters are copied to a shadow set and
// cleared in the same cycle, so no event is lost and counting goes on. The
// shadow values are then written, one word per statistics-bus grant, to
// buffer words BASE .. BASE+NEV-1. done_o goes low at the sample pulse and
// high again when the last word has been written.
//
// Interface: stats_req_o/stats_gnt_i is a write-only master port on the
// statistics bus (request held until granted; the write happens in the
// granted cycle). A sample pulse that arrives while the previous write-out is
// still in progress restarts the write-out with the newer values.
//
// Origin: count-logging sniffers that count events per period and deposit
// them in a shared buffer follow the framework description; counter width,
// the snapshot on the sample pulse and the bus write-out are this design's
// own.
module sniffer_count
  import mpsoc_pkg::*;
#(
  parameter int unsigned NEV  = 10,
  parameter int unsigned BASE = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NEV-1:0]   ev_i,
  input  logic             sample_i,
  output stats_req_t       stats_req_o,
  input  logic             stats_gnt_i,
  output logic             done_o
);
  localparam int unsigned NW = (NEV < 2) ? 1 : $clog2(NEV);

  logic [XLEN-1:0] cnt    [NEV];
  logic [XLEN-1:0] shadow [NEV];
  logic [NW-1:0]   widx;
  logic            wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NEV; i++) begin
        cnt[i]    <= '0;
        shadow[i] <= '0;
      end
      widx <= '0;
      wr   <= 1'b0;
    end else begin
      for (int i = 0; i < NEV; i++) begin
        if (sample_i) begin
          shadow[i] <= cnt[i] + XLEN'(ev_i[i]);
          cnt[i]    <= '0;
        end else if (ev_i[i]) begin
          cnt[i] <= cnt[i] + 1'b1;
        end
      end
      if (sample_i) begin
        widx <= '0;
        wr   <= 1'b1;
      end else if (wr && stats_gnt_i) begin
        if (widx == NW'(NEV - 1)) wr <= 1'b0;
        widx <= widx + 1'b1;
      end
    end
  end

  assign stats_req_o.req   = wr;
  assign stats_req_o.we    = 1'b1;
  assign stats_req_o.addr  = STATS_AW'(BASE) + STATS_AW'(widx);
  assign stats_req_o.wdata = shadow[widx];
  assign done_o            = !wr;

endmodule
