// sniffer_event: event-logging hardware sniffer.
//
// It records every cycle in which any of its NEV (at most 8) event inputs is
// high as one 32-bit log record {timestamp[23:0], event_mask[7:0]}, where the
// timestamp counts cycles since the last sample pulse. Records go through a
// FIFO of FIFO_DEPTH entries and are written over the statistics bus to
// buffer words BASE+1, BASE+2, ... up to the end of its REGION-word window;
// records that do not fit (window full, or FIFO full) are dropped and
// counted. On a sample pulse the sniffer finishes draining its FIFO, writes
// the header {dropped[15:0], logged[15:0]} to word BASE, then restarts the
// log at BASE+1 and the timestamp at zero; done_o is high when no header is
// pending.
//
// Interface: write-only statistics-bus master (request held until granted).
//
// Origin: an event-logging sniffer that logs every interesting event follows
// the framework description; the record format, window layout, FIFO and drop
// counting are this design's own. Records that arrive between the sample
// pulse and the header write are counted in the period being closed.
module sniffer_event
  import mpsoc_pkg::*;
#(
  parameter int unsigned NEV        = 4,
  parameter int unsigned BASE       = 80,
  parameter int unsigned REGION     = 48,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NEV-1:0] ev_i,
  input  logic           sample_i,
  output stats_req_t     stats_req_o,
  input  logic           stats_gnt_i,
  output logic           done_o
);
  localparam int unsigned FW = $clog2(FIFO_DEPTH);
  localparam int unsigned RW = $clog2(REGION);

  logic [XLEN-1:0] fifo [FIFO_DEPTH];
  logic [FW:0]     wp, rp;
  logic            full, empty;
  logic [23:0]     ts;
  logic [15:0]     logged, dropped;     // current period
  logic [RW-1:0]   slot;                // next log slot (1 .. REGION-1)
  logic            hdr_pend;            // sample seen, header not yet written
  logic            push, pop, fit, wr_hdr;

  assign full   = (wp[FW-1:0] == rp[FW-1:0]) && (wp[FW] != rp[FW]);
  assign empty  = (wp == rp);
  assign push   = (|ev_i) && !full;
  assign wr_hdr = hdr_pend && empty;
  assign fit    = (slot != '0);          // slot wraps to 0 when the window is full
  assign pop    = !empty && (stats_gnt_i || !fit);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; ts <= '0;
      logged <= '0; dropped <= '0;
      slot <= RW'(1); hdr_pend <= 1'b0;
    end else begin
      ts <= sample_i ? 24'd0 : ts + 1'b1;
      if (push) wp <= wp + 1'b1;
      if (pop) begin
        rp <= rp + 1'b1;
        if (fit) begin
          slot   <= (slot == RW'(REGION - 1)) ? '0 : slot + 1'b1;
          logged <= logged + 1'b1;
        end else begin
          dropped <= dropped + 1'b1;
        end
      end
      if ((|ev_i) && full) dropped <= dropped + 1'b1;
      if (sample_i) hdr_pend <= 1'b1;
      if (wr_hdr && stats_gnt_i) begin
        hdr_pend <= 1'b0;
        slot     <= RW'(1);
        logged   <= '0;
        dropped  <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push) fifo[wp[FW-1:0]] <= {ts, 8'(ev_i)};
  end

  always_comb begin
    stats_req_o.we = 1'b1;
    if (wr_hdr) begin
      stats_req_o.req   = 1'b1;
      stats_req_o.addr  = STATS_AW'(BASE);
      stats_req_o.wdata = {dropped, logged};
    end else begin
      stats_req_o.req   = !empty && fit;
      stats_req_o.addr  = STATS_AW'(BASE) + STATS_AW'(slot);
      stats_req_o.wdata = fifo[rp[FW-1:0]];
    end
  end

  assign done_o = !hdr_pend;

endmodule
