// sniffer_toggle: interconnect sniffer that counts signal transitions.
//
// Every cycle it compares the W monitored lines with their value in the
// previous cycle and adds the number of lines that changed to a 32-bit
// accumulator. On a sample pulse the accumulated count (including the
// current cycle) is copied out and the accumulator restarts from zero; the
// copy is written to buffer word BASE over the statistics bus, after which
// done_o goes high again.
//
// Interface: write-only statistics-bus master (request held until granted).
//
// Origin: counting signal transitions on the interconnect follows the
// framework description; the choice of monitored lines (address, write and
// read data of the shared bus) is this design's own.
module sniffer_toggle
  import mpsoc_pkg::*;
#(
  parameter int unsigned W    = 96,
  parameter int unsigned BASE = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] lines_i,
  input  logic         sample_i,
  output stats_req_t   stats_req_o,
  input  logic         stats_gnt_i,
  output logic         done_o
);
  logic [W-1:0]    prev;
  logic [XLEN-1:0] acc, shadow, flips;
  logic            wr;

  always_comb begin
    flips = '0;
    for (int i = 0; i < W; i++) flips = flips + XLEN'(lines_i[i] ^ prev[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev   <= '0;
      acc    <= '0;
      shadow <= '0;
      wr     <= 1'b0;
    end else begin
      prev <= lines_i;
      if (sample_i) begin
        shadow <= acc + flips;
        acc    <= '0;
        wr     <= 1'b1;
      end else begin
        acc <= acc + flips;
        if (wr && stats_gnt_i) wr <= 1'b0;
      end
    end
  end

  assign stats_req_o = '{req: wr, we: 1'b1, addr: STATS_AW'(BASE), wdata: shadow};
  assign done_o      = !wr;

endmodule
