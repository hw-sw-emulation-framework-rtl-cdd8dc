// eth_buffer: block-RAM buffer in which the sniffers leave their statistics
// and from which the Ethernet dispatcher builds its packets.
//
// Single-port synchronous RAM of DEPTH 32-bit words, reached over the
// statistics bus: a write is stored at the clock edge of an enabled cycle;
// a read returns the word on rdata_o in the following cycle. The contents
// are not reset.
//
// Origin: a block-RAM buffer holding the statistics of one period follows the
// framework description; its depth and single port are this design's own.
module eth_buffer #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = 11
) (
  input  logic          clk,
  input  logic          en_i,
  input  logic          we_i,
  input  logic [AW-1:0] addr_i,
  input  logic [31:0]   wdata_i,
  output logic [31:0]   rdata_o
);
  localparam int unsigned IW = $clog2(DEPTH);

  logic [31:0]   mem [DEPTH];
  logic [IW-1:0] idx;

  assign idx = addr_i[IW-1:0];

  always_ff @(posedge clk) begin
    if (en_i) begin
      if (we_i) mem[idx] <= wdata_i;
      rdata_o <= mem[idx];
    end
  end

endmodule
