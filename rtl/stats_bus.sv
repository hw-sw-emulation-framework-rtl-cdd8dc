// stats_bus: dedicated statistics bus. It connects the hardware sniffers, the
// Ethernet dispatcher and the statistics-side processing core (masters) to
// the Ethernet buffer and the virtual temperature sensor bank (slaves),
// separately from the emulated MPSoC's own interconnect so that collecting
// statistics never disturbs the emulated traffic.
//
// One access per cycle. A round-robin arbiter grants one requesting master
// per cycle (gnt_o, combinational); the granted access is performed in that
// same cycle. Address bit STATS_AW-1 selects the slave: 0 = Ethernet buffer,
// 1 = sensor bank. Read data comes back one cycle after the grant, on rdata_o
// with rvalid_o set for the master that read.
//
// Origin: a dedicated statistics bus joining the sniffers, the buffer, the
// dispatcher, the sensors and a processing core is named by the framework
// description; its protocol, arbitration and address map are this design's
// own.
module stats_bus
  import mpsoc_pkg::*;
#(
  parameter int unsigned NM = 9
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  stats_req_t [NM-1:0]   m_req_i,
  output logic       [NM-1:0]   gnt_o,
  output logic       [NM-1:0]   rvalid_o,
  output logic       [XLEN-1:0] rdata_o,
  // Ethernet buffer port
  output logic                  buf_en_o,
  output logic                  buf_we_o,
  output logic [STATS_AW-2:0]   buf_addr_o,
  output logic [XLEN-1:0]       buf_wdata_o,
  input  logic [XLEN-1:0]       buf_rdata_i,
  // sensor bank port
  output logic                  sen_en_o,
  output logic                  sen_we_o,
  output logic [STATS_AW-2:0]   sen_addr_o,
  output logic [XLEN-1:0]       sen_wdata_o,
  input  logic [XLEN-1:0]       sen_rdata_i
);
  localparam int unsigned MW = (NM < 2) ? 1 : $clog2(NM);

  logic [MW-1:0] last, pick;
  logic          any;
  stats_req_t    sel;
  logic          rd_sen_q;

  always_comb begin
    pick = '0;
    any  = 1'b0;
    for (int k = NM; k >= 1; k--) begin
      int unsigned c;
      c = (int'(last) + k) % NM;
      if (m_req_i[c].req) begin
        pick = MW'(c);
        any  = 1'b1;
      end
    end
    gnt_o = '0;
    if (any) gnt_o[pick] = 1'b1;
    sel = m_req_i[pick];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last     <= MW'(NM - 1);
      rvalid_o <= '0;
      rd_sen_q <= 1'b0;
    end else begin
      rvalid_o <= '0;
      if (any) begin
        last <= pick;
        if (!sel.we) begin
          rvalid_o[pick] <= 1'b1;
          rd_sen_q       <= sel.addr[STATS_AW-1];
        end
      end
    end
  end

  assign buf_en_o    = any && !sel.addr[STATS_AW-1];
  assign buf_we_o    = sel.we;
  assign buf_addr_o  = sel.addr[STATS_AW-2:0];
  assign buf_wdata_o = sel.wdata;
  assign sen_en_o    = any && sel.addr[STATS_AW-1];
  assign sen_we_o    = sel.we;
  assign sen_addr_o  = sel.addr[STATS_AW-2:0];
  assign sen_wdata_o = sel.wdata;
  assign rdata_o     = rd_sen_q ? sen_rdata_i : buf_rdata_i;

endmodule
