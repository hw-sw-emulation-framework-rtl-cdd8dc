// temp_sensors: bank of NS virtual temperature sensors.
//
// Each sensor is a register holding the latest temperature of one floorplan
// component as computed by the host's thermal model and delivered by the
// Ethernet dispatcher. Temperatures are unsigned 16-bit values in units of
// 1/16 kelvin. Two threshold registers (upper and lower, written like the
// sensors) give each sensor a hot flag (temperature above the upper
// threshold) and a cool flag (temperature below the lower threshold); their
// reset values are 350 K and 340 K, the thresholds of the case study.
//
// Statistics-bus slave, word addresses: 0 .. NS-1 sensors, NS upper
// threshold, NS+1 lower threshold. Reads return the value one cycle later.
// Sensors reset to T_RESET (300 K). upd_o pulses for each sensor write.
//
// Origin: sensors as plain registers written with temperatures from the host,
// and the 350 K / 340 K thresholds, follow the framework description; the
// 1/16 K encoding, the reset value and the writable threshold registers are
// this design's own.
module temp_sensors
  import mpsoc_pkg::*;
#(
  parameter int unsigned NS      = 8,
  parameter logic [15:0] T_HIGH  = 16'(350 * 16),
  parameter logic [15:0] T_LOW   = 16'(340 * 16),
  parameter logic [15:0] T_RESET = 16'(300 * 16)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en_i,
  input  logic                we_i,
  input  logic [STATS_AW-2:0] addr_i,
  input  logic [XLEN-1:0]     wdata_i,
  output logic [XLEN-1:0]     rdata_o,
  output logic [NS-1:0][15:0] temp_o,
  output logic [NS-1:0]       hot_o,
  output logic [NS-1:0]       cool_o,
  output logic                upd_o
);
  logic [15:0] th_hi, th_lo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NS; i++) temp_o[i] <= T_RESET;
      th_hi   <= T_HIGH;
      th_lo   <= T_LOW;
      rdata_o <= '0;
      upd_o   <= 1'b0;
    end else begin
      upd_o <= 1'b0;
      if (en_i) begin
        if (we_i) begin
          if (int'(addr_i) < NS) begin
            temp_o[addr_i] <= wdata_i[15:0];
            upd_o          <= 1'b1;
          end else if (int'(addr_i) == NS) begin
            th_hi <= wdata_i[15:0];
          end else if (int'(addr_i) == NS + 1) begin
            th_lo <= wdata_i[15:0];
          end
        end
        if (int'(addr_i) < NS)          rdata_o <= {16'd0, temp_o[addr_i]};
        else if (int'(addr_i) == NS)    rdata_o <= {16'd0, th_hi};
        else if (int'(addr_i) == NS + 1) rdata_o <= {16'd0, th_lo};
        else                            rdata_o <= '0;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NS; i++) begin
      hot_o[i]  = temp_o[i] > th_hi;
      cool_o[i] = temp_o[i] < th_lo;
    end
  end

endmodule
