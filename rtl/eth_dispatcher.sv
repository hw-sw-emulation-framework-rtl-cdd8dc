// eth_dispatcher: the network dispatcher between the statistics buffer and
// the Ethernet MAC that links the emulator to the host's thermal model.
//
// Sampling. A period counter advances on every emulated cycle (emu_en_i).
// After SAMPLE_CYCLES cycles it pulses sample_o: every sniffer then writes
// its statistics of the closed period into the Ethernet buffer. If the
// previous period's packet is still being sent when a period ends, the link
// is saturated: stall_o is raised, which freezes emulated time (the clock
// manager stops all virtual clocks) until the packet has left, and the
// sample is taken then. The default period is 10 ms of a 500 MHz target,
// 5,000,000 cycles.
//
// Upload. Once every sniffer reports done_i, one packet is sent on the
// transmit byte stream (tx_valid_o/tx_ready_i, tx_last_o on the final byte):
//   destination MAC (6 bytes), source MAC (6), EtherType (2),
//   period sequence number (4), then buffer words 0 .. NWORDS-1 (4 bytes
//   each, most significant byte first).
// Each word is read from the buffer over the statistics bus (txm_* port).
//
// Download. Packets on the receive stream (rx_valid_i, rx_last_i) whose
// EtherType matches carry 16-bit temperatures, most significant byte first,
// for sensors 0, 1, 2, ...; each one is queued (RXQ_DEPTH entries) and
// written to the sensor bank over the statistics bus (rxm_* port). A value
// that finds the queue full is dropped and counted in rx_drop_o. Values for
// sensors NS and above, and packets with another EtherType, are ignored.
//
// The packet layout, the EtherType and the MAC addresses are this design's
// own choice; the MAC itself and the PHY are outside this module.
//
// Origin: periodic download of the statistics as MAC packets in a custom
// format, upload of temperatures into the sensors, and stopping emulation
// while the Ethernet link is saturated follow the framework description; both
// packet formats, the 10 ms period expressed in cycles, and the saturation
// rule (a period ends while the previous packet is still being sent) are this
// design's own.
module eth_dispatcher
  import mpsoc_pkg::*;
#(
  parameter int unsigned SAMPLE_CYCLES = 5_000_000,
  parameter int unsigned NWORDS        = 128,
  parameter int unsigned NS            = 8,
  parameter int unsigned RXQ_DEPTH     = 8,
  parameter logic [47:0] MAC_DST       = 48'h02_00_00_00_00_02,
  parameter logic [47:0] MAC_SRC       = 48'h02_00_00_00_00_01,
  parameter logic [15:0] ETYPE         = 16'h88B5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            emu_en_i,
  input  logic            done_i,
  output logic            sample_o,
  output logic            stall_o,
  // transmit byte stream
  output logic [7:0]      tx_data_o,
  output logic            tx_valid_o,
  output logic            tx_last_o,
  input  logic            tx_ready_i,
  // receive byte stream
  input  logic [7:0]      rx_data_i,
  input  logic            rx_valid_i,
  input  logic            rx_last_i,
  // statistics bus: reader (upload) and writer (download)
  output stats_req_t      txm_req_o,
  input  logic            txm_gnt_i,
  input  logic            txm_rvalid_i,
  input  logic [XLEN-1:0] rdata_i,
  output stats_req_t      rxm_req_o,
  input  logic            rxm_gnt_i,
  // status
  output logic [31:0]     frames_sent_o,
  output logic [31:0]     frames_rcvd_o,
  output logic [31:0]     stall_cycles_o,
  output logic [15:0]     rx_drop_o
);
  localparam int unsigned PW  = $clog2(SAMPLE_CYCLES + 1);
  localparam int unsigned NWW = $clog2(NWORDS + 1);
  localparam int unsigned HDR = 18;   // bytes before the first buffer word

  // ---------------------------------------------------------------- sampling
  typedef enum logic [2:0] {T_IDLE, T_SAMPLED, T_WAITSN, T_HDR, T_FETCH, T_RD, T_DATA} tstate_e;
  tstate_e          ts;
  logic [PW-1:0]    pcnt;
  logic             pend;
  logic [31:0]      seq;
  logic [4:0]       hcnt;      // header byte index
  logic [NWW-1:0]   widx;      // buffer word index
  logic [1:0]       bidx;      // byte within word
  logic [31:0]      word_q;
  logic [HDR*8-1:0] hdr;

  assign pend     = (pcnt == PW'(SAMPLE_CYCLES - 1));
  assign stall_o  = pend && (ts != T_IDLE);
  assign sample_o = pend && (ts == T_IDLE) && emu_en_i;
  assign hdr      = {MAC_DST, MAC_SRC, ETYPE, seq};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcnt <= '0; ts <= T_IDLE; seq <= '0; hcnt <= '0; widx <= '0; bidx <= '0;
      word_q <= '0; frames_sent_o <= '0; stall_cycles_o <= '0;
    end else begin
      if (emu_en_i) pcnt <= pend ? (sample_o ? '0 : pcnt) : pcnt + 1'b1;
      if (stall_o) stall_cycles_o <= stall_cycles_o + 1'b1;
      unique case (ts)
        T_IDLE:    if (sample_o) ts <= T_SAMPLED;
        T_SAMPLED: ts <= T_WAITSN;                 // sniffers drop done this cycle
        T_WAITSN:  if (done_i) begin hcnt <= '0; ts <= T_HDR; end
        T_HDR: if (tx_ready_i) begin
          if (hcnt == 5'(HDR - 1)) begin
            widx <= '0;
            ts   <= T_FETCH;
          end
          hcnt <= hcnt + 1'b1;
        end
        T_FETCH: if (txm_gnt_i) ts <= T_RD;
        T_RD: if (txm_rvalid_i) begin
          word_q <= rdata_i;
          bidx   <= '0;
          ts     <= T_DATA;
        end
        T_DATA: if (tx_ready_i) begin
          word_q <= {word_q[23:0], 8'h00};
          bidx   <= bidx + 1'b1;
          if (bidx == 2'd3) begin
            widx <= widx + 1'b1;
            if (widx == NWW'(NWORDS - 1)) begin
              seq           <= seq + 1'b1;
              frames_sent_o <= frames_sent_o + 1'b1;
              ts            <= T_IDLE;
            end else begin
              ts <= T_FETCH;
            end
          end
        end
        default: ts <= T_IDLE;
      endcase
    end
  end

  always_comb begin
    tx_valid_o = (ts == T_HDR) || (ts == T_DATA);
    tx_data_o  = (ts == T_HDR) ? hdr[(HDR - 1 - int'(hcnt)) * 8 +: 8] : word_q[31:24];
    tx_last_o  = (ts == T_DATA) && (bidx == 2'd3) && (widx == NWW'(NWORDS - 1));
  end

  assign txm_req_o = '{req: ts == T_FETCH, we: 1'b0,
                       addr: {1'b0, (STATS_AW-1)'(widx)}, wdata: '0};

  // ---------------------------------------------------------------- download
  localparam int unsigned QW = $clog2(RXQ_DEPTH);

  logic [4:0]  rcnt;       // header byte index (saturates at 14)
  logic        rgood;      // EtherType matched
  logic        rphase;     // 0: high byte expected
  logic [7:0]  rhi;
  logic [15:0] ridx;       // next sensor index
  logic [STATS_AW-2:0] q_idx [RXQ_DEPTH];
  logic [15:0]         q_val [RXQ_DEPTH];
  logic [QW:0] qwp, qrp;
  logic        qfull, qempty, qpush;

  assign qempty = (qwp == qrp);
  assign qfull  = (qwp[QW-1:0] == qrp[QW-1:0]) && (qwp[QW] != qrp[QW]);
  assign qpush  = rx_valid_i && (rcnt >= 5'd14) && rgood && rphase && (int'(ridx) < NS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcnt <= '0; rgood <= 1'b0; rphase <= 1'b0; rhi <= '0; ridx <= '0;
      qwp <= '0; qrp <= '0; rx_drop_o <= '0; frames_rcvd_o <= '0;
    end else begin
      if (!qempty && rxm_gnt_i) qrp <= qrp + 1'b1;
      if (qpush) begin
        if (qfull) rx_drop_o <= rx_drop_o + 1'b1;
        else       qwp <= qwp + 1'b1;
      end
      if (rx_valid_i) begin
        if (rcnt < 5'd14) begin
          rcnt <= rcnt + 1'b1;
          if (rcnt == 5'd12) rgood <= (rx_data_i == ETYPE[15:8]);
          if (rcnt == 5'd13) rgood <= rgood && (rx_data_i == ETYPE[7:0]);
          rphase <= 1'b0;
          ridx   <= '0;
        end else if (rgood) begin
          rphase <= !rphase;
          if (!rphase) rhi  <= rx_data_i;
          else         ridx <= ridx + 1'b1;
        end
        if (rx_last_i) begin
          rcnt <= '0;
          if (rgood && rcnt >= 5'd14) frames_rcvd_o <= frames_rcvd_o + 1'b1;
          rgood <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (qpush && !qfull) begin
      q_idx[qwp[QW-1:0]] <= (STATS_AW-1)'(ridx);
      q_val[qwp[QW-1:0]] <= {rhi, rx_data_i};
    end
  end

  assign rxm_req_o = '{req: !qempty, we: 1'b1,
                       addr: {1'b1, q_idx[qrp[QW-1:0]]}, wdata: {16'd0, q_val[qrp[QW-1:0]]}};

endmodule
