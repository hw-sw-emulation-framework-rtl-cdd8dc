// tb_eth_dispatcher: the dispatcher with a behavioural statistics bus and
// buffer, sniffers that take a random time to finish, a transmit side that
// is sometimes slow enough to saturate, and a receive side fed with
// temperature packets. Checks: sampling period in emulated cycles, packet
// bytes (header, sequence number, buffer words), stall only while the
// previous packet is still in flight, temperature writes, and that packets of
// another EtherType are ignored.
//
// Origin: the expected values are worked out in the testbench from the
// behaviour stated above; the stimulus, sizes and check list are this
// testbench's own. Timing: 10 ns clock; a watchdog counts a failure and ends
// the run if it does not finish in time.
module tb_eth_dispatcher;
  import mpsoc_pkg::*;
  localparam int SC = 300, NW = 8, NS = 4;
  localparam logic [47:0] DST = 48'h02_00_00_00_00_02, SRC = 48'h02_00_00_00_00_01;
  localparam logic [15:0] ET = 16'h88B5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic emu, done, sample, stall;
  logic [7:0] txd, rxd;
  logic txv, txl, txr, rxv, rxl;
  stats_req_t txm, rxm;
  logic txg, rxg, txrv;
  logic [31:0] rdata, fs, fr, sc;
  logic [15:0] drop;

  eth_dispatcher #(.SAMPLE_CYCLES(SC), .NWORDS(NW), .NS(NS)) dut (
    .clk, .rst_n, .emu_en_i(emu), .done_i(done), .sample_o(sample), .stall_o(stall),
    .tx_data_o(txd), .tx_valid_o(txv), .tx_last_o(txl), .tx_ready_i(txr),
    .rx_data_i(rxd), .rx_valid_i(rxv), .rx_last_i(rxl),
    .txm_req_o(txm), .txm_gnt_i(txg), .txm_rvalid_i(txrv), .rdata_i(rdata),
    .rxm_req_o(rxm), .rxm_gnt_i(rxg),
    .frames_sent_o(fs), .frames_rcvd_o(fr), .stall_cycles_o(sc), .rx_drop_o(drop));

  assign emu = !stall;   // as the clock manager does

  // statistics bus model: one grant per cycle, random
  logic [31:0] bufm [NW];
  logic [15:0] sens [NS];
  int period = 0;
  always @(posedge clk) begin
    txrv <= 1'b0;
    txg  <= 1'b0;
    rxg  <= 1'b0;
    if (rxm.req && !rxg && $urandom_range(1)) begin
      rxg <= 1'b1;
    end else if (txm.req && !txg && !txrv && $urandom_range(1)) begin
      txg <= 1'b1;
    end
    if (txg && txm.req) begin
      chk(!txm.we && !txm.addr[STATS_AW-1], "upload must read the buffer");
      rdata <= bufm[txm.addr[2:0]];
      txrv  <= 1'b1;
    end
    if (rxg && rxm.req) begin
      chk(rxm.we && rxm.addr[STATS_AW-1], "download must write the sensors");
      sens[rxm.addr[1:0]] <= rxm.wdata[15:0];
    end
  end

  // sniffers: busy for a random time after each sample; they refill the buffer
  int busy_left = 0;
  always @(posedge clk) begin
    if (sample) begin
      busy_left <= 3 + int'($urandom_range(20));
      for (int i = 0; i < NW; i++) bufm[i] <= {8'(period + 1), 24'(i * 1111)};
      period <= period + 1;
    end else if (busy_left > 0) busy_left <= busy_left - 1;
  end
  assign done = (busy_left == 0) && !sample;

  // transmit side: collect bytes, check each finished packet
  byte q[$];

  int nfr = 0, slow_tx = 0, ncyc = 0, last_sample = -1, emu_since = 0;
  always @(posedge clk) begin
    txr <= slow_tx ? ($urandom_range(15) == 0) : ($urandom_range(3) != 0);
    if (rst_n) begin
      if (emu) emu_since++;
      if (sample) begin
        if (last_sample >= 0) chk(emu_since == SC, $sformatf("sampling period %0d emulated cycles", emu_since));
        last_sample = ncyc; emu_since = 0;
      end
      if (stall) chk(txv || dut.ts != 0, "stall without a packet in flight");
      ncyc++;
    end
    if (rst_n && txv && txr) begin
      q.push_back(txd);
      if (txl) begin
        logic [8*(18+4*NW)-1:0] exp_pkt;
        exp_pkt = '0;
        exp_pkt[8*(18+4*NW)-1 -: 144] = {DST, SRC, ET, 32'(nfr)};
        for (int i = 0; i < NW; i++) exp_pkt[8*(4*NW - 4*i) - 1 -: 32] = {8'(nfr + 1), 24'(i * 1111)};
        chk(q.size() == 18 + 4 * NW, $sformatf("packet length %0d", q.size()));
        for (int b = 0; b < q.size() && b < 18 + 4 * NW; b++)
          chk(q[b] == exp_pkt[8*(18+4*NW-b)-1 -: 8], $sformatf("packet %0d byte %0d: %h expected %h", nfr, b, q[b], exp_pkt[8*(18+4*NW-b)-1 -: 8]));
        q.delete();
        nfr++;
      end
    end
  end

  // receive side: bytes queued by send_rx are presented by a clocked
  // process, one per cycle with random gaps
  byte rxq[$];
  always @(posedge clk) begin
    if (rxq.size() > 0 && $urandom_range(2) != 0) begin
      rxv <= 1'b1;
      rxd <= rxq.pop_front();
      rxl <= (rxq.size() == 0);
    end else begin
      rxv <= 1'b0;
      rxl <= 1'b0;
    end
  end

  task automatic send_rx(input logic [15:0] et, input logic [15:0] t [NS]);
    for (int i = 5; i >= 0; i--) rxq.push_back(SRC[8*i +: 8]);
    for (int i = 5; i >= 0; i--) rxq.push_back(DST[8*i +: 8]);
    rxq.push_back(et[15:8]); rxq.push_back(et[7:0]);
    for (int s = 0; s < NS; s++) begin rxq.push_back(t[s][15:8]); rxq.push_back(t[s][7:0]); end
    while (rxq.size() > 0) @(posedge clk);
    repeat (40) @(posedge clk);
  endtask

  initial begin
    logic [15:0] t [NS];
    logic [15:0] bad [NS];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    wait (nfr == 3);
    slow_tx = 1;                // saturate the link
    wait (nfr == 6);
    slow_tx = 0;
    wait (nfr == 8);
    chk(sc > 0, "link saturation never stalled the emulation");
    for (int r = 0; r < 5; r++) begin
      for (int s = 0; s < NS; s++) t[s] = 16'(16 * (320 + 7 * r + s));
      send_rx(ET, t);
      for (int s = 0; s < NS; s++) chk(sens[s] == t[s], $sformatf("sensor %0d: %h expected %h", s, sens[s], t[s]));
      for (int s = 0; s < NS; s++) bad[s] = 16'hBAD0 + 16'(s);
      send_rx(16'h0800, bad);
      for (int s = 0; s < NS; s++) chk(sens[s] == t[s], "foreign packet changed a sensor");
    end
    chk(fr == 5, $sformatf("%0d temperature packets counted", fr));
    chk(fs == 32'(nfr), "sent packet counter");
    $display("packets %0d, stall cycles %0d", nfr, sc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
