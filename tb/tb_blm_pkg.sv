// tb_blm_pkg -- self-checking testbench of the shared package: packet CRC, packet
// unpacking and the running-sum configuration constants.
//
// 3000 random packets are built by the transmitter model of tb_pkt_pkg, whose CRC is
// computed bit by bit over the whole body. The package's word-wise crc32_word, run over
// words 0..17, must end on the CRC carried in words 18..19, and it must differ after a
// random single-bit error. unpack_packet must return every field of the packet.
// The constant tables are checked against the configuration written out here a second
// time (window, refresh period and width of each sum), together with the derived
// properties the running-sum logic relies on: every window a multiple of its refresh
// period, the longest window 2^21 steps (84 s at 40 us) and a threshold table of
// 262,144 bits. A clock drives the watchdog only; the checks need no design timing.
module tb_blm_pkg;
  import blm_pkg::*;
  import tb_pkt_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  localparam int unsigned T_LEN [12] = '{1, 2, 8, 16, 64, 256, 2048, 8192, 32768, 131072,
                                         524288, 2097152};
  localparam int unsigned T_REF [12] = '{1, 1, 1, 1, 2, 2, 64, 64, 2048, 2048, 32768, 32768};
  localparam int unsigned T_BIT [12] = '{20, 22, 22, 22, 26, 26, 32, 32, 36, 36, 40, 40};

  initial begin
    longint unsigned tbits;
    // ---- constants ----
    tbits = 0;
    for (int k = 0; k < NRS; k++) begin
      chk(RS_LEN[k] == T_LEN[k], $sformatf("RS%0d window", k));
      chk(RS_REFRESH[k] == T_REF[k], $sformatf("RS%0d refresh", k));
      chk(RS_WIDTH[k] == T_BIT[k], $sformatf("RS%0d width", k));
      chk(RS_LEN[k] % RS_REFRESH[k] == 0, $sformatf("RS%0d window not a multiple of refresh", k));
      chk(RS_THR_W[k] >= 32 && RS_THR_W[k] <= THR_W, $sformatf("RS%0d threshold width", k));
      chk(RS_WIDTH[k] <= RSW_MAX && RS_WIDTH[k] >= VAL_W, $sformatf("RS%0d width range", k));
      tbits += longint'(RS_THR_W[k]) * NCH * NENERGY;
    end
    chk(tbits == 262144, "threshold table size");
    chk(RS_LEN[NRS-1] == (1 << STEP_W), "longest window");
    chk(PKT_WORDS * 16 == PKT_BITS && PKT_BITS == 320, "packet length");
    chk(NCARD * CH_PER_CARD == NCH, "detector count");
    chk(CNT_W + ADC_W == VAL_W, "channel field width");

    // ---- CRC and unpacking ----
    for (int n = 0; n < 3000; n++) begin
      tx_pkt_t     p;
      words_t      w;
      logic [31:0] c;
      logic [287:0] body;
      packet_t     u;
      int          bit_n;
      p = random_pkt(16'($urandom), 16'($urandom));
      w = build(p);
      c = 32'hFFFF_FFFF;
      for (int i = 0; i < 18; i++) c = crc32_word(c, w[i]);
      chk(c == {w[18], w[19]}, $sformatf("packet %0d CRC %h exp %h", n, c, {w[18], w[19]}));
      // a single-bit error must change the CRC
      bit_n = $urandom_range(0, 287);
      w[bit_n / 16][bit_n % 16] = ~w[bit_n / 16][bit_n % 16];
      c = 32'hFFFF_FFFF;
      for (int i = 0; i < 18; i++) c = crc32_word(c, w[i]);
      chk(c != {w[18], w[19]}, "single-bit error not detected");
      w[bit_n / 16][bit_n % 16] = ~w[bit_n / 16][bit_n % 16];
      for (int i = 0; i < 18; i++) body[(17 - i) * 16 +: 16] = w[i];
      u = unpack_packet(body);
      chk(u.card_id == p.cid && u.frame_id == p.fid && u.status == p.status, "header fields");
      for (int ch = 0; ch < 8; ch++) begin
        chk(u.chan[ch].count == p.count[ch] && u.chan[ch].adc == p.adc[ch],
            $sformatf("channel %0d fields", ch));
        chk(u.dac[ch] == p.dac[ch], $sformatf("DAC %0d", ch));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
