// tb_link_rx -- self-checking testbench of the single-link packet receiver.
//
// Sends 300 packets with random contents and random idle cycles between and inside them.
// One packet in four has one bit flipped in a random word (its CRC must fail); one in
// eight is preceded by a truncated packet that a new start-of-frame cuts off (it must be
// dropped). For every complete packet the decoded fields, the received CRC, the CRC
// verdict and that pkt_done is a one-cycle pulse from the edge that takes the last word
// are checked, and no
// extra pkt_done may appear. Inputs change and outputs are checked at the falling edge.
module tb_link_rx;
  import blm_pkg::*;
  import tb_pkt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        rx_valid, rx_sof;
  logic [15:0] rx_data;
  logic        pkt_done, crc_ok;
  logic [31:0] crc_rx;
  packet_t     pkt;

  link_rx dut (.*);

  int unsigned checks = 0, failures = 0;
  int unsigned done_seen = 0;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  task automatic send_word(input logic [15:0] w, input logic sof);
    while ($urandom_range(0, 4) == 0) begin
      rx_valid = 0; rx_sof = 0; rx_data = 16'($urandom);
      @(negedge clk);
    end
    rx_valid = 1; rx_sof = sof; rx_data = w;
    @(negedge clk);
    rx_valid = 0; rx_sof = 0;
  endtask

  initial begin
    rx_valid = 0; rx_sof = 0; rx_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 300; n++) begin
      tx_pkt_t p;
      words_t  w;
      bit      bad;
      int      wi;
      p = random_pkt(16'($urandom), 16'(n));
      w = build(p);
      bad = ($urandom_range(0, 3) == 0);
      if (bad) begin
        wi = $urandom_range(0, 19);
        w[wi] = w[wi] ^ (16'd1 << $urandom_range(0, 15));
      end
      if ($urandom_range(0, 7) == 0) begin
        // truncated packet, cut off by the next start of frame
        for (int i = 0; i < int'($urandom_range(1, 19)); i++) send_word(16'($urandom), i == 0);
      end
      for (int i = 0; i < 20; i++) begin
        if (i == 19) begin
          // last word: pkt_done must follow in exactly one cycle
          rx_valid = 1; rx_sof = 0; rx_data = w[19];
          @(negedge clk);
          rx_valid = 0;
          chk(pkt_done == 1, "pkt_done not at the edge that takes the last word");
          chk(crc_ok == !bad, $sformatf("crc verdict pkt %0d bad=%0d", n, bad));
          chk(crc_rx == {w[18], w[19]}, "received CRC");
          if (!bad) begin
            chk(pkt.card_id == p.cid && pkt.frame_id == p.fid, "card/frame ID");
            chk(pkt.status == p.status, "status");
            for (int c = 0; c < 8; c++) begin
              chk(pkt.chan[c].count == p.count[c] && pkt.chan[c].adc == p.adc[c],
                  $sformatf("channel %0d", c));
              chk(pkt.dac[c] == p.dac[c], "dac");
            end
          end
          @(negedge clk);
          chk(pkt_done == 0, "pkt_done longer than one cycle");
        end else begin
          send_word(w[i], i == 0);
        end
      end
    end
    repeat (5) @(negedge clk);
    chk(done_seen == 300, $sformatf("pkt_done count %0d", done_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && pkt_done) done_seen++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
