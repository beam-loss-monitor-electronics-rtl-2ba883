// tb_rcc -- self-checking testbench of Receive, Check & Compare for one tunnel card.
//
// 400 acquisition periods. In each, links A and B independently carry a good copy, a
// copy with a corrupted bit, or nothing; B's good copy is sometimes a different packet
// (the copies then differ). The card ID is sometimes wrong and the frame ID sometimes
// skips. After each acquisition tick every output (chosen data, the none flag, the
// seven error/lost pulses, the status words) is compared with a reference model of the
// decision rules, one cycle after the tick. Each rule must fire at least once.
module tb_rcc;
  import blm_pkg::*;
  import tb_pkt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam logic [15:0] CID = 16'h0A51;

  logic        acq_tick;
  logic [15:0] expected_cid;
  logic        a_valid, a_sof, b_valid, b_sof;
  logic [15:0] a_data, b_data;
  logic        out_valid, out_none;
  packet_t     out_pkt;
  logic        err_crc_a, err_crc_b, err_comp, err_cid, err_fid, lost_a, lost_b;
  logic [15:0] status_a, status_b;

  rcc dut (.*);

  int unsigned checks = 0, failures = 0;
  int unsigned seen [7];

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    logic [15:0] fid, last_fid, exp_sa, exp_sb;
    bit          have_fid;
    acq_tick = 0; expected_cid = CID;
    a_valid = 0; a_sof = 0; a_data = 0; b_valid = 0; b_sof = 0; b_data = 0;
    fid = 0; last_fid = 0; have_fid = 0; exp_sa = 0; exp_sb = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      tx_pkt_t pa, pb;
      words_t  wa, wb;
      int      ma, mb;          // 0 good, 1 corrupted, 2 missing, 3 (B only) other packet
      bit      ua, ub, usable, cidbad, e_fid;
      tx_pkt_t ch;
      fid = fid + 16'd1;
      if ($urandom_range(0, 9) == 0) fid = fid + 16'd3;
      pa = random_pkt(($urandom_range(0, 9) == 0) ? 16'h0BAD : CID, fid);
      pb = pa;
      ma = $urandom_range(0, 5); if (ma > 2) ma = 0;
      mb = $urandom_range(0, 6); if (mb > 3) mb = 0;
      if (mb == 3) begin
        pb.count[0] = pb.count[0] + 8'd1;
      end
      wa = build(pa);
      wb = build(pb);
      if (ma == 1) wa[5] = wa[5] ^ 16'h0100;
      if (mb == 1) wb[11] = wb[11] ^ 16'h0001;
      for (int i = 0; i < 20; i++) begin
        a_valid = (ma != 2); a_sof = (i == 0); a_data = wa[i];
        b_valid = (mb != 2); b_sof = (i == 0); b_data = wb[i];
        @(negedge clk);
      end
      a_valid = 0; b_valid = 0; a_sof = 0; b_sof = 0;
      repeat ($urandom_range(1, 5)) @(negedge clk);
      acq_tick = 1;
      @(negedge clk);
      acq_tick = 0;
      // reference decision
      ua = (ma == 0);
      ub = (mb == 0 || mb == 3);
      ch = ua ? pa : pb;
      cidbad = (ua || ub) && ch.cid != CID;
      usable = (ua || ub) && !cidbad;
      e_fid  = usable && have_fid && ch.fid != last_fid + 16'd1;
      if (ma != 2) exp_sa = pa.status[15:0];
      if (mb != 2) exp_sb = pb.status[15:0];
      chk(out_valid == usable && out_none == !usable, $sformatf("valid/none period %0d", n));
      chk(err_crc_a == (ma == 1) && err_crc_b == (mb == 1), "CRC errors");
      chk(lost_a == (ma == 2) && lost_b == (mb == 2), "lost frames");
      chk(err_comp == (ua && mb == 3), "A/B compare");
      chk(err_cid == cidbad, "card ID");
      chk(err_fid == e_fid, $sformatf("frame ID period %0d", n));
      chk(status_a == exp_sa && status_b == exp_sb, "status words");
      if (usable) begin
        chk(out_pkt.card_id == ch.cid && out_pkt.frame_id == ch.fid, "chosen IDs");
        for (int c = 0; c < 8; c++)
          chk(out_pkt.chan[c].count == ch.count[c] && out_pkt.chan[c].adc == ch.adc[c],
              "chosen channel data");
        last_fid = ch.fid;
        have_fid = 1;
      end
      seen[0] += int'(err_crc_a); seen[1] += int'(err_crc_b); seen[2] += int'(err_comp);
      seen[3] += int'(err_cid);   seen[4] += int'(err_fid);   seen[5] += int'(lost_a && lost_b);
      seen[6] += int'(out_valid && !ua);
      @(negedge clk);
      chk(!out_valid && !out_none && !err_crc_a && !lost_a, "pulses last one cycle");
    end
    for (int i = 0; i < 7; i++) chk(seen[i] > 0, $sformatf("case %0d never happened", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
