// tb_masking -- self-checking testbench of the masking table and beam permit.
//
// Loads a masking table in which every combination of connected/maskable occurs (the
// first five detectors follow the example table: 1-2 unconnected and maskable, 3 and 15
// connected and not maskable, 16 connected and maskable), then runs 600 steps of 16
// channels with random over-threshold flags, random safe_beam/mask_enable and occasional
// rearm. A reference model gives the per-step requests, the permit, the dump trigger
// and the latched cause; all are checked every step. The permit must stay low until the
// configuration is marked done (armed).
module tb_masking;
  import blm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           tbl_wr_en, tbl_connected, tbl_maskable, armed, safe_beam, mask_enable, rearm;
  logic [3:0]     tbl_wr_ch, in_ch;
  logic           in_valid, in_last;
  logic [NRS-1:0] in_over;
  logic           req_unmaskable, req_maskable, beam_permit, dump_trig;
  logic [15:0]    dump_cause;

  masking dut (.*);

  int unsigned checks = 0, failures = 0;
  int unsigned n_trig = 0, n_masked = 0, n_unconn = 0;
  bit conn [16], mskb [16];

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    bit tripped;
    logic [15:0] cause;
    tbl_wr_en = 0; tbl_connected = 0; tbl_maskable = 0; tbl_wr_ch = 0;
    armed = 0; safe_beam = 0; mask_enable = 0; rearm = 0;
    in_valid = 0; in_last = 0; in_ch = 0; in_over = '0;
    tripped = 0; cause = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(beam_permit == 0, "permit low before configuration");
    for (int c = 0; c < 16; c++) begin
      case (c)
        0, 1:    begin conn[c] = 0; mskb[c] = 1; end
        2, 14:   begin conn[c] = 1; mskb[c] = 0; end
        15:      begin conn[c] = 1; mskb[c] = 1; end
        default: begin conn[c] = 1'($urandom); mskb[c] = 1'($urandom); end
      endcase
      tbl_wr_en = 1; tbl_wr_ch = 4'(c); tbl_connected = conn[c]; tbl_maskable = mskb[c];
      @(negedge clk);
    end
    tbl_wr_en = 0;
    armed = 1;
    @(negedge clk);
    chk(beam_permit == 1, "permit high once armed");
    for (int s = 0; s < 600; s++) begin
      logic [15:0] hu, hm;
      bit masked, fire;
      hu = '0; hm = '0;
      safe_beam = 1'($urandom); mask_enable = 1'($urandom);
      masked = safe_beam && mask_enable;
      for (int c = 0; c < 16; c++) begin
        in_valid = 1; in_ch = 4'(c); in_last = (c == 15);
        in_over = ($urandom_range(0, 40) == 0) ? NRS'(1 << $urandom_range(0, NRS - 1)) : '0;
        if (|in_over) begin
          if (!conn[c]) n_unconn++;
          else if (mskb[c]) hm[c] = 1;
          else hu[c] = 1;
        end
        @(negedge clk);
        // a gap cycle now and then, as between real steps
        if (c < 15 && $urandom_range(0, 7) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
      end
      in_valid = 0; in_last = 0;
      fire = !tripped && ((|hu) || ((|hm) && !masked));
      if ((|hm) && masked && !(|hu)) n_masked++;
      chk(req_unmaskable == (|hu) && req_maskable == (|hm), $sformatf("requests step %0d", s));
      chk(dump_trig == fire, $sformatf("dump trigger step %0d", s));
      if (fire) begin
        tripped = 1;
        cause = hu | (masked ? 16'd0 : hm);
        n_trig++;
      end
      chk(beam_permit == !tripped, "permit");
      chk(dump_cause == cause, "dump cause");
      @(negedge clk);
      chk(dump_trig == 0 && req_unmaskable == 0, "pulses one cycle");
      if (tripped && $urandom_range(0, 3) == 0) begin
        rearm = 1;
        @(negedge clk);
        rearm = 0;
        tripped = 0; cause = '0;
        chk(beam_permit == 1 && dump_cause == 0, "rearm");
      end
    end
    chk(n_trig > 5 && n_masked > 0 && n_unconn > 0, "dump, masked request and unconnected detector all seen");
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
