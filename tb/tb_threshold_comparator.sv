// tb_threshold_comparator -- self-checking testbench of the threshold table and comparator.
//
// Fills the whole table (16 detectors x 32 energies x 12 sums, random 64-bit words of
// which the 32-bit banks keep the low half) and gives each detector a random shift of
// 0..7. It then streams 3000 channels' worth of running sums at random energies; each sum
// is the scaled threshold minus one, equal, plus one, or random, so both sides of the
// strict comparison are hit. out_over must equal the reference two cycles after the
// input, together with out_valid, out_ch and out_last. The logging port is read for
// 500 random (detector, sum) pairs and must return the scaled threshold one cycle later;
// in table mode it is read for 500 random (detector, energy, sum) entries at a different
// running energy and must return the stored, unscaled value.
module tb_threshold_comparator;
  import blm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [4:0]   energy, wr_energy;
  logic         in_valid, in_last, out_valid, out_last, wr_en, sh_wr_en;
  logic [3:0]   in_ch, out_ch, wr_ch, sh_wr_ch, log_ch, wr_rs, log_rs;
  logic         log_table;
  logic [4:0]   log_energy;
  rs_t          in_rs [NRS];
  logic [NRS-1:0] out_over;
  thr_t         wr_data, log_thr;
  logic [5:0]   sh_wr_val;

  threshold_comparator dut (.*);

  int unsigned checks = 0, failures = 0, n_over = 0, n_under = 0;
  longint unsigned thr [16][32][NRS];
  int unsigned     sh  [16];

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  function automatic longint unsigned scaled(int c, int e, int k);
    return thr[c][e][k] >> sh[c];
  endfunction

  // expected results, two cycles deep
  logic [NRS-1:0] exp_q [2];
  logic           expv_q [2];
  logic [3:0]     expc_q [2];
  logic           expl_q [2];

  initial begin
    energy = 0; in_valid = 0; in_last = 0; in_ch = 0; wr_en = 0; sh_wr_en = 0;
    wr_ch = 0; wr_energy = 0; wr_rs = 0; wr_data = 0; sh_wr_ch = 0; sh_wr_val = 0;
    log_ch = 0; log_rs = 0; log_table = 0; log_energy = 0;
    for (int k = 0; k < NRS; k++) in_rs[k] = '0;
    for (int i = 0; i < 2; i++) begin exp_q[i] = '0; expv_q[i] = 0; expc_q[i] = 0; expl_q[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 16; c++)
      for (int e = 0; e < 32; e++)
        for (int k = 0; k < NRS; k++) begin
          wr_en = 1; wr_ch = 4'(c); wr_energy = 5'(e); wr_rs = 4'(k);
          wr_data = {$urandom, $urandom};
          thr[c][e][k] = (RS_THR_W[k] == 32) ? {32'd0, wr_data[31:0]} : wr_data;
          @(negedge clk);
        end
    wr_en = 0;
    for (int c = 0; c < 16; c++) begin
      sh_wr_en = 1; sh_wr_ch = 4'(c); sh_wr_val = 6'($urandom_range(0, 7)); sh[c] = sh_wr_val;
      @(negedge clk);
    end
    sh_wr_en = 0;
    for (int n = 0; n < 3000; n++) begin
      int c, e;
      logic [NRS-1:0] ov;
      c = $urandom_range(0, 15);
      e = $urandom_range(0, 31);
      energy = 5'(e);
      in_valid = ($urandom_range(0, 5) != 0); in_ch = 4'(c); in_last = ($urandom_range(0, 3) == 0);
      for (int k = 0; k < NRS; k++) begin
        longint unsigned s, v;
        s = scaled(c, e, k);
        case ($urandom_range(0, 3))
          0: v = s - 1;
          1: v = s;
          2: v = s + 1;
          default: v = {$urandom, $urandom};
        endcase
        v = v & ((64'd1 << 40) - 1);
        in_rs[k] = rs_t'(v);
        ov[k] = (v > s);
      end
      // shift the expectation pipeline, then compare with what comes out now
      exp_q[1] = exp_q[0];  expv_q[1] = expv_q[0]; expc_q[1] = expc_q[0]; expl_q[1] = expl_q[0];
      exp_q[0] = in_valid ? ov : '0;  expv_q[0] = in_valid; expc_q[0] = in_ch;
      expl_q[0] = in_valid && in_last;
      @(negedge clk);
      if (n >= 1) begin
        chk(out_valid == expv_q[1], "out_valid");
        chk(out_last == expl_q[1], "out_last");
        if (expv_q[1]) begin
          chk(out_ch == expc_q[1], "out_ch");
          chk(out_over == exp_q[1], $sformatf("over got %h exp %h", out_over, exp_q[1]));
          foreach (exp_q[1][k]) if (exp_q[1][k]) n_over++; else n_under++;
        end
      end
    end
    in_valid = 0;
    for (int n = 0; n < 500; n++) begin
      int c, e, k;
      c = $urandom_range(0, 15); e = $urandom_range(0, 31); k = $urandom_range(0, 11);
      energy = 5'(e); log_ch = 4'(c); log_rs = 4'(k);
      @(negedge clk);
      chk(log_thr == scaled(c, e, k), "logged threshold");
    end
    log_table = 1;
    for (int n = 0; n < 500; n++) begin
      int c, e, k;
      c = $urandom_range(0, 15); e = $urandom_range(0, 31); k = $urandom_range(0, 11);
      energy = 5'($urandom); log_energy = 5'(e); log_ch = 4'(c); log_rs = 4'(k);
      @(negedge clk);
      chk(log_thr == thr[c][e][k], "table read-back");
    end
    chk(n_over > 100 && n_under > 100, "both outcomes of the comparison");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
