// tb_srs -- self-checking testbench of the successive running sums.
//
// Two channels receive random 20-bit values, one channel per cycle, for 2^21 + 40000
// steps: every window, the longest (2^21 steps) included, fills completely and the step
// counter wraps once. The reference keeps prefix sums P[i] = x[0] + ... + x[i-1] per
// channel; a sum of window N refreshed every R steps must, after step t, equal
// P[t'+1] - P[t'+1-N] modulo 2^width, where t' is the last refresh step (t'+1 multiple of
// R) not after t. Every output of every step is compared, and the one-cycle latency from
// in_valid to out_valid is checked. Inputs change and outputs are checked at the falling
// clock edge.
module tb_srs;
  import blm_pkg::*;

  localparam int unsigned NC    = 2;
  localparam int unsigned STEPS = (1 << 21) + 40000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            ready, in_valid, out_valid, out_last;
  logic [0:0]      in_ch, out_ch;
  logic [VAL_W-1:0] in_val;
  logic [STEP_W-1:0] out_step;
  rs_t             out_rs [NRS];

  srs #(.N_CH(NC)) dut (.*);

  int unsigned checks = 0, failures = 0;
  longint unsigned P [NC][];
  int unsigned     in_steps = 0;

  initial begin
    for (int c = 0; c < NC; c++) begin
      P[c] = new[STEPS + 1];
      P[c][0] = 0;
    end
  end

  function automatic longint unsigned expect_rs(int c, int unsigned t, int k);
    longint unsigned n = RS_LEN[k], r = RS_REFRESH[k];
    longint signed tp, lo;
    tp = ((longint'(t) + 1) / r) * r - 1;
    if (tp < 0) return 0;
    lo = tp + 1 - n;
    if (lo < 0) lo = 0;
    return (P[c][tp + 1] - P[c][lo]) & ((64'd1 << RS_WIDTH[k]) - 1);
  endfunction

  // stimulus
  initial begin
    in_valid = 0; in_ch = 0; in_val = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ready);
    @(negedge clk);
    for (int unsigned t = 0; t < STEPS; t++) begin
      for (int c = 0; c < NC; c++) begin
        logic [VAL_W-1:0] v;
        v = VAL_W'($urandom);
        if ($urandom_range(0, 3) == 0) v = VAL_W'($urandom_range(0, 15));
        P[c][t + 1] = P[c][t] + longint'(v);
        in_valid = 1; in_ch = 1'(c); in_val = v;
        @(negedge clk);
      end
      in_steps++;
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  logic            v_d;
  logic [0:0]      ch_d;
  int unsigned     cycle_step = 0;
  int unsigned     exp_step = 0;
  always @(posedge clk) begin
    v_d  <= in_valid;
    ch_d <= in_ch;
  end
  always @(negedge clk) begin
    if (rst_n && ready) begin
      checks++;
      if (out_valid !== v_d) begin
        failures++;
        if (failures < 10) $display("latency mismatch");
      end
      if (out_valid) begin
        checks++;
        if (out_ch != ch_d || out_step != STEP_W'(exp_step)) begin
          failures++;
          if (failures < 10) $display("ch/step mismatch %0d %0d", out_step, exp_step);
        end
        for (int k = 0; k < NRS; k++) begin
          longint unsigned e;
          e = expect_rs(int'(out_ch), exp_step, k);
          checks++;
          if (64'(out_rs[k]) != e) begin
            failures++;
            if (failures < 10)
              $display("step %0d ch %0d RS%0d got %0d exp %0d", exp_step, out_ch, k, out_rs[k], e);
          end
        end
        if (out_last) exp_step++;
      end
    end
  end

  // watchdog
  initial begin
    repeat (STEPS * NC + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
