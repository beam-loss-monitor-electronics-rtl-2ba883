// tb_max_values -- self-checking testbench of the one-second maxima.
//
// Four channels stream random running sums (40-bit, most small, a few large) for 30
// "seconds" of 50 steps each; a tick ends each second, sometimes in the same cycle as a
// sample. After every tick all 4 x 12 maxima are read back and compared with the maxima
// computed by the testbench over that second; max_reset must pulse once per tick.
module tb_max_values;
  import blm_pkg::*;

  localparam int unsigned NC = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           in_valid, sec_tick, max_reset;
  logic [1:0]     in_ch, rd_ch;
  rs_t            in_rs [NRS];
  logic [3:0]     rd_rs;
  logic [63:0]    rd_data;

  max_values #(.N_CH(NC)) dut (.*);

  int unsigned checks = 0, failures = 0, resets = 0;
  longint unsigned cur [NC][NRS];
  longint unsigned kept [NC][NRS];

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  always @(negedge clk) if (rst_n && max_reset) resets++;

  initial begin
    in_valid = 0; sec_tick = 0; in_ch = 0; rd_ch = 0; rd_rs = 0;
    for (int k = 0; k < NRS; k++) in_rs[k] = '0;
    for (int c = 0; c < NC; c++) for (int k = 0; k < NRS; k++) cur[c][k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < 30; s++) begin
      for (int t = 0; t < 50; t++)
        for (int c = 0; c < NC; c++) begin
          in_valid = 1; in_ch = 2'(c);
          for (int k = 0; k < NRS; k++) begin
            in_rs[k] = ($urandom_range(0, 30) == 0) ? rs_t'({$urandom, $urandom})
                                                    : rs_t'($urandom_range(0, 1000));
            if (longint'(in_rs[k]) > cur[c][k]) cur[c][k] = longint'(in_rs[k]);
          end
          // the tick comes with the very last sample of the second
          sec_tick = (t == 49 && c == NC - 1);
          @(negedge clk);
        end
      in_valid = 0; sec_tick = 0;
      for (int c = 0; c < NC; c++)
        for (int k = 0; k < NRS; k++) begin
          kept[c][k] = cur[c][k];
          cur[c][k]  = 0;
        end
      for (int c = 0; c < NC; c++)
        for (int k = 0; k < 16; k++) begin
          rd_ch = 2'(c); rd_rs = 4'(k);
          @(negedge clk);
          chk(rd_data == ((k < NRS) ? kept[c][k] : 64'd0),
              $sformatf("second %0d ch %0d RS%0d got %0d exp %0d", s, c, k, rd_data,
                        (k < NRS) ? kept[c][k] : 0));
        end
    end
    chk(resets == 30, $sformatf("max_reset pulses %0d", resets));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
