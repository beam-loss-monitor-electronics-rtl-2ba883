// tb_data_combine -- self-checking testbench of the CFC/ADC data combination.
//
// 2000 acquisitions of 8 channels with random counts and ADC values (small counts and
// ADC values that fall between frames are frequent, so that clipping at zero happens),
// with about one in ten periods without data. The reference computes
// count*4096 + adc - previous adc, clipped to [0, 2^20-1], with the first frame after
// reset counting whole counts only, and expects zeros for a period without data. The
// output is checked one cycle after the input.
module tb_data_combine;
  import blm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 in_valid, in_none, out_valid;
  chan_raw_t [7:0]      in_chan;
  logic [VAL_W-1:0]     out_val [8];

  data_combine #(.NC(8)) dut (.*);

  int unsigned checks = 0, failures = 0, clipped = 0;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    int  prev [8];
    bit  have_prev;
    int  e [8];
    have_prev = 0;
    in_valid = 0; in_none = 0; in_chan = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      bit none;
      none = ($urandom_range(0, 9) == 0);
      for (int c = 0; c < 8; c++) begin
        in_chan[c].count = ($urandom_range(0, 1) == 0) ? 8'($urandom_range(0, 2)) : 8'($urandom);
        in_chan[c].adc   = 12'($urandom);
        if (none) e[c] = 0;
        else begin
          e[c] = int'(in_chan[c].count) * 4096 + int'(in_chan[c].adc)
               - (have_prev ? prev[c] : int'(in_chan[c].adc));
          if (e[c] < 0) begin e[c] = 0; clipped++; end
          if (e[c] > 1048575) e[c] = 1048575;
        end
      end
      in_valid = !none; in_none = none;
      @(negedge clk);
      in_valid = 0; in_none = 0;
      chk(out_valid == 1, "out_valid one cycle after input");
      for (int c = 0; c < 8; c++)
        chk(int'(out_val[c]) == e[c], $sformatf("frame %0d ch %0d got %0d exp %0d", n, c, out_val[c], e[c]));
      if (!none) begin
        for (int c = 0; c < 8; c++) prev[c] = int'(in_chan[c].adc);
        have_prev = 1;
      end
      @(negedge clk);
      chk(out_valid == 0, "out_valid one cycle long");
    end
    chk(clipped > 0, "clipping at zero never happened");
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
