// tb_blmtc_top -- end-to-end test of the surface-card processing at a shortened period.
//
// The acquisition period is cut to 64 cycles and a "second" to 200 periods so that
// 34 000 periods (enough for the 32768-step refresh of the longest shift register) run in
// about two million cycles (64 cycles leave room for the post-mortem SRAM writes). tb_blmtc_env drives the links, configuration and machine
// inputs and checks every period against its reference model; every mechanism of the
// design (CRC errors, lost and differing copies, wrong card and frame IDs, clipping in
// the combination, all shift-register refreshes, scaled thresholds, masking, dumps,
// rearm, energy changes, 1-second maxima, status registers, post-mortem freezes and
// wrapping of both post-mortem buffers; buffer B is cut to 8 integrals) must occur.
module tb_blmtc_top;
  import blm_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  logic [NCARD-1:0] a_valid, a_sof, b_valid, b_sof;
  logic [NCARD-1:0][15:0] a_data, b_data, expected_cid;
  logic [4:0] energy, thr_wr_energy;
  logic safe_beam, mask_enable, rearm, config_done, thr_wr_en, sh_wr_en, mask_wr_en;
  logic mask_connected, mask_maskable;
  logic [3:0] thr_wr_ch, thr_wr_rs, sh_wr_ch, mask_wr_ch, esr_addr, max_rd_ch, max_rd_rs, log_ch, log_rs;
  thr_t thr_wr_data, log_thr;
  logic [5:0] sh_wr_val;
  logic beam_permit, dump_trig, req_unmaskable, req_maskable, running, acq_tick, step_done, sec_tick;
  logic [NCH-1:0] dump_cause;
  logic [STEP_W-1:0] step_count;
  logic esr_rd_en, esr_card;
  logic [31:0] esr_rd_data;
  logic [63:0] max_rd_data;
  logic pm_freeze, sram_we, pm_half, pm_frz_valid, pm_frz_half, pm_frz_a_full, pm_frz_b_full;
  logic [18:0] sram_addr;
  logic [31:0] sram_wdata;
  logic [15:0] pm_frz_count;
  logic log_table;
  logic [4:0] log_energy;
  logic [10:0] pm_frz_a_ptr;
  logic [2:0]  pm_frz_b_ptr;

  blmtc_top #(.ACQ_CYCLES(64), .STEPS_PER_SEC(200), .PM_INTS(8)) dut (.*);

  tb_blmtc_env #(.ACQ(64), .SPS(200), .NSTEPS(34000), .SPIKE_RANGE(400),
                 .FORCE_SPIKE(3), .CHECK_ALL(1), .PMI(8)) env (.*);
endmodule
