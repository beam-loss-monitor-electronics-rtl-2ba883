// tb_blmtc_full -- one complete operation of the surface card at full size.
//
// blmtc_top with its default parameters (40 us period = 1600 cycles, 16 detectors,
// 12 running sums, 32 energy levels): configuration loaded, 25,100 acquisition periods
// (just over one second) of packets on the four links with injected link errors, a forced
// loss spike on an unmaskable detector at period 3 that must withdraw the beam permit,
// rearm, the once-per-second maxima handover, post-mortem freezes after period 20 and
// after buffer A has wrapped at its full depth, a final read of the status registers and
// a final comparison of the whole board SRAM, all checked against the model in tb_blmtc_env.
module tb_blmtc_full;
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
  logic [10:0] pm_frz_a_ptr, pm_frz_b_ptr;

  blmtc_top dut (.*);

  tb_blmtc_env #(.ACQ(1600), .SPS(25000), .NSTEPS(25100), .SPIKE_RANGE(400),
                 .FORCE_SPIKE(3), .CHECK_ALL(0)) env (.*);
endmodule
