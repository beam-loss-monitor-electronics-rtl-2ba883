// blmtc_top -- real-time processing of the BLM surface card (one surface FPGA).
//
// Two tunnel cards, each reading 8 ionisation-chamber detectors, send a 320-bit packet
// every 40 us over two redundant optical links each. For every acquisition period:
//   1. rcc (one per tunnel card) receives both copies, checks CRC, card and frame ID,
//      compares the copies and picks one;
//   2. data_combine merges each channel's CFC count and ADC value into a 20-bit value;
//   3. the 16 values are fed one per cycle to srs, which updates 12 running sums per
//      detector (40 us .. 84 s windows);
//   4. threshold_comparator compares every sum with the detector's threshold for the
//      present beam energy (scaled by the detector's shift);
//   5. masking applies the connected/maskable table and drives the beam permit;
//   6. max_values keeps the 1-second maxima and esr the error and status counters for
//      the logging read-out.
//   7. pm_recorder writes the raw words of all four links and 10 ms integrals of the
//      combined values into post-mortem buffers in the board SRAM, frozen on request.
// The acquisition period is ACQ_CYCLES clock cycles (1600 = 40 us at 40 MHz); the
// period timer runs once srs has cleared its memories and the configuration (thresholds,
// shifts, masking table) is marked loaded by config_done. Every STEPS_PER_SEC periods (1 s) the
// maxima are handed over to the logging side.
//
// Latency: a period closes with acq_tick; rcc decides 1 cycle later, data_combine 1 more,
// channel c enters srs at cycle 3+c after acq_tick, its sums leave srs one cycle later
// and the comparison two cycles after that. The permit falls at the latest 3+16+4 = 23
// cycles after the acq_tick that closes the period of the offending packet.
//
// The chain of processes follows the document; the clock frequency, the period timer,
// the channel-serial schedule and all configuration and read-out ports (which the crate
// CPU reaches through the VME bus) are this design's own choices.
module blmtc_top
  import blm_pkg::*;
#(
  parameter int unsigned ACQ_CYCLES    = 1600,
  parameter int unsigned STEPS_PER_SEC = 25000,
  parameter int unsigned PM_TURNS      = 2000,
  parameter int unsigned PM_INT_STEPS  = 250,
  parameter int unsigned PM_INTS       = 2000
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // optical links, after the deserialisers: [card]
  input  logic [NCARD-1:0]              a_valid,
  input  logic [NCARD-1:0]              a_sof,
  input  logic [NCARD-1:0][15:0]        a_data,
  input  logic [NCARD-1:0]              b_valid,
  input  logic [NCARD-1:0]              b_sof,
  input  logic [NCARD-1:0][15:0]        b_data,
  input  logic [NCARD-1:0][15:0]        expected_cid,
  // machine state
  input  logic [$clog2(NENERGY)-1:0]    energy,
  input  logic                          safe_beam,
  input  logic                          mask_enable,
  input  logic                          rearm,
  // configuration
  input  logic                          config_done,
  input  logic                          thr_wr_en,
  input  logic [$clog2(NCH)-1:0]        thr_wr_ch,
  input  logic [$clog2(NENERGY)-1:0]    thr_wr_energy,
  input  logic [3:0]                    thr_wr_rs,
  input  thr_t                          thr_wr_data,
  input  logic                          sh_wr_en,
  input  logic [$clog2(NCH)-1:0]        sh_wr_ch,
  input  logic [5:0]                    sh_wr_val,
  input  logic                          mask_wr_en,
  input  logic [$clog2(NCH)-1:0]        mask_wr_ch,
  input  logic                          mask_connected,
  input  logic                          mask_maskable,
  // beam permit
  output logic                          beam_permit,
  output logic                          dump_trig,
  output logic                          req_unmaskable,
  output logic                          req_maskable,
  output logic [NCH-1:0]                dump_cause,
  // status
  output logic                          running,       // acquisition timer runs
  output logic                          acq_tick,
  output logic                          step_done,     // all sums of a step compared
  output logic                          sec_tick,
  output logic [STEP_W-1:0]             step_count,    // step number of the last compared sums
  // logging read-out
  input  logic                          esr_rd_en,
  input  logic                          esr_card,
  input  logic [3:0]                    esr_addr,
  output logic [31:0]                   esr_rd_data,
  input  logic [$clog2(NCH)-1:0]        max_rd_ch,
  input  logic [3:0]                    max_rd_rs,
  output logic [63:0]                   max_rd_data,
  input  logic [$clog2(NCH)-1:0]        log_ch,
  input  logic [3:0]                    log_rs,
  input  logic                          log_table,     // read the stored table, not the thresholds in use
  input  logic [$clog2(NENERGY)-1:0]    log_energy,
  output thr_t                          log_thr,
  // post-mortem recording: freeze request, board SRAM write port, buffer state
  input  logic                          pm_freeze,
  output logic                          sram_we,
  output logic [18:0]                   sram_addr,
  output logic [31:0]                   sram_wdata,
  output logic                          pm_half,
  output logic                          pm_frz_valid,
  output logic                          pm_frz_half,
  output logic [$clog2(PM_TURNS)-1:0]   pm_frz_a_ptr,
  output logic                          pm_frz_a_full,
  output logic [$clog2(PM_INTS)-1:0]    pm_frz_b_ptr,
  output logic                          pm_frz_b_full,
  output logic [15:0]                   pm_frz_count
);

  localparam int unsigned CW = $clog2(NCH);
  localparam int unsigned PW = $clog2(CH_PER_CARD);

  // The post-mortem record of a period takes 2*NCARD*10 + NCH SRAM writes after the
  // sums of the period have started; the period must leave room for them.
  if (ACQ_CYCLES < 64) begin : g_period_check
    $error("blmtc_top: ACQ_CYCLES must be at least 64");
  end

  // ---------------- acquisition period timer ----------------
  logic srs_ready;
  logic [$clog2(ACQ_CYCLES)-1:0] acq_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acq_cnt  <= '0;
      acq_tick <= 1'b0;
    end else begin
      acq_tick <= 1'b0;
      if (srs_ready && config_done) begin
        if (32'(acq_cnt) == ACQ_CYCLES - 1) begin
          acq_cnt  <= '0;
          acq_tick <= 1'b1;
        end else begin
          acq_cnt <= acq_cnt + 1'b1;
        end
      end
    end
  end
  assign running = srs_ready && config_done;

  // ---------------- receive, check & compare; data combine ----------------
  logic [NCARD-1:0]       r_valid, r_none, e_crc_a, e_crc_b, e_comp, e_cid, e_fid, e_lost_a, e_lost_b;
  packet_t                r_pkt    [NCARD];
  logic [15:0]            st_a     [NCARD];
  logic [15:0]            st_b     [NCARD];
  logic [NCARD-1:0]       dc_valid;
  logic [VAL_W-1:0]       dc_val   [NCARD][CH_PER_CARD];

  for (genvar g = 0; g < NCARD; g++) begin : g_card
    rcc u_rcc (
      .clk, .rst_n, .acq_tick, .expected_cid(expected_cid[g]),
      .a_valid(a_valid[g]), .a_sof(a_sof[g]), .a_data(a_data[g]),
      .b_valid(b_valid[g]), .b_sof(b_sof[g]), .b_data(b_data[g]),
      .out_valid(r_valid[g]), .out_none(r_none[g]), .out_pkt(r_pkt[g]),
      .err_crc_a(e_crc_a[g]), .err_crc_b(e_crc_b[g]), .err_comp(e_comp[g]),
      .err_cid(e_cid[g]), .err_fid(e_fid[g]), .lost_a(e_lost_a[g]), .lost_b(e_lost_b[g]),
      .status_a(st_a[g]), .status_b(st_b[g]));

    data_combine #(.NC(CH_PER_CARD)) u_dc (
      .clk, .rst_n, .in_valid(r_valid[g]), .in_none(r_none[g]), .in_chan(r_pkt[g].chan),
      .out_valid(dc_valid[g]), .out_val(dc_val[g]));
  end

  // ---------------- channel sequencer into the running sums ----------------
  logic          seq_busy;
  logic [CW-1:0] seq_ch;
  logic          s_valid;
  logic [CW-1:0] s_ch;
  logic [VAL_W-1:0] s_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq_busy <= 1'b0;
      seq_ch   <= '0;
    end else if (|dc_valid) begin
      seq_busy <= 1'b1;
      seq_ch   <= '0;
    end else if (seq_busy) begin
      seq_ch <= seq_ch + 1'b1;
      if (32'(seq_ch) == NCH - 1) seq_busy <= 1'b0;
    end
  end

  logic s_last;
  assign s_valid = seq_busy;
  assign s_last  = (32'(seq_ch) == NCH - 1);
  assign s_ch    = seq_ch;
  assign s_val   = dc_val[seq_ch[CW-1:PW]][seq_ch[PW-1:0]];

  // ---------------- successive running sums ----------------
  logic             rs_valid, rs_last;
  logic [CW-1:0]    rs_ch;
  rs_t              rs_val [NRS];

  srs #(.N_CH(NCH)) u_srs (
    .clk, .rst_n, .ready(srs_ready),
    .in_valid(s_valid), .in_ch(s_ch), .in_val(s_val),
    .out_valid(rs_valid), .out_ch(rs_ch), .out_last(rs_last), .out_step(step_count),
    .out_rs(rs_val));

  // one-second tick for the maxima
  logic [$clog2(STEPS_PER_SEC+1)-1:0] sec_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sec_cnt  <= '0;
      sec_tick <= 1'b0;
    end else begin
      sec_tick <= 1'b0;
      if (rs_valid && rs_last) begin
        if (32'(sec_cnt) == STEPS_PER_SEC - 1) begin
          sec_cnt  <= '0;
          sec_tick <= 1'b1;
        end else begin
          sec_cnt <= sec_cnt + 1'b1;
        end
      end
    end
  end

  logic max_reset;
  max_values #(.N_CH(NCH)) u_max (
    .clk, .rst_n, .in_valid(rs_valid), .in_ch(rs_ch), .in_rs(rs_val),
    .sec_tick, .max_reset, .rd_ch(max_rd_ch), .rd_rs(max_rd_rs), .rd_data(max_rd_data));

  // ---------------- threshold comparison and masking ----------------
  logic           tc_valid, tc_last;
  logic [CW-1:0]  tc_ch;
  logic [NRS-1:0] tc_over;

  threshold_comparator #(.N_CH(NCH), .N_EN(NENERGY)) u_tc (
    .clk, .rst_n, .energy,
    .in_valid(rs_valid), .in_ch(rs_ch), .in_last(rs_last), .in_rs(rs_val),
    .out_valid(tc_valid), .out_ch(tc_ch), .out_last(tc_last), .out_over(tc_over),
    .wr_en(thr_wr_en), .wr_ch(thr_wr_ch), .wr_energy(thr_wr_energy), .wr_rs(thr_wr_rs),
    .wr_data(thr_wr_data),
    .sh_wr_en, .sh_wr_ch, .sh_wr_val,
    .log_ch, .log_rs, .log_table, .log_energy, .log_thr);

  masking #(.N_CH(NCH)) u_mask (
    .clk, .rst_n,
    .tbl_wr_en(mask_wr_en), .tbl_wr_ch(mask_wr_ch),
    .tbl_connected(mask_connected), .tbl_maskable(mask_maskable),
    .armed(config_done), .safe_beam, .mask_enable, .rearm,
    .in_valid(tc_valid), .in_ch(tc_ch), .in_last(tc_last), .in_over(tc_over),
    .req_unmaskable, .req_maskable, .beam_permit, .dump_trig, .dump_cause);

  assign step_done = tc_valid && tc_last;

  // ---------------- post-mortem recording ----------------
  logic [2*NCARD-1:0]       pm_valid, pm_sof;
  logic [2*NCARD-1:0][15:0] pm_data;
  always_comb
    for (int g = 0; g < NCARD; g++) begin
      pm_valid[2*g]   = a_valid[g];  pm_sof[2*g]   = a_sof[g];  pm_data[2*g]   = a_data[g];
      pm_valid[2*g+1] = b_valid[g];  pm_sof[2*g+1] = b_sof[g];  pm_data[2*g+1] = b_data[g];
    end

  pm_recorder #(.N_LINK(2*NCARD), .N_CH(NCH), .N_TURNS(PM_TURNS), .INT_STEPS(PM_INT_STEPS),
                .N_INT(PM_INTS), .ADDR_W(19)) u_pm (
    .clk, .rst_n, .rx_valid(pm_valid), .rx_sof(pm_sof), .rx_data(pm_data), .acq_tick,
    .in_valid(s_valid), .in_ch(s_ch), .in_val(s_val), .in_last(s_last),
    .pm_freeze, .sram_we, .sram_addr, .sram_wdata,
    .cur_half(pm_half), .frz_valid(pm_frz_valid), .frz_half(pm_frz_half),
    .frz_a_ptr(pm_frz_a_ptr), .frz_a_full(pm_frz_a_full),
    .frz_b_ptr(pm_frz_b_ptr), .frz_b_full(pm_frz_b_full), .frz_count(pm_frz_count));

  // ---------------- error & status reports ----------------
  logic [31:0] esr_q [NCARD];
  for (genvar g = 0; g < NCARD; g++) begin : g_esr
    logic [63:0] dac_flat;
    always_comb
      for (int c = 0; c < CH_PER_CARD; c++) dac_flat[(CH_PER_CARD-1-c)*8 +: 8] = r_pkt[g].dac[c];

    esr u_esr (
      .clk, .rst_n,
      .ev_max_reset(max_reset), .ev_acq(acq_tick), .ev_frame(r_valid[g]), .ev_dump(dump_trig),
      .ev_crc_a(e_crc_a[g]), .ev_crc_b(e_crc_b[g]), .ev_comp(e_comp[g]), .ev_cid(e_cid[g]),
      .ev_fid(e_fid[g]), .ev_lost_a(e_lost_a[g]), .ev_lost_b(e_lost_b[g]),
      .status_a(st_a[g]), .status_b(st_b[g]),
      .fid(r_pkt[g].frame_id), .cid(r_pkt[g].card_id), .dac(dac_flat),
      .rd_en(esr_rd_en && (esr_card == 1'(g))), .rd_addr(esr_addr), .rd_data(esr_q[g]));
  end

  logic esr_sel_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         esr_sel_q <= 1'b0;
    else if (esr_rd_en) esr_sel_q <= esr_card;
  end
  assign esr_rd_data = esr_q[esr_sel_q];

endmodule
