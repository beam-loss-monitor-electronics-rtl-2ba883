// tb_blmtc_env -- stimulus and reference model for end-to-end tests of blmtc_top.
//
// Plays the two tunnel cards (a packet per card on each redundant link every period),
// the configuration loader (thresholds, scaling shifts, masking table), the machine
// (beam energy, safe-beam flag, masking enable, rearm), the crate CPU (start-up read of
// the whole threshold table, thresholds in use, 1-second maxima, status registers) and
// the board SRAM that holds the post-mortem buffers. A reference model, written independently of the
// RTL, follows every period: choice of link copy, CFC/ADC combination, all 12 running
// sums (from prefix sums), threshold comparison with scaling, masking, permit, maxima,
// error counters and the post-mortem records (freezes, both halves, wrap-around).
//
// Timing of one period (cycle 0 = the falling edge after acq_tick):
//   cycles 1..20  packets of this period on the four links; 1-second maxima reads
//   cycle  PCHK   results of the step closed by acq_tick are checked (dump pulses,
//                 requests, permit, cause, step number)
//   cycle  PCHK+1 machine inputs for the next step change; rearm pulse
// Thresholds: N*20000 + 100000*(1 + (energy+channel) mod 8) for a window of N steps,
// shift = channel mod 3. Normal traffic stays below 16384 per step; rare spikes of
// 100 000 .. 900 000 cross some thresholds, depending on energy and shift.
// The mechanisms exercised are counted; with CHECK_ALL set each must occur at least once.
module tb_blmtc_env
  import blm_pkg::*;
  import tb_pkt_pkg::*;
#(
  parameter int unsigned ACQ         = 32,
  parameter int unsigned SPS         = 200,
  parameter int unsigned NSTEPS      = 1000,
  parameter int unsigned SPIKE_RANGE = 400,   // a spike per channel-step with prob 1/SPIKE_RANGE
  parameter int unsigned FORCE_SPIKE = 3,     // step with a forced spike on detector 3
  parameter bit          CHECK_ALL   = 1,
  parameter int unsigned PMT         = 2000,  // post-mortem buffer A depth (acquisitions)
  parameter int unsigned PMIS        = 250,   // steps per post-mortem integral
  parameter int unsigned PMI         = 2000,  // post-mortem buffer B depth (integrals)
  parameter int unsigned FREEZE_AT   = 20     // step after which a freeze is requested
) (
  input  logic                          clk,
  output logic                          rst_n,
  output logic [NCARD-1:0]              a_valid,
  output logic [NCARD-1:0]              a_sof,
  output logic [NCARD-1:0][15:0]        a_data,
  output logic [NCARD-1:0]              b_valid,
  output logic [NCARD-1:0]              b_sof,
  output logic [NCARD-1:0][15:0]        b_data,
  output logic [NCARD-1:0][15:0]        expected_cid,
  output logic [4:0]                    energy,
  output logic                          safe_beam,
  output logic                          mask_enable,
  output logic                          rearm,
  output logic                          config_done,
  output logic                          thr_wr_en,
  output logic [3:0]                    thr_wr_ch,
  output logic [4:0]                    thr_wr_energy,
  output logic [3:0]                    thr_wr_rs,
  output thr_t                          thr_wr_data,
  output logic                          sh_wr_en,
  output logic [3:0]                    sh_wr_ch,
  output logic [5:0]                    sh_wr_val,
  output logic                          mask_wr_en,
  output logic [3:0]                    mask_wr_ch,
  output logic                          mask_connected,
  output logic                          mask_maskable,
  input  logic                          beam_permit,
  input  logic                          dump_trig,
  input  logic                          req_unmaskable,
  input  logic                          req_maskable,
  input  logic [NCH-1:0]                dump_cause,
  input  logic                          running,
  input  logic                          acq_tick,
  input  logic                          step_done,
  input  logic                          sec_tick,
  input  logic [STEP_W-1:0]             step_count,
  output logic                          esr_rd_en,
  output logic                          esr_card,
  output logic [3:0]                    esr_addr,
  input  logic [31:0]                   esr_rd_data,
  output logic [3:0]                    max_rd_ch,
  output logic [3:0]                    max_rd_rs,
  input  logic [63:0]                   max_rd_data,
  output logic [3:0]                    log_ch,
  output logic [3:0]                    log_rs,
  output logic                          log_table,
  output logic [4:0]                    log_energy,
  input  thr_t                          log_thr,
  output logic                          pm_freeze,
  input  logic                          sram_we,
  input  logic [18:0]                   sram_addr,
  input  logic [31:0]                   sram_wdata,
  input  logic                          pm_half,
  input  logic                          pm_frz_valid,
  input  logic                          pm_frz_half,
  input  logic [$clog2(PMT)-1:0]        pm_frz_a_ptr,
  input  logic                          pm_frz_a_full,
  input  logic [$clog2(PMI)-1:0]        pm_frz_b_ptr,
  input  logic                          pm_frz_b_full,
  input  logic [15:0]                   pm_frz_count
);

  localparam int unsigned PCHK = 26;
  localparam logic [15:0] CIDS [2] = '{16'h0C01, 16'h0C02};

  int unsigned checks = 0, failures = 0;

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL: %s", msg);
    end
  endtask

  // ---------------- reference model state ----------------
  longint unsigned P [NCH][];          // prefix sums of the combined values
  bit  conn [NCH], mskb [NCH];
  int  shv  [NCH];
  int  prev_adc [NCARD][CH_PER_CARD];
  bit  have_prev [NCARD];
  bit  tripped;
  logic [NCH-1:0] cause;
  longint unsigned cur_max [NCH][NRS], kept_max [NCH][NRS];
  int unsigned steps_done = 0;
  // event counters: per card
  int unsigned n_crc_a [2], n_crc_b [2], n_comp [2], n_cid [2], n_fid [2], n_lost_a [2],
               n_lost_b [2], n_frames [2], n_vme [2];
  int unsigned n_ticks = 0, n_sec = 0, n_dumps = 0;
  // last status / id / dac seen
  logic [15:0] last_sa [2], last_sb [2];
  tx_pkt_t     last_used [2];
  bit          any_used [2];
  logic [15:0] last_fid [2];
  bit          have_fid [2];
  // mechanism counters
  int unsigned m_none = 0, m_masked = 0, m_unconn = 0, m_shift = 0, m_clip = 0, m_rearm = 0;
  int unsigned m_push [6];
  int unsigned m_maxchk = 0, m_logchk = 0, m_energy = 0;

  function automatic longint unsigned thr_val(int c, int e, int k);
    longint unsigned t;
    t = longint'(RS_LEN[k]) * 20000 + 100000 * (1 + ((e + c) % 8));
    return t;
  endfunction

  function automatic longint unsigned rs_ref(int c, int unsigned t, int k);
    longint unsigned n = RS_LEN[k], r = RS_REFRESH[k];
    longint signed tp, lo;
    tp = ((longint'(t) + 1) / r) * r - 1;
    if (tp < 0) return 0;
    lo = tp + 1 - n;
    if (lo < 0) lo = 0;
    return (P[c][tp + 1] - P[c][lo]) & ((64'd1 << RS_WIDTH[k]) - 1);
  endfunction

  // ---------------- period data ----------------
  tx_pkt_t pk_a [2], pk_b [2];
  int      mode_a [2], mode_b [2];         // 0 good, 1 corrupted, 2 missing, 3 (B) other
  logic [15:0] fid_ctr [2];
  int      ctl_energy; bit ctl_safe, ctl_men;

  task automatic make_period(input int unsigned s);
    for (int g = 0; g < 2; g++) begin
      tx_pkt_t p;
      fid_ctr[g] = fid_ctr[g] + 16'd1;
      if ($urandom_range(0, 29) == 0) fid_ctr[g] = fid_ctr[g] + 16'd2;
      p = random_pkt(($urandom_range(0, 49) == 0) ? 16'h0BAD : CIDS[g], fid_ctr[g]);
      for (int c = 0; c < CH_PER_CARD; c++) begin
        int ch;
        ch = g * CH_PER_CARD + c;
        p.count[c] = 8'($urandom_range(0, 3));
        if ($urandom_range(1, SPIKE_RANGE) == 1 || (s == FORCE_SPIKE && ch == 3))
          p.count[c] = 8'($urandom_range(25, 220));
      end
      pk_a[g] = p;
      pk_b[g] = p;
      mode_a[g] = $urandom_range(0, 15); if (mode_a[g] > 2) mode_a[g] = 0;
      mode_b[g] = $urandom_range(0, 17); if (mode_b[g] > 3) mode_b[g] = 0;
      if (s == FORCE_SPIKE) begin mode_a[g] = 0; pk_a[g].cid = CIDS[g]; pk_b[g].cid = CIDS[g]; end
      if (mode_b[g] == 3) pk_b[g].adc[1] = pk_b[g].adc[1] + 12'd1;
    end
  endtask

  task automatic make_empty();
    for (int g = 0; g < 2; g++) begin
      mode_a[g] = 2; mode_b[g] = 2;
    end
  endtask

  // reference evaluation of one completed step s (data pk_*, controls ctl_*)
  task automatic eval_step(input int unsigned s, output bit fire, output bit ru, output bit rm);
    logic [NCH-1:0] hu, hm;
    bit masked;
    hu = '0; hm = '0;
    masked = ctl_safe && ctl_men;
    for (int g = 0; g < 2; g++) begin
      bit ua, ub, usable, cidbad;
      tx_pkt_t chs;
      ua = (mode_a[g] == 0);
      ub = (mode_b[g] == 0 || mode_b[g] == 3);
      chs = ua ? pk_a[g] : pk_b[g];
      cidbad = (ua || ub) && chs.cid != CIDS[g];
      usable = (ua || ub) && !cidbad;
      n_crc_a[g] += (mode_a[g] == 1);
      n_crc_b[g] += (mode_b[g] == 1);
      n_lost_a[g] += (mode_a[g] == 2);
      n_lost_b[g] += (mode_b[g] == 2);
      n_comp[g] += (ua && mode_b[g] == 3);
      n_cid[g] += cidbad;
      if (usable && have_fid[g] && chs.fid != last_fid[g] + 16'd1) n_fid[g]++;
      if (mode_a[g] != 2) last_sa[g] = pk_a[g].status[15:0];
      if (mode_b[g] != 2) last_sb[g] = pk_b[g].status[15:0];
      if (!usable) m_none++;
      if (usable) begin
        n_frames[g]++;
        last_fid[g] = chs.fid; have_fid[g] = 1;
        last_used[g] = chs; any_used[g] = 1;
      end
      for (int c = 0; c < CH_PER_CARD; c++) begin
        int ch, v;
        ch = g * CH_PER_CARD + c;
        if (usable) begin
          v = int'(chs.count[c]) * 4096 + int'(chs.adc[c]) - (have_prev[g] ? prev_adc[g][c] : int'(chs.adc[c]));
          if (v < 0) begin v = 0; m_clip++; end
          if (v > 1048575) v = 1048575;
          prev_adc[g][c] = int'(chs.adc[c]);
        end else v = 0;
        P[ch][s + 1] = P[ch][s] + longint'(v);
      end
      if (usable) have_prev[g] = 1;
    end
    for (int ch = 0; ch < NCH; ch++) begin
      bit over, over_noshift;
      over = 0; over_noshift = 0;
      for (int k = 0; k < NRS; k++) begin
        longint unsigned r, t;
        r = rs_ref(ch, s, k);
        t = thr_val(ch, ctl_energy, k);
        if (r > (t >> shv[ch])) over = 1;
        if (r > t) over_noshift = 1;
        if (r > cur_max[ch][k]) cur_max[ch][k] = r;
      end
      if (over && !over_noshift && conn[ch]) m_shift++;
      if (over && !conn[ch]) m_unconn++;
      if (over && conn[ch]) begin
        if (mskb[ch]) hm[ch] = 1; else hu[ch] = 1;
      end
    end
    for (int i = 2; i <= 5; i++) begin
      int unsigned r;
      r = (i == 2) ? 2 : (i == 3) ? 64 : (i == 4) ? 2048 : 32768;
      if ((s + 1) % r == 0) m_push[i]++;
    end
    ru = |hu; rm = |hm;
    fire = !tripped && ((|hu) || ((|hm) && !masked));
    if ((|hm) && masked && !(|hu)) m_masked++;
    if (fire) begin
      tripped = 1;
      cause = hu | (masked ? '0 : hm);
      n_dumps++;
    end
    if ((s + 1) % SPS == 0) begin
      n_sec++;
      for (int ch = 0; ch < NCH; ch++)
        for (int k = 0; k < NRS; k++) begin
          kept_max[ch][k] = cur_max[ch][k];
          cur_max[ch][k] = 0;
        end
    end
  endtask

  // ---------------- monitors of the one-cycle outputs ----------------
  bit seen_trig, seen_ru, seen_rm;
  int unsigned trig_cnt = 0;
  always @(negedge clk) begin
    if (dump_trig) begin seen_trig = 1; trig_cnt++; end
    if (req_unmaskable) seen_ru = 1;
    if (req_maskable) seen_rm = 1;
  end

  // acquisition ticks, counted as the status registers count them
  always @(negedge clk) if (rst_n && acq_tick) n_ticks++;

  // latency: permit must fall within 24 cycles of the closing acq_tick
  int unsigned since_tick = 0;
  always @(negedge clk) begin
    if (acq_tick) since_tick = 0; else since_tick++;
    if (dump_trig) begin
      checks++;
      if (since_tick > 23) begin
        failures++;
        $display("FAIL: dump %0d cycles after acq_tick", since_tick);
      end
    end
  end

  // ---------------- board SRAM and post-mortem reference ----------------
  localparam int unsigned PM_AW = NCARD * 2 * 10 * PMT;   // words of one half of buffer A
  localparam int unsigned PM_BW = PMI * NCH;             // words of one half of buffer B
  logic [31:0] sram [1 << 19];
  logic [31:0] pm_ref [1 << 19];
  always_ff @(posedge clk) if (rst_n && sram_we) sram[sram_addr] <= sram_wdata;

  int  pm_h, pm_ap, pm_bp, pm_nfrz;
  bit  pm_af, pm_bf, pm_pend;
  bit  e_frz, e_af, e_bf;
  int  e_h, e_ap, e_bp;
  int unsigned m_pm_frz = 0, m_pm_frz_full = 0, m_pm_awrap = 0, m_pm_bwrap = 0;

  // words a link delivered in the period now closing (zeros when it sent nothing)
  function automatic words_t link_words(int g, bit b);
    words_t w;
    if (b) begin
      w = build(pk_b[g]);
      if (mode_b[g] == 1) w[11] = w[11] ^ 16'h8000;
      if (mode_b[g] == 2) w = '{default: 16'd0};
    end else begin
      w = build(pk_a[g]);
      if (mode_a[g] == 1) w[5] = w[5] ^ 16'h0040;
      if (mode_a[g] == 2) w = '{default: 16'd0};
    end
    return w;
  endfunction

  // at an acquisition tick: apply a pending freeze, then record the closing period
  task automatic pm_tick();
    e_frz = pm_pend;
    if (pm_pend) begin
      e_h = pm_h; e_ap = pm_ap; e_af = pm_af; e_bp = pm_bp; e_bf = pm_bf;
      pm_h ^= 1; pm_ap = 0; pm_af = 0; pm_bp = 0; pm_bf = 0; pm_nfrz++;
      m_pm_frz++;
      if (e_af) m_pm_frz_full++;
    end
    pm_pend = 0;
    for (int l = 0; l < 2 * NCARD; l++) begin
      words_t w;
      w = link_words(l / 2, l[0]);
      for (int i = 0; i < 10; i++)
        pm_ref[pm_h * PM_AW + pm_ap * NCARD * 20 + l * 10 + i] = {w[2 * i], w[2 * i + 1]};
    end
    if (pm_ap == PMT - 1) begin pm_ap = 0; pm_af = 1; m_pm_awrap++; end
    else pm_ap++;
  endtask

  // after step s has been evaluated: integral record when an integration period ends
  task automatic pm_integral(input int unsigned s);
    if ((s + 1) % PMIS == 0) begin
      for (int c = 0; c < NCH; c++)
        pm_ref[2 * PM_AW + pm_h * PM_BW + pm_bp * NCH + c] = 32'(P[c][s + 1] - P[c][s + 1 - PMIS]);
      if (pm_bp == PMI - 1) begin pm_bp = 0; pm_bf = 1; m_pm_bwrap++; end
      else pm_bp++;
    end
  endtask

  // ---------------- main sequence ----------------
  initial begin
    int unsigned s;
    int rd_ptr;
    rst_n = 0;
    a_valid = '0; a_sof = '0; a_data = '0; b_valid = '0; b_sof = '0; b_data = '0;
    expected_cid[0] = CIDS[0]; expected_cid[1] = CIDS[1];
    energy = 0; safe_beam = 0; mask_enable = 0; rearm = 0; config_done = 0;
    thr_wr_en = 0; thr_wr_ch = 0; thr_wr_energy = 0; thr_wr_rs = 0; thr_wr_data = 0;
    sh_wr_en = 0; sh_wr_ch = 0; sh_wr_val = 0;
    mask_wr_en = 0; mask_wr_ch = 0; mask_connected = 0; mask_maskable = 0;
    esr_rd_en = 0; esr_card = 0; esr_addr = 0; max_rd_ch = 0; max_rd_rs = 0;
    log_ch = 0; log_rs = 0; log_table = 0; log_energy = 0;
    pm_freeze = 0;
    for (int i = 0; i < (1 << 19); i++) begin sram[i] = 0; pm_ref[i] = 0; end
    pm_h = 0; pm_ap = 0; pm_bp = 0; pm_nfrz = 0; pm_af = 0; pm_bf = 0; pm_pend = 0; e_frz = 0;
    for (int c = 0; c < NCH; c++) begin
      P[c] = new[NSTEPS + 3];
      P[c][0] = 0;
      for (int k = 0; k < NRS; k++) begin cur_max[c][k] = 0; kept_max[c][k] = 0; end
    end
    for (int g = 0; g < 2; g++) begin
      have_prev[g] = 0; have_fid[g] = 0; any_used[g] = 0; fid_ctr[g] = 16'($urandom);
      n_crc_a[g] = 0; n_crc_b[g] = 0; n_comp[g] = 0; n_cid[g] = 0; n_fid[g] = 0;
      n_lost_a[g] = 0; n_lost_b[g] = 0; n_frames[g] = 0; n_vme[g] = 0;
      last_sa[g] = 0; last_sb[g] = 0;
    end
    foreach (m_push[i]) m_push[i] = 0;
    tripped = 0; cause = '0;
    ctl_energy = 0; ctl_safe = 0; ctl_men = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;

    // ---- configuration: masking table (detectors 1..5 as in the example), shifts, thresholds
    for (int c = 0; c < NCH; c++) begin
      case (c)
        0, 1:    begin conn[c] = 0; mskb[c] = 1; end
        2, 3, 14: begin conn[c] = 1; mskb[c] = 0; end
        15:      begin conn[c] = 1; mskb[c] = 1; end
        default: begin conn[c] = 1; mskb[c] = c[0]; end
      endcase
      shv[c] = c % 3;
      mask_wr_en = 1; mask_wr_ch = 4'(c); mask_connected = conn[c]; mask_maskable = mskb[c];
      sh_wr_en = 1; sh_wr_ch = 4'(c); sh_wr_val = 6'(shv[c]);
      @(negedge clk);
    end
    mask_wr_en = 0; sh_wr_en = 0;
    for (int c = 0; c < NCH; c++)
      for (int e = 0; e < NENERGY; e++)
        for (int k = 0; k < NRS; k++) begin
          thr_wr_en = 1; thr_wr_ch = 4'(c); thr_wr_energy = 5'(e); thr_wr_rs = 4'(k);
          thr_wr_data = thr_val(c, e, k);
          @(negedge clk);
        end
    thr_wr_en = 0;
    // logging read-back of thresholds in use (energy 0)
    for (int n = 0; n < 40; n++) begin
      int c, k;
      c = $urandom_range(0, NCH - 1); k = $urandom_range(0, NRS - 1);
      log_ch = 4'(c); log_rs = 4'(k);
      @(negedge clk);
      chk(log_thr == (thr_val(c, 0, k) >> shv[c]), "logged threshold");
      m_logchk++;
    end
    // start-up read-back of the complete threshold table, as stored
    log_table = 1;
    for (int c = 0; c < NCH; c++)
      for (int e = 0; e < NENERGY; e++)
        for (int k = 0; k < NRS; k++) begin
          log_ch = 4'(c); log_energy = 5'(e); log_rs = 4'(k);
          @(negedge clk);
          chk(log_thr == thr_val(c, e, k), "threshold table read-back");
        end
    log_table = 0;
    m_logchk++;
    // start acquisition; the first period carries no packets (both links lost)
    config_done = 1;
    s = 0;
    make_empty();
    rd_ptr = -1;

    // ---- periods ----
    while (s < NSTEPS) begin
      // wait for the tick closing the current period
      while (!acq_tick) @(negedge clk);
      begin
        bit fire, ru, rm;
        bit have_step;
        int unsigned st;
        have_step = 1;
        st = s;
        pm_tick();
        eval_step(st, fire, ru, rm);
        pm_integral(st);
        s++;
        // new packets for the period that starts now; the last period stays empty
        if (s < NSTEPS - 1) make_period(s);
        else                make_empty();
        seen_trig = 0; seen_ru = 0; seen_rm = 0;
        for (int cyc = 1; cyc < int'(ACQ); cyc++) begin
          @(negedge clk);
          // post-mortem freeze report, the cycle after the tick
          if (cyc == 1) begin
            chk(pm_frz_valid == e_frz && pm_half == 1'(pm_h), $sformatf("PM half step %0d", st));
            if (e_frz)
              chk(pm_frz_half == 1'(e_h) && 32'(pm_frz_a_ptr) == e_ap && pm_frz_a_full == e_af &&
                  32'(pm_frz_b_ptr) == e_bp && pm_frz_b_full == e_bf && pm_frz_count == 16'(pm_nfrz),
                  $sformatf("PM freeze report step %0d", st));
          end
          // post-mortem freeze requests
          pm_freeze = 0;
          if (cyc == PCHK + 3 && (st == FREEZE_AT || st == PMT + 57 ||
                                  (CHECK_ALL && $urandom_range(0, 4999) == 0))) begin
            pm_freeze = 1;
            pm_pend = 1;
          end
          // link words
          for (int g = 0; g < 2; g++) begin
            a_valid[g] = 0; b_valid[g] = 0; a_sof[g] = 0; b_sof[g] = 0;
            if (cyc >= 1 && cyc <= 20) begin
              words_t wa, wb;
              wa = build(pk_a[g]);
              wb = build(pk_b[g]);
              if (mode_a[g] == 1) wa[5] = wa[5] ^ 16'h0040;
              if (mode_b[g] == 1) wb[11] = wb[11] ^ 16'h8000;
              a_valid[g] = (mode_a[g] != 2); a_sof[g] = (cyc == 1); a_data[g] = wa[cyc - 1];
              b_valid[g] = (mode_b[g] != 2); b_sof[g] = (cyc == 1); b_data[g] = wb[cyc - 1];
            end
          end
          // maxima read-back, one entry per cycle in cycles 2..9, checked a cycle later
          if (cyc >= 3 && cyc <= 10 && rd_ptr >= 1 && rd_ptr <= NCH * NRS) begin
            chk(max_rd_data == 64'(kept_max[max_rd_ch][max_rd_rs]),
                $sformatf("max ch %0d RS%0d got %0d exp %0d", max_rd_ch, max_rd_rs,
                          max_rd_data, kept_max[max_rd_ch][max_rd_rs]));
            m_maxchk++;
          end
          if (cyc >= 2 && cyc <= 9 && rd_ptr >= 0 && rd_ptr < NCH * NRS) begin
            max_rd_ch = 4'(rd_ptr / NRS); max_rd_rs = 4'(rd_ptr % NRS);
            rd_ptr++;
          end else if (cyc == 11 && rd_ptr >= NCH * NRS) rd_ptr = -1;
          // results of the step just closed
          if (cyc == PCHK && have_step) begin
            chk(seen_trig == fire, $sformatf("dump trigger step %0d", st));
            chk(seen_ru == ru && seen_rm == rm, $sformatf("requests step %0d", st));
            chk(beam_permit == !tripped, $sformatf("permit step %0d", st));
            chk(dump_cause == cause, $sformatf("cause step %0d", st));
            chk(step_count == STEP_W'(st), "step number");
            if ((st + 1) % SPS == 0) rd_ptr = 0;
          end
          // machine inputs for the next step
          if (cyc == PCHK + 1) begin
            int ne;
            ne = ($urandom_range(0, 9) == 0) ? $urandom_range(0, 31) : ctl_energy;
            if (ne != ctl_energy) m_energy++;
            ctl_energy = ne; ctl_safe = 1'($urandom); ctl_men = 1'($urandom);
            energy = 5'(ctl_energy); safe_beam = ctl_safe; mask_enable = ctl_men;
            if (tripped && $urandom_range(0, 2) == 0) begin
              rearm = 1; tripped = 0; cause = '0; m_rearm++;
            end
          end
          if (cyc == PCHK + 2) rearm = 0;
        end
        for (int g = 0; g < 2; g++) begin a_valid[g] = 0; b_valid[g] = 0; end
        @(negedge clk);
      end
    end

    // the tick just seen closed one more (empty) period: account for it; acquisition
    // stops here so that no further periods are recorded
    config_done = 0;
    begin
      bit f, u, m;
      pm_tick();
      eval_step(s, f, u, m);
      pm_integral(s);
    end

    // ---- status registers of both cards ----
    for (int g = 0; g < 2; g++)
      for (int a = 0; a < 16; a++) begin
        logic [31:0] e;
        logic [63:0] d;
        esr_rd_en = 1; esr_card = 1'(g); esr_addr = 4'(a);
        if (any_used[g]) for (int c = 0; c < 8; c++) d[(7-c)*8 +: 8] = last_used[g].dac[c];
        else d = '0;
        case (a)
          0: e = n_sec;          1: e = n_ticks;       2: e = n_frames[g];  3: e = n_dumps;
          4: e = n_vme[g];       5: e = n_crc_a[g];    6: e = n_crc_b[g];   7: e = n_comp[g];
          8: e = n_cid[g];       9: e = n_fid[g];
          10: e = {last_sa[g], last_sb[g]};
          11: e = n_lost_a[g];   12: e = n_lost_b[g];
          13: e = any_used[g] ? {last_used[g].fid, last_used[g].cid} : 32'd0;
          14: e = d[63:32];
          default: e = d[31:0];
        endcase
        @(negedge clk);
        esr_rd_en = 0;
        n_vme[g]++;
        chk(esr_rd_data == e, $sformatf("ESR card %0d reg %0d got %0d exp %0d", g, a, esr_rd_data, e));
      end

    // ---- post-mortem buffers in the SRAM, once all records are written ----
    repeat (2 * ACQ) @(negedge clk);
    begin
      int unsigned bad;
      bad = 0;
      for (int i = 0; i < (1 << 19); i++)
        if (sram[i] != pm_ref[i]) begin
          bad++;
          if (bad < 5) $display("FAIL: SRAM word %0d got %h exp %h", i, sram[i], pm_ref[i]);
        end
      checks += 1 << 19;
      failures += bad;
    end

    // ---- mechanisms ----
    $display("mechanisms: dumps=%0d masked=%0d unconnected=%0d shifted=%0d rearm=%0d none=%0d clip=%0d",
             n_dumps, m_masked, m_unconn, m_shift, m_rearm, m_none, m_clip);
    $display("  errA=%0d errB=%0d cmp=%0d cid=%0d fid=%0d lostA=%0d lostB=%0d seconds=%0d maxchk=%0d energy=%0d",
             n_crc_a[0] + n_crc_a[1], n_crc_b[0] + n_crc_b[1], n_comp[0] + n_comp[1],
             n_cid[0] + n_cid[1], n_fid[0] + n_fid[1], n_lost_a[0] + n_lost_a[1],
             n_lost_b[0] + n_lost_b[1], n_sec, m_maxchk, m_energy);
    $display("  PM: freezes=%0d (of a wrapped buffer %0d) A wraps=%0d B wraps=%0d",
             m_pm_frz, m_pm_frz_full, m_pm_awrap, m_pm_bwrap);
    $display("  SR pushes: SR2=%0d SR3=%0d SR4=%0d SR5=%0d", m_push[2], m_push[3], m_push[4], m_push[5]);
    chk(n_dumps > 0, "no beam dump happened");
    chk(trig_cnt == n_dumps, "dump trigger count");
    chk(m_logchk > 0, "threshold read-back");
    chk(m_pm_frz > 0, "mechanism: post-mortem freeze");
    if (CHECK_ALL) begin
      chk(m_masked > 0, "mechanism: masked request");
      chk(m_unconn > 0, "mechanism: unconnected detector over threshold");
      chk(m_shift > 0, "mechanism: scaled threshold crossed");
      chk(m_rearm > 0, "mechanism: rearm");
      chk(m_none > 0, "mechanism: period without usable data");
      chk(m_clip > 0, "mechanism: negative combination clipped");
      chk(n_crc_a[0] + n_crc_a[1] > 0 && n_crc_b[0] + n_crc_b[1] > 0, "mechanism: CRC errors");
      chk(n_comp[0] + n_comp[1] > 0, "mechanism: copies differ");
      chk(n_cid[0] + n_cid[1] > 0, "mechanism: wrong card ID");
      chk(n_fid[0] + n_fid[1] > 0, "mechanism: frame ID skip");
      chk(n_lost_a[0] + n_lost_a[1] > 0 && n_lost_b[0] + n_lost_b[1] > 0, "mechanism: lost frames");
      chk(n_sec > 0 && m_maxchk > 0, "mechanism: 1-second maxima");
      chk(m_energy > 0, "mechanism: energy change");
      chk(m_push[5] > 0, "mechanism: SR5 refresh");
      chk(m_pm_frz_full > 0 && m_pm_awrap > 0 && m_pm_bwrap > 0, "mechanism: post-mortem wrap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat ((NSTEPS + 8) * (ACQ + 1) + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
