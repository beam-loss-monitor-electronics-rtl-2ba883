// threshold_comparator -- threshold table, threshold scaling and comparison.
//
// Each detector has its own threshold for every running sum and every one of the 32
// beam-energy levels. The table is split into one bank per running sum, addressed by
// {channel, energy}: RS00..RS07 use 32-bit banks and RS08..RS11 64-bit banks, so the
// table holds 16*32*8 = 4096 32-bit and 16*32*4 = 2048 64-bit values (256 Kbit, 32 KB).
// Because every bank is read in parallel, the 12 sums of a channel are compared in one
// cycle. A per-channel scaling register gives a right shift applied to all thresholds
// of that channel (divide by 2, 4, 8, ...); it can only lower a threshold.
// A sum is over its threshold when it is strictly greater than the scaled threshold.
//
// Interface: the running-sum stream (in_valid, in_ch, in_last, in_rs) comes in; two
// cycles later out_valid/out_ch/out_last carry out_over, one flag per running sum.
// The table is filled through the wr_* port (at power-on, from the configuration or a
// non-volatile memory) and the shifts through the sh_* port. The log_* port returns,
// one cycle later, the scaled threshold that is in use for a channel and sum at the
// present energy (the "used thresholds" the logging reads every second); with log_table
// set it returns instead the stored, unscaled entry at energy log_energy, so that the
// complete table can be read back at start-up.
// The table organisation, its size and the shift-based scaling follow the document; the
// bank-per-sum layout, the strict comparison, the 6-bit shift and the ports are this
// design's own choices.
module threshold_comparator
  import blm_pkg::*;
#(
  parameter int unsigned N_CH = NCH,
  parameter int unsigned N_EN = NENERGY
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$clog2(N_EN)-1:0]       energy,
  // running sums in
  input  logic                          in_valid,
  input  logic [$clog2(N_CH)-1:0]       in_ch,
  input  logic                          in_last,
  input  rs_t                           in_rs [NRS],
  // comparison out
  output logic                          out_valid,
  output logic [$clog2(N_CH)-1:0]       out_ch,
  output logic                          out_last,
  output logic [NRS-1:0]                out_over,
  // table loading
  input  logic                          wr_en,
  input  logic [$clog2(N_CH)-1:0]       wr_ch,
  input  logic [$clog2(N_EN)-1:0]       wr_energy,
  input  logic [3:0]                    wr_rs,
  input  thr_t                          wr_data,
  // per-channel scaling
  input  logic                          sh_wr_en,
  input  logic [$clog2(N_CH)-1:0]       sh_wr_ch,
  input  logic [5:0]                    sh_wr_val,
  // logging read-back
  input  logic [$clog2(N_CH)-1:0]       log_ch,
  input  logic [3:0]                    log_rs,
  input  logic                          log_table,
  input  logic [$clog2(N_EN)-1:0]       log_energy,
  output thr_t                          log_thr
);

  localparam int unsigned CW    = $clog2(N_CH);
  localparam int unsigned EW    = $clog2(N_EN);
  localparam int unsigned DEPTH = N_CH * N_EN;

  logic [5:0]  shift [N_CH];

  logic [CW+EW-1:0] waddr, raddr, laddr;
  assign waddr = {wr_ch, wr_energy};
  assign raddr = {in_ch, energy};
  assign laddr = {log_ch, log_table ? log_energy : energy};

  // ---- one memory per running sum: write port, compare read port, logging read port ----
  thr_t thr_q [NRS];     // stage-1 threshold for the comparison
  thr_t thr_l [NRS];     // threshold for the logging port
  for (genvar k = 0; k < NRS; k++) begin : g_bank
    localparam int unsigned W = RS_THR_W[k];
    logic [W-1:0] bank [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_en && wr_rs == 4'(k)) bank[waddr] <= wr_data[W-1:0];
      thr_q[k] <= thr_t'(bank[raddr]);
      thr_l[k] <= thr_t'(bank[laddr]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) shift[c] <= '0;
    end else if (sh_wr_en) begin
      shift[sh_wr_ch] <= sh_wr_val;
    end
  end

  // ---- stage 1: delay the sums alongside the memory read ----
  rs_t                 rs_q  [NRS];
  logic                v_q, last_q;
  logic [CW-1:0]       ch_q, lch_q;
  logic [3:0]          lrs_q;
  logic                ltab_q;

  always_ff @(posedge clk) begin
    for (int k = 0; k < NRS; k++) rs_q[k] <= in_rs[k];
    ch_q  <= in_ch;
    lch_q <= log_ch;
    lrs_q <= log_rs;
    ltab_q <= log_table;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0;  last_q <= 1'b0;
    end else begin
      v_q <= in_valid;  last_q <= in_valid && in_last;
    end
  end

  // ---- stage 2: scale and compare ----
  logic [NRS-1:0] over_c;
  always_comb begin
    for (int k = 0; k < NRS; k++)
      over_c[k] = thr_t'(rs_q[k]) > (thr_q[k] >> shift[ch_q]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_ch    <= '0;
      out_over  <= '0;
    end else begin
      out_valid <= v_q;
      out_last  <= last_q;
      out_ch    <= ch_q;
      out_over  <= v_q ? over_c : '0;
    end
  end

  // ---- logging read-back of the threshold in use ----
  always_comb begin
    if (32'(lrs_q) >= NRS) log_thr = '0;
    else if (ltab_q)       log_thr = thr_l[lrs_q];
    else                   log_thr = thr_l[lrs_q] >> shift[lch_q];
  end

endmodule
