// pm_recorder -- post-mortem recording into external SRAM, double-buffered, never stopped.
//
// After a beam dump the experts need the loss history just before it. Two circular
// buffers are kept in the board SRAM:
//   A: the packets of every link as received (both redundant copies of both tunnel cards,
//      CRC included) for the last N_TURNS acquisitions;
//   B: the integral of every detector's combined value over INT_STEPS acquisitions
//      (250 x 40 us = 10 ms) for the last N_INT integration periods.
// Each buffer exists twice. Recording never stops: a freeze request (from the timing
// receiver through the backplane, or a test) makes the other half the one being written,
// so the half that was being written keeps the history up to the freeze until the next
// freeze. The freeze takes effect at the next acquisition boundary (acq_tick); the frozen
// half, its next record index (the oldest record when it has wrapped) and whether it has
// wrapped are reported on the frz_* outputs for the crate CPU, which reads the SRAM and
// adds the time stamp.
//
// Capture: per link, the 16-bit words of the current period are stored from the word
// flagged start-of-frame on (a new start-of-frame restarts the packet; words past the
// 20th, or without a start, are dropped). At acq_tick the period's words are staged and
// the capture restarts; a word arriving in the tick cycle belongs to the next period.
// Words never received are recorded as zero.
// SRAM layout (32-bit words, ADDR_W-bit word address):
//   A half h, record r: h*A_WORDS + r*REC_A + link*10 + i, word i = {word 2i, word 2i+1}
//   B half h, record r: 2*A_WORDS + h*B_WORDS + r*N_CH + channel
// with REC_A = N_LINK*10, A_WORDS = N_TURNS*REC_A, B_WORDS = N_INT*N_CH. Link l is link A
// (l even) or B (l odd) of tunnel card l/2.
// Timing: record A is written in the N_LINK*10 cycles after acq_tick; record B in N_CH
// cycles once the last channel of the integration period has been accumulated and A is
// not writing. A period must therefore be longer than N_LINK*10 + N_CH cycles plus the
// delay of the value stream (checked by an assertion on A).
// The two circular buffers, their contents, the depth of A, the 10 ms integrals, the
// toggling on the freeze trigger and never stopping follow the document; the depth of B,
// the SRAM layout, the word packing and the boundary at which a freeze takes effect are
// this design's own choices.
module pm_recorder
  import blm_pkg::*;
#(
  parameter int unsigned N_LINK    = 2 * NCARD,
  parameter int unsigned N_CH      = NCH,
  parameter int unsigned N_TURNS   = 2000,
  parameter int unsigned INT_STEPS = 250,
  parameter int unsigned N_INT     = 2000,
  parameter int unsigned ADDR_W    = 19
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // link words, after the deserialisers
  input  logic [N_LINK-1:0]              rx_valid,
  input  logic [N_LINK-1:0]              rx_sof,
  input  logic [N_LINK-1:0][15:0]        rx_data,
  input  logic                           acq_tick,
  // combined values, one channel per cycle, in_last on channel N_CH-1
  input  logic                           in_valid,
  input  logic [$clog2(N_CH)-1:0]        in_ch,
  input  logic [VAL_W-1:0]               in_val,
  input  logic                           in_last,
  // freeze request
  input  logic                           pm_freeze,
  // SRAM write port
  output logic                           sram_we,
  output logic [ADDR_W-1:0]              sram_addr,
  output logic [31:0]                    sram_wdata,
  // state of the buffers
  output logic                           cur_half,
  output logic                           frz_valid,
  output logic                           frz_half,
  output logic [$clog2(N_TURNS)-1:0]     frz_a_ptr,
  output logic                           frz_a_full,
  output logic [$clog2(N_INT)-1:0]       frz_b_ptr,
  output logic                           frz_b_full,
  output logic [15:0]                    frz_count
);

  localparam int unsigned REC_A   = N_LINK * 10;
  localparam int unsigned A_WORDS = N_TURNS * REC_A;
  localparam int unsigned B_WORDS = N_INT * N_CH;
  localparam int unsigned AP_W    = $clog2(N_TURNS);
  localparam int unsigned BP_W    = $clog2(N_INT);
  localparam int unsigned CW      = $clog2(N_CH);
  localparam int unsigned LW      = (N_LINK > 1) ? $clog2(N_LINK) : 1;
  localparam int unsigned IW      = $clog2(INT_STEPS);

  if (2 * (64'(A_WORDS) + 64'(B_WORDS)) > (64'd1 << ADDR_W)) begin : g_size_check
    $error("pm_recorder: the buffers do not fit the SRAM address space");
  end

  // ---------------- capture of the current period ----------------
  logic [15:0]         cap   [N_LINK][PKT_WORDS];
  logic [PKT_WORDS-1:0] cap_v [N_LINK];
  logic [4:0]          cap_i [N_LINK];
  logic [15:0]         stg   [N_LINK][PKT_WORDS];
  logic [PKT_WORDS-1:0] stg_v [N_LINK];

  for (genvar l = 0; l < N_LINK; l++) begin : g_cap
    logic [PKT_WORDS-1:0] base_v;
    logic [4:0]           base_i;
    assign base_v = acq_tick ? '0 : cap_v[l];
    assign base_i = acq_tick ? 5'(PKT_WORDS) : cap_i[l];

    always_ff @(posedge clk) begin
      if (rx_valid[l] && rx_sof[l])                   cap[l][0]      <= rx_data[l];
      else if (rx_valid[l] && base_i < 5'(PKT_WORDS)) cap[l][base_i] <= rx_data[l];
      if (acq_tick) stg[l] <= cap[l];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cap_v[l] <= '0;
        cap_i[l] <= 5'(PKT_WORDS);
        stg_v[l] <= '0;
      end else begin
        if (rx_valid[l] && rx_sof[l]) begin
          cap_v[l] <= PKT_WORDS'(1);
          cap_i[l] <= 5'd1;
        end else if (rx_valid[l] && base_i < 5'(PKT_WORDS)) begin
          cap_v[l] <= base_v | (PKT_WORDS'(1) << base_i);
          cap_i[l] <= base_i + 5'd1;
        end else begin
          cap_v[l] <= base_v;
          cap_i[l] <= base_i;
        end
        if (acq_tick) stg_v[l] <= cap_v[l];
      end
    end
  end

  // ---------------- 10 ms integrals ----------------
  logic [31:0]   acc  [N_CH];
  logic [31:0]   istg [N_CH];
  logic [IW-1:0] icnt;
  logic          int_end;
  assign int_end = (32'(icnt) == INT_STEPS - 1);

  always_ff @(posedge clk) begin
    if (in_valid && int_end) istg[in_ch] <= acc[in_ch] + 32'(in_val);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) acc[c] <= '0;
      icnt <= '0;
    end else if (in_valid) begin
      acc[in_ch] <= int_end ? 32'd0 : acc[in_ch] + 32'(in_val);
      if (in_last) icnt <= int_end ? '0 : icnt + 1'b1;
    end
  end

  // ---------------- buffer pointers, freeze and SRAM writers ----------------
  logic            half, frz_pend;
  logic [AP_W-1:0] a_ptr;
  logic            a_full;
  logic [BP_W-1:0] b_ptr;
  logic            b_full;

  logic              a_busy, b_busy;
  logic [LW-1:0]     a_link;
  logic [3:0]        a_w;
  logic [CW-1:0]     b_cnt;
  logic [ADDR_W-1:0] a_base, b_base;

  // pointers as they stand after a freeze applied in this cycle
  logic            h_now;
  logic [AP_W-1:0] ap_now;
  logic [BP_W-1:0] bp_now;
  logic            af_now, bf_now;
  logic            b_start;
  assign b_start = in_valid && in_last && int_end;

  always_comb begin
    if (acq_tick && frz_pend) begin
      h_now = !half;  ap_now = '0;  af_now = 1'b0;  bp_now = '0;  bf_now = 1'b0;
    end else begin
      h_now = half;   ap_now = a_ptr; af_now = a_full; bp_now = b_ptr; bf_now = b_full;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      half       <= 1'b0;
      frz_pend   <= 1'b0;
      a_ptr      <= '0;  a_full <= 1'b0;
      b_ptr      <= '0;  b_full <= 1'b0;
      a_busy     <= 1'b0; a_link <= '0; a_w <= '0; a_base <= '0;
      b_busy     <= 1'b0; b_cnt  <= '0; b_base <= '0;
      frz_valid  <= 1'b0;
      frz_half   <= 1'b0;
      frz_a_ptr  <= '0;  frz_a_full <= 1'b0;
      frz_b_ptr  <= '0;  frz_b_full <= 1'b0;
      frz_count  <= '0;
    end else begin
      frz_valid <= 1'b0;
      // freeze: requested any time, applied at the next acquisition boundary
      if (acq_tick) frz_pend <= pm_freeze;
      else if (pm_freeze) frz_pend <= 1'b1;
      if (acq_tick && frz_pend) begin
        frz_valid  <= 1'b1;
        frz_half   <= half;
        frz_a_ptr  <= a_ptr;  frz_a_full <= a_full;
        frz_b_ptr  <= b_ptr;  frz_b_full <= b_full;
        frz_count  <= frz_count + 16'd1;
      end
      half   <= h_now;
      a_ptr  <= ap_now;  a_full <= af_now;
      b_ptr  <= bp_now;  b_full <= bf_now;

      // buffer A: one record per acquisition; the previous record must be complete
      if (acq_tick && a_busy)
        a_done_before_tick: assert (32'(a_link) == N_LINK - 1 && a_w == 4'd9)
          else $error("pm_recorder: acquisition period too short for the record");
      if (acq_tick) begin
        a_busy <= 1'b1;
        a_link <= '0;
        a_w    <= '0;
        a_base <= ADDR_W'(32'(h_now) * A_WORDS + 32'(ap_now) * REC_A);
        if (32'(ap_now) == N_TURNS - 1) begin
          a_ptr <= '0;  a_full <= 1'b1;
        end else begin
          a_ptr <= ap_now + 1'b1;
        end
      end else if (a_busy) begin
        if (a_w == 4'd9) begin
          a_w <= '0;
          if (32'(a_link) == N_LINK - 1) a_busy <= 1'b0;
          else                           a_link <= a_link + 1'b1;
        end else begin
          a_w <= a_w + 4'd1;
        end
      end

      // buffer B: one record per integration period, written while A is idle
      if (b_start) begin
        b_busy <= 1'b1;
        b_cnt  <= '0;
        b_base <= ADDR_W'(2 * A_WORDS + 32'(h_now) * B_WORDS + 32'(bp_now) * N_CH);
        if (32'(bp_now) == N_INT - 1) begin
          b_ptr <= '0;  b_full <= 1'b1;
        end else begin
          b_ptr <= bp_now + 1'b1;
        end
      end else if (b_busy && !a_busy) begin
        b_cnt <= b_cnt + 1'b1;
        if (32'(b_cnt) == N_CH - 1) b_busy <= 1'b0;
      end
    end
  end

  assign cur_half = half;


  // ---------------- SRAM write port ----------------
  logic [4:0] wi0, wi1;
  assign wi0 = 5'({a_w, 1'b0});
  assign wi1 = 5'({a_w, 1'b1});

  always_comb begin
    sram_we    = 1'b0;
    sram_addr  = '0;
    sram_wdata = '0;
    if (a_busy) begin
      sram_we    = 1'b1;
      sram_addr  = a_base + ADDR_W'(32'(a_link) * 10 + 32'(a_w));
      sram_wdata = {stg_v[a_link][wi0] ? stg[a_link][wi0] : 16'd0,
                    stg_v[a_link][wi1] ? stg[a_link][wi1] : 16'd0};
    end else if (b_busy) begin
      sram_we    = 1'b1;
      sram_addr  = b_base + ADDR_W'(b_cnt);
      sram_wdata = istg[b_cnt];
    end
  end

endmodule
