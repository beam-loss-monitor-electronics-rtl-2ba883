// srs -- Successive Running Sums: 12 moving-sum windows per channel, 40 us to 84 s.
//
// Every 40 us step each channel delivers one value. Five multi-point shift registers keep
// its history at growing granularity, and each running sum is maintained incrementally:
// new sum = old sum + value entering the window - value leaving it. The value leaving is
// read from a tap of the shift register, so no window is ever added up from scratch.
//
//   register  fed with            every      depth   running sums (window, width)
//   SR1       the new value       1 step     16      RS00 (1, 20) RS01 (2, 22)
//                                                    RS02 (8, 22) RS03 (16, 22)
//   SR2       RS01                2 steps    128     RS04 (64, 26) RS05 (256, 26)
//   SR3       RS04                64 steps   128     RS06 (2048, 32) RS07 (8192, 32)
//   SR4       RS06                2048 steps 64      RS08 (32768, 36) RS09 (131072, 36)
//   SR5       RS08                32768 st.  64      RS10 (524288, 40) RS11 (2097152, 40)
//
// A running sum refreshed every R steps changes only at steps t with (t+1) mod R = 0,
// and then equals the sum of the values of steps t-N+1 .. t. The shift registers are
// circular buffers whose write positions are bit fields of the 21-bit step counter.
// Sums are kept modulo 2^width, with the widths of the configuration table.
//
// Interface: after reset the block clears its memories (NCH*128 cycles, ready low). It
// then accepts one channel per cycle (in_valid, in_ch, in_val); channels 0..NCH-1 in
// order make one step, and the step counter advances after channel NCH-1. For each
// accepted channel all 12 sums appear one cycle later on out_rs with out_valid/out_ch;
// out_last marks the last channel of a step and out_step gives the step number.
// The windows, refresh periods, shift-register grouping and widths follow the document;
// the channel-serial schedule, the buffer depths chosen as the smallest that hold each
// window, and the single-cycle update are this design's own choices.
module srs
  import blm_pkg::*;
#(
  parameter int unsigned N_CH = NCH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     ready,
  input  logic                     in_valid,
  input  logic [$clog2(N_CH)-1:0]  in_ch,
  input  logic [VAL_W-1:0]         in_val,
  output logic                     out_valid,
  output logic [$clog2(N_CH)-1:0]  out_ch,
  output logic                     out_last,
  output logic [STEP_W-1:0]        out_step,
  output rs_t                      out_rs [NRS]
);

  localparam int unsigned CW = $clog2(N_CH);

  // Shift registers as flat memories addressed {channel, position}; sums packed per channel.
  logic [19:0]         sr1 [N_CH*16];
  logic [21:0]         sr2 [N_CH*128];
  logic [25:0]         sr3 [N_CH*128];
  logic [31:0]         sr4 [N_CH*64];
  logic [35:0]         sr5 [N_CH*64];
  logic [NRS*RSW_MAX-1:0] rs_mem [N_CH];

  logic [STEP_W-1:0] step;
  logic [CW+6:0]     init_idx;

  function automatic rs_t wmask(input rs_t v, input int unsigned w);
    return v & ((rs_t'(1) << w) - rs_t'(1));
  endfunction

  // Write positions of the five shift registers and their push conditions.
  logic [3:0] p1;
  logic [6:0] p2, p3;
  logic [5:0] p4, p5;
  logic       push2, push3, push4, push5;
  assign p1    = step[3:0];
  assign p2    = step[7:1];
  assign p3    = step[12:6];
  assign p4    = step[16:11];
  assign p5    = step[20:15];
  assign push2 = step[0];
  assign push3 = &step[5:0];
  assign push4 = &step[10:0];
  assign push5 = &step[14:0];

  // New sums of the channel presented now.
  rs_t nrs [NRS];
  always_comb begin
    for (int k = 0; k < NRS; k++) nrs[k] = rs_mem[in_ch][k*RSW_MAX +: RSW_MAX];
    nrs[0] = rs_t'(in_val);
    nrs[1] = wmask(nrs[1] + rs_t'(in_val) - rs_t'(sr1[{in_ch, 4'(p1 - 4'd2)}]), RS_WIDTH[1]);
    nrs[2] = wmask(nrs[2] + rs_t'(in_val) - rs_t'(sr1[{in_ch, 4'(p1 - 4'd8)}]), RS_WIDTH[2]);
    nrs[3] = wmask(nrs[3] + rs_t'(in_val) - rs_t'(sr1[{in_ch, p1}]),        RS_WIDTH[3]);
    if (push2) begin
      nrs[4] = wmask(nrs[4] + nrs[1] - rs_t'(sr2[{in_ch, 7'(p2 - 7'd32)}]), RS_WIDTH[4]);
      nrs[5] = wmask(nrs[5] + nrs[1] - rs_t'(sr2[{in_ch, p2}]),         RS_WIDTH[5]);
    end
    if (push3) begin
      nrs[6] = wmask(nrs[6] + nrs[4] - rs_t'(sr3[{in_ch, 7'(p3 - 7'd32)}]), RS_WIDTH[6]);
      nrs[7] = wmask(nrs[7] + nrs[4] - rs_t'(sr3[{in_ch, p3}]),         RS_WIDTH[7]);
    end
    if (push4) begin
      nrs[8] = wmask(nrs[8] + nrs[6] - rs_t'(sr4[{in_ch, 6'(p4 - 6'd16)}]), RS_WIDTH[8]);
      nrs[9] = wmask(nrs[9] + nrs[6] - rs_t'(sr4[{in_ch, p4}]),         RS_WIDTH[9]);
    end
    if (push5) begin
      nrs[10] = wmask(nrs[10] + nrs[8] - rs_t'(sr5[{in_ch, 6'(p5 - 6'd16)}]), RS_WIDTH[10]);
      nrs[11] = wmask(nrs[11] + nrs[8] - rs_t'(sr5[{in_ch, p5}]),         RS_WIDTH[11]);
    end
  end

  logic [NRS*RSW_MAX-1:0] nrs_packed;
  always_comb
    for (int k = 0; k < NRS; k++) nrs_packed[k*RSW_MAX +: RSW_MAX] = nrs[k];

  // Memory writes: during the clearing sweep zeros at the sweep address, afterwards the
  // new value of the channel being processed.
  logic [CW-1:0] wch;
  logic [6:0]    wpos;
  logic          clr;
  assign clr  = !ready;
  assign wch  = clr ? init_idx[CW+6:7] : in_ch;
  assign wpos = init_idx[6:0];

  always_ff @(posedge clk) begin
    if (clr) begin
      sr1[{wch, wpos[3:0]}] <= '0;
      sr2[{wch, wpos}]      <= '0;
      sr3[{wch, wpos}]      <= '0;
      sr4[{wch, wpos[5:0]}] <= '0;
      sr5[{wch, wpos[5:0]}] <= '0;
      rs_mem[wch]           <= '0;
    end else if (in_valid) begin
      sr1[{wch, p1}] <= in_val;
      if (push2) sr2[{wch, p2}] <= nrs[1][21:0];
      if (push3) sr3[{wch, p3}] <= nrs[4][25:0];
      if (push4) sr4[{wch, p4}] <= nrs[6][31:0];
      if (push5) sr5[{wch, p5}] <= nrs[8][35:0];
      rs_mem[wch] <= nrs_packed;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready     <= 1'b0;
      init_idx  <= '0;
      step      <= '0;
      out_valid <= 1'b0;
      out_ch    <= '0;
      out_last  <= 1'b0;
      out_step  <= '0;
      for (int k = 0; k < NRS; k++) out_rs[k] <= '0;
    end else if (!ready) begin
      init_idx <= init_idx + 1'b1;
      if (&init_idx) ready <= 1'b1;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < NRS; k++) out_rs[k] <= nrs[k];
        out_ch   <= in_ch;
        out_step <= step;
        out_last <= (32'(in_ch) == N_CH - 1);
        if (32'(in_ch) == N_CH - 1) step <= step + 1'b1;
      end
    end
  end

endmodule
