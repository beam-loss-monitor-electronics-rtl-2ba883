// data_combine -- merges the CFC count and the ADC reading of each channel into one value.
//
// The current-to-frequency converter emits one count per fixed charge; the ADC samples
// the converter's integrator, i.e. the charge collected towards the next count. Taking
// one count as ADC full scale (2^ADC_W codes), the charge of the last 40 us is
//     value = count * 2^ADC_W + (adc_now - adc_prev)
// which gives sub-count resolution at low loss rates. A negative result (ADC noise with
// no count) is clipped to 0 and a result above 2^VAL_W - 1 is clipped to the maximum.
// The first packet after reset has no previous ADC value and counts only whole counts.
// A period without usable data (in_none) yields zero for all channels and keeps the
// previous ADC values.
// Timing: one register stage; out_valid follows in_valid or in_none by one cycle.
// The document only says that the two readings are merged into one value; the formula,
// the clipping and the treatment of missing data are this design's own choices.
module data_combine
  import blm_pkg::*;
#(
  parameter int unsigned NC = CH_PER_CARD
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_none,
  input  chan_raw_t [NC-1:0]    in_chan,
  output logic                  out_valid,
  output logic [VAL_W-1:0]      out_val [NC]
);

  logic [ADC_W-1:0] adc_prev [NC];
  logic             have_prev;

  function automatic logic [VAL_W-1:0] merge(input chan_raw_t ch, input logic [ADC_W-1:0] prev,
                                             input logic use_prev);
    logic signed [VAL_W+2:0] v;
    v = $signed({3'b0, ch.count, {ADC_W{1'b0}}}) + $signed({{(VAL_W+3-ADC_W){1'b0}}, ch.adc});
    if (use_prev) v = v - $signed({{(VAL_W+3-ADC_W){1'b0}}, prev});
    else          v = v - $signed({{(VAL_W+3-ADC_W){1'b0}}, ch.adc});
    if (v < 0)                                   return '0;
    else if (v > $signed({3'b0, {VAL_W{1'b1}}})) return '1;
    else                                         return v[VAL_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      have_prev <= 1'b0;
      for (int c = 0; c < NC; c++) begin
        adc_prev[c] <= '0;
        out_val[c]  <= '0;
      end
    end else begin
      out_valid <= in_valid || in_none;
      if (in_valid) begin
        have_prev <= 1'b1;
        for (int c = 0; c < NC; c++) begin
          out_val[c]  <= merge(in_chan[c], adc_prev[c], have_prev);
          adc_prev[c] <= in_chan[c].adc;
        end
      end else if (in_none) begin
        for (int c = 0; c < NC; c++) out_val[c] <= '0;
      end
    end
  end

endmodule
