// max_values -- maximum of every running sum over the last second, for logging.
//
// The crate CPU reads, once per second, the largest value each running sum of each
// detector reached. The block follows the running-sum stream (one channel per cycle, all
// 12 sums) and keeps a running maximum per channel and sum in one of two banks. At every
// sec_tick the banks swap: the bank that collected the second just ended (including a
// sample arriving in the same cycle) becomes the read-out bank, the other one is emptied
// and collects the next second, and max_reset pulses (it feeds the "MaxValue Resets"
// counter of the status registers).
// Read port: rd_ch/rd_rs select a value; rd_data follows one cycle later. The values are
// 64 bits wide so that the 40-bit sums fit; the 8 short sums of a channel need 32 bits
// and the 4 long ones 64 bits, which makes the 1 KB per card the logging reads.
// That the maxima of the last second are kept follows the document; the two-bank scheme,
// the tick-based restart and the read port are this design's own choices.
module max_values
  import blm_pkg::*;
#(
  parameter int unsigned N_CH = NCH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [$clog2(N_CH)-1:0]  in_ch,
  input  rs_t                      in_rs [NRS],
  input  logic                     sec_tick,
  output logic                     max_reset,
  input  logic [$clog2(N_CH)-1:0]  rd_ch,
  input  logic [3:0]               rd_rs,
  output logic [63:0]              rd_data
);

  localparam int unsigned CW = $clog2(N_CH);
  localparam int unsigned VW = NRS * RSW_MAX;

  // Two banks of maxima, {bank, channel} addressed: one collects the current second,
  // the other holds the last complete second. fresh marks the entries written since
  // their bank was last emptied; an entry that is not fresh reads as zero, so a bank is
  // emptied by clearing its fresh bits only.
  logic [VW-1:0]   mem [2*N_CH];
  logic [N_CH-1:0] fresh [2];
  logic            sel;              // bank collecting the current second

  logic [VW-1:0] old_v, new_v;
  always_comb begin
    old_v = fresh[sel][in_ch] ? mem[{sel, in_ch}] : '0;
    for (int k = 0; k < NRS; k++)
      new_v[k*RSW_MAX +: RSW_MAX] = (in_rs[k] > old_v[k*RSW_MAX +: RSW_MAX])
                                    ? in_rs[k] : old_v[k*RSW_MAX +: RSW_MAX];
  end

  always_ff @(posedge clk)
    if (in_valid) mem[{sel, in_ch}] <= new_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel       <= 1'b0;
      fresh[0]  <= '0;
      fresh[1]  <= '0;
      max_reset <= 1'b0;
    end else begin
      max_reset <= sec_tick;
      if (in_valid) fresh[sel][in_ch] <= 1'b1;
      if (sec_tick) begin
        sel         <= !sel;
        fresh[!sel] <= '0;
      end
    end
  end

  // Read-out of the last complete second.
  logic [VW-1:0] rd_v;
  assign rd_v = fresh[!sel][rd_ch] ? mem[{!sel, rd_ch}] : '0;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 rd_data <= '0;
    else if (32'(rd_rs) < NRS)  rd_data <= 64'(rd_v[rd_rs*RSW_MAX +: RSW_MAX]);
    else                        rd_data <= '0;
  end

endmodule
