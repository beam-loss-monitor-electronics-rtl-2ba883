// masking -- turns over-threshold flags into the beam permit, honouring the masking table.
//
// Each detector has two configuration bits: connected and maskable. A detector that is
// not connected never requests a dump. A connected, not-maskable detector over any of its
// thresholds always requests a dump. A connected, maskable detector requests one unless
// masking is allowed, which needs both the operator's mask_enable and the safe_beam flag
// (masking only while the beam is safe).
//
// The comparison stream (in_valid, in_ch, in_last, in_over) is followed per step; at the
// last channel of a step the step's requests are evaluated. req_unmaskable/req_maskable
// pulse one cycle after in_last when some connected detector of that class was over a
// threshold (before masking). beam_permit is high only when armed (configuration loaded)
// and no effective request has been seen since the last rearm; it falls in the cycle
// after in_last of the offending step and then stays low until rearm. dump_trig pulses
// once when the permit is withdrawn by a request, and dump_cause latches which detectors
// caused it.
// The connected/maskable table and "masking only when safe" follow the document; the
// two-input masking condition, the latching permit and the rearm input are this design's
// own choices.
module masking
  import blm_pkg::*;
#(
  parameter int unsigned N_CH = NCH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // table loading
  input  logic                     tbl_wr_en,
  input  logic [$clog2(N_CH)-1:0]  tbl_wr_ch,
  input  logic                     tbl_connected,
  input  logic                     tbl_maskable,
  // control
  input  logic                     armed,
  input  logic                     safe_beam,
  input  logic                     mask_enable,
  input  logic                     rearm,
  // comparison stream
  input  logic                     in_valid,
  input  logic [$clog2(N_CH)-1:0]  in_ch,
  input  logic                     in_last,
  input  logic [NRS-1:0]           in_over,
  // results
  output logic                     req_unmaskable,
  output logic                     req_maskable,
  output logic                     beam_permit,
  output logic                     dump_trig,
  output logic [N_CH-1:0]          dump_cause
);

  logic [N_CH-1:0] connected, maskable;
  logic [N_CH-1:0] hit_u, hit_m;         // requests collected in the current step
  logic            tripped;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      connected <= '0;
      maskable  <= '0;
    end else if (tbl_wr_en) begin
      connected[tbl_wr_ch] <= tbl_connected;
      maskable[tbl_wr_ch]  <= tbl_maskable;
    end
  end

  // Requests of the channel on the input, merged with those of earlier channels.
  logic [N_CH-1:0] nu, nm;
  logic            any_over, masked;
  always_comb begin
    nu       = hit_u;
    nm       = hit_m;
    any_over = in_valid && (|in_over) && connected[in_ch];
    if (any_over) begin
      if (maskable[in_ch]) nm[in_ch] = 1'b1;
      else                 nu[in_ch] = 1'b1;
    end
    masked = safe_beam && mask_enable;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_u <= '0;  hit_m <= '0;
      tripped <= 1'b0;
      req_unmaskable <= 1'b0;  req_maskable <= 1'b0;
      dump_trig <= 1'b0;  dump_cause <= '0;
    end else begin
      req_unmaskable <= 1'b0;
      req_maskable   <= 1'b0;
      dump_trig      <= 1'b0;
      if (in_valid && in_last) begin
        hit_u <= '0;
        hit_m <= '0;
        req_unmaskable <= |nu;
        req_maskable   <= |nm;
        if (!tripped && ((|nu) || ((|nm) && !masked))) begin
          tripped    <= 1'b1;
          dump_trig  <= 1'b1;
          dump_cause <= nu | (masked ? '0 : nm);
        end
      end else begin
        hit_u <= nu;
        hit_m <= nm;
        if (rearm) begin
          tripped    <= 1'b0;
          dump_cause <= '0;
        end
      end
    end
  end

  assign beam_permit = armed && !tripped;

endmodule
