// rcc -- Receive, Check & Compare for one tunnel card.
//
// A tunnel card sends the same 320-bit packet every 40 us over two redundant optical
// links, A and B. Two link_rx blocks receive and CRC-check the copies. At the end of
// each acquisition period (acq_tick) the block decides on what arrived in that period:
//   * a copy is usable if it arrived with a good CRC; A is taken when both are usable;
//   * both usable but with different CRCs             -> err_comp   (ESR ERRC)
//   * a copy arrived with a bad CRC                    -> err_crc_a / err_crc_b (ERRA/B)
//   * no copy at all on a link                         -> lost_a / lost_b (LostFrames)
//   * the chosen copy carries another card ID          -> err_cid (ERRD), data not used
//   * its frame ID is not the previous one plus one    -> err_fid (ERRF), data used
// Timing: all outputs are registered and valid in the cycle after acq_tick; the event
// flags are one-cycle pulses, out_valid/out_none likewise, out_pkt and the status words
// are held. A packet completing in the same cycle as acq_tick counts for the next period.
// The checks are those named by the document's error counters; the period-based
// decision, the preference for link A and the rejection of a foreign card ID are this
// design's own choices.
module rcc
  import blm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        acq_tick,        // end of a 40 us acquisition period
  input  logic [15:0] expected_cid,    // card ID of the tunnel card on these links
  // link A
  input  logic        a_valid,
  input  logic        a_sof,
  input  logic [15:0] a_data,
  // link B
  input  logic        b_valid,
  input  logic        b_sof,
  input  logic [15:0] b_data,
  // decision
  output logic        out_valid,       // out_pkt holds this period's data
  output logic        out_none,        // no usable data this period
  output packet_t     out_pkt,
  output logic        err_crc_a,
  output logic        err_crc_b,
  output logic        err_comp,
  output logic        err_cid,
  output logic        err_fid,
  output logic        lost_a,
  output logic        lost_b,
  output logic [15:0] status_a,        // low status half of the last packet on A
  output logic [15:0] status_b
);

  logic        da, oka, db, okb;
  logic [31:0] crca, crcb;
  packet_t     pa, pb;

  link_rx u_rx_a (.clk, .rst_n, .rx_valid(a_valid), .rx_sof(a_sof), .rx_data(a_data),
                  .pkt_done(da), .crc_ok(oka), .crc_rx(crca), .pkt(pa));
  link_rx u_rx_b (.clk, .rst_n, .rx_valid(b_valid), .rx_sof(b_sof), .rx_data(b_data),
                  .pkt_done(db), .crc_ok(okb), .crc_rx(crcb), .pkt(pb));

  // What arrived in the current period.
  logic        got_a, got_b, good_a, good_b;
  logic [31:0] cka, ckb;
  packet_t     ka, kb;
  logic [15:0] last_fid;
  logic        have_fid;

  // Decision on the registers of the closing period.
  logic    use_a, use_b, usable, cid_bad;
  packet_t chosen;

  always_comb begin
    use_a   = got_a && good_a;
    use_b   = got_b && good_b;
    chosen  = use_a ? ka : kb;
    cid_bad = (use_a || use_b) && (chosen.card_id != expected_cid);
    usable  = (use_a || use_b) && !cid_bad;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      got_a <= 1'b0;  got_b <= 1'b0;  good_a <= 1'b0;  good_b <= 1'b0;
      cka <= '0;  ckb <= '0;  ka <= '0;  kb <= '0;
      last_fid <= '0;  have_fid <= 1'b0;
      out_valid <= 1'b0;  out_none <= 1'b0;  out_pkt <= '0;
      err_crc_a <= 1'b0;  err_crc_b <= 1'b0;  err_comp <= 1'b0;
      err_cid <= 1'b0;  err_fid <= 1'b0;  lost_a <= 1'b0;  lost_b <= 1'b0;
      status_a <= '0;  status_b <= '0;
    end else begin
      out_valid <= 1'b0;  out_none <= 1'b0;
      err_crc_a <= 1'b0;  err_crc_b <= 1'b0;  err_comp <= 1'b0;
      err_cid <= 1'b0;  err_fid <= 1'b0;  lost_a <= 1'b0;  lost_b <= 1'b0;

      if (acq_tick) begin
        out_valid <= usable;
        out_none  <= !usable;
        if (usable) out_pkt <= chosen;
        err_crc_a <= got_a && !good_a;
        err_crc_b <= got_b && !good_b;
        lost_a    <= !got_a;
        lost_b    <= !got_b;
        err_comp  <= use_a && use_b && (cka != ckb);
        err_cid   <= cid_bad;
        err_fid   <= usable && have_fid && (chosen.frame_id != last_fid + 16'd1);
        if (usable) begin
          last_fid <= chosen.frame_id;
          have_fid <= 1'b1;
        end
        got_a <= 1'b0;
        got_b <= 1'b0;
      end

      // A packet finishing now belongs to the (new) current period.
      if (da) begin
        got_a <= 1'b1;  good_a <= oka;  cka <= crca;  ka <= pa;
        status_a <= pa.status[15:0];
      end
      if (db) begin
        got_b <= 1'b1;  good_b <= okb;  ckb <= crcb;  kb <= pb;
        status_b <= pb.status[15:0];
      end
    end
  end

endmodule
