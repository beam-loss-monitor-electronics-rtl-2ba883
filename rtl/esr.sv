// esr -- Error & Status Reports of one tunnel card, read by the crate CPU every second.
//
// Sixteen 32-bit registers (64 bytes; two tunnel cards make the 128 bytes per surface
// card). Word index, byte offset from the ESR base (00FFC400 for the first card):
//   0 00 MaxValue Resets   4 10 VME accesses     8 20 ERRD wrong card ID   12 30 LostFramesB
//   1 04 acquisitions      5 14 ERRA CRC link A  9 24 ERRF wrong frame ID  13 34 {FID, CID}
//   2 08 frames to VME     6 18 ERRB CRC link B 10 28 {StatusA, StatusB}   14 38 DAC 1..4
//   3 0C dumps             7 1C ERRC A/B differ 11 2C LostFramesA          15 3C DAC 5..8
// Counters 0..9, 11 and 12 count one-cycle event pulses and wrap at 2^32. Words 10 and
// 13..15 show the latest values of their inputs; the first-named field sits in the upper
// half (or upper byte). Every read (rd_en) counts as a VME access, including the read of
// that counter itself, which returns the count before the access.
// Read timing: rd_data is valid the cycle after rd_en.
// The register list and addresses follow the document; which event feeds "frames to VME"
// (frames that reached the processing chain) and the wrapping counters are this
// design's own choices.
module esr (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ev_max_reset,
  input  logic        ev_acq,
  input  logic        ev_frame,
  input  logic        ev_dump,
  input  logic        ev_crc_a,
  input  logic        ev_crc_b,
  input  logic        ev_comp,
  input  logic        ev_cid,
  input  logic        ev_fid,
  input  logic        ev_lost_a,
  input  logic        ev_lost_b,
  input  logic [15:0] status_a,
  input  logic [15:0] status_b,
  input  logic [15:0] fid,
  input  logic [15:0] cid,
  input  logic [63:0] dac,          // DAC 1 in bits [63:56] ... DAC 8 in bits [7:0]
  input  logic        rd_en,
  input  logic [3:0]  rd_addr,
  output logic [31:0] rd_data
);

  typedef enum logic [3:0] {
    R_MAXRST = 4'd0,  R_ACQ = 4'd1,   R_FRAMES = 4'd2,  R_DUMPS = 4'd3,
    R_VMEACC = 4'd4,  R_ERRA = 4'd5,  R_ERRB = 4'd6,    R_ERRC = 4'd7,
    R_ERRD = 4'd8,    R_ERRF = 4'd9,  R_STATUS = 4'd10, R_LOSTA = 4'd11,
    R_LOSTB = 4'd12,  R_IDS = 4'd13,  R_DAC14 = 4'd14,  R_DAC58 = 4'd15
  } esr_reg_e;

  logic [31:0] cnt [13];   // counters at indices 0..9, 11, 12 (10 unused)
  logic [12:0] ev;

  always_comb begin
    ev = '0;
    ev[R_MAXRST] = ev_max_reset;
    ev[R_ACQ]    = ev_acq;
    ev[R_FRAMES] = ev_frame;
    ev[R_DUMPS]  = ev_dump;
    ev[R_VMEACC] = rd_en;
    ev[R_ERRA]   = ev_crc_a;
    ev[R_ERRB]   = ev_crc_b;
    ev[R_ERRC]   = ev_comp;
    ev[R_ERRD]   = ev_cid;
    ev[R_ERRF]   = ev_fid;
    ev[R_LOSTA]  = ev_lost_a;
    ev[R_LOSTB]  = ev_lost_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 13; i++) cnt[i] <= '0;
      rd_data <= '0;
    end else begin
      for (int i = 0; i < 13; i++)
        if (ev[i]) cnt[i] <= cnt[i] + 32'd1;
      if (rd_en) begin
        unique case (esr_reg_e'(rd_addr))
          R_STATUS: rd_data <= {status_a, status_b};
          R_IDS:    rd_data <= {fid, cid};
          R_DAC14:  rd_data <= dac[63:32];
          R_DAC58:  rd_data <= dac[31:0];
          default:  rd_data <= cnt[rd_addr];
        endcase
      end
    end
  end

endmodule
