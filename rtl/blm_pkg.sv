// blm_pkg -- constants and types shared by the BLM surface-card (BLMTC) logic.
//
// The surface FPGA receives, every 40 us, one 320-bit packet per tunnel card on each of
// two redundant optical links. Each tunnel card serves 8 detector channels; a surface
// card takes two tunnel cards, i.e. 16 detectors. Every channel value feeds 12 moving-sum
// windows ("running sums", RS00..RS11) whose lengths, refresh rates and bit widths are
// the ones of the successive-running-sum configuration table. Threshold values are
// 32 bits wide for RS00..RS07 and 64 bits wide for RS08..RS11, 32 energy levels per
// detector.
//
// Packet layout (20 words of 16 bits, word 0 sent first) is this design's own choice;
// only the total length of 320 bits, the per-channel data (CFC count and ADC value),
// the status bits, the card ID, the frame ID, the eight DAC values and a CRC are given:
//   word 0      card ID
//   word 1      frame ID
//   words 2..11 8 channels x 20 bits: channel c occupies payload bits [20c+19 : 20c]
//               as {CFC count[7:0], ADC[11:0]}, word 2 holding payload bits [159:144]
//   words 12,13 status (32 bits)
//   words 14..17 DAC values, 8 x 8 bits, DAC 1 in the most significant byte
//   words 18,19 CRC-32 (polynomial 04C11DB7, initial value all ones, MSB first, no final
//               inversion) over words 0..17
package blm_pkg;

  localparam int unsigned NCH          = 16;  // detectors per surface card
  localparam int unsigned CH_PER_CARD  = 8;   // detectors per tunnel card
  localparam int unsigned NCARD        = 2;   // tunnel cards per surface card
  localparam int unsigned NRS          = 12;  // running sums
  localparam int unsigned NSR          = 5;   // shift registers SR1..SR5
  localparam int unsigned NENERGY      = 32;  // beam energy levels
  localparam int unsigned VAL_W        = 20;  // combined value (= RS00 width)
  localparam int unsigned CNT_W        = 8;   // CFC count per 40 us
  localparam int unsigned ADC_W        = 12;  // ADC resolution
  localparam int unsigned PKT_WORDS    = 20;  // 320-bit packet in 16-bit words
  localparam int unsigned PKT_BITS     = 320;
  localparam int unsigned RSW_MAX      = 40;  // widest running sum
  localparam int unsigned THR_W        = 64;  // widest threshold
  localparam int unsigned STEP_W       = 21;  // 2^21 steps = longest window

  // Window length of each running sum, in 40 us steps.
  localparam int unsigned RS_LEN [NRS] = '{1, 2, 8, 16, 64, 256, 2048, 8192,
                                           32768, 131072, 524288, 2097152};
  // Refresh period of each running sum, in 40 us steps.
  localparam int unsigned RS_REFRESH [NRS] = '{1, 1, 1, 1, 2, 2, 64, 64,
                                               2048, 2048, 32768, 32768};
  // Bits kept for each running sum.
  localparam int unsigned RS_WIDTH [NRS] = '{20, 22, 22, 22, 26, 26, 32, 32,
                                             36, 36, 40, 40};
  // Threshold width of each running sum.
  localparam int unsigned RS_THR_W [NRS] = '{32, 32, 32, 32, 32, 32, 32, 32,
                                             64, 64, 64, 64};

  typedef logic [RSW_MAX-1:0] rs_t;
  typedef rs_t                rs_vec_t [NRS];
  typedef logic [THR_W-1:0]   thr_t;

  // One channel as carried by the packet.
  typedef struct packed {
    logic [CNT_W-1:0] count;
    logic [ADC_W-1:0] adc;
  } chan_raw_t;

  // Decoded contents of a packet.
  typedef struct packed {
    logic [15:0]                        card_id;
    logic [15:0]                        frame_id;
    chan_raw_t [CH_PER_CARD-1:0]        chan;     // chan[c] = channel c
    logic [31:0]                        status;
    logic [CH_PER_CARD-1:0][7:0]        dac;      // dac[c] = DAC value of channel c
  } packet_t;

  // One step of CRC-32 over a 16-bit word, MSB first.
  function automatic logic [31:0] crc32_word(input logic [31:0] crc, input logic [15:0] w);
    logic [31:0] c;
    c = crc;
    for (int i = 15; i >= 0; i--) begin
      if (c[31] ^ w[i]) c = {c[30:0], 1'b0} ^ 32'h04C1_1DB7;
      else              c = {c[30:0], 1'b0};
    end
    return c;
  endfunction

  // Unpack words 0..17 of a received packet (word 0 at the top of the vector).
  function automatic packet_t unpack_packet(input logic [18*16-1:0] body);
    packet_t p;
    logic [159:0] pay;
    p.card_id  = body[17*16 +: 16];
    p.frame_id = body[16*16 +: 16];
    pay        = body[6*16 +: 160];
    for (int c = 0; c < CH_PER_CARD; c++) p.chan[c] = pay[20*c +: 20];
    p.status   = body[4*16 +: 32];
    for (int c = 0; c < CH_PER_CARD; c++) p.dac[c] = body[(7-c)*8 +: 8];
    return p;
  endfunction

endpackage
