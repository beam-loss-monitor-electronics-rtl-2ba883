// tb_pkt_pkg -- testbench model of the tunnel-card packet (the transmitter side).
//
// Builds the 20 16-bit words of a 320-bit packet from its fields, with a CRC computed
// bit by bit over the 288-bit body by a shift-register model written independently of
// the receiver's word-wise function. Layout: card ID, frame ID, 8 x {count[7:0],
// adc[11:0]} (channel 7 first, i.e. channel c in payload bits [20c+19:20c]), 32 status
// bits, 8 DAC bytes (channel 0 first), CRC-32 (04C11DB7, start all ones, MSB first).
package tb_pkt_pkg;

  typedef logic [15:0] words_t [20];

  typedef struct {
    logic [15:0] cid;
    logic [15:0] fid;
    logic [7:0]  count [8];
    logic [11:0] adc   [8];
    logic [31:0] status;
    logic [7:0]  dac   [8];
  } tx_pkt_t;

  function automatic logic [31:0] crc_bits(input logic [287:0] body);
    logic [31:0] r = 32'hFFFF_FFFF;
    for (int i = 287; i >= 0; i--) begin
      logic fb;
      fb = r[31] ^ body[i];
      r  = r << 1;
      if (fb) r = r ^ 32'h04C1_1DB7;
    end
    return r;
  endfunction

  function automatic words_t build(input tx_pkt_t p);
    words_t w;
    logic [287:0] body;
    logic [159:0] pay;
    logic [63:0]  d;
    logic [31:0]  c;
    for (int ch = 0; ch < 8; ch++) pay[20*ch +: 20] = {p.count[ch], p.adc[ch]};
    for (int ch = 0; ch < 8; ch++) d[(7-ch)*8 +: 8] = p.dac[ch];
    body = {p.cid, p.fid, pay, p.status, d};
    c = crc_bits(body);
    for (int i = 0; i < 18; i++) w[i] = body[(17-i)*16 +: 16];
    w[18] = c[31:16];
    w[19] = c[15:0];
    return w;
  endfunction

  function automatic tx_pkt_t random_pkt(input logic [15:0] cid, input logic [15:0] fid);
    tx_pkt_t p;
    p.cid = cid;
    p.fid = fid;
    for (int ch = 0; ch < 8; ch++) begin
      p.count[ch] = 8'($urandom);
      p.adc[ch]   = 12'($urandom);
      p.dac[ch]   = 8'($urandom);
    end
    p.status = $urandom;
    return p;
  endfunction

endpackage
