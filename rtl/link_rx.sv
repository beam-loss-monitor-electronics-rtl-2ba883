// link_rx -- packet receiver of one optical link of the surface card.
//
// The gigabit link is deserialised and decoded outside the FPGA; this block sees the
// decoded 16-bit words. A word flagged rx_sof starts a packet; the next 19 valid words
// complete it (20 words = 320 bits). While the words arrive a CRC-32 runs over words
// 0..17 and is compared with words 18..19 (layout in blm_pkg). A start-of-frame in the
// middle of a packet restarts reception; the partial packet is dropped.
//
// Timing: pkt_done is a registered one-cycle pulse that rises at the clock edge which
// takes the last word; pkt, crc_rx and crc_ok are valid with it and held until the next packet completes.
// Receiving, de-serialising and checking each link follows the document; the word
// width, the framing by rx_sof and the CRC polynomial are this design's own choices.
module link_rx
  import blm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        rx_valid,   // a decoded word is present
  input  logic        rx_sof,     // this word is word 0 of a packet
  input  logic [15:0] rx_data,
  output logic        pkt_done,   // one-cycle pulse: a whole packet was received
  output logic        crc_ok,     // its CRC matched
  output logic [31:0] crc_rx,     // CRC carried by the packet
  output packet_t     pkt         // decoded contents
);

  logic [4:0]         widx;       // index of the next expected word
  logic               busy;
  logic [18*16-1:0]   body;
  logic [31:0]        crc_calc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      widx     <= '0;
      busy     <= 1'b0;
      body     <= '0;
      crc_calc <= '1;
      pkt_done <= 1'b0;
      crc_ok   <= 1'b0;
      crc_rx   <= '0;
      pkt      <= '0;
    end else begin
      pkt_done <= 1'b0;
      if (rx_valid && rx_sof) begin
        body     <= {body[17*16-1:0], rx_data};
        crc_calc <= crc32_word(32'hFFFF_FFFF, rx_data);
        widx     <= 5'd1;
        busy     <= 1'b1;
      end else if (rx_valid && busy) begin
        if (widx < 5'd18) begin
          body     <= {body[17*16-1:0], rx_data};
          crc_calc <= crc32_word(crc_calc, rx_data);
          widx     <= widx + 5'd1;
        end else if (widx == 5'd18) begin
          crc_rx[31:16] <= rx_data;
          widx          <= widx + 5'd1;
        end else begin
          crc_rx[15:0] <= rx_data;
          crc_ok       <= (crc_calc == {crc_rx[31:16], rx_data});
          pkt          <= unpack_packet(body);
          pkt_done     <= 1'b1;
          busy         <= 1'b0;
          widx         <= '0;
        end
      end
    end
  end

endmodule
