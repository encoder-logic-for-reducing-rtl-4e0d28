// vdbs_serializer: shifts encoded words out on one serial data line, most
// significant bit first, one bit per clock.
//
// This is the serial link whose line toggles the encoding is meant to
// reduce: every pair of adjacent bits that differ costs one transition on
// sdo. A word is accepted with a valid/ready handshake (ld_valid and
// ld_ready both high at a clock edge). Its L bits then appear on sdo in the
// next L cycles, marked by sdo_valid, with sdo_first on the first bit as a
// frame marker. ld_ready is high when the shifter is idle or on the last
// bit of a word, so words can follow back to back at one word per L cycles.
// Between words sdo holds the last bit sent, so idle time adds no toggles.
//
// The bit order (MSB first, as words are drawn in the serial-word
// illustration) follows the source of the encoder; the handshake, frame
// marker and idle level are this design's own choices, standing in for the
// framing of whatever standard link (SPI, I2S) carries the words.
module vdbs_serializer #(
  parameter int unsigned L = 8,  // word size
  localparam int unsigned CW = $clog2(L + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld_valid,   // a word is offered
  output logic         ld_ready,   // the word can be taken this cycle
  input  logic [L-1:0] ld_word,    // word to send
  output logic         sdo,        // serial data out
  output logic         sdo_valid,  // sdo carries a bit of a word
  output logic         sdo_first   // sdo carries the MSB of a word
);

  logic [L-1:0]  shreg;
  logic [CW-1:0] left;   // bits still to send, including the one on sdo

  assign ld_ready  = (left <= 1);
  assign sdo_valid = (left != 0);
  assign sdo       = shreg[L-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      left      <= '0;
      sdo_first <= 1'b0;
    end else if (ld_valid && ld_ready) begin
      shreg     <= ld_word;
      left      <= CW'(L);
      sdo_first <= 1'b1;
    end else begin
      sdo_first <= 1'b0;
      if (left > 1) begin
        shreg <= {shreg[L-2:0], shreg[L-1]};
        left  <= left - 1'b1;
      end else begin
        left  <= '0;   // hold the last bit on sdo
      end
    end
  end

  a_count_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  left <= CW'(L));

endmodule
