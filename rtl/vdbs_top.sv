// vdbs_top: sensor-side transmit path with value-deviation-bounded serial
// (VDBS) encoding.
//
// Each sample from the sensor (datain, L bits) is encoded before it is sent
// over a serial line, so that the word on the wire toggles the line less
// often while staying within m of the true value. The receiver needs no
// decoder: it reads the word as an ordinary sample with bounded error.
//
// How it works: N_SET encoders (vdbs_encoder), one per maximum-deviation
// setting, see the same sample in parallel. Setting k allows
// m_k = floor(k * 0.5 % * 2^L), so the default bank covers 0 % to 5 % of
// full-scale range in 0.5 % steps; for L = 8 that is
// m = 0, 1, 2, 3, 5, 6, 7, 8, 10, 11, 12, setting 0 meaning "encoding off"
// and setting 8 (m = 10, 3.9 % FSR) being the main 8-bit configuration.
// vdbs_encoder_interface selects which encoder's word is used; it is
// written through cfg_we / cfg_sel and starts at setting 0 after reset.
// The chosen word goes to vdbs_serializer, which sends it MSB first on sdo.
//
// Interface and timing: a sample is taken when in_valid and in_ready are
// both high at a rising dataclk edge, and is encoded with the setting active in
// that cycle. encoderout shows the encoded word from the next cycle on,
// together with its bits starting on sdo (sdo_first marks the MSB). One word
// is sent every L cycles; in_ready is low while a word is being shifted out
// except on its last bit. active_m reports the deviation bound in use.
// The per-setting encoder bank with a selection interface follows the
// encoder generator's organisation; the 0.5 % setting grid follows the
// evaluated deviation sweep; the handshakes and serial framing are this
// design's own.
module vdbs_top #(
  parameter int unsigned L     = 8,                     // sample word size l
  parameter int unsigned N_SET = vdbs_pkg::N_SETTINGS,  // deviation settings
  localparam int unsigned SW   = (N_SET > 1) ? $clog2(N_SET) : 1
) (
  input  logic          dataclk,      // data clock
  input  logic          rst_n,        // asynchronous reset, active low
  // configuration selection
  input  logic          cfg_we,
  input  logic [SW-1:0] cfg_sel,
  output logic          cfg_err,
  output logic [SW-1:0] active_sel,
  output logic [31:0]   active_m,     // deviation bound m of active_sel
  // samples in
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [L-1:0]  datain,
  // encoded words out
  output logic [L-1:0]  encoderout,   // last word sent, parallel view
  output logic          sdo,
  output logic          sdo_valid,
  output logic          sdo_first
);
  import vdbs_pkg::*;

  logic [L-1:0] enc_words [N_SET];
  logic [L-1:0] enc_sel;

  for (genvar k = 0; k < N_SET; k++) begin : g_enc
    vdbs_encoder #(.L(L), .M(setting_m(k, L))) u_enc (
      .datain     (datain),
      .encoderout (enc_words[k])
    );
  end

  vdbs_encoder_interface #(.L(L), .N_SET(N_SET)) u_if (
    .clk        (dataclk),
    .rst_n      (rst_n),
    .cfg_we     (cfg_we),
    .cfg_sel    (cfg_sel),
    .cfg_err    (cfg_err),
    .active_sel (active_sel),
    .enc_words  (enc_words),
    .enc_out    (enc_sel)
  );

  always_comb begin
    active_m = 0;
    for (int unsigned k = 0; k < N_SET; k++) begin
      if (32'(active_sel) == k) active_m = setting_m(k, L);
    end
  end

  vdbs_serializer #(.L(L)) u_ser (
    .clk       (dataclk),
    .rst_n     (rst_n),
    .ld_valid  (in_valid),
    .ld_ready  (in_ready),
    .ld_word   (enc_sel),
    .sdo       (sdo),
    .sdo_valid (sdo_valid),
    .sdo_first (sdo_first)
  );

  always_ff @(posedge dataclk or negedge rst_n) begin
    if (!rst_n)                     encoderout <= '0;
    else if (in_valid && in_ready)  encoderout <= enc_sel;
  end

endmodule
