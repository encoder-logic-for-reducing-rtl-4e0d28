// vdbs_encoder_interface: configuration selection between the encoders of
// the N_SET maximum-deviation settings.
//
// A bank of encoders, one per setting, all see the same sample; this block
// remembers which setting is active and passes that encoder's word on. The
// active setting is a register written through a one-cycle write strobe
// (cfg_we with cfg_sel); a write naming a setting that does not exist is
// ignored and answered by cfg_err for one cycle. After reset setting 0 is
// active, which in the default bank is m = 0, i.e. encoding off.
//
// Timing: a write takes effect from the clock edge that accepts it; the word
// mux itself is combinational. That a settings list comes with a selection
// interface follows the encoder generator's description; the register,
// strobe, error flag and reset value are this design's own choices.
module vdbs_encoder_interface #(
  parameter int unsigned L     = 8,   // encoder word size l
  parameter int unsigned N_SET = 11,  // number of deviation settings
  localparam int unsigned SW   = (N_SET > 1) ? $clog2(N_SET) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,               // write strobe for cfg_sel
  input  logic [SW-1:0] cfg_sel,              // setting to activate
  output logic          cfg_err,              // last write named no setting
  output logic [SW-1:0] active_sel,           // setting now in use
  input  logic [L-1:0]  enc_words [N_SET],    // one word per encoder
  output logic [L-1:0]  enc_out               // word of the active setting
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active_sel <= '0;
      cfg_err    <= 1'b0;
    end else begin
      cfg_err <= 1'b0;
      if (cfg_we) begin
        if (32'(cfg_sel) < N_SET) active_sel <= cfg_sel;
        else                      cfg_err    <= 1'b1;
      end
    end
  end

  always_comb begin
    enc_out = enc_words[0];
    for (int unsigned k = 1; k < N_SET; k++) begin
      if (32'(active_sel) == k) enc_out = enc_words[k];
    end
  end

  // The selection register never holds a setting that does not exist.
  a_sel_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                   32'(active_sel) < N_SET);

endmodule
