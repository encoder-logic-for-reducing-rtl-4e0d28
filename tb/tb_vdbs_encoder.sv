// tb_vdbs_encoder: self-checking testbench for vdbs_encoder.
//
// Three instances are checked: the default 8-bit encoder with m = 10, a
// 12-bit encoder with m = 200 (the 12-bit, 4.9 % FSR configuration) and an
// 8-bit encoder with m = 0, which must pass every sample through unchanged.
// First the 21 samples 0x00 .. 0x14 of the published 8-bit, m = 10 trace are
// compared with the outputs printed in that trace. Then every possible input
// of each instance, and of an 8-bit m = 15 instance that must also map the
// illustrated sample 64 to 63, is compared with a reference written independently here:
// it first finds the minimum transition count over the whole window, then
// keeps the sample if it already reaches that minimum and otherwise takes
// the lowest word that does. Each result is also checked for the two rules
// of the code: deviation at most m, and no more transitions than the sample.
module tb_vdbs_encoder;

  localparam int unsigned L8 = 8, M8 = 10;
  localparam int unsigned L12 = 12, M12 = 200;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [L8-1:0]  s8, t8, t8_id;
  logic [L12-1:0] s12, t12;

  vdbs_encoder                       dut8   (.datain(s8),  .encoderout(t8));
  vdbs_encoder #(.L(L8),  .M(0))     dut8id (.datain(s8),  .encoderout(t8_id));
  vdbs_encoder #(.L(L12), .M(M12))   dut12  (.datain(s12), .encoderout(t12));

  // l = 8, m = 15 example of the serial-word illustration: 64 -> 63.
  logic [L8-1:0] t8m15;
  vdbs_encoder #(.L(L8), .M(15))     dut8m15 (.datain(s8), .encoderout(t8m15));

  int checks = 0, failures = 0;

  function automatic int trans(int unsigned w, int unsigned l);
    int n = 0;
    for (int i = 0; i < int'(l) - 1; i++) n += ((w >> i) & 1) != ((w >> (i + 1)) & 1);
    return n;
  endfunction

  function automatic int unsigned ref_enc(int unsigned s, int unsigned l, int unsigned m);
    int lo, hi, best;
    lo = int'(s) - int'(m); if (lo < 0) lo = 0;
    hi = int'(s) + int'(m); if (hi > (1 << l) - 1) hi = (1 << l) - 1;
    best = l;
    for (int v = lo; v <= hi; v++) if (trans(v, l) < best) best = trans(v, l);
    if (trans(s, l) == best) return s;
    for (int v = lo; v <= hi; v++) if (trans(v, l) == best) return v;
    return s;
  endfunction

  task automatic check(string what, int unsigned got, int unsigned exp, int unsigned s);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: s=0x%0h got 0x%0h expected 0x%0h", what, s, got, exp);
    end
  endtask

  task automatic check_rules(string what, int unsigned s, int unsigned t, int unsigned l, int unsigned m);
    int d;
    d = int'(s) - int'(t); if (d < 0) d = -d;
    checks++;
    if (d > int'(m) || trans(t, l) > trans(s, l)) begin
      failures++;
      if (failures < 20) $display("FAIL %s rules: s=0x%0h t=0x%0h", what, s, t);
    end
  endtask

  // Outputs printed in the l = 8, m = 10 simulation trace for 0x00 .. 0x14.
  localparam logic [7:0] TRACE [21] = '{
    8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
    8'h01, 8'h03, 8'h03, 8'h07, 8'h0F, 8'h07, 8'h07, 8'h0F, 8'h0F, 8'h0F};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s8 = '0; s12 = '0;
    for (int i = 0; i < 21; i++) begin
      s8 = 8'(i);
      @(posedge clk);
      check("trace", t8, TRACE[i], s8);
    end
    s8 = 8'd64;
    @(posedge clk);
    check("l8m15 example", t8m15, 8'd63, s8);
    for (int i = 0; i < (1 << L8); i++) begin
      s8 = 8'(i);
      @(posedge clk);
      check("l8m10", t8, ref_enc(i, L8, M8), s8);
      check_rules("l8m10", s8, t8, L8, M8);
      check("l8m0", t8_id, s8, s8);
      check("l8m15", t8m15, ref_enc(i, L8, 15), s8);
    end
    for (int i = 0; i < (1 << L12); i++) begin
      s12 = 12'(i);
      @(posedge clk);
      check("l12m200", t12, ref_enc(i, L12, M12), s12);
      check_rules("l12m200", s12, t12, L12, M12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
