// tb_vdbs_top: end-to-end self-checking testbench for vdbs_top at its
// default parameters (8-bit samples, 11 deviation settings).
//
// Phase 1 selects each setting in turn and streams all 256 sample values
// back to back. A sink rebuilds every word from the serial line and
// compares it with a reference encoder written here independently (lowest
// word of minimum transition count within +-m, the sample itself when it is
// already minimal), using the m of the setting active when the sample was
// accepted. The parallel output encoderout, the reported setting and its m,
// and the rate of one word per L cycles are checked too, and the in-word
// line transitions are totalled per setting: setting 0 must leave them
// unchanged, every other setting must lower them.
// Phase 2 sends random samples with random idle gaps while the setting is
// rewritten at random, also to numbers that do not exist.
// The mechanisms of the design are counted and each must occur: setting
// switches, refused settings, back-pressure stalls, idle gaps, words passed
// unchanged and words changed by the encoder.
module tb_vdbs_top;

  localparam int unsigned L = 8, N = 11, SW = 4;
  // Deviation bound of each setting: floor(k * 0.5 % * 256).
  localparam int MTAB [N] = '{0, 1, 2, 3, 5, 6, 7, 8, 10, 11, 12};

  logic          clk = 1'b0;
  logic          rst_n;
  logic          cfg_we;
  logic [SW-1:0] cfg_sel;
  logic          cfg_err;
  logic [SW-1:0] active_sel;
  logic [31:0]   active_m;
  logic          in_valid, in_ready;
  logic [L-1:0]  datain, encoderout;
  logic          sdo, sdo_valid, sdo_first;

  always #5 clk = ~clk;

  vdbs_top dut (.dataclk(clk), .rst_n, .cfg_we, .cfg_sel, .cfg_err, .active_sel,
                .active_m, .in_valid, .in_ready, .datain, .encoderout,
                .sdo, .sdo_valid, .sdo_first);

  int checks = 0, failures = 0;
  int cycle = 0;
  int model_sel = 0;
  logic [L-1:0] exp_q [$];
  int n_switch = 0, n_reject = 0, n_stall = 0, n_idle = 0;
  int n_same = 0, n_changed = 0;
  int raw_tr = 0, line_tr = 0;
  int acc_first, acc_last;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cycle);
    end
  endtask

  function automatic int trans(int w);
    int n = 0;
    for (int i = 0; i < int'(L) - 1; i++) n += ((w >> i) & 1) != ((w >> (i + 1)) & 1);
    return n;
  endfunction

  function automatic int ref_enc(int s, int m);
    int lo, hi, best;
    lo = (s - m < 0) ? 0 : s - m;
    hi = (s + m > 255) ? 255 : s + m;
    best = 99;
    for (int v = lo; v <= hi; v++) if (trans(v) < best) best = trans(v);
    if (trans(s) == best) return s;
    for (int v = lo; v <= hi; v++) if (trans(v) == best) return v;
    return s;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  // One clock cycle of stimulus; returns whether the sample was accepted.
  task automatic drive(input bit v, input int d, input bit we, input int sel,
                       output bit acc);
    int e;
    @(negedge clk);
    in_valid = v; datain = L'(d); cfg_we = we; cfg_sel = SW'(sel);
    #1;
    acc = v && in_ready;
    if (v && !in_ready) n_stall++;
    if (!v) n_idle++;
    e = 0;
    if (acc) begin
      e = ref_enc(d, MTAB[model_sel]);
      exp_q.push_back(L'(e));
      raw_tr += trans(d);
      if (e == d) n_same++; else n_changed++;
      if (acc_first < 0) acc_first = cycle;
      acc_last = cycle;
    end
    @(posedge clk);
    if (we) begin
      if (sel < int'(N)) begin model_sel = sel; n_switch++; end
      else n_reject++;
    end
    #1;
    if (acc) check("encoderout", int'(encoderout), e);
    check("active_sel", int'(active_sel), model_sel);
    check("active_m", int'(active_m), MTAB[model_sel]);
    check("cfg_err", int'(cfg_err), int'(we && sel >= int'(N)));
  endtask

  task automatic send(input int d, input bit we, input int sel);
    bit acc;
    drive(1'b1, d, we, sel, acc);
    while (!acc) drive(1'b1, d, 1'b0, 0, acc);
  endtask

  task automatic idle(input int n);
    bit acc;
    repeat (n) drive(1'b0, 0, 1'b0, 0, acc);
  endtask

  // Sink: rebuild words from the serial line, mid-cycle.
  int nbits = 0, nrx = 0;
  logic [L-1:0] rx;
  logic prev_bit;
  always @(negedge clk) if (rst_n && sdo_valid) begin
    check("sdo_first", int'(sdo_first), int'(nbits == 0));
    if (nbits > 0 && sdo != prev_bit) line_tr++;
    prev_bit = sdo;
    rx = {rx[L-2:0], sdo};
    nbits++;
    if (nbits == int'(L)) begin
      nbits = 0;
      nrx++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL word on the line with none expected");
      end else check("serial word", int'(rx), int'(exp_q.pop_front()));
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit acc;
    int base_tr;
    rst_n = 1'b0; in_valid = 1'b0; datain = '0; cfg_we = 1'b0; cfg_sel = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Phase 1: every setting, every sample value, back to back.
    base_tr = -1;
    for (int k = 0; k < int'(N); k++) begin
      drive(1'b0, 0, 1'b1, k, acc);
      drive(1'b0, 0, 1'b1, 12 + k % 4, acc);   // refused, setting k stays
      idle(2 * L);
      raw_tr = 0; line_tr = 0; acc_first = -1;
      for (int s = 0; s < 256; s++) send(s, 1'b0, 0);
      idle(2 * L);
      check("words on the line", exp_q.size(), 0);
      check("rate: cycles for 255 more words", acc_last - acc_first, 255 * L);
      $display("setting %0d (m=%0d, %0d.%0d %% FSR): in-word line transitions %0d of %0d raw",
               k, MTAB[k], k / 2, 5 * (k % 2), line_tr, raw_tr);
      if (k == 0) check("setting 0 keeps transitions", line_tr, raw_tr);
      else check("setting lowers transitions", int'(line_tr < raw_tr), 1);
    end
    // Phase 2: random samples, gaps and setting writes.
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(0, 3) == 0) idle($urandom_range(1, 10));
      if ($urandom_range(0, 9) == 0) send($urandom_range(0, 255), 1'b1, $urandom_range(0, 15));
      else send($urandom_range(0, 255), 1'b0, 0);
    end
    idle(2 * L);
    check("all words received", exp_q.size(), 0);
    $display("mechanisms: switches=%0d refused=%0d stalls=%0d idle=%0d unchanged=%0d changed=%0d words=%0d",
             n_switch, n_reject, n_stall, n_idle, n_same, n_changed, nrx);
    check("setting switch seen", int'(n_switch > 0), 1);
    check("refused setting seen", int'(n_reject > 0), 1);
    check("stall seen", int'(n_stall > 0), 1);
    check("idle gap seen", int'(n_idle > 0), 1);
    check("unchanged word seen", int'(n_same > 0), 1);
    check("changed word seen", int'(n_changed > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
