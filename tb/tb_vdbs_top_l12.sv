// tb_vdbs_top_l12: 12-bit workload for vdbs_top.
//
// The same transmit path built for 12-bit samples (L = 12), whose settings
// give m = 0, 20, 40, 61, 81, 102, 122, 143, 163, 184, 204; setting 10
// (m = 204) is the one nearest the 12-bit, 4.9 % FSR (m = 200) encoder.
// Under every setting the test streams the edge values 0, 1, 4094, 4095,
// the values next to every power of two and 200 random samples back to
// back, rebuilds each word from the serial line and compares it with an
// independent reference encoder (lowest word of minimum transition count
// within +-m, the sample itself when already minimal). It also checks
// active_m, the one-word-per-12-cycles rate, that setting 0 leaves the line
// toggles unchanged and that every other setting lowers them.
module tb_vdbs_top_l12;

  localparam int unsigned L = 12, N = 11, SW = 4;
  // floor(k * 0.5 % * 4096)
  localparam int MTAB [N] = '{0, 20, 40, 61, 81, 102, 122, 143, 163, 184, 204};

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

  vdbs_top #(.L(L)) dut (.dataclk(clk), .rst_n, .cfg_we, .cfg_sel, .cfg_err,
                         .active_sel, .active_m, .in_valid, .in_ready, .datain,
                         .encoderout, .sdo, .sdo_valid, .sdo_first);

  int checks = 0, failures = 0;
  int cycle = 0;
  logic [L-1:0] exp_q [$];
  int raw_tr, line_tr, acc_first, acc_last, n_acc;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    hi = (s + m > 4095) ? 4095 : s + m;
    best = 99;
    for (int v = lo; v <= hi; v++) if (trans(v) < best) best = trans(v);
    if (trans(s) == best) return s;
    for (int v = lo; v <= hi; v++) if (trans(v) == best) return v;
    return s;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  // Offer one sample until it is taken; the setting is k.
  task automatic send(input int d, input int k);
    @(negedge clk);
    in_valid = 1'b1; datain = L'(d);
    #1;
    while (!in_ready) begin
      @(negedge clk); #1;
    end
    exp_q.push_back(L'(ref_enc(d, MTAB[k])));
    raw_tr += trans(d);
    if (n_acc == 0) acc_first = cycle;
    acc_last = cycle;
    n_acc++;
    @(posedge clk); #1;
    check("encoderout", int'(encoderout), int'(exp_q[$]));
    in_valid = 1'b0;
  endtask

  int nbits = 0;
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
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL word on the line with none expected");
      end else check("serial word", int'(rx), int'(exp_q.pop_front()));
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; datain = '0; cfg_we = 1'b0; cfg_sel = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < int'(N); k++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_sel = SW'(k);
      @(negedge clk);
      cfg_we = 1'b0;
      check("active_m", int'(active_m), MTAB[k]);
      raw_tr = 0; line_tr = 0; n_acc = 0;
      send(0, k); send(1, k); send(4094, k); send(4095, k);
      for (int b = 1; b < int'(L); b++) begin
        send((1 << b) - 1, k); send(1 << b, k); send((1 << b) + 1, k);
      end
      for (int i = 0; i < 200; i++) send(int'($urandom_range(0, 4095)), k);
      repeat (2 * L) @(negedge clk);
      check("words on the line", exp_q.size(), 0);
      check("rate", acc_last - acc_first, (n_acc - 1) * int'(L));
      $display("setting %0d (m=%0d): in-word line transitions %0d of %0d raw",
               k, MTAB[k], line_tr, raw_tr);
      if (k == 0) check("setting 0 keeps transitions", line_tr, raw_tr);
      else check("setting lowers transitions", int'(line_tr < raw_tr), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
