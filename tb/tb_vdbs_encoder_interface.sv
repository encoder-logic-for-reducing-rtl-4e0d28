// tb_vdbs_encoder_interface: self-checking testbench for
// vdbs_encoder_interface with its default 11 settings of 8-bit words.
//
// Each encoder word input gets its own random value every cycle. The test
// checks that setting 0 is active after reset, that every legal write
// selects the matching word from the next cycle on, that writes naming
// settings 11 .. 15 are refused with cfg_err for one cycle while the old
// setting stays, and that nothing changes without a write strobe.
module tb_vdbs_encoder_interface;

  localparam int unsigned L = 8, N = 11, SW = 4;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          cfg_we;
  logic [SW-1:0] cfg_sel;
  logic          cfg_err;
  logic [SW-1:0] active_sel;
  logic [L-1:0]  words [N];
  logic [L-1:0]  enc_out;

  always #5 clk = ~clk;

  vdbs_encoder_interface dut (
    .clk, .rst_n, .cfg_we, .cfg_sel, .cfg_err, .active_sel,
    .enc_words (words), .enc_out
  );

  int checks = 0, failures = 0;
  int exp_sel;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic new_words();
    for (int k = 0; k < N; k++) words[k] = 8'($urandom);
  endtask

  // Apply one cycle of stimulus, then check the outputs after the edge.
  task automatic step(bit we, int sel);
    bit bad;
    cfg_we  = we;
    cfg_sel = SW'(sel);
    bad = we && sel >= N;
    @(posedge clk); #1;
    if (we && !bad) exp_sel = sel;
    cfg_we = 1'b0;
    new_words();
    #1;
    check("active_sel", int'(active_sel), exp_sel);
    check("enc_out", int'(enc_out), int'(words[exp_sel]));
    check("cfg_err", int'(cfg_err), int'(bad));
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; cfg_we = 1'b0; cfg_sel = '0; exp_sel = 0;
    new_words();
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    #1 check("reset sel", int'(active_sel), 0);
    check("reset word", int'(enc_out), int'(words[0]));
    for (int k = N - 1; k >= 0; k--) begin
      step(1'b1, k);
      step(1'b0, 0);
    end
    for (int k = N; k < 16; k++) begin
      step(1'b1, 3);
      step(1'b1, k);
      step(1'b0, 0);
    end
    for (int i = 0; i < 500; i++) step(1'($urandom), int'($urandom_range(0, 15)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
