// tb_vdbs_serializer: self-checking testbench for vdbs_serializer with
// 8-bit words.
//
// A source offers random words, sometimes back to back and sometimes with
// idle gaps; a sink collects the bits on sdo while sdo_valid is high and
// rebuilds each word MSB first. The test checks every rebuilt word against
// the queue of accepted words, that sdo_first marks exactly the first bit
// of each word, that each word takes exactly L cycles on the line, that a
// back-to-back stream reaches one word per L cycles, and that sdo does not
// toggle while the line is idle.
module tb_vdbs_serializer;

  localparam int unsigned L = 8;
  localparam int NWORDS = 400;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         ld_valid, ld_ready;
  logic [L-1:0] ld_word;
  logic         sdo, sdo_valid, sdo_first;

  always #5 clk = ~clk;

  vdbs_serializer dut (.clk, .rst_n, .ld_valid, .ld_ready, .ld_word,
                       .sdo, .sdo_valid, .sdo_first);

  int checks = 0, failures = 0;
  logic [L-1:0] sent [$];
  int cycle = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sink: rebuild words from the line.
  int nbits = 0, nwords_rx = 0, first_cycle = 0, burst_start = -1;
  logic [L-1:0] rx;
  logic prev_sdo;
  always @(posedge clk) if (rst_n) begin
    if (sdo_valid) begin
      check("sdo_first", int'(sdo_first), int'(nbits == 0));
      if (nbits == 0) first_cycle = cycle;
      rx = {rx[L-2:0], sdo};
      nbits++;
      if (nbits == L) begin
        nbits = 0;
        nwords_rx++;
        check("frame length", cycle - first_cycle + 1, L);
        if (sent.size() == 0) begin
          failures++; $display("FAIL word with nothing sent");
        end else check("word", int'(rx), int'(sent.pop_front()));
      end
    end else begin
      check("idle hold", int'(sdo), int'(prev_sdo));
      check("idle first", int'(sdo_first), 0);
    end
    prev_sdo = sdo;
  end

  initial begin
    int t0, t1;
    rst_n = 1'b0; ld_valid = 1'b0; ld_word = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("ready after reset", int'(ld_ready), 1);
    // Back-to-back burst: measure the rate.
    t0 = -1;
    for (int i = 0; i < 50; i++) begin
      ld_valid = 1'b1; ld_word = L'($urandom);
      @(negedge clk); while (!ld_ready) @(negedge clk);
      @(posedge clk);
      if (t0 < 0) t0 = cycle;
      t1 = cycle;
      sent.push_back(ld_word);
      #1;
    end
    ld_valid = 1'b0;
    check("burst rate (cycles for 49 more words)", t1 - t0, 49 * L);
    // Random gaps.
    for (int i = 0; i < NWORDS - 50; i++) begin
      repeat ($urandom_range(0, 12)) @(posedge clk);
      #1 ld_valid = 1'b1; ld_word = L'($urandom);
      @(negedge clk); while (!ld_ready) @(negedge clk);
      @(posedge clk);
      sent.push_back(ld_word);
      #1 ld_valid = 1'b0;
    end
    repeat (2 * L) @(posedge clk);
    check("words received", nwords_rx, NWORDS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
