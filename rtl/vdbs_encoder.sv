// vdbs_encoder: optimal transition-reducing VDBS encoder for one setting of
// the maximum tolerable deviation M.
//
// For an L-bit input sample s (datain) it outputs the L-bit word t
// (encoderout) that, among all words with |s - t| <= M, has the fewest
// serial transitions (adjacent bit pairs that differ, i.e. line toggles
// when the word is shifted out bit by bit). Because s itself is in the
// window, t never has more transitions than s, and t never deviates from s
// by more than M, so the receiver can use t directly with no decoder.
//
// How it works: the window s-M .. s+M is scanned in ascending order; words
// outside 0 .. 2^L-1 are skipped. s is the starting candidate and a word
// replaces the current candidate only when it has strictly fewer
// transitions. So s is kept when nothing in the window beats it, and
// otherwise the smallest-valued word of minimum transition count is chosen.
// The optimality criterion follows the encoder's analytic definition; that
// tie-breaking rule is read from the published l = 8, m = 10 simulation
// trace (e.g. 0x0B -> 0x01, 0x0F -> 0x0F, 0x10 -> 0x07), which it
// reproduces exactly.
//
// Timing: purely combinational, one sample in and one word out with no
// latency, as in that trace where the output changes together with the
// input. The logic is 2M+1 copies of an adder, a transition counter and a
// comparator in a chain. Defaults L = 8, M = 10 are the 8-bit, 3.9 % FSR
// configuration (10 / 256 = 3.9 %).
module vdbs_encoder #(
  parameter int unsigned L = 8,   // encoder word size l
  parameter int unsigned M = 10   // maximum tolerable deviation m
) (
  input  logic [L-1:0] datain,     // sample s
  output logic [L-1:0] encoderout  // encoded word t
);
  import vdbs_pkg::*;

  localparam longint MAXV = (64'd1 << L) - 1;

  always_comb begin
    int unsigned best_n;
    int unsigned cand_n;
    longint      cand;
    cand       = 0;
    cand_n     = 0;
    best_n     = serial_transitions(MAX_L'(datain), L);
    encoderout = datain;
    for (int unsigned k = 0; k <= 2 * M; k++) begin
      cand = longint'(datain) - longint'(M) + longint'(k);
      if (cand >= 0 && cand <= MAXV) begin
        cand_n = serial_transitions(MAX_L'(cand), L);
        if (cand_n < best_n) begin
          best_n     = cand_n;
          encoderout = L'(cand);
        end
      end
    end
  end

endmodule
