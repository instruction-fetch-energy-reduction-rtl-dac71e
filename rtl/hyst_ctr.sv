// hyst_ctr: next-state logic of the 2-bit direction counter kept in every BTB
// entry.
//
// Purely combinational: cur is the entry's counter, taken the resolved
// direction of the branch, nxt the counter the entry holds after the update.
// The caller registers nxt (the BTB writes it at the clock edge of the
// update).
//
// The counter is bimodal, as the evaluated BTB's predictor is. The update rule
// is the "hysteresis" variant:
//   ST  taken -> ST,  not taken -> WT
//   WT  taken -> ST,  not taken -> SNT
//   WNT taken -> ST,  not taken -> SNT
//   SNT taken -> WNT, not taken -> SNT
// so a misprediction in a strong state moves to the weak state of the same
// direction, and a misprediction in a weak state jumps to the strong state of
// the other direction. The loop buffer controller tells these two cases apart
// (a strong-to-weak change keeps the stored trace, a weak-to-strong change
// refills it). The document names both changes but not the full rule; the
// table above is this design's reading of it.
module hyst_ctr
  import hclb_pkg::*;
(
  input  ctr_t cur,
  input  logic taken,
  output ctr_t nxt
);

  always_comb begin
    unique case (cur)
      CTR_ST:  nxt = taken ? CTR_ST  : CTR_WT;
      CTR_WT:  nxt = taken ? CTR_ST  : CTR_SNT;
      CTR_WNT: nxt = taken ? CTR_ST  : CTR_SNT;
      default: nxt = taken ? CTR_WNT : CTR_SNT;  // CTR_SNT
    endcase
  end

endmodule
