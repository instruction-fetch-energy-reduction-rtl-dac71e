// fetch_mux: chooses where the fetched instruction comes from.
//
// When the loop buffer controller raises sel_lb (ACTIVE state) the core gets
// the loop buffer's output; otherwise it gets the instruction IL1 returns.
// Purely combinational, no timing of its own.
module fetch_mux
  import hclb_pkg::*;
(
  input  logic   sel_lb,
  input  instr_t lb_instr,
  input  instr_t il1_instr,
  output instr_t instr
);

  always_comb begin
    if (sel_lb) instr = lb_instr;
    else        instr = il1_instr;
  end

endmodule
