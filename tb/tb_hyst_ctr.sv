// tb_hyst_ctr: checks the 2-bit counter's next-state logic against an
// independent table: every state with both outcomes, plus the two
// misprediction cases the loop buffer controller depends on (strong -> weak of
// the same direction, weak -> strong of the other direction).
module tb_hyst_ctr;
  import hclb_pkg::*;

  int unsigned checks = 0, failures = 0;

  // expected next state, index {state, taken}; 00 SNT, 01 WNT, 10 WT, 11 ST
  localparam logic [1:0] NEXT [8] = '{2'b00, 2'b01,
                                      2'b00, 2'b11,
                                      2'b00, 2'b11,
                                      2'b10, 2'b11};

  ctr_t cur, nxt;
  logic taken;

  hyst_ctr u_dut (.cur, .taken, .nxt);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int s = 0; s < 4; s++) begin
      for (int t = 0; t < 2; t++) begin
        cur = ctr_t'(s); taken = t[0];
        #1;
        check(nxt == ctr_t'(NEXT[2 * s + t]), $sformatf("next of state %0d, taken %0d", s, t));
        // a misprediction from strong keeps the direction, from weak flips it
        if (ctr_taken(cur) != taken)
          check(ctr_taken(nxt) == (ctr_strong(cur) ? ctr_taken(cur) : taken) &&
                ctr_strong(nxt) == !ctr_strong(cur),
                $sformatf("misprediction from state %0d", s));
        else
          check(ctr_strong(nxt) && ctr_taken(nxt) == taken,
                $sformatf("correct prediction from state %0d", s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
