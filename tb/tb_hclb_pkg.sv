// tb_hclb_pkg: checks the package's counter decode functions against an
// independent table (direction and strength read from each of the four
// states) and that the state and action codes are distinct.
module tb_hclb_pkg;
  import hclb_pkg::*;

  int unsigned checks = 0, failures = 0;

  localparam logic TAKEN  [4] = '{1'b0, 1'b0, 1'b1, 1'b1};
  localparam logic STRONG [4] = '{1'b1, 1'b0, 1'b0, 1'b1};

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int s = 0; s < 4; s++) begin
      check(ctr_taken(ctr_t'(s)) == TAKEN[s], $sformatf("direction of state %0d", s));
      check(ctr_strong(ctr_t'(s)) == STRONG[s], $sformatf("strength of state %0d", s));
    end
    check(LBC_IDLE != LBC_FILL && LBC_FILL != LBC_ACTIVE && LBC_IDLE != LBC_ACTIVE, "state codes distinct");
    check(int'(ACT_EXIT) == 13, "fourteen action codes");
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
