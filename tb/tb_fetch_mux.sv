// tb_fetch_mux: checks that the core receives the loop buffer's word when
// sel_lb is high and IL1's word otherwise, for random words.
module tb_fetch_mux;
  import hclb_pkg::*;

  logic        sel_lb;
  instr_t      lb_instr, il1_instr, instr;
  int unsigned checks = 0, failures = 0;

  fetch_mux u_dut (.sel_lb, .lb_instr, .il1_instr, .instr);

  initial begin
    for (int n = 0; n < 1000; n++) begin
      sel_lb = $urandom_range(0, 1) != 0;
      lb_instr = $urandom; il1_instr = $urandom;
      #1;
      checks++;
      if (instr != (sel_lb ? lb_instr : il1_instr)) begin
        failures++;
        if (failures < 10) $display("FAIL: sel_lb=%0b instr=%h", sel_lb, instr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
