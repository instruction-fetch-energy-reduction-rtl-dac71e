// tb_loop_buffer_controller: directed test of the IDLE/FILL/ACTIVE controller.
//
// The testbench plays the BTB and the core for an 8-entry loop buffer and a
// fetch-to-execute distance of 2. The loop is the textbook innermost loop
// with one forward branch: nine instructions at 0x100..0x120, a forward branch
// at 0x108 to 0x114 and the loop-end branch at 0x120 back to 0x100. Its taken
// trace (7 instructions) fits in the buffer, its not-taken trace (9) does not.
// A second loop at 0x200..0x220 with a forward branch at 0x204 to 0x210 is
// used for mispredictions during FILL. P-bits written by the controller are
// kept by the testbench's BTB stand-in.
// Each phase checks the action, the memory controls and the loop buffer
// address cycle by cycle: B and the fill of the taken trace with its P-bit,
// E, serving from the buffer (I), J, C with its one-cycle compare delay, M
// and the refill that overflows (F), L for the resulting BIG loop, K, H with
// its count-back and G. A second controller with FILL_STRATEGY = 2 sees the
// same stimulus and must wait for the second taken backward branch.
module tb_loop_buffer_controller;
  import hclb_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned AW = $clog2(N);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          if_valid;
  addr_t         if_pc;
  btb_lookup_t   lk;
  logic          ex_valid, ex_taken, ex_mispredict, up_hit, btb_evict;
  addr_t         ex_pc;
  ctr_t          up_old_ctr;
  logic          il1_en, lb_we, lb_re, sel_lb, pw_valid, pw_val;
  logic [AW-1:0] lb_addr;
  addr_t         pw_pc;
  lbc_state_t    state;
  lbc_action_t   action;
  // second controller, FILL_STRATEGY = 2
  logic          il1_en2, lb_we2, lb_re2, sel_lb2, pw_valid2, pw_val2;
  logic [AW-1:0] lb_addr2;
  addr_t         pw_pc2;
  lbc_state_t    state2;
  lbc_action_t   action2;

  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  loop_buffer_controller #(.LB_ENTRIES(N), .PIPE_P(2), .FILL_STRATEGY(1)) u_dut (
    .clk, .rst_n, .if_valid, .if_pc, .lk,
    .ex_valid, .ex_pc, .ex_taken, .ex_mispredict, .up_hit, .up_old_ctr, .btb_evict,
    .il1_en, .lb_we, .lb_re, .lb_addr, .sel_lb, .pw_valid, .pw_pc, .pw_val,
    .state, .action
  );

  loop_buffer_controller #(.LB_ENTRIES(N), .PIPE_P(2), .FILL_STRATEGY(2)) u_dut2 (
    .clk, .rst_n, .if_valid, .if_pc, .lk,
    .ex_valid, .ex_pc, .ex_taken, .ex_mispredict, .up_hit, .up_old_ctr, .btb_evict,
    .il1_en(il1_en2), .lb_we(lb_we2), .lb_re(lb_re2), .lb_addr(lb_addr2), .sel_lb(sel_lb2),
    .pw_valid(pw_valid2), .pw_pc(pw_pc2), .pw_val(pw_val2),
    .state(state2), .action(action2)
  );

  // BTB stand-in: direction/strength set by the test, P-bits from the controller
  logic fb_taken, fb_strong, fb_pbit;     // forward branch of the current loop
  logic fb2_pbit;
  logic end_taken;

  always_comb begin
    lk = '0;
    if (if_pc == 32'h108 || if_pc == 32'h204) begin
      lk.hit = 1'b1; lk.taken = fb_taken; lk.is_strong = fb_strong;
      lk.pbit = (if_pc == 32'h108) ? fb_pbit : fb2_pbit;
      lk.target = (if_pc == 32'h108) ? 32'h114 : 32'h210;
    end else if (if_pc == 32'h120 || if_pc == 32'h220) begin
      lk.hit = 1'b1; lk.taken = end_taken; lk.is_strong = 1'b1;
      lk.target = (if_pc == 32'h120) ? 32'h100 : 32'h200;
    end
  end

  always @(posedge clk) begin
    if (pw_valid && pw_pc == 32'h108) fb_pbit  <= pw_val;
    if (pw_valid && pw_pc == 32'h204) fb2_pbit <= pw_val;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t pc=%h action=%s lb_addr=%0d: %s", $time, if_pc, action, lb_addr, what);
    end
  endtask

  // one fetch cycle; expected action and, where >= 0, loop buffer address
  task automatic fetch(addr_t pc, lbc_action_t exp_act, int exp_addr = -1);
    if_valid = 1'b1; if_pc = pc;
    #1;
    check(action == exp_act, $sformatf("action, expected %s", exp_act));
    if (exp_addr >= 0) check(lb_addr == AW'(exp_addr), $sformatf("lb_addr, expected %0d", exp_addr));
    unique case (state)
      LBC_ACTIVE: if (!ex_mispredict)
                    check(sel_lb && lb_re && !il1_en && !lb_we, "ACTIVE: served by the loop buffer only");
      LBC_FILL:   if (!ex_mispredict)
                    check(il1_en && lb_we && !sel_lb, "FILL: IL1 read and buffer written");
      default:    if (action == ACT_B_NEW_LOOP) check(il1_en && lb_we, "B writes entry 0");
                  else check(il1_en == if_valid && !lb_we && !sel_lb, "IDLE: IL1 only");
    endcase
    @(posedge clk);
    @(negedge clk);
    ex_valid = 1'b0; ex_mispredict = 1'b0; up_hit = 1'b0; ex_taken = 1'b0;
  endtask

  // the resolution reported in the next fetch cycle
  task automatic resolve(addr_t pc, logic taken, logic mis, ctr_t old);
    ex_valid = 1'b1; ex_pc = pc; ex_taken = taken; ex_mispredict = mis;
    up_hit = 1'b1; up_old_ctr = old;
  endtask

  initial begin
    if_valid = 1'b0; if_pc = '0;
    ex_valid = 1'b0; ex_pc = '0; ex_taken = 1'b0; ex_mispredict = 1'b0;
    up_hit = 1'b0; up_old_ctr = CTR_SNT; btb_evict = 1'b0;
    fb_taken = 1'b1; fb_strong = 1'b1; fb_pbit = 1'b0; fb2_pbit = 1'b0; end_taken = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1st iteration from IL1; the taken loop-end branch is a loop candidate
    fetch(32'h100, ACT_A_DETECT); fetch(32'h104, ACT_A_DETECT); fetch(32'h108, ACT_A_DETECT);
    fetch(32'h114, ACT_A_DETECT); fetch(32'h118, ACT_A_DETECT); fetch(32'h11C, ACT_A_DETECT);
    fetch(32'h120, ACT_A_DETECT);
    // 2nd iteration: B, then the taken trace is written to entries 0..6 (D), E
    check(action2 == ACT_A_DETECT, "strategy 2 waits for the second taken branch");
    fetch(32'h100, ACT_B_NEW_LOOP, 0);
    check(action2 == ACT_A_DETECT, "strategy 2 does not fill after one taken branch");
    fetch(32'h104, ACT_D_FILL, 1);
    if_pc = 32'h108; #1 check(pw_valid && pw_pc == 32'h108 && pw_val, "P-bit of the forward branch recorded");
    fetch(32'h108, ACT_D_FILL, 2);
    fetch(32'h114, ACT_D_FILL, 3); fetch(32'h118, ACT_D_FILL, 4); fetch(32'h11C, ACT_D_FILL, 5);
    fetch(32'h120, ACT_E_FILL_DONE, 6);
    check(fb_pbit, "P-bit holds taken");
    // 3rd iteration from the loop buffer (I); strategy 2 fills now
    if_pc = 32'h100; #1 check(action2 == ACT_B_NEW_LOOP, "strategy 2 fills after the second taken branch");
    fetch(32'h100, ACT_I_FETCH, 0); fetch(32'h104, ACT_I_FETCH, 1); fetch(32'h108, ACT_I_FETCH, 2);
    fetch(32'h114, ACT_I_FETCH, 3); fetch(32'h118, ACT_I_FETCH, 4); fetch(32'h11C, ACT_I_FETCH, 5);
    fetch(32'h120, ACT_I_FETCH, 6);
    // 4th: the forward branch is now predicted not taken, weakly: J
    fb_taken = 1'b0; fb_strong = 1'b0;
    fetch(32'h100, ACT_I_FETCH, 0); fetch(32'h104, ACT_I_FETCH, 1);
    fetch(32'h108, ACT_J_LB_MISS, 2);
    fetch(32'h10C, ACT_A_DETECT); fetch(32'h110, ACT_A_DETECT); fetch(32'h114, ACT_A_DETECT);
    fetch(32'h118, ACT_A_DETECT); fetch(32'h11C, ACT_A_DETECT); fetch(32'h120, ACT_A_DETECT);
    // 5th: stored loop: C in the cycle after the branch (from IL1), buffer from entry 1
    fetch(32'h100, ACT_C_EXISTING_LOOP);
    fetch(32'h104, ACT_I_FETCH, 1);
    // the predictor is now strong not taken: M, P-bit flipped, refill from entry 3
    fb_strong = 1'b1;
    if_pc = 32'h108; #1 check(pw_valid && !pw_val, "M writes the new P-bit");
    fetch(32'h108, ACT_M_REFILL, 2);
    check(!fb_pbit, "P-bit holds not taken");
    fetch(32'h10C, ACT_D_FILL, 3); fetch(32'h110, ACT_D_FILL, 4); fetch(32'h114, ACT_D_FILL, 5);
    fetch(32'h118, ACT_D_FILL, 6);
    // the not-taken trace is 9 instructions: the buffer is full at 0x11C (F)
    fetch(32'h11C, ACT_F_LB_FULL, 7);
    fetch(32'h120, ACT_A_DETECT);
    // 6th: BIG loop: 8 entries served, then L hands over to IL1
    fetch(32'h100, ACT_C_EXISTING_LOOP);
    fetch(32'h104, ACT_I_FETCH, 1); fetch(32'h108, ACT_I_FETCH, 2); fetch(32'h10C, ACT_I_FETCH, 3);
    fetch(32'h110, ACT_I_FETCH, 4); fetch(32'h114, ACT_I_FETCH, 5); fetch(32'h118, ACT_I_FETCH, 6);
    fetch(32'h11C, ACT_L_BIG_LOOP, 7);
    fetch(32'h120, ACT_A_DETECT);
    // 7th: a misprediction while ACTIVE: K, the buffer keeps its loop
    fetch(32'h100, ACT_C_EXISTING_LOOP);
    fetch(32'h104, ACT_I_FETCH, 1);
    resolve(32'h0FC, 1'b1, 1'b1, CTR_WT);
    fetch(32'h108, ACT_K_MISPRED_ACT);
    fetch(32'h300, ACT_A_DETECT);

    // second loop 0x200..0x220, forward branch 0x204 -> 0x210 predicted taken
    fb_taken = 1'b1; fb_strong = 1'b0;
    fetch(32'h220, ACT_A_DETECT);
    fetch(32'h200, ACT_B_NEW_LOOP, 0);
    fetch(32'h204, ACT_D_FILL, 1);
    fetch(32'h210, ACT_D_FILL, 2);
    // 0x204 resolves not taken from a weak state (-> strong not taken): H,
    // this fetch is squashed and the fill restarts at entry 2 on the other path
    resolve(32'h204, 1'b0, 1'b1, CTR_WT);
    if_pc = 32'h214; #1 check(pw_valid && pw_pc == 32'h204 && !pw_val, "H rewrites the P-bit");
    fetch(32'h214, ACT_H_REFILL);
    check(!fb2_pbit, "P-bit after H holds not taken");
    fetch(32'h208, ACT_D_FILL, 2);
    fetch(32'h20C, ACT_D_FILL, 3);
    fetch(32'h210, ACT_D_FILL, 4);
    // a misprediction from a strong state: G abandons the fill
    resolve(32'h20C, 1'b1, 1'b1, CTR_ST);
    fetch(32'h214, ACT_G_MISPRED_FILL);
    fetch(32'h218, ACT_A_DETECT);
    // the abandoned loop is not stored: the next detection fills again (B)
    fb_taken = 1'b0;
    fetch(32'h220, ACT_A_DETECT);
    fetch(32'h200, ACT_B_NEW_LOOP, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
