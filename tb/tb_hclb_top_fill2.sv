// tb_hclb_top_fill2: the end-to-end test of tb_hclb_top with the less
// aggressive fill strategy (FILL_STRATEGY = 2: a loop is filled only after its
// backward branch has been seen taken twice in succession); all other sizes
// at their defaults. The stimulus and checks are the same as in tb_hclb_top.
//
// The testbench plays the processor core and IL1:
//  * IL1 returns, for every address, an instruction word computed from the
//    address (instr_of), so any instruction delivered from the wrong entry
//    of the loop buffer is detected.
//  * The core fetches one instruction per cycle and follows the BTB's
//    prediction. A branch resolves PIPE_P = 2 cycles after its fetch; on a
//    misprediction the core squashes the younger fetches and redirects.
//  * The program is a chain of innermost loops laid out one after another,
//    each ending in a backward branch, with 0..3 forward branches inside
//    (targets inside the loop), followed by a jump back to the first loop.
//    One loop is longer than the loop buffer (a BIG loop). On every visit a
//    loop gets a new iteration count and every forward branch a new
//    behaviour: always taken, never taken, taken for the first k iterations
//    and then not (like the example loop with one forward branch), or random
//    with a bias.
// Checks every cycle: the instruction the core receives equals IL1's word for
// the fetch address; IL1 is idle exactly when the loop buffer serves. At each
// action C the loop start is fetched in the cycle after the backward branch
// and the loop buffer serves from the cycle after that (the one-cycle compare
// delay). At the end every controller action A..M must have occurred.
module tb_hclb_top_fill2;
  import hclb_pkg::*;

  localparam int unsigned P       = 2;       // the top's default PIPE_P
  localparam int unsigned NCYCLES = 400000;
  localparam int unsigned MAXCYCLES = 10 * NCYCLES;
  localparam int unsigned NLOOPS  = 8;
  localparam addr_t       BASE    = 32'h0000_1000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        if_valid;
  addr_t       if_pc;
  instr_t      if_instr;
  logic        if_pred_taken;
  addr_t       if_pred_target;
  logic        ex_valid, ex_taken, ex_mispredict;
  addr_t       ex_pc, ex_target;
  logic        il1_en;
  addr_t       il1_addr;
  instr_t      il1_instr;
  lbc_state_t  lbc_state;
  lbc_action_t lbc_action;

  hclb_top #(.FILL_STRATEGY(2)) u_dut (
    .clk, .rst_n,
    .if_valid, .if_pc, .if_instr, .if_pred_taken, .if_pred_target,
    .ex_valid, .ex_pc, .ex_taken, .ex_target, .ex_mispredict,
    .il1_en, .il1_addr, .il1_instr,
    .lbc_state, .lbc_action
  );

  function automatic instr_t instr_of(addr_t a);
    return {a[17:2] ^ 16'hC3A5, ~a[17:2]};
  endfunction

  assign il1_instr = instr_of(il1_addr);

  // ---------------- program description ----------------
  // branch kinds: 0 forward, 1 loop end (backward), 2 jump back to BASE
  int unsigned loop_size  [NLOOPS];
  addr_t       loop_base  [NLOOPS];
  int          br_kind    [addr_t];
  addr_t       br_target  [addr_t];
  int unsigned br_loop    [addr_t];
  int unsigned br_mode    [addr_t];   // 0 taken, 1 not taken, 2 switch, 3 biased, 4 random
  int unsigned br_k       [addr_t];   // switch iteration / bias direction
  int unsigned iter       [NLOOPS];
  int unsigned n_iter     [NLOOPS];
  addr_t       jump_pc;

  function automatic void new_visit(int unsigned l);
    iter[l]   = 0;
    // short visits let branch counters move while the loop is not being served
    n_iter[l] = ($urandom_range(0, 9) < 3) ? 1 + $urandom_range(0, 1) : 3 + $urandom_range(0, 40);
    foreach (br_kind[a]) begin
      if (br_kind[a] == 0 && br_loop[a] == l) begin
        br_mode[a] = $urandom_range(0, 4);
        br_k[a]    = $urandom_range(0, n_iter[l]);
      end
    end
  endfunction

  task automatic build_program();
    addr_t a = BASE;
    for (int unsigned l = 0; l < NLOOPS; l++) begin
      int unsigned nf;
      loop_size[l] = (l == 5) ? 300 : 3 + $urandom_range(0, 37);
      loop_base[l] = a;
      nf = (loop_size[l] < 6) ? 0 : $urandom_range(0, 3);
      for (int unsigned f = 0; f < nf; f++) begin
        int unsigned p, t;
        p = $urandom_range(0, loop_size[l] - 4);
        t = $urandom_range(p + 2, loop_size[l] - 1);
        if (!br_kind.exists(a + 4 * p)) begin
          br_kind  [a + 4 * p] = 0;
          br_target[a + 4 * p] = a + 4 * t;
          br_loop  [a + 4 * p] = l;
        end
      end
      br_kind  [a + 4 * (loop_size[l] - 1)] = 1;
      br_target[a + 4 * (loop_size[l] - 1)] = a;
      br_loop  [a + 4 * (loop_size[l] - 1)] = l;
      a = a + 4 * loop_size[l];
    end
    jump_pc            = a;
    br_kind  [jump_pc] = 2;
    br_target[jump_pc] = BASE;
    br_loop  [jump_pc] = 0;
    for (int unsigned l = 0; l < NLOOPS; l++) new_visit(l);
  endtask

  // actual outcome of a correct-path branch; advances the program state
  function automatic logic resolve_outcome(addr_t a);
    logic t;
    int unsigned l = br_loop[a];
    int kind = br_kind[a];
    int unsigned mode = br_mode.exists(a) ? br_mode[a] : 0;
    int unsigned k = br_k.exists(a) ? br_k[a] : 0;
    case (kind)
      0: begin
        case (mode)
          0: t = 1'b1;
          1: t = 1'b0;
          2: t = (iter[l] < k);
          3: t = ($urandom_range(0, 99) < 90) ? k[0] : !k[0];
          default: t = $urandom_range(0, 1) != 0;
        endcase
      end
      1: begin
        t = (iter[l] + 1 < n_iter[l]);
        if (t) iter[l]++;
        else   new_visit(l);
      end
      default: t = 1'b1;
    endcase
    return t;
  endfunction

  // ---------------- core pipeline model ----------------
  logic  st_v      [P];
  addr_t st_pc     [P];
  addr_t st_pred   [P];   // next address the core fetched after this one
  logic  st_taken  [P];   // actual outcome (valid in the resolving stage)
  addr_t pc;

  int unsigned checks = 0, failures = 0;
  int unsigned act_cnt [16];
  int unsigned il1_reads = 0, lb_reads = 0, fetches = 0;
  logic  prev_pred_taken;
  addr_t prev_pc, prev_target;
  logic  expect_lb;
  logic  served_lb;

  function automatic logic all_seen();
    for (int a = 0; a <= int'(ACT_M_REFILL); a++) if (act_cnt[a] == 0) return 1'b0;
    return 1'b1;
  endfunction

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s (pc=%h)", $time, what, if_pc);
    end
  endtask

  initial begin
    if_valid = 1'b0; if_pc = BASE;
    ex_valid = 1'b0; ex_pc = '0; ex_taken = 1'b0; ex_target = '0; ex_mispredict = 1'b0;
    foreach (act_cnt[i]) act_cnt[i] = 0;
    foreach (st_v[i]) begin st_v[i] = 1'b0; st_pc[i] = '0; st_pred[i] = '0; st_taken[i] = 1'b0; end
    build_program();
    pc = BASE;
    prev_pred_taken = 1'b0; prev_pc = '0; prev_target = '0; expect_lb = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // run NCYCLES, then on until every action has been seen (at most MAXCYCLES)
    for (int unsigned cyc = 0; cyc < MAXCYCLES && !(cyc >= NCYCLES && all_seen()); cyc++) begin
      addr_t pred_next, actual_next;
      logic  mis;
      @(negedge clk);
      // drive this cycle's fetch and the resolving branch
      if_valid  = 1'b1;
      if_pc     = pc;
      ex_valid  = st_v[P-1] && br_kind.exists(st_pc[P-1]);
      ex_pc     = st_pc[P-1];
      ex_taken  = st_taken[P-1];
      ex_target = ex_valid ? br_target[st_pc[P-1]] : '0;
      actual_next = (ex_valid && ex_taken) ? ex_target : st_pc[P-1] + 4;
      mis = st_v[P-1] && (actual_next != st_pred[P-1]);
      ex_mispredict = ex_valid && mis;
      #1;
      // ----- checks on this cycle's fetch -----
      fetches++;
      act_cnt[lbc_action]++;
      check(!mis || ex_valid, "non-branch resolved with a wrong next address");
      if (!ex_mispredict) check(if_instr == instr_of(if_pc), "wrong instruction delivered");
      // a fetch squashed by a misprediction needs no source; otherwise exactly
      // one of IL1 and the loop buffer (state ACTIVE) serves it
      served_lb = (lbc_state == LBC_ACTIVE) && !ex_mispredict;
      if (served_lb) lb_reads++;
      if (!ex_mispredict) check(served_lb == !il1_en, "IL1 and loop buffer use disagree");
      if (lbc_action inside {ACT_I_FETCH, ACT_J_LB_MISS, ACT_M_REFILL})
        check(served_lb, "loop buffer action without a loop buffer read");
      if (il1_en) il1_reads++;
      if (expect_lb && !ex_mispredict)
        check(served_lb, "loop buffer not serving two cycles after the backward branch");
      expect_lb = 1'b0;
      if (lbc_action == ACT_C_EXISTING_LOOP) begin
        check(prev_pred_taken && prev_target == if_pc && prev_pc >= if_pc,
              "action C not in the cycle after a taken backward branch");
        expect_lb = 1'b1;
      end
      prev_pred_taken = if_pred_taken;
      prev_pc         = if_pc;
      prev_target     = if_pred_target;
      // ----- core model update -----
      pred_next = if_pred_taken ? if_pred_target : if_pc + 4;
      if (ex_mispredict || mis) begin
        foreach (st_v[i]) st_v[i] = 1'b0;
        pc = actual_next;
      end else begin
        for (int i = P - 1; i > 0; i--) begin
          st_v[i] = st_v[i-1]; st_pc[i] = st_pc[i-1]; st_pred[i] = st_pred[i-1];
        end
        st_v[0] = 1'b1; st_pc[0] = if_pc; st_pred[0] = pred_next;
        if (P == 1) st_taken[0] = br_kind.exists(if_pc) ? resolve_outcome(if_pc) : 1'b0;
        else if (st_v[P-1]) st_taken[P-1] = br_kind.exists(st_pc[P-1]) ? resolve_outcome(st_pc[P-1]) : 1'b0;
        pc = pred_next;
      end
    end

    // every mechanism of the state diagram must have happened
    for (int a = 0; a <= int'(ACT_M_REFILL); a++) begin
      checks++;
      if (act_cnt[a] == 0) begin
        failures++;
        $display("FAIL: action %s never happened", lbc_action_t'(a));
      end
    end
    for (int a = 0; a <= int'(ACT_EXIT); a++)
      $display("action %-22s %0d", lbc_action_t'(a), act_cnt[a]);
    $display("fetches %0d  from loop buffer %0d (%0d%%)  IL1 reads %0d (%0d%%)",
             fetches, lb_reads, 100 * lb_reads / fetches, il1_reads, 100 * il1_reads / fetches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (MAXCYCLES + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
