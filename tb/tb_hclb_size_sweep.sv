// tb_hclb_size_sweep: the loop-buffer sizes and fill strategies of the
// evaluation, run side by side on one synthetic program.
//
// Twelve copies of hclb_top are instantiated: loop buffers of 16, 32, 64, 128,
// 256 and 512 instructions (64 B .. 2 KB), each with FILL_STRATEGY 1 (HCLB-1)
// and 2 (HCLB-2). The BTB's predictions do not depend on the loop buffer (the
// P-bit is not part of a prediction), so all copies see the same fetch
// stream and one model core, the same as in tb_hclb_top, drives them all.
// Checks: every copy predicts the same next address, delivers the correct
// instruction on every unsquashed fetch and reads exactly one of IL1 and its
// loop buffer; the largest buffer serves more fetches than the smallest.
// Reported per copy: the share of fetches served by the loop buffer (R_LB),
// the share that read IL1 (R_IC; fills read both), and the fetch energy
// relative to a front end without loop buffer, from
//   E_IF / E_IC = R_IC + (E_LB / E_IC) * R_LB
// with E_LB / E_IC = 6.91 %, 7.44 %, 8.65 %, 11.53 %, 18.8 % and 34.23 % for
// the six sizes (energy ratios of the evaluated loop buffers, controller
// included).
module tb_hclb_size_sweep;
  import hclb_pkg::*;

  localparam int unsigned P       = 2;
  localparam int unsigned NCYCLES = 300000;
  localparam int unsigned NLOOPS  = 8;
  localparam int unsigned NCFG    = 12;
  localparam addr_t       BASE    = 32'h0000_1000;
  localparam int unsigned SIZES [6] = '{16, 32, 64, 128, 256, 512};
  localparam real         ELB   [6] = '{0.0691, 0.0744, 0.0865, 0.1153, 0.188, 0.3423};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        if_valid;
  addr_t       if_pc;
  logic        ex_valid, ex_taken, ex_mispredict;
  addr_t       ex_pc, ex_target;
  instr_t      if_instr       [NCFG];
  logic        if_pred_taken  [NCFG];
  addr_t       if_pred_target [NCFG];
  logic        il1_en         [NCFG];
  addr_t       il1_addr       [NCFG];
  lbc_state_t  lbc_state      [NCFG];
  lbc_action_t lbc_action     [NCFG];

  function automatic instr_t instr_of(addr_t a);
    return {a[17:2] ^ 16'hC3A5, ~a[17:2]};
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    hclb_top #(
      .LB_ENTRIES    (SIZES[g % 6]),
      .FILL_STRATEGY (1 + g / 6)
    ) u_dut (
      .clk, .rst_n,
      .if_valid, .if_pc,
      .if_instr       (if_instr[g]),
      .if_pred_taken  (if_pred_taken[g]),
      .if_pred_target (if_pred_target[g]),
      .ex_valid, .ex_pc, .ex_taken, .ex_target, .ex_mispredict,
      .il1_en         (il1_en[g]),
      .il1_addr       (il1_addr[g]),
      .il1_instr      (instr_of(il1_addr[g])),
      .lbc_state      (lbc_state[g]),
      .lbc_action     (lbc_action[g])
    );
  end

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
  addr_t st_pred   [P];
  logic  st_taken  [P];
  addr_t pc;

  int unsigned checks = 0, failures = 0;
  int unsigned il1_reads [NCFG];
  int unsigned lb_reads  [NCFG];
  int unsigned fetches = 0;

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
    foreach (il1_reads[g]) begin il1_reads[g] = 0; lb_reads[g] = 0; end
    foreach (st_v[i]) begin st_v[i] = 1'b0; st_pc[i] = '0; st_pred[i] = '0; st_taken[i] = 1'b0; end
    build_program();
    pc = BASE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int unsigned cyc = 0; cyc < NCYCLES; cyc++) begin
      addr_t pred_next, actual_next;
      logic  mis, served_lb;
      @(negedge clk);
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
      fetches++;
      for (int g = 0; g < NCFG; g++) begin
        served_lb = (lbc_state[g] == LBC_ACTIVE) && !ex_mispredict;
        if (served_lb) lb_reads[g]++;
        if (il1_en[g]) il1_reads[g]++;
        if (!ex_mispredict) begin
          check(if_instr[g] == instr_of(if_pc), "wrong instruction delivered");
          check(served_lb == !il1_en[g], "IL1 and loop buffer use disagree");
        end
        check(if_pred_taken[g] == if_pred_taken[0] &&
              (!if_pred_taken[0] || if_pred_target[g] == if_pred_target[0]),
              "configurations predict differently");
      end
      pred_next = if_pred_taken[0] ? if_pred_target[0] : if_pc + 4;
      if (mis) begin
        foreach (st_v[i]) st_v[i] = 1'b0;
        pc = actual_next;
      end else begin
        for (int i = P - 1; i > 0; i--) begin
          st_v[i] = st_v[i-1]; st_pc[i] = st_pc[i-1]; st_pred[i] = st_pred[i-1];
        end
        st_v[0] = 1'b1; st_pc[0] = if_pc; st_pred[0] = pred_next;
        if (st_v[P-1]) st_taken[P-1] = br_kind.exists(st_pc[P-1]) ? resolve_outcome(st_pc[P-1]) : 1'b0;
        pc = pred_next;
      end
    end

    $display("strategy  size   R_LB    R_IC    fetch energy saved");
    for (int g = 0; g < NCFG; g++) begin
      real rlb, ric;
      rlb = real'(lb_reads[g]) / real'(fetches);
      ric = real'(il1_reads[g]) / real'(fetches);
      $display("HCLB-%0d  %4d B  %5.1f%%  %5.1f%%  %5.1f%%", 1 + g / 6, 4 * SIZES[g % 6],
               100.0 * rlb, 100.0 * ric, 100.0 * (1.0 - (ric + ELB[g % 6] * rlb)));
    end
    for (int s = 0; s < 2; s++)
      check(lb_reads[6 * s + 5] > lb_reads[6 * s], "a 2 KB buffer serves no more than a 64 B one");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYCLES + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
