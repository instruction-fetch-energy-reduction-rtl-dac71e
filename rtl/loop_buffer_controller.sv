// loop_buffer_controller: decides, cycle by cycle, whether the instruction the
// core fetches comes from IL1 or from the loop buffer, and manages what the
// loop buffer holds.
//
// Idea: the loop buffer holds the *predicted instruction trace* of one
// innermost loop, forward branches included. For every forward branch in that
// trace the direction it took when the trace was written is kept as the P-bit
// of its BTB entry. While the loop runs from the buffer, each forward branch's
// current prediction is compared with its P-bit: as long as they agree the
// stored trace is exactly what the core would fetch, so the buffer needs no
// tags and is addressed by a plain counter (the loop buffer address, lpc).
//
// States (reset enters IDLE) and the actions reported on `action`:
//  IDLE   (A) IL1 serves the core. A backward branch predicted taken is a loop
//         candidate: with FILL_STRATEGY=1 on its first occurrence, with
//         FILL_STRATEGY=2 only when the same backward branch is seen taken
//         twice in succession. The candidate's start (branch target) is
//         compared with S_addr in the *next* cycle, the cycle in which the loop
//         start itself is fetched from IL1, so the buffer serves from the
//         second cycle after the branch on.
//         (B) not stored: go to FILL, writing the loop start to entry 0.
//         (C) stored: go to ACTIVE, continuing at entry 1.
//  FILL   (D) IL1 serves the core and each fetched instruction is also written
//         to entry lpc; a forward branch's predicted direction is written to
//         its P-bit. (E) the loop-end branch written, predicted taken: go to
//         ACTIVE at entry 0. (F) buffer full before the loop end (a BIG loop):
//         keep the first LB_ENTRIES instructions and go to IDLE. A branch
//         misprediction resolved in execute means the last PIPE_P fetches were
//         wrong-path: (G) if the predictor went from strong to weak, abandon
//         the fill; (H) if it went from weak to strong, count lpc back and
//         refill the other path, updating that branch's P-bit.
//  ACTIVE (I) the buffer serves the core, IL1 is idle. (J) a forward branch's
//         prediction differs from its P-bit and the predictor is weak: go to
//         IDLE (the branch itself is served from the buffer). (M) the same
//         with a strong predictor: flip the P-bit and refill from the entry
//         after the branch. (K) any misprediction: go to IDLE, contents kept.
//         (L) the last entry of a BIG loop served: go to IDLE.
//
// Choices of this design where the behaviour is otherwise open:
//  * S_addr is kept with a valid bit and with the address of the loop-end
//    branch (S_end); a loop matches only if both agree. S_end marks where the
//    trace wraps to entry 0.
//  * ACT_EXIT: FILL/ACTIVE end in IDLE when the predicted flow leaves the loop
//    (loop-end branch predicted not taken, an inner backward branch predicted
//    taken, or a forward branch predicted to jump past the loop end).
//  * The count-back of PIPE_P entries assumes the core fetches one instruction
//    every cycle while filling, so that exactly PIPE_P fetches follow a branch
//    before it resolves. A mispredicted branch that resolves in cycle r
//    squashes the fetch of cycle r as well.
//  * When the BTB replaces a valid entry (btb_evict) a P-bit may be lost, so
//    the stored loop is invalidated and the controller returns to IDLE.
//  * A forward branch that misses in the BTB during FILL is predicted not
//    taken; the BTB allocates entries with P-bit 0, which matches that trace.
//
// Interface: fetch request if_valid/if_pc with the BTB's lookup `lk` for that
// address (same cycle); branch resolution ex_* with the BTB's view of the
// counter before the update (up_hit, up_old_ctr). Outputs are combinational
// for the current fetch: il1_en (IL1 read), lb_we/lb_re/lb_addr, sel_lb for
// the fetch mux, and a P-bit write (pw_*) to the BTB.
module loop_buffer_controller
  import hclb_pkg::*;
#(
  parameter int unsigned LB_ENTRIES    = 256,
  parameter int unsigned PIPE_P        = 2,
  parameter int unsigned FILL_STRATEGY = 1,
  localparam int unsigned AW = $clog2(LB_ENTRIES)
) (
  input  logic          clk,
  input  logic          rst_n,
  // fetch stage
  input  logic          if_valid,
  input  addr_t         if_pc,
  input  btb_lookup_t   lk,
  // execute stage (branch resolution)
  input  logic          ex_valid,
  input  addr_t         ex_pc,
  input  logic          ex_taken,
  input  logic          ex_mispredict,
  input  logic          up_hit,
  input  ctr_t          up_old_ctr,
  input  logic          btb_evict,
  // memory control
  output logic          il1_en,
  output logic          lb_we,
  output logic          lb_re,
  output logic [AW-1:0] lb_addr,
  output logic          sel_lb,
  // P-bit write to the BTB
  output logic          pw_valid,
  output addr_t         pw_pc,
  output logic          pw_val,
  // observation
  output lbc_state_t    state,
  output lbc_action_t   action
);

  localparam logic [AW-1:0] LAST = AW'(LB_ENTRIES - 1);

  lbc_state_t    state_q, state_d;
  logic [AW-1:0] lpc_q, lpc_d;
  logic [AW:0]   cnt_q, cnt_d;           // instructions stored for S_addr
  logic          s_valid_q, s_valid_d;
  addr_t         s_addr_q, s_addr_d;
  addr_t         s_end_q, s_end_d;
  logic          det_q, det_d;           // candidate loop waiting for the compare
  addr_t         det_start_q, det_start_d;
  addr_t         det_end_q, det_end_d;
  logic          bb_valid_q, bb_valid_d; // last backward branch seen taken
  addr_t         bb_addr_q, bb_addr_d;

  logic          flush;
  logic          fwd, bwd, fwd_mismatch;
  logic          do_fill;
  logic [AW-1:0] widx;
  addr_t         fend;

  assign flush        = ex_valid && ex_mispredict;
  assign fwd          = lk.hit && (lk.target > if_pc);
  assign bwd          = lk.hit && (lk.target <= if_pc);
  assign fwd_mismatch = fwd && (lk.taken != lk.pbit);
  assign state        = state_q;

  always_comb begin
    state_d     = state_q;
    lpc_d       = lpc_q;
    cnt_d       = cnt_q;
    s_valid_d   = s_valid_q;
    s_addr_d    = s_addr_q;
    s_end_d     = s_end_q;
    det_d       = det_q;
    det_start_d = det_start_q;
    det_end_d   = det_end_q;
    bb_valid_d  = bb_valid_q;
    bb_addr_d   = bb_addr_q;

    il1_en   = 1'b0;
    lb_we    = 1'b0;
    lb_re    = 1'b0;
    lb_addr  = lpc_q;
    sel_lb   = 1'b0;
    pw_valid = 1'b0;
    pw_pc    = if_pc;
    pw_val   = lk.taken;
    action   = ACT_A_DETECT;

    do_fill  = 1'b0;
    widx     = lpc_q;
    fend     = s_end_q;

    // a backward branch that resolves not taken breaks the "twice in succession"
    if (ex_valid && !ex_taken && ex_pc == bb_addr_q) bb_valid_d = 1'b0;

    unique case (state_q)
      LBC_IDLE: begin
        il1_en = if_valid;
        if (flush) begin
          det_d = 1'b0;
        end else if (det_q) begin
          det_d = 1'b0;
          if (if_valid && if_pc == det_start_q) begin
            if (s_valid_q && s_addr_q == det_start_q && s_end_q == det_end_q) begin
              // C: this fetch (entry 0) still comes from IL1, the buffer takes over next
              if (!fwd_mismatch) begin
                if (if_pc == s_end_q) begin
                  if (lk.taken) begin
                    state_d = LBC_ACTIVE;
                    lpc_d   = '0;
                    action  = ACT_C_EXISTING_LOOP;
                  end
                end else if (cnt_q > 1) begin
                  state_d = LBC_ACTIVE;
                  lpc_d   = AW'(1);
                  action  = ACT_C_EXISTING_LOOP;
                end
              end
            end else begin
              // B: a new loop, its first instruction goes to entry 0 now
              s_addr_d  = det_start_q;
              s_end_d   = det_end_q;
              s_valid_d = 1'b0;
              do_fill   = 1'b1;
              widx      = '0;
              fend      = det_end_q;
              action    = ACT_B_NEW_LOOP;
            end
          end
        end else if (if_valid && bwd && lk.taken) begin
          // A: loop detection
          if (FILL_STRATEGY == 1 || (bb_valid_q && bb_addr_q == if_pc)) begin
            det_d       = 1'b1;
            det_start_d = lk.target;
            det_end_d   = if_pc;
          end
          bb_valid_d = 1'b1;
          bb_addr_d  = if_pc;
        end
      end

      LBC_FILL: begin
        if (flush) begin
          if (up_hit && !ctr_strong(up_old_ctr) && ex_pc >= s_addr_q && ex_pc < s_end_q
              && lpc_q >= AW'(PIPE_P)) begin
            // H: the PIPE_P - 1 entries after the branch and this cycle's fetch
            // were wrong-path; refill from the entry after the branch
            lpc_d    = lpc_q - AW'(PIPE_P) + AW'(1);
            pw_valid = 1'b1;
            pw_pc    = ex_pc;
            pw_val   = ex_taken;
            action   = ACT_H_REFILL;
          end else begin
            state_d   = LBC_IDLE;
            s_valid_d = 1'b0;
            action    = ACT_G_MISPRED_FILL;
          end
        end else if (if_valid) begin
          do_fill = 1'b1;
          widx    = lpc_q;
          fend    = s_end_q;
          action  = ACT_D_FILL;
        end
      end

      LBC_ACTIVE: begin
        if (flush) begin
          state_d = LBC_IDLE;
          action  = ACT_K_MISPRED_ACT;
        end else if (if_valid) begin
          lb_re  = 1'b1;
          sel_lb = 1'b1;
          action = ACT_I_FETCH;
          if (fwd_mismatch) begin
            if (lk.is_strong && lpc_q != LAST && !(lk.taken && lk.target > s_end_q)) begin
              state_d   = LBC_FILL;
              lpc_d     = lpc_q + AW'(1);
              s_valid_d = 1'b0;
              pw_valid  = 1'b1;
              pw_val    = lk.taken;
              action    = ACT_M_REFILL;
            end else begin
              state_d = LBC_IDLE;
              action  = ACT_J_LB_MISS;
            end
          end else if (if_pc == s_end_q) begin
            if (lk.taken) begin
              lpc_d = '0;
            end else begin
              state_d = LBC_IDLE;
              action  = ACT_EXIT;
            end
          end else if ({1'b0, lpc_q} + 1'b1 == cnt_q) begin
            state_d = LBC_IDLE;
            action  = ACT_L_BIG_LOOP;
          end else begin
            lpc_d = lpc_q + AW'(1);
          end
        end
      end

      default: state_d = LBC_IDLE;
    endcase

    // one fill step: write the fetched instruction to entry widx
    if (do_fill) begin
      il1_en  = 1'b1;
      lb_we   = 1'b1;
      lb_addr = widx;
      state_d = LBC_FILL;
      if (fwd) begin
        pw_valid = 1'b1;
        pw_pc    = if_pc;
        pw_val   = lk.taken;
      end
      if (if_pc == fend) begin
        cnt_d     = {1'b0, widx} + 1'b1;
        s_valid_d = 1'b1;
        lpc_d     = '0;
        if (lk.taken) begin
          state_d = LBC_ACTIVE;
          action  = ACT_E_FILL_DONE;
        end else begin
          state_d = LBC_IDLE;
          action  = ACT_EXIT;
        end
      end else if ((bwd && lk.taken) || (fwd && lk.taken && lk.target > fend)) begin
        state_d   = LBC_IDLE;
        s_valid_d = 1'b0;
        action    = ACT_EXIT;
      end else if (widx == LAST) begin
        state_d   = LBC_IDLE;
        cnt_d     = (AW+1)'(LB_ENTRIES);
        s_valid_d = 1'b1;
        action    = ACT_F_LB_FULL;
      end else begin
        lpc_d = widx + AW'(1);
      end
    end

    // a lost BTB entry may have carried a P-bit of the stored trace
    if (btb_evict) begin
      s_valid_d = 1'b0;
      if (state_d != LBC_IDLE) begin
        state_d = LBC_IDLE;
        action  = ACT_EXIT;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= LBC_IDLE;
      lpc_q       <= '0;
      cnt_q       <= '0;
      s_valid_q   <= 1'b0;
      s_addr_q    <= '0;
      s_end_q     <= '0;
      det_q       <= 1'b0;
      det_start_q <= '0;
      det_end_q   <= '0;
      bb_valid_q  <= 1'b0;
      bb_addr_q   <= '0;
    end else begin
      state_q     <= state_d;
      lpc_q       <= lpc_d;
      cnt_q       <= cnt_d;
      s_valid_q   <= s_valid_d;
      s_addr_q    <= s_addr_d;
      s_end_q     <= s_end_d;
      det_q       <= det_d;
      det_start_q <= det_start_d;
      det_end_q   <= det_end_d;
      bb_valid_q  <= bb_valid_d;
      bb_addr_q   <= bb_addr_d;
    end
  end

  // the two memories are never used against each other in one fetch
  a_no_rw: assert property (@(posedge clk) !(lb_we && lb_re));
  a_sel:   assert property (@(posedge clk) sel_lb |-> (lb_re && !il1_en));
  a_fill:  assert property (@(posedge clk) lb_we |-> il1_en);

endmodule
