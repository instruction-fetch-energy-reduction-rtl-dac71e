// hclb_top: instruction fetch front end with a forward-branch bufferable
// innermost loop buffer, placed between a processor core and its L1
// instruction cache (IL1).
//
// Blocks: btb (branch target buffer with bimodal counters and the P-bit),
// loop_buffer_controller (IDLE/FILL/ACTIVE FSM), loop_buffer (tagless
// instruction store) and fetch_mux (loop buffer or IL1 to the core). The core
// sends its fetch address every cycle; the BTB answers with the prediction the
// core uses for its next address, and the controller chooses the instruction
// source. In IDLE and FILL the address goes to IL1 (il1_en); in FILL the
// instruction IL1 returns is also written into the loop buffer; in ACTIVE IL1
// is not accessed at all, which is where the fetch energy is saved.
//
// Timing: one fetch per cycle. IL1 is expected to return il1_instr in the same
// cycle as il1_en/il1_addr (the IL1 and the core are outside this design). A
// branch resolves in the core's execute stage PIPE_P cycles after its fetch
// and is reported on ex_*; ex_mispredict means the core redirects fetch and
// squashes the fetch of that same cycle.
//
// Defaults follow the evaluated configuration: 256-entry (1 KB) loop buffer,
// fill on the first taken backward branch (FILL_STRATEGY=1; 2 waits for the
// second), 512-set 4-way BTB. PIPE_P = 2 (fetch-to-execute distance of a
// five-stage pipeline) is this design's choice.
module hclb_top
  import hclb_pkg::*;
#(
  parameter int unsigned LB_ENTRIES    = 256,
  parameter int unsigned PIPE_P        = 2,
  parameter int unsigned FILL_STRATEGY = 1,
  parameter int unsigned BTB_SETS      = 512,
  parameter int unsigned BTB_WAYS      = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // core: fetch
  input  logic        if_valid,
  input  addr_t       if_pc,
  output instr_t      if_instr,
  output logic        if_pred_taken,
  output addr_t       if_pred_target,
  // core: branch resolution
  input  logic        ex_valid,
  input  addr_t       ex_pc,
  input  logic        ex_taken,
  input  addr_t       ex_target,
  input  logic        ex_mispredict,
  // IL1
  output logic        il1_en,
  output addr_t       il1_addr,
  input  instr_t      il1_instr,
  // observation
  output lbc_state_t  lbc_state,
  output lbc_action_t lbc_action
);

  localparam int unsigned AW = $clog2(LB_ENTRIES);

  btb_lookup_t   lk;
  logic          up_hit, up_evict;
  ctr_t          up_old_ctr;
  logic          pw_valid, pw_val;
  addr_t         pw_pc;
  logic          lb_we, lb_re, sel_lb;
  logic [AW-1:0] lb_addr;
  instr_t        lb_rdata;

  btb #(
    .NUM_SETS (BTB_SETS),
    .WAYS     (BTB_WAYS)
  ) u_btb (
    .clk        (clk),
    .rst_n      (rst_n),
    .lk_pc      (if_pc),
    .lk         (lk),
    .up_valid   (ex_valid),
    .up_pc      (ex_pc),
    .up_taken   (ex_taken),
    .up_target  (ex_target),
    .up_hit     (up_hit),
    .up_old_ctr (up_old_ctr),
    .up_evict   (up_evict),
    .pw_valid   (pw_valid),
    .pw_pc      (pw_pc),
    .pw_val     (pw_val)
  );

  loop_buffer_controller #(
    .LB_ENTRIES    (LB_ENTRIES),
    .PIPE_P        (PIPE_P),
    .FILL_STRATEGY (FILL_STRATEGY)
  ) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .if_valid      (if_valid),
    .if_pc         (if_pc),
    .lk            (lk),
    .ex_valid      (ex_valid),
    .ex_pc         (ex_pc),
    .ex_taken      (ex_taken),
    .ex_mispredict (ex_mispredict),
    .up_hit        (up_hit),
    .up_old_ctr    (up_old_ctr),
    .btb_evict     (up_evict),
    .il1_en        (il1_en),
    .lb_we         (lb_we),
    .lb_re         (lb_re),
    .lb_addr       (lb_addr),
    .sel_lb        (sel_lb),
    .pw_valid      (pw_valid),
    .pw_pc         (pw_pc),
    .pw_val        (pw_val),
    .state         (lbc_state),
    .action        (lbc_action)
  );

  loop_buffer #(
    .ENTRIES (LB_ENTRIES)
  ) u_lb (
    .clk   (clk),
    .we    (lb_we),
    .waddr (lb_addr),
    .wdata (il1_instr),
    .re    (lb_re),
    .raddr (lb_addr),
    .rdata (lb_rdata)
  );

  fetch_mux u_mux (
    .sel_lb    (sel_lb),
    .lb_instr  (lb_rdata),
    .il1_instr (il1_instr),
    .instr     (if_instr)
  );

  assign il1_addr       = if_pc;
  assign if_pred_taken  = lk.taken;
  assign if_pred_target = lk.target;

endmodule
