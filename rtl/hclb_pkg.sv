// hclb_pkg: types and decode functions shared by the loop-buffer fetch front end.
//
// The loop buffer controller has three states, IDLE, FILL and ACTIVE, and its
// transitions are the lettered actions A..M of the loop-buffer state diagram.
// The controller reports the action it takes every cycle (lbc_action_t) so a
// core or a testbench can count how often each mechanism happens. ACT_EXIT is
// this design's own addition: it covers leaving FILL/ACTIVE because the
// predicted fetch flow leaves the stored loop (loop-end branch predicted not
// taken, an inner backward branch, or a forward branch jumping past the loop
// end), which the state diagram does not list.
//
// Direction prediction is a bimodal 2-bit counter per BTB entry (encoding
// ctr_t; the update rule is in hyst_ctr). ctr_taken and ctr_strong decode a
// counter's direction and strength.
package hclb_pkg;

  localparam int unsigned XLEN    = 32;  // address width
  localparam int unsigned INSTR_W = 32;  // one instruction per loop-buffer entry

  typedef logic [XLEN-1:0]    addr_t;
  typedef logic [INSTR_W-1:0] instr_t;

  typedef enum logic [1:0] {
    LBC_IDLE   = 2'd0,
    LBC_FILL   = 2'd1,
    LBC_ACTIVE = 2'd2
  } lbc_state_t;

  // One code per action of the state diagram; A, D and I are the "stay" actions.
  typedef enum logic [3:0] {
    ACT_A_DETECT        = 4'd0,   // IDLE: watching for an innermost loop
    ACT_B_NEW_LOOP      = 4'd1,   // IDLE -> FILL
    ACT_C_EXISTING_LOOP = 4'd2,   // IDLE -> ACTIVE (start address equals S_addr)
    ACT_D_FILL          = 4'd3,   // FILL: one instruction written
    ACT_E_FILL_DONE     = 4'd4,   // FILL -> ACTIVE (whole loop stored)
    ACT_F_LB_FULL       = 4'd5,   // FILL -> IDLE (BIG loop, buffer full)
    ACT_G_MISPRED_FILL  = 4'd6,   // FILL -> IDLE (mispredict, strong -> weak)
    ACT_H_REFILL        = 4'd7,   // FILL: mispredict, weak -> strong, count back P
    ACT_I_FETCH         = 4'd8,   // ACTIVE: instruction served from the loop buffer
    ACT_J_LB_MISS       = 4'd9,   // ACTIVE -> IDLE (P-bit differs, predictor weak)
    ACT_K_MISPRED_ACT   = 4'd10,  // ACTIVE -> IDLE (branch misprediction)
    ACT_L_BIG_LOOP      = 4'd11,  // ACTIVE -> IDLE (last stored entry of a BIG loop)
    ACT_M_REFILL        = 4'd12,  // ACTIVE -> FILL (P-bit differs, predictor strong)
    ACT_EXIT            = 4'd13   // FILL/ACTIVE -> IDLE (fetch flow leaves the loop)
  } lbc_action_t;

  typedef enum logic [1:0] {
    CTR_SNT = 2'b00,  // strongly not taken
    CTR_WNT = 2'b01,  // weakly not taken
    CTR_WT  = 2'b10,  // weakly taken
    CTR_ST  = 2'b11   // strongly taken
  } ctr_t;

  function automatic logic ctr_taken(ctr_t c);
    return c == CTR_WT || c == CTR_ST;
  endfunction

  function automatic logic ctr_strong(ctr_t c);
    return c == CTR_ST || c == CTR_SNT;
  endfunction

  // What the BTB tells the fetch stage about the instruction being fetched.
  typedef struct packed {
    logic  hit;     // the fetch address is a known branch
    logic  taken;   // predicted direction (counter MSB)
    logic  is_strong; // counter is in a strong state
    logic  pbit;    // direction recorded when the loop buffer was filled
    addr_t target;  // branch target address
  } btb_lookup_t;

endpackage
