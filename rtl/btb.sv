// btb: set-associative branch target buffer with a bimodal direction counter
// and the extra P-bit per entry.
//
// Organisation: NUM_SETS sets x WAYS ways (512 x 4 by default, as in the
// evaluated configuration). An entry holds a tag (the instruction address above
// the set index, 21 bits for 32-bit word addresses), the 32-bit branch target,
// a 2-bit direction counter (update rule in hyst_ctr) and the P-bit.
// The P-bit is the only field the loop buffer adds to a conventional BTB: it
// records the direction a forward branch took in the trace held by the loop
// buffer. It is one bit next to roughly 20 + 32 + 2 bits of the usual fields,
// about 1.8 % more storage.
//
// Ports, all addresses are byte addresses of 32-bit instructions (bits 1:0
// are always zero and are not used):
//  * lookup (combinational): lk_pc in, lk (hit, predicted direction, whether
//    the counter is strong, P-bit, target) out, in the same cycle.
//  * update (resolution of a branch in the execute stage): on up_valid the
//    entry of up_pc is updated at the clock edge: counter trained, target
//    rewritten (up_target is the decoded target, taken or not). A missing
//    branch is allocated (first invalid way, otherwise a per-set round-robin
//    victim) with a weak counter in its resolved direction and P-bit 0.
//    up_hit/up_old_ctr show, combinationally, the entry's state before the
//    update (CTR_SNT on a miss); up_evict says the allocation replaces a
//    valid entry.
//  * P-bit write: on pw_valid the P-bit of pw_pc's entry (if present) is set
//    to pw_val at the clock edge; an allocation into the same way in the
//    same cycle wins (the new entry starts with P-bit 0).
// Reset clears the valid bits and round-robin pointers only.
//
// The allocation policy, replacement policy and reset behaviour are this
// design's choices; the evaluated BTB is only given as 512-set, 4-way with a
// bimodal predictor.
module btb
  import hclb_pkg::*;
#(
  parameter int unsigned NUM_SETS = 512,
  parameter int unsigned WAYS     = 4,
  localparam int unsigned IDX_W   = $clog2(NUM_SETS),
  localparam int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned TAG_W   = XLEN - IDX_W - 2
) (
  input  logic        clk,
  input  logic        rst_n,
  // fetch-stage lookup
  input  addr_t       lk_pc,
  output btb_lookup_t lk,
  // execute-stage update
  input  logic        up_valid,
  input  addr_t       up_pc,
  input  logic        up_taken,
  input  addr_t       up_target,
  output logic        up_hit,
  output ctr_t        up_old_ctr,
  output logic        up_evict,
  // P-bit write from the loop buffer controller
  input  logic        pw_valid,
  input  addr_t       pw_pc,
  input  logic        pw_val
);

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [WAY_W-1:0] way_t;

  logic [WAYS-1:0] valid_q [NUM_SETS];
  tag_t            tag_q   [NUM_SETS][WAYS];
  addr_t           tgt_q   [NUM_SETS][WAYS];
  ctr_t            ctr_q   [NUM_SETS][WAYS];
  logic            pbit_q  [NUM_SETS][WAYS];
  way_t            rr_q    [NUM_SETS];

  // word address bits [IDX_W+1:2] select the set, the bits above are the tag

  // ---------------- lookup ----------------
  idx_t lk_idx;
  logic lk_hit;
  way_t lk_way;

  always_comb begin
    lk_idx = lk_pc[IDX_W+1:2];
    lk_hit = 1'b0;
    lk_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!lk_hit && valid_q[lk_idx][w] && tag_q[lk_idx][w] == lk_pc[XLEN-1:IDX_W+2]) begin
        lk_hit = 1'b1;
        lk_way = way_t'(w);
      end
    end
    lk.hit    = lk_hit;
    lk.taken  = lk_hit && ctr_taken(ctr_q[lk_idx][lk_way]);
    lk.is_strong = ctr_strong(ctr_q[lk_idx][lk_way]);
    lk.pbit   = pbit_q[lk_idx][lk_way];
    lk.target = tgt_q[lk_idx][lk_way];
  end

  // ---------------- update side ----------------
  idx_t up_idx;
  way_t up_way;
  logic up_has_free;
  way_t up_free_way;
  way_t up_alloc_way;

  always_comb begin
    up_idx      = up_pc[IDX_W+1:2];
    up_hit      = 1'b0;
    up_way      = '0;
    up_has_free = 1'b0;
    up_free_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!up_hit && valid_q[up_idx][w] && tag_q[up_idx][w] == up_pc[XLEN-1:IDX_W+2]) begin
        up_hit = 1'b1;
        up_way = way_t'(w);
      end
      if (!up_has_free && !valid_q[up_idx][w]) begin
        up_has_free = 1'b1;
        up_free_way = way_t'(w);
      end
    end
    up_alloc_way = up_has_free ? up_free_way : rr_q[up_idx];
    up_old_ctr   = up_hit ? ctr_q[up_idx][up_way] : CTR_SNT;
    up_evict     = up_valid && !up_hit && !up_has_free;
  end

  ctr_t up_new_ctr;   // trained counter of the hit entry
  hyst_ctr u_hyst_ctr (.cur(up_old_ctr), .taken(up_taken), .nxt(up_new_ctr));

  // ---------------- P-bit write side ----------------
  idx_t pw_idx;
  logic pw_hit;
  way_t pw_way;

  always_comb begin
    pw_idx = pw_pc[IDX_W+1:2];
    pw_hit = 1'b0;
    pw_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (!pw_hit && valid_q[pw_idx][w] && tag_q[pw_idx][w] == pw_pc[XLEN-1:IDX_W+2]) begin
        pw_hit = 1'b1;
        pw_way = way_t'(w);
      end
    end
  end

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_SETS; s++) begin
        valid_q[s] <= '0;
        rr_q[s]    <= '0;
      end
    end else if (up_valid) begin
      if (!up_hit) begin
        valid_q[up_idx][up_alloc_way] <= 1'b1;
        if (!up_has_free) rr_q[up_idx] <= way_t'((32'(rr_q[up_idx]) + 1) % WAYS);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (pw_valid && pw_hit) pbit_q[pw_idx][pw_way] <= pw_val;
    if (up_valid) begin
      if (up_hit) begin
        ctr_q[up_idx][up_way] <= up_new_ctr;
        tgt_q[up_idx][up_way] <= up_target;
      end else begin
        tag_q [up_idx][up_alloc_way] <= up_pc[XLEN-1:IDX_W+2];
        tgt_q [up_idx][up_alloc_way] <= up_target;
        ctr_q [up_idx][up_alloc_way] <= up_taken ? CTR_WT : CTR_WNT;
        pbit_q[up_idx][up_alloc_way] <= 1'b0;
      end
    end
  end

endmodule
