// tb_btb: self-checking test of the branch target buffer with P-bit.
//
// A small configuration (8 sets x 2 ways) makes allocation and eviction
// frequent. Every cycle random lookup, update and P-bit-write requests are
// applied to a pool of addresses that fall into few sets; the lookup result,
// up_hit/up_old_ctr/up_evict are compared with a reference model kept in the
// testbench (own table of the 2-bit counter transitions, first-free-way then
// per-set round-robin replacement, weak initial counter, P-bit 0 on
// allocation, allocation winning over a P-bit write to the same way).
// Directed checks first walk one branch through every counter transition.
module tb_btb;
  import hclb_pkg::*;

  localparam int unsigned SETS = 8;
  localparam int unsigned WAYS = 2;
  localparam int unsigned IW   = $clog2(SETS);

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  addr_t       lk_pc, up_pc, up_target, pw_pc;
  btb_lookup_t lk;
  logic        up_valid, up_taken, up_hit, up_evict, pw_valid, pw_val;
  ctr_t        up_old_ctr;
  int unsigned checks = 0, failures = 0;

  always #5 clk = ~clk;

  btb #(.NUM_SETS(SETS), .WAYS(WAYS)) u_dut (
    .clk, .rst_n, .lk_pc, .lk,
    .up_valid, .up_pc, .up_taken, .up_target, .up_hit, .up_old_ctr, .up_evict,
    .pw_valid, .pw_pc, .pw_val
  );

  // reference model
  logic        m_v   [SETS][WAYS];
  addr_t       m_pc  [SETS][WAYS];
  addr_t       m_tgt [SETS][WAYS];
  logic [1:0]  m_ctr [SETS][WAYS];
  logic        m_p   [SETS][WAYS];
  int unsigned m_rr  [SETS];

  // next counter: index {ctr, taken}; 00 SNT, 01 WNT, 10 WT, 11 ST
  localparam logic [1:0] NEXT [8] = '{2'b00, 2'b01,   // SNT: N->SNT, T->WNT
                                      2'b00, 2'b11,   // WNT: N->SNT, T->ST
                                      2'b00, 2'b11,   // WT : N->SNT, T->ST
                                      2'b10, 2'b11};  // ST : N->WT,  T->ST

  function automatic int find(addr_t a);
    int unsigned s = (a >> 2) % SETS;
    for (int w = 0; w < WAYS; w++) if (m_v[s][w] && m_pc[s][w][31:IW+2] == a[31:IW+2]) return w;
    return -1;
  endfunction

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic compare();
    int w, s;
    w = find(lk_pc); s = (lk_pc >> 2) % SETS;
    check(lk.hit == (w >= 0), "lookup hit");
    if (w >= 0) begin
      check(lk.taken == m_ctr[s][w][1], "lookup direction");
      check(lk.is_strong == (m_ctr[s][w] == 2'b11 || m_ctr[s][w] == 2'b00), "lookup strength");
      check(lk.pbit == m_p[s][w], "lookup P-bit");
      check(lk.target == m_tgt[s][w], "lookup target");
    end else check(!lk.taken, "miss predicts not taken");
    if (up_valid) begin
      int free;
      w = find(up_pc); s = (up_pc >> 2) % SETS;
      check(up_hit == (w >= 0), "update hit");
      if (w >= 0) check(up_old_ctr == ctr_t'(m_ctr[s][w]), "old counter");
      free = -1;
      for (int i = WAYS - 1; i >= 0; i--) if (!m_v[s][i]) free = i;
      check(up_evict == (w < 0 && free < 0), "evict flag");
    end
  endtask

  task automatic model_edge();
    int w, s, pw_w, pw_s;
    pw_w = find(pw_pc); pw_s = (pw_pc >> 2) % SETS;
    if (pw_valid && pw_w >= 0) m_p[pw_s][pw_w] = pw_val;
    if (up_valid) begin
      w = find(up_pc); s = (up_pc >> 2) % SETS;
      if (w >= 0) begin
        m_ctr[s][w] = NEXT[{m_ctr[s][w], up_taken}];
        m_tgt[s][w] = up_target;
      end else begin
        int free = -1;
        for (int i = WAYS - 1; i >= 0; i--) if (!m_v[s][i]) free = i;
        if (free < 0) begin
          free = m_rr[s];
          m_rr[s] = (m_rr[s] + 1) % WAYS;
        end
        m_v[s][free] = 1'b1; m_pc[s][free] = up_pc; m_tgt[s][free] = up_target;
        m_ctr[s][free] = up_taken ? 2'b10 : 2'b01; m_p[s][free] = 1'b0;
      end
    end
  endtask

  function automatic addr_t rand_pc();
    // 3 sets x 4 tags -> more branches than ways
    return 32'h1000 + (($urandom_range(0, 3) * SETS + $urandom_range(0, 2)) << 2);
  endfunction

  task automatic step();
    #1 compare();
    @(posedge clk);
    model_edge();
    @(negedge clk);
  endtask

  initial begin
    foreach (m_v[s, w]) m_v[s][w] = 1'b0;
    foreach (m_rr[s]) m_rr[s] = 0;
    lk_pc = '0; up_pc = '0; up_target = '0; pw_pc = '0;
    up_valid = 1'b0; up_taken = 1'b0; pw_valid = 1'b0; pw_val = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // directed: one branch through T,T,N,N,N,T,T (WT,ST,ST,WT,SNT,SNT,WNT,ST)
    lk_pc = 32'h2000;
    step();
    check(!lk.hit, "empty BTB misses");
    up_valid = 1'b1; up_pc = 32'h2000; up_target = 32'h1F00;
    for (int i = 0; i < 7; i++) begin
      up_taken = (i < 2 || i > 4);
      step();
    end
    up_valid = 1'b0;
    #1 check(lk.hit && lk.taken && lk.is_strong && lk.target == 32'h1F00, "directed walk ends in ST");
    // P-bit write
    pw_valid = 1'b1; pw_pc = 32'h2000; pw_val = 1'b1;
    step();
    pw_valid = 1'b0;
    #1 check(lk.pbit, "P-bit written");

    // random traffic
    for (int n = 0; n < 20000; n++) begin
      lk_pc     = ($urandom_range(0, 3) == 0) ? 32'h2000 : rand_pc();
      up_valid  = $urandom_range(0, 1) != 0;
      up_pc     = rand_pc();
      up_taken  = $urandom_range(0, 1) != 0;
      up_target = $urandom & 32'hFFFF_FFFC;
      pw_valid  = $urandom_range(0, 2) == 0;
      pw_pc     = rand_pc();
      pw_val    = $urandom_range(0, 1) != 0;
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
