// tb_loop_buffer: self-checking test of the tagless loop buffer array at its
// default size (256 entries). Every entry is written with a random word, then
// random mixes of writes and reads are compared against a reference copy
// kept in the testbench. A read with re low must return zero; a write is
// visible from the cycle after its clock edge.
module tb_loop_buffer;
  import hclb_pkg::*;

  localparam int unsigned ENTRIES = 256;
  localparam int unsigned AW      = $clog2(ENTRIES);

  logic          clk = 1'b0;
  logic          we, re;
  logic [AW-1:0] waddr, raddr;
  instr_t        wdata, rdata;
  instr_t        ref_mem [ENTRIES];
  int unsigned   checks = 0, failures = 0;

  always #5 clk = ~clk;

  loop_buffer #(.ENTRIES(ENTRIES)) u_dut (
    .clk, .we, .waddr, .wdata, .re, .raddr, .rdata
  );

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    we = 1'b0; re = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    // fill every entry
    for (int i = 0; i < ENTRIES; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = $urandom; ref_mem[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    // read every entry back
    for (int i = 0; i < ENTRIES; i++) begin
      re = 1'b1; raddr = AW'(i);
      #1 check(rdata == ref_mem[i], "read back after fill");
      @(negedge clk);
    end
    // random traffic
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) != 0; waddr = AW'($urandom); wdata = $urandom;
      re = $urandom_range(0, 3) != 0; raddr = AW'($urandom);
      #1;
      if (re) check(rdata == ref_mem[raddr], "random read");
      else    check(rdata == '0, "read with re low");
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
