// sram2r2w_tb: self-checking test of the 2R2W SRAM against sram_ref_pkg.
//
// Fills all 512 words with both write ports (two words per cycle), then runs random
// traffic on all four ports, narrowed at times to a few words so that read/write
// and write/write conflicts occur, with CEN dropped now and then. Port inputs are
// driven after the falling edge; the negative-VVSS enables are checked one cycle
// later (during the access) and read data and stall flags two cycles later (after
// the access cycle's closing edge), which checks the one-cycle latency. At the end
// it reads the whole array back and requires that every kind of stall happened.
`timescale 1ns / 1ps
module sram2r2w_tb;
  import sram_pkg::*;
  import sram_ref_pkg::*;

  logic clk = 0, rst_n = 0, cen = 1;
  logic ren_a = 0, ren_b = 0, wen_a = 0, wen_b = 0;
  saddr_t radd_a = '0, radd_b = '0, wadd_a = '0, wadd_b = '0;
  logic [DATA_W-1:0] din_a = '0, din_b = '0, q_out_a, q_out_b;
  logic stall_a, stall_b;
  logic [DATA_W*INTERLEAVE-1:0] neg;

  sram2r2w dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  sram_model model;
  sram_expect_t q [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  // inputs for this cycle are set; record the expectation and move to the next cycle
  task automatic tick();
    sram_expect_t e;
    model.step(cen, ren_a, radd_a, ren_b, radd_b, wen_a, wadd_a, din_a, wen_b, wadd_b, din_b, e);
    q.push_back(e);
    @(negedge clk);
    if (q.size() >= 1) check(neg == q[q.size()-1].neg, "neg enables");
    if (q.size() >= 2) begin
      e = q.pop_front();
      check(q_out_a == e.q_a, $sformatf("q_out_a %h exp %h", q_out_a, e.q_a));
      check(q_out_b == e.q_b, $sformatf("q_out_b %h exp %h", q_out_b, e.q_b));
      check(stall_a == e.stall_a && stall_b == e.stall_b, "stall flags");
    end
  endtask

  function automatic saddr_t rnd_addr(bit narrow);
    return narrow ? saddr_t'({6'($urandom_range(1)), 3'($urandom_range(1))}) : saddr_t'($urandom);
  endfunction

  initial begin
    #200us; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    model = new();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      wen_a = 1; wadd_a = saddr_t'(2 * i); din_a = 16'($urandom);
      wen_b = 1; wadd_b = saddr_t'(2 * i + 1); din_b = 16'($urandom);
      tick();
    end
    for (int i = 0; i < 4000; i++) begin
      bit narrow;
      narrow = (i % 100) < 40;
      cen    = (i % 250) < 240;
      ren_a = 1'($urandom_range(99) < 60); radd_a = rnd_addr(narrow);
      ren_b = 1'($urandom_range(99) < 60); radd_b = rnd_addr(narrow);
      wen_a = 1'($urandom_range(99) < 60); wadd_a = rnd_addr(narrow); din_a = 16'($urandom);
      wen_b = 1'($urandom_range(99) < 60); wadd_b = rnd_addr(narrow); din_b = 16'($urandom);
      tick();
    end
    cen = 1; wen_a = 0; wen_b = 0;
    for (int i = 0; i < 256; i++) begin
      ren_a = 1; radd_a = saddr_t'(2 * i);
      ren_b = 1; radd_b = saddr_t'(2 * i + 1);
      tick();
    end
    ren_a = 0; ren_b = 0;
    repeat (2) tick();
    check(model.n_rw_stall > 0, "no read/write stall");
    check(model.n_ww_stall > 0, "no write/write stall");
    check(model.n_neg > 0, "no negative VVSS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
