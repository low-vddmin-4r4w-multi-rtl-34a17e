// sram_test_pattern_tb: the 2R2W SRAM's seven-cycle functional test pattern.
//
// Seven back-to-back cycles, each exercising a different combination of ports, with
// write data placed first in the nearest word (address 0) and then in the furthest
// (address 511): 1W, 1R, 1W1R, 2W, 2R, 2W2R, and finally a read/write conflict on
// one word, where the read must return the old word and the write must be stalled.
// Read data must appear one cycle after the inputs are registered and then hold.
`timescale 1ns / 1ps
module sram_test_pattern_tb;
  import sram_pkg::*;

  logic clk = 0, rst_n = 0, cen = 1;
  logic ren_a, ren_b, wen_a, wen_b;
  saddr_t radd_a, radd_b, wadd_a, wadd_b;
  logic [DATA_W-1:0] din_a, din_b, q_out_a, q_out_b;
  logic stall_a, stall_b;
  logic [DATA_W*INTERLEAVE-1:0] neg;

  sram2r2w dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  task automatic idle();
    ren_a = 0; ren_b = 0; wen_a = 0; wen_b = 0;
    radd_a = '0; radd_b = '0; wadd_a = '0; wadd_b = '0; din_a = '0; din_b = '0;
  endtask

  initial begin
    #2000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    idle();
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1: 1W (nearest word)
    wen_a = 1; wadd_a = 9'd0; din_a = 16'hFFFF;
    @(negedge clk);
    check(neg == {DATA_W{8'b0000_0001}}, "1W: negative VVSS on column 0 of every bit");
    // 2: 1R
    idle(); ren_a = 1; radd_a = 9'd0;
    @(negedge clk);
    // 3: 1W1R (furthest word written, nearest read)
    idle(); wen_b = 1; wadd_b = 9'd511; din_b = 16'h5AA5; ren_b = 1; radd_b = 9'd0;
    @(negedge clk);
    check(q_out_a == 16'hFFFF, "1R: nearest word");
    // 4: 2W
    idle(); wen_a = 1; wadd_a = 9'd1; din_a = 16'h1234; wen_b = 1; wadd_b = 9'd510; din_b = 16'hFEDC;
    @(negedge clk);
    check(q_out_b == 16'hFFFF && !stall_b, "1W1R: read and write in one cycle");
    // 5: 2R
    idle(); ren_a = 1; radd_a = 9'd511; ren_b = 1; radd_b = 9'd1;
    @(negedge clk);
    check(q_out_a == 16'hFFFF && q_out_b == 16'hFFFF, "2W: outputs hold without a read");
    check(!stall_a && !stall_b, "2W: no stall");
    // 6: 2W2R
    idle(); ren_a = 1; radd_a = 9'd510; ren_b = 1; radd_b = 9'd0;
    wen_a = 1; wadd_a = 9'd2; din_a = 16'h0F0F; wen_b = 1; wadd_b = 9'd509; din_b = 16'hF0F0;
    @(negedge clk);
    check(q_out_a == 16'h5AA5 && q_out_b == 16'h1234, "2R: furthest and second word");
    // 7: conflict: read A and write A on one word
    idle(); ren_a = 1; radd_a = 9'd2; wen_a = 1; wadd_a = 9'd2; din_a = 16'hDEAD;
    @(negedge clk);
    check(neg == '0, "conflict: stalled write raises no negative VVSS");
    check(q_out_a == 16'hFEDC && q_out_b == 16'hFFFF, "2W2R: reads");
    check(!stall_a && !stall_b, "2W2R: no stall");
    idle(); ren_a = 1; radd_a = 9'd509; ren_b = 1; radd_b = 9'd2;
    @(negedge clk);
    check(q_out_a == 16'h0F0F && stall_a, "conflict: old word read, write stalled");
    @(negedge clk);
    check(q_out_a == 16'hF0F0 && q_out_b == 16'h0F0F, "stalled write not performed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
