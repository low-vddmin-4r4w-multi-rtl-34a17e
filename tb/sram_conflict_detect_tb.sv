// sram_conflict_detect_tb: checks the SRAM's read-over-write conflict detector.
// Directed cases (each read port against each write port, both writes to one word,
// a disabled read that must not stall) are followed by random inputs on a small
// address range; each result is compared with the rule worked out here: a write is
// stalled when any enabled read addresses its word, and write B is also stalled when
// a performed write A addresses the same word. Combinational, so no clock.
`timescale 1ns / 1ps
module sram_conflict_detect_tb;
  import sram_pkg::*;
  logic ren_a, ren_b, wen_a, wen_b, wen_a_int, wen_b_int, stall_a, stall_b;
  saddr_t radd_a, radd_b, wadd_a, wadd_b;
  sram_conflict_detect dut (.*);
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  task automatic apply(bit ra, int xa, bit rb, int xb, bit wa, int ya, bit wb, int yb,
                       bit exp_sa, bit exp_sb, string what);
    ren_a = ra; radd_a = saddr_t'(xa); ren_b = rb; radd_b = saddr_t'(xb);
    wen_a = wa; wadd_a = saddr_t'(ya); wen_b = wb; wadd_b = saddr_t'(yb);
    #1;
    check(stall_a == exp_sa && stall_b == exp_sb, what);
    check(wen_a_int == (wa && !exp_sa) && wen_b_int == (wb && !exp_sb), {what, " (enables)"});
  endtask

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    apply(1, 5, 1, 6, 1, 7, 1, 8, 0, 0, "no conflict");
    apply(1, 5, 0, 0, 1, 5, 0, 0, 1, 0, "read A vs write A");
    apply(0, 0, 1, 5, 1, 5, 0, 0, 1, 0, "read B vs write A");
    apply(1, 9, 0, 0, 0, 0, 1, 9, 0, 1, "read A vs write B");
    apply(0, 0, 1, 9, 0, 0, 1, 9, 0, 1, "read B vs write B");
    apply(0, 5, 0, 5, 1, 5, 1, 6, 0, 0, "disabled reads do not stall");
    apply(0, 0, 0, 0, 1, 3, 1, 3, 0, 1, "two writes to one word: A wins");
    apply(1, 3, 0, 0, 1, 3, 1, 3, 1, 1, "both writes hit a read");
    for (int i = 0; i < 5000; i++) begin
      bit ra, rb, wa, wb, sa, sb;
      int xa, xb, ya, yb;
      ra = 1'($urandom); rb = 1'($urandom); wa = 1'($urandom); wb = 1'($urandom);
      xa = $urandom_range(3); xb = $urandom_range(3); ya = $urandom_range(3); yb = $urandom_range(3);
      sa = wa && ((ra && xa == ya) || (rb && xb == ya));
      sb = wb && ((ra && xa == yb) || (rb && xb == yb) || (wa && !sa && ya == yb));
      apply(ra, xa * 65, rb, xb * 65, wa, ya * 65, wb, yb * 65, sa, sb, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
