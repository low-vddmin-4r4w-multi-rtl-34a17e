// sram_neg_vvss_sel_tb: checks the SRAM's negative-VVSS column enables. For random
// write data, column selects and enables it works out, for each of the 16 bits and
// 8 interleaved columns, whether a 1 is being written there by port A or B, and
// compares with the module's 128 enables. Combinational, so no clock.
`timescale 1ns / 1ps
module sram_neg_vvss_sel_tb;
  import sram_pkg::*;
  logic wen_a, wen_b;
  logic [YSEL_W-1:0] y_a_sel, y_b_sel;
  logic [DATA_W-1:0] din_a, din_b;
  logic [DATA_W*INTERLEAVE-1:0] neg;
  sram_neg_vvss_sel dut (.*);
  int checks = 0, failures = 0;

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      wen_a = 1'($urandom); wen_b = 1'($urandom);
      y_a_sel = 3'($urandom); y_b_sel = 3'($urandom);
      din_a = 16'($urandom); din_b = 16'($urandom);
      #1;
      for (int b = 0; b < DATA_W; b++)
        for (int y = 0; y < INTERLEAVE; y++) begin
          bit e;
          e = 0;
          if (wen_a && y_a_sel == y && din_a[b]) e = 1;
          if (wen_b && y_b_sel == y && din_b[b]) e = 1;
          checks++;
          if (neg[b * INTERLEAVE + y] != e) begin
            failures++;
            if (failures < 20) $display("FAIL bit %0d column %0d", b, y);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
