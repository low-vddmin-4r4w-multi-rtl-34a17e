// sram_bank_array_tb: checks one 64 x 64 SRAM bank with 8:1 bit interleaving.
// Random writes on both ports (never both to one word) are mirrored in a plain
// word array here; reads on both ports are compared with it combinationally. The
// physical placement is checked too: bit b of the word at (row, ysel) must sit in
// row `row`, column b*8 + ysel, so the eight words of a row are interleaved bit by bit.
`timescale 1ns / 1ps
module sram_bank_array_tb;
  import sram_pkg::*;
  logic clk = 0;
  saddr_t radd [2], wadd [2];
  logic [BANK_DW-1:0] rdata [2], wdata [2];
  logic wen [2];
  sram_bank_array dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [BANK_DW-1:0] ref_mem [2**ADDR_W];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    #1ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wen = '{0, 0};
    // fill
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        wen[p] = 1; wadd[p] = saddr_t'(2 * i + p); wdata[p] = 8'($urandom);
        ref_mem[2 * i + p] = wdata[p];
      end
    end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        radd[p] = saddr_t'($urandom);
        #1 check(rdata[p] == ref_mem[radd[p]], $sformatf("read port %0d addr %0d", p, radd[p]));
      end
      wen[0] = 1'($urandom); wadd[0] = saddr_t'($urandom); wdata[0] = 8'($urandom);
      wen[1] = 1'($urandom); wadd[1] = saddr_t'($urandom); wdata[1] = 8'($urandom);
      if (wadd[1] == wadd[0]) wen[1] = 0;
      for (int p = 0; p < 2; p++) if (wen[p]) ref_mem[wadd[p]] = wdata[p];
    end
    @(negedge clk);
    wen = '{0, 0};
    // placement
    for (int a = 0; a < 2**ADDR_W; a++) begin
      saddr_t s;
      s = saddr_t'(a);
      for (int b = 0; b < BANK_DW; b++)
        check(dut.mem[s.row][b * INTERLEAVE + int'(s.ysel)] == ref_mem[a][b],
              $sformatf("placement word %0d bit %0d", a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
