// rf_neg_vvss_ctrl_tb: checks the negative-VVSS capacitor enables against the truth
// table (no write or write 0: both off; one port writes 1: cap 1; both ports write 1
// into the column: caps 1 and 2), column by column, with directed and random writes.
`timescale 1ns / 1ps
module rf_neg_vvss_ctrl_tb;
  import rf_pkg::*;
  ireq_t wa, wb;
  logic [DATA_W-1:0] da, db;
  logic [PHYS_COLS-1:0] cap1_en, cap2_en;
  rf_neg_vvss_ctrl dut (.*);
  int checks = 0, failures = 0, n_c2 = 0;

  task automatic check_all();
    #1;
    for (int b = 0; b < DATA_W; b++)
      for (int c = 0; c < INTERLEAVE; c++) begin
        bit oa, ob;
        oa = wa.en && da[b] && (wa.loc.rnum % INTERLEAVE == c);
        ob = wb.en && db[b] && (wb.loc.rnum % INTERLEAVE == c);
        checks += 2;
        if (cap1_en[b*INTERLEAVE+c] !== (oa || ob)) begin failures++; $display("FAIL cap1 b%0d c%0d", b, c); end
        if (cap2_en[b*INTERLEAVE+c] !== (oa && ob)) begin failures++; $display("FAIL cap2 b%0d c%0d", b, c); end
        if (oa && ob) n_c2++;
      end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    // the five columns of the truth table, same word column for A and B
    wa = '0; wb = '0; wa.loc.rnum = 3'd2; wb.loc.rnum = 3'd4;
    da = '1; db = '1; check_all();                       // WEN = 0
    if (cap1_en != '0 || cap2_en != '0) failures++;
    checks++;
    wa.en = 1; wb.en = 1;
    da = '0; db = '0; check_all();                       // 0 / 0
    checks++; if (cap1_en != '0) failures++;
    da = '0; db = '1; check_all();                       // 0 / 1: cap 1 only
    checks++; if (cap1_en[0] !== 1'b1 || cap2_en[0] !== 1'b0) failures++;
    da = '1; db = '0; check_all();                       // 1 / 0: cap 1 only
    da = '1; db = '1; check_all();                       // 1 / 1: both
    checks++; if (cap1_en[0] !== 1'b1 || cap2_en[0] !== 1'b1) failures++;
    for (int it = 0; it < 300; it++) begin
      wa = ireq_t'($urandom); wb = ireq_t'($urandom);
      da = $urandom; db = $urandom;
      check_all();
    end
    checks++; if (n_c2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
