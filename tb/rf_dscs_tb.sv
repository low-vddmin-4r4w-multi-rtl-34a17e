// rf_dscs_tb: checks the data slot conflict switch on the five cases of the slot
// controller (no conflict; conflict then switch succeeds; conflict remains after
// the switch; conflict with no S1 write; conflict only in S1), with the conflicting
// read on port A and on port B, then on random requests against a reference.
`timescale 1ns / 1ps
module rf_dscs_tb;
  import rf_pkg::*;
  ireq_t             w   [NUM_SLOTS];
  logic [DATA_W-1:0] wd  [NUM_SLOTS];
  ireq_t             rd  [NUM_SLOTS][2];
  ireq_t             wo  [NUM_SLOTS];
  logic [DATA_W-1:0] wdo [NUM_SLOTS];
  logic              dropped [NUM_SLOTS];
  logic              wchange;
  dscs_state_e       state;
  rf_dscs dut (.*);
  int checks = 0, failures = 0;

  function automatic ireq_t mk(bit en, int loc);
    ireq_t r;
    r = '0; r.en = en; r.loc = baddr_t'(loc);
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // expected: locations issued in slot 0/1 (-1 none), which data, drops, wchange, state
  task automatic expect_(string nm, int l0, int l1, bit sw, bit d0, bit d1, dscs_state_e st);
    #1;
    check(wo[0].en == (l0 >= 0) && (l0 < 0 || int'(wo[0].loc) == l0), {nm, " slot0"});
    check(wo[1].en == (l1 >= 0) && (l1 < 0 || int'(wo[1].loc) == l1), {nm, " slot1"});
    if (l0 >= 0) check(wdo[0] == (sw ? wd[1] : wd[0]), {nm, " data0"});
    if (l1 >= 0) check(wdo[1] == (sw ? wd[0] : wd[1]), {nm, " data1"});
    check(wchange == sw, {nm, " wchange"});
    check(dropped[0] == d0 && dropped[1] == d1, {nm, " dropped"});
    check(state == st, {nm, " state"});
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    wd[0] = 32'h1111_0000; wd[1] = 32'h2222_0000;
    for (int port = 0; port < 2; port++) begin
      // reads: A0 in S0, A1 in S1 on the chosen intra-port, other port idle
      rd[0][port] = mk(1, 0); rd[1][port] = mk(1, 1);
      rd[0][1-port] = mk(0, 0); rd[1][1-port] = mk(0, 0);
      w[0] = mk(1, 3); w[1] = mk(1, 4);   // case 1
      expect_("case1", 3, 4, 0, 0, 0, DSCS_S0);
      w[0] = mk(1, 0); w[1] = mk(1, 2);   // case 2
      expect_("case2", 2, 0, 1, 0, 0, DSCS_S2);
      w[0] = mk(1, 0); w[1] = mk(1, 0);   // case 3
      expect_("case3", -1, -1, 1, 1, 1, DSCS_S3);
      w[0] = mk(1, 2); w[1] = mk(1, 1);   // case 5: only S1 conflicts
      expect_("case5", 2, -1, 0, 0, 1, DSCS_S0);
      w[0] = mk(1, 0); w[1] = mk(0, 0);   // case 4: S1 off, S0 conflicts
      expect_("case4", -1, -1, 0, 1, 0, DSCS_S3);
      // switched S0 write meets a read of the other intra-port in S1
      rd[1][1-port] = mk(1, 0);
      w[0] = mk(1, 0); w[1] = mk(1, 2);
      expect_("case3b", -1, -1, 1, 1, 1, DSCS_S3);
    end
    // random, reference written as a table of outcomes
    for (int it = 0; it < 3000; it++) begin
      bit c0, c1, a0, a1;
      for (int s = 0; s < 2; s++) begin
        w[s] = mk($urandom_range(1), $urandom_range(3));
        wd[s] = $urandom;
        for (int p = 0; p < 2; p++) rd[s][p] = mk($urandom_range(1), $urandom_range(3));
      end
      c0 = w[0].en && ((rd[0][0].en && rd[0][0].loc == w[0].loc) || (rd[0][1].en && rd[0][1].loc == w[0].loc));
      c1 = w[1].en && ((rd[1][0].en && rd[1][0].loc == w[1].loc) || (rd[1][1].en && rd[1][1].loc == w[1].loc));
      a0 = w[1].en && ((rd[0][0].en && rd[0][0].loc == w[1].loc) || (rd[0][1].en && rd[0][1].loc == w[1].loc));
      a1 = w[0].en && ((rd[1][0].en && rd[1][0].loc == w[0].loc) || (rd[1][1].en && rd[1][1].loc == w[0].loc));
      case ({c0, w[1].en})
        2'b10: expect_("rnd4", -1, -1, 0, 1, 0, DSCS_S3);
        2'b11: if (!a0 && !a1) expect_("rnd2", int'(w[1].loc), int'(w[0].loc), 1, 0, 0, DSCS_S2);
               else expect_("rnd3", -1, -1, 1, 1, 1, DSCS_S3);
        default: expect_("rnd1", w[0].en ? int'(w[0].loc) : -1, (w[1].en && !c1) ? int'(w[1].loc) : -1,
                         0, 0, c1, DSCS_S0);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
