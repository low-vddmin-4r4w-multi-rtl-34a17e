// rf_bank_tb: directed test of one register-file bank: plain writes and reads in
// both slots, read priority with a successful slot switch, a dropped single-slot
// write, an A/B write collision, a sleeping bank (CEN low) and the negative-VVSS
// enables. Requests are driven as the arbiters would present them; results are
// checked after the following clock edge (one-cycle latency). A random phase then
// drives conflict-free traffic (all words of one slot distinct) with the bank now
// and then asleep, and compares read data with a shadow copy of the bank (S1 reads
// seeing S0 writes) and the capacitor enables with values worked out per column.
`timescale 1ns / 1ps
module rf_bank_tb;
  import rf_pkg::*;
  logic clk = 0, rst_n = 0, cen = 1;
  ireq_t rreq [NUM_SLOTS][2], wreq [NUM_SLOTS][2];
  logic [DATA_W-1:0] wdata [NUM_SLOTS][2], rdata [NUM_SLOTS][2];
  ireq_t rdone [NUM_SLOTS][2], wdone [NUM_SLOTS][2];
  logic wdrop [NUM_SLOTS][2];
  logic [1:0] wchange;
  dscs_state_e dstate [2];
  logic [PHYS_COLS-1:0] neg_cap1 [NUM_SLOTS], neg_cap2 [NUM_SLOTS];
  rf_bank dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic ireq_t mk(bit en, int loc);
    ireq_t r;
    r = '0; r.en = en; r.loc = baddr_t'(loc);
    return r;
  endfunction

  task automatic clear();
    for (int s = 0; s < 2; s++) for (int p = 0; p < 2; p++) begin
      rreq[s][p] = '0; wreq[s][p] = '0; wdata[s][p] = '0;
    end
  endtask

  // apply the current requests for one cycle
  task automatic cycle();
    @(posedge clk); #1;
  endtask

  // ---- random conflict-free traffic against a shadow copy
  logic [DATA_W-1:0] shadow [32];

  task automatic random_phase();
    clear();
    for (int i = 0; i < 4; i++) begin                 // fill all 32 words
      for (int s = 0; s < 2; s++) for (int p = 0; p < 2; p++) begin
        wreq[s][p] = mk(1, i * 8 + s * 4 + p * 2);
        wdata[s][p] = $urandom;
        shadow[i * 8 + s * 4 + p * 2] = wdata[s][p];
      end
      cycle();
      clear();
      for (int s = 0; s < 2; s++) for (int p = 0; p < 2; p++) begin
        wreq[s][p] = mk(1, i * 8 + s * 4 + p * 2 + 1);
        wdata[s][p] = $urandom;
        shadow[i * 8 + s * 4 + p * 2 + 1] = wdata[s][p];
      end
      cycle();
      clear();
    end
    for (int i = 0; i < 2000; i++) begin
      int locs [4];
      logic [DATA_W-1:0] exp_rd [2][2];
      bit exp_rv [2][2];
      logic [PHYS_COLS-1:0] c1, c2;
      cen = (i % 50) < 45;
      for (int s = 0; s < 2; s++) begin
        // four distinct words per slot: two reads, two writes
        locs[0] = $urandom_range(31);
        for (int k = 1; k < 4; k++) begin
          bit dup;
          do begin
            locs[k] = $urandom_range(31);
            dup = 0;
            for (int j = 0; j < k; j++) if (locs[j] == locs[k]) dup = 1;
          end while (dup);
        end
        for (int p = 0; p < 2; p++) begin
          rreq[s][p] = mk(1'($urandom), locs[p]);
          wreq[s][p] = mk(1'($urandom), locs[2 + p]);
          wdata[s][p] = $urandom;
        end
      end
      #1;
      // capacitor enables per slot
      for (int s = 0; s < 2; s++) begin
        c1 = '0; c2 = '0;
        for (int b = 0; b < DATA_W; b++) begin
          bit oa, ob;
          oa = cen && wreq[s][0].en && wdata[s][0][b];
          ob = cen && wreq[s][1].en && wdata[s][1][b];
          if (oa) c1[2 * b + int'(wreq[s][0].loc[0])] = 1'b1;
          if (ob) c1[2 * b + int'(wreq[s][1].loc[0])] = 1'b1;
          if (oa && ob && wreq[s][0].loc[0] == wreq[s][1].loc[0]) c2[2 * b + int'(wreq[s][0].loc[0])] = 1'b1;
        end
        check(neg_cap1[s] == c1 && neg_cap2[s] == c2, $sformatf("random: capacitor enables slot %0d", s));
      end
      // expected results: S0 reads, S0 writes, S1 reads, S1 writes
      for (int s = 0; s < 2; s++) begin
        for (int p = 0; p < 2; p++) begin
          exp_rv[s][p] = cen && rreq[s][p].en;
          exp_rd[s][p] = shadow[rreq[s][p].loc];
        end
        if (cen) for (int p = 0; p < 2; p++) if (wreq[s][p].en) shadow[wreq[s][p].loc] = wdata[s][p];
      end
      cycle();
      for (int s = 0; s < 2; s++)
        for (int p = 0; p < 2; p++) begin
          check(rdone[s][p].en == exp_rv[s][p], "random: read done");
          if (exp_rv[s][p]) check(rdata[s][p] == exp_rd[s][p], $sformatf("random: read data slot %0d port %0d", s, p));
          check(!wdrop[s][p], "random: no write dropped");
        end
      check(wchange == 2'b00, "random: no slot switch");
    end
    cen = 1;
    clear();
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    clear();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // 1. writes in both slots on both intra-ports
    wreq[0][0] = mk(1, 5);  wdata[0][0] = 32'hAAAA_0005;
    wreq[1][0] = mk(1, 6);  wdata[1][0] = 32'hAAAA_0006;
    wreq[0][1] = mk(1, 20); wdata[0][1] = 32'hBBBB_0014;   // thread 2: subcell 1
    wreq[1][1] = mk(1, 11); wdata[1][1] = 32'hBBBB_000B;
    #1 check(neg_cap1[0][phys_col(0, 5 % 2)] && !neg_cap2[0][phys_col(0, 5 % 2)], "neg cap 1 for a single 1");
    check(neg_cap1[0][phys_col(1, 1)] == 1'b0, "neg cap off for a 0");
    cycle();
    check(wdone[0][0].en && wdone[1][1].en && !wdrop[0][0] && !wdrop[1][1], "writes done");
    clear();
    rreq[0][0] = mk(1, 5); rreq[0][1] = mk(1, 20); rreq[1][0] = mk(1, 6); rreq[1][1] = mk(1, 11);
    cycle();
    check(rdata[0][0] == 32'hAAAA_0005 && rdata[0][1] == 32'hBBBB_0014, "S0 reads");
    check(rdata[1][0] == 32'hAAAA_0006 && rdata[1][1] == 32'hBBBB_000B, "S1 reads");
    check(rdone[0][1].en && rdone[1][0].en, "reads done");
    // 2. read of 5 in S0 and 7 in S1; B writes 5 in S0 and 9 in S1: slots switch
    clear();
    rreq[0][0] = mk(1, 5); rreq[1][0] = mk(1, 7);
    wreq[0][1] = mk(1, 5); wdata[0][1] = 32'h5555_5555;
    wreq[1][1] = mk(1, 9); wdata[1][1] = 32'h9999_9999;
    cycle();
    check(rdata[0][0] == 32'hAAAA_0005, "read kept the old word");
    check(wchange == 2'b10 && dstate[1] == DSCS_S2, "slot switch on B");
    check(!wdrop[0][1] && !wdrop[1][1], "both switched writes done");
    check(wdone[0][1].en && wdone[0][1].loc == 9 && wdone[1][1].loc == 5, "switched order");
    clear();
    rreq[0][0] = mk(1, 5); rreq[0][1] = mk(1, 9);
    cycle();
    check(rdata[0][0] == 32'h5555_5555 && rdata[0][1] == 32'h9999_9999, "switched writes landed");
    check(wchange == 2'b00, "WChange cleared next cycle");
    // 3. conflict in S0 and no S1 write: dropped
    clear();
    rreq[0][1] = mk(1, 5); wreq[0][0] = mk(1, 5); wdata[0][0] = 32'hDEAD_DEAD;
    cycle();
    check(wdrop[0][0] && dstate[0] == DSCS_S3 && !wdone[0][0].en, "single-slot write dropped");
    // 4. A and B write one word in one slot: A kept
    clear();
    wreq[0][0] = mk(1, 12); wdata[0][0] = 32'h0000_00A0;
    wreq[0][1] = mk(1, 12); wdata[0][1] = 32'h0000_00B0;
    cycle();
    check(!wdrop[0][0] && wdrop[0][1], "B dropped on collision");
    clear();
    rreq[0][0] = mk(1, 5); rreq[1][0] = mk(1, 12);
    cycle();
    check(rdata[0][0] == 32'h5555_5555, "dropped write left word alone");
    check(rdata[1][0] == 32'h0000_00A0, "A won collision");
    // 5. sleeping bank ignores everything
    clear();
    cen = 0;
    wreq[0][0] = mk(1, 12); wdata[0][0] = 32'hFFFF_FFFF; rreq[0][1] = mk(1, 5);
    cycle();
    check(!rdone[0][1].en && !wdone[0][0].en, "sleep: no access");
    cen = 1;
    clear();
    rreq[0][0] = mk(1, 12);
    cycle();
    check(rdata[0][0] == 32'h0000_00A0, "sleep: word unchanged");
    // 6. both ports write 1 into the same column: cap 2
    clear();
    wreq[0][0] = mk(1, 2); wdata[0][0] = 32'h1;
    wreq[0][1] = mk(1, 4); wdata[0][1] = 32'h1;
    #1 check(neg_cap2[0][phys_col(0, 0)], "neg cap 2 for two 1s");
    cycle();
    random_phase();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
