// lvmin_top_tb: end-to-end test of the whole design at its default sizes.
//
// Drives the 4R4W register file and the 2R2W SRAM at the same time, each compared
// cycle by cycle with its own reference model (rf_ref_pkg, sram_ref_pkg). The
// register file is first filled (all 64 words), the SRAM too (all 512 words); then
// both get random traffic, narrowed at times to a few words so that conflicts occur,
// with bank sleep and single-slot phases. The replica slot-timing pulses are watched
// as well: every clock edge must give a TS1 pulse, and a TS2 pulse exactly when the
// second slot is enabled. Each mechanism is counted and must occur at least once:
// register file port conflicts (read, write), slot switch that succeeds and that
// fails, dropped S0 write, dropped S1 write, A/B write collision, sleeping bank,
// single-slot mode, reads from both subcells, S1 reading an S0 write, negative-VVSS
// capacitor 1 and 2, SRAM read/write and write/write stalls and negative VVSS, and
// both slot-timer sequences.
`timescale 1ns / 1ps
module lvmin_top_tb;
  import rf_pkg::*;
  import rf_ref_pkg::*;
  import sram_ref_pkg::*;

  localparam int NCYC = 4000;

  logic clk = 0, rst_n = 0;
  // register file
  logic [NUM_BANKS-1:0] rf_cen;
  logic rf_dual_slot;
  req_t              rf_rd_req  [NUM_PORTS][NUM_SLOTS];
  req_t              rf_wr_req  [NUM_PORTS][NUM_SLOTS];
  logic [DATA_W-1:0] rf_wr_data [NUM_PORTS][NUM_SLOTS];
  logic [DATA_W-1:0] rf_rd_data [NUM_PORTS][NUM_SLOTS];
  logic rf_rd_valid [NUM_PORTS][NUM_SLOTS], rf_rd_conflict [NUM_PORTS][NUM_SLOTS];
  logic rf_wr_done [NUM_PORTS][NUM_SLOTS], rf_wr_conflict [NUM_PORTS][NUM_SLOTS];
  logic rf_wr_dropped [NUM_PORTS][NUM_SLOTS];
  logic [1:0] rf_wchange [NUM_BANKS];
  dscs_state_e rf_dscs_state [NUM_BANKS][2];
  logic [PHYS_COLS-1:0] rf_neg_cap1 [NUM_BANKS][NUM_SLOTS], rf_neg_cap2 [NUM_BANKS][NUM_SLOTS];
  logic rf_reset_sig, rf_r_wp, rf_r_w_ok, rf_ts1, rf_ts2, rf_slot;
  int   rf_slot_overruns;
  // SRAM
  logic sram_cen, sram_ren_a, sram_ren_b, sram_wen_a, sram_wen_b;
  sram_pkg::saddr_t sram_radd_a, sram_radd_b, sram_wadd_a, sram_wadd_b;
  logic [sram_pkg::DATA_W-1:0] sram_din_a, sram_din_b, sram_q_out_a, sram_q_out_b;
  logic sram_stall_a, sram_stall_b;
  logic [sram_pkg::DATA_W*sram_pkg::INTERLEAVE-1:0] sram_neg;

  lvmin_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_cap1 = 0, n_cap2 = 0, n_ts1 = 0, n_ts2 = 0, n_ts2_exp = 0, n_edges = 0;
  rf_model      rfm;
  sram_model    sm;
  rf_expect_t   rq [$];
  sram_expect_t sq [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  // slot timer pulses
  always @(posedge rf_ts1) n_ts1++;
  always @(posedge rf_ts2) n_ts2++;

  task automatic compare_rf(input rf_expect_t e);
    for (int p = 0; p < NUM_PORTS; p++)
      for (int s = 0; s < NUM_SLOTS; s++) begin
        check(rf_rd_valid[p][s] == e.rd_valid[p][s] && rf_rd_conflict[p][s] == e.rd_conflict[p][s],
              $sformatf("rf read status p%0d s%0d", p, s));
        check(rf_wr_done[p][s] == e.wr_done[p][s] && rf_wr_conflict[p][s] == e.wr_conflict[p][s] &&
              rf_wr_dropped[p][s] == e.wr_dropped[p][s], $sformatf("rf write status p%0d s%0d", p, s));
        if (e.rd_chk[p][s] && e.rd_valid[p][s])
          check(rf_rd_data[p][s] == e.rd_data[p][s], $sformatf("rf rd_data p%0d s%0d", p, s));
      end
    for (int b = 0; b < NUM_BANKS; b++) begin
      check(rf_wchange[b] == e.wchange[b], "rf wchange");
      for (int a = 0; a < 2; a++) check(int'(rf_dscs_state[b][a]) == e.state[b][a], "rf dscs state");
    end
  endtask

  // one cycle of both memories
  task automatic tick();
    rf_expect_t e;
    sram_expect_t f;
    rfm.step(rf_rd_req, rf_wr_req, rf_wr_data, rf_cen, rf_dual_slot, e);
    rq.push_back(e);
    sm.step(sram_cen, sram_ren_a, sram_radd_a, sram_ren_b, sram_radd_b,
            sram_wen_a, sram_wadd_a, sram_din_a, sram_wen_b, sram_wadd_b, sram_din_b, f);
    sq.push_back(f);
    if (rst_n) begin n_edges++; if (rf_dual_slot) n_ts2_exp++; end
    @(negedge clk);
    for (int b = 0; b < NUM_BANKS; b++)
      for (int s = 0; s < NUM_SLOTS; s++) begin
        if (rf_neg_cap1[b][s] != '0) n_cap1++;
        if (rf_neg_cap2[b][s] != '0) n_cap2++;
      end
    check(sram_neg == sq[sq.size()-1].neg, "sram neg enables");
    if (rq.size() >= 2) compare_rf(rq.pop_front());
    if (sq.size() >= 2) begin
      f = sq.pop_front();
      check(sram_q_out_a == f.q_a && sram_q_out_b == f.q_b, "sram read data");
      check(sram_stall_a == f.stall_a && sram_stall_b == f.stall_b, "sram stall flags");
    end
  endtask

  function automatic req_t rnd_req(int pct_en, bit narrow);
    req_t r;
    r.en = ($urandom_range(99) < pct_en);
    r.addr.bank = 1'($urandom);
    r.addr.ab   = 1'($urandom);
    r.addr.loc.thread = narrow ? 2'($urandom_range(1) * 2) : 2'($urandom);
    r.addr.loc.rnum   = narrow ? 3'($urandom_range(1)) : 3'($urandom);
    return r;
  endfunction

  function automatic sram_pkg::saddr_t rnd_sa(bit narrow);
    return narrow ? sram_pkg::saddr_t'({6'($urandom_range(1)), 3'($urandom_range(1))})
                  : sram_pkg::saddr_t'($urandom);
  endfunction

  task automatic idle();
    for (int p = 0; p < NUM_PORTS; p++)
      for (int s = 0; s < NUM_SLOTS; s++) begin
        rf_rd_req[p][s] = '0; rf_wr_req[p][s] = '0; rf_wr_data[p][s] = '0;
      end
    sram_ren_a = 0; sram_ren_b = 0; sram_wen_a = 0; sram_wen_b = 0;
    sram_radd_a = '0; sram_radd_b = '0; sram_wadd_a = '0; sram_wadd_b = '0;
    sram_din_a = '0; sram_din_b = '0;
  endtask

  initial begin
    #(20 * (NCYC + 600) * 1ns);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rfm = new(); sm = new();
    rf_cen = '1; rf_dual_slot = 1; sram_cen = 1;
    idle();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill both memories
    for (int i = 0; i < 256; i++) begin
      idle();
      if (i < 8)
        for (int p = 0; p < NUM_PORTS; p++)
          for (int s = 0; s < NUM_SLOTS; s++) begin
            rf_wr_req[p][s].en = 1;
            rf_wr_req[p][s].addr.bank = p[1];
            rf_wr_req[p][s].addr.ab = p[0];
            rf_wr_req[p][s].addr.loc.thread = 2'(p[0] * 2 + s);
            rf_wr_req[p][s].addr.loc.rnum = 3'(i);
            rf_wr_data[p][s] = $urandom;
          end
      sram_wen_a = 1; sram_wadd_a = sram_pkg::saddr_t'(2 * i); sram_din_a = 16'($urandom);
      sram_wen_b = 1; sram_wadd_b = sram_pkg::saddr_t'(2 * i + 1); sram_din_b = 16'($urandom);
      tick();
    end
    // random traffic on both
    for (int i = 0; i < NCYC; i++) begin
      bit narrow;
      narrow = (i % 400) < 300;
      rf_dual_slot = !((i % 500) >= 450);
      rf_cen = ((i % 300) >= 280) ? 2'($urandom) : '1;
      for (int p = 0; p < NUM_PORTS; p++)
        for (int s = 0; s < NUM_SLOTS; s++) begin
          rf_rd_req[p][s]  = rnd_req(60, narrow);
          rf_wr_req[p][s]  = rnd_req(50, narrow);
          rf_wr_data[p][s] = $urandom;
        end
      sram_cen = (i % 250) < 240;
      sram_ren_a = 1'($urandom_range(99) < 60); sram_radd_a = rnd_sa(narrow && i % 3 == 0);
      sram_ren_b = 1'($urandom_range(99) < 60); sram_radd_b = rnd_sa(narrow && i % 3 == 0);
      sram_wen_a = 1'($urandom_range(99) < 60); sram_wadd_a = rnd_sa(narrow && i % 3 == 0);
      sram_wen_b = 1'($urandom_range(99) < 60); sram_wadd_b = rnd_sa(narrow && i % 3 == 0);
      sram_din_a = 16'($urandom); sram_din_b = 16'($urandom);
      tick();
    end
    idle();
    rf_cen = '1; rf_dual_slot = 1; sram_cen = 1;
    repeat (2) tick();
    // every mechanism must have happened
    check(rfm.n_rd_l1_conflict > 0, "no register file read port conflict");
    check(rfm.n_wr_l1_conflict > 0, "no register file write port conflict");
    check(rfm.n_switch_ok > 0, "no successful slot switch");
    check(rfm.n_switch_fail > 0, "no failed slot switch");
    check(rfm.n_case4_drop > 0, "no dropped S0 write");
    check(rfm.n_case5_drop > 0, "no dropped S1 write");
    check(rfm.n_ab_collision > 0, "no A/B write collision");
    check(rfm.n_sleep_ignored > 0, "no access to a sleeping bank");
    check(rfm.n_single_slot > 0, "no single-slot mode");
    check(rfm.n_sub0_read > 0 && rfm.n_sub1_read > 0, "subcells not both read");
    check(rfm.n_s1_sees_s0 > 0, "no S1 read of an S0 write");
    check(n_cap1 > 0, "no negative-VVSS capacitor 1");
    check(n_cap2 > 0, "no negative-VVSS capacitor 2");
    check(sm.n_rw_stall > 0, "no SRAM read/write stall");
    check(sm.n_ww_stall > 0, "no SRAM write/write stall");
    check(sm.n_neg > 0, "no SRAM negative VVSS");
    check(n_ts1 >= n_edges - 1 && n_ts1 <= n_edges + 1, $sformatf("TS1 pulses %0d for %0d edges", n_ts1, n_edges));
    check(n_ts2 >= n_ts2_exp - 2 && n_ts2 <= n_ts2_exp + 2 && n_ts2 < n_ts1,
          $sformatf("TS2 pulses %0d expected %0d", n_ts2, n_ts2_exp));
    check(rf_slot_overruns == 0, "slot sequence overran the clock");
    $display("mechanisms: rdL1=%0d wrL1=%0d switch_ok=%0d switch_fail=%0d dropS0=%0d dropS1=%0d ab=%0d sleep=%0d single=%0d s1_after_s0=%0d cap1=%0d cap2=%0d sram_rw=%0d sram_ww=%0d sram_neg=%0d ts1=%0d ts2=%0d",
             rfm.n_rd_l1_conflict, rfm.n_wr_l1_conflict, rfm.n_switch_ok, rfm.n_switch_fail,
             rfm.n_case4_drop, rfm.n_case5_drop, rfm.n_ab_collision, rfm.n_sleep_ignored,
             rfm.n_single_slot, rfm.n_s1_sees_s0, n_cap1, n_cap2, sm.n_rw_stall, sm.n_ww_stall,
             sm.n_neg, n_ts1, n_ts2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
