// rf4r4w_tb: self-checking test of the 4R4W register file against rf_ref_pkg.
//
// First fills every word of both banks with conflict-free double-slot writes, then
// runs random traffic on a narrow address range so that port-priority conflicts,
// read/write conflicts, slot switches (successful and not), single-slot drops,
// A/B write collisions, sleeping banks and single-slot mode all occur. Each cycle's
// results are compared, one cycle after the requests were registered, with the
// reference model; each mechanism must have occurred at least once.
`timescale 1ns / 1ps
module rf4r4w_tb;
  import rf_pkg::*;
  import rf_ref_pkg::*;

  localparam int NCYC = 3000;

  logic clk = 0, rst_n = 0;
  logic [NUM_BANKS-1:0] cen;
  logic dual_slot;
  req_t              rd_req  [NUM_PORTS][NUM_SLOTS];
  req_t              wr_req  [NUM_PORTS][NUM_SLOTS];
  logic [DATA_W-1:0] wr_data [NUM_PORTS][NUM_SLOTS];
  logic [DATA_W-1:0] rd_data [NUM_PORTS][NUM_SLOTS];
  logic rd_valid [NUM_PORTS][NUM_SLOTS], rd_conflict [NUM_PORTS][NUM_SLOTS];
  logic wr_done [NUM_PORTS][NUM_SLOTS], wr_conflict [NUM_PORTS][NUM_SLOTS];
  logic wr_dropped [NUM_PORTS][NUM_SLOTS];
  logic [1:0] wchange [NUM_BANKS];
  dscs_state_e dscs_state [NUM_BANKS][2];
  logic [PHYS_COLS-1:0] neg_cap1 [NUM_BANKS][NUM_SLOTS], neg_cap2 [NUM_BANKS][NUM_SLOTS];

  rf4r4w dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, data_checks = 0, pushed = 0;
  rf_model    model;
  rf_expect_t exp_q [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  task automatic compare(input rf_expect_t e);
    for (int p = 0; p < NUM_PORTS; p++)
      for (int s = 0; s < NUM_SLOTS; s++) begin
        check(rd_valid[p][s] == e.rd_valid[p][s], $sformatf("rd_valid p%0d s%0d", p, s));
        check(rd_conflict[p][s] == e.rd_conflict[p][s], $sformatf("rd_conflict p%0d s%0d", p, s));
        check(wr_done[p][s] == e.wr_done[p][s], $sformatf("wr_done p%0d s%0d", p, s));
        check(wr_conflict[p][s] == e.wr_conflict[p][s], $sformatf("wr_conflict p%0d s%0d", p, s));
        check(wr_dropped[p][s] == e.wr_dropped[p][s], $sformatf("wr_dropped p%0d s%0d", p, s));
        if (e.rd_chk[p][s] && e.rd_valid[p][s])
          begin data_checks++; check(rd_data[p][s] == e.rd_data[p][s],
                $sformatf("rd_data p%0d s%0d got %h exp %h", p, s, rd_data[p][s], e.rd_data[p][s])); end
      end
    for (int b = 0; b < NUM_BANKS; b++) begin
      check(wchange[b] == e.wchange[b], $sformatf("wchange bank %0d", b));
      for (int a = 0; a < 2; a++)
        check(int'(dscs_state[b][a]) == e.state[b][a], $sformatf("dscs state bank %0d ab %0d", b, a));
    end
  endtask

  // drive one cycle of requests, record what must come back, and compare the
  // results of the requests issued one cycle earlier
  task automatic tick();
    rf_expect_t e;
    model.step(rd_req, wr_req, wr_data, cen, dual_slot, e);
    foreach (e.rd_chk[p, s]) if (e.rd_chk[p][s] && e.rd_valid[p][s]) pushed++;
    exp_q.push_back(e);
    @(negedge clk);
    if (exp_q.size() >= 2) compare(exp_q.pop_front());
  endtask

  function automatic req_t rnd_req(int pct_en, int narrow);
    req_t r;
    r.en           = ($urandom_range(99) < pct_en);
    r.addr.bank    = 1'($urandom);
    r.addr.ab      = 1'($urandom);
    r.addr.loc.thread = narrow ? 2'($urandom_range(1) * 2) : 2'($urandom);
    r.addr.loc.rnum   = narrow ? 3'($urandom_range(1)) : 3'($urandom);
    return r;
  endfunction

  task automatic idle_inputs();
    for (int p = 0; p < NUM_PORTS; p++)
      for (int s = 0; s < NUM_SLOTS; s++) begin
        rd_req[p][s] = '0; wr_req[p][s] = '0; wr_data[p][s] = '0;
      end
  endtask

  initial begin
    #(20 * NCYC + 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = new();
    cen = '1; dual_slot = 1;
    idle_inputs();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill: port p writes bank p[1], intra-port p[0]; 8 words per cycle
    for (int i = 0; i < 8; i++) begin
      idle_inputs();
      for (int p = 0; p < NUM_PORTS; p++)
        for (int s = 0; s < NUM_SLOTS; s++) begin
          wr_req[p][s].en = 1;
          wr_req[p][s].addr.bank = p[1];
          wr_req[p][s].addr.ab = p[0];
          wr_req[p][s].addr.loc.thread = 2'(p[0] * 2 + s);
          wr_req[p][s].addr.loc.rnum = 3'(i);
          wr_data[p][s] = $urandom;
        end
      tick();
    end
    // random traffic
    for (int i = 0; i < NCYC; i++) begin
      int narrow;
      narrow = (i % 400) < 300;
      dual_slot = !((i % 500) >= 450);
      cen = ((i % 300) >= 280) ? 2'($urandom) : '1;
      for (int p = 0; p < NUM_PORTS; p++)
        for (int s = 0; s < NUM_SLOTS; s++) begin
          rd_req[p][s]  = rnd_req(60, narrow);
          wr_req[p][s]  = rnd_req(50, narrow);
          wr_data[p][s] = $urandom;
        end
      tick();
    end
    idle_inputs();
    cen = '1;
    dual_slot = 1;
    repeat (2) tick();
    // every mechanism must have happened
    check(model.n_rd_l1_conflict > 0, "no read port conflict");
    check(model.n_wr_l1_conflict > 0, "no write port conflict");
    check(model.n_case5_drop > 0, "no S1 write dropped (case 5)");
    check(model.n_switch_ok > 0, "no successful slot switch (case 2)");
    check(model.n_switch_fail > 0, "no failed slot switch (case 3)");
    check(model.n_case4_drop > 0, "no single-slot drop (case 4)");
    check(model.n_ab_collision > 0, "no A/B write collision");
    check(model.n_sleep_ignored > 0, "no request to a sleeping bank");
    check(model.n_single_slot > 0, "no single-slot mode");
    check(model.n_sub0_read > 0 && model.n_sub1_read > 0, "both subcells not read");
    check(model.n_s1_sees_s0 > 0, "no S1 read after S0 write");
    $display("data checks: %0d pushed %0d", data_checks, pushed);
    $display("mechanisms: rdL1=%0d wrL1=%0d case5=%0d switch_ok=%0d switch_fail=%0d case4=%0d ab=%0d sleep=%0d single=%0d s1_after_s0=%0d",
             model.n_rd_l1_conflict, model.n_wr_l1_conflict, model.n_case5_drop, model.n_switch_ok,
             model.n_switch_fail, model.n_case4_drop, model.n_ab_collision, model.n_sleep_ignored,
             model.n_single_slot, model.n_s1_sees_s0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
