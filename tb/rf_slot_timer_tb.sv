// rf_slot_timer_tb: checks the replica-timed slot sequence of the behavioural slot
// timer. For each clock edge it records when R_WP, R_W_OK, TS1 and TS2 rise and fall
// and compares the times with the expected sequence: R_WP at the edge, R_W_OK and TS1
// one replica delay later, the second R_WP only after R_W_OK has ended plus the gap,
// TS2 one replica delay after that, and nothing of slot S1 when WEN_S1 is low. A clock
// slower than the sequence must give no overrun; a faster one must be counted.
`timescale 1ns / 1ps
module rf_slot_timer_tb;
  localparam realtime T_RST = 0.2ns, T_REPLICA = 1.5ns, T_OK = 0.2ns, T_GAP = 0.3ns;
  localparam realtime EPS = 0.01ns;

  logic clk = 0, rst_n = 0, wen_s1 = 1;
  logic reset_sig, r_wp, r_w_ok, ts1, ts2, slot;
  int   overruns;
  bit fast = 0;

  rf_slot_timer dut (.*);

  always begin
    if (fast) #1.5ns; else #5ns;
    clk = ~clk;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $realtime, what); end
  endtask

  function automatic bit near(realtime a, realtime b);
    return (a - b < EPS) && (b - a < EPS);
  endfunction

  initial begin
    #2000ns; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // one clock cycle: wait for the edge, then follow the pulses
  task automatic one_cycle(input bit s1);
    realtime t0;
    wen_s1 = s1;
    @(posedge clk); t0 = $realtime;
    #(EPS);
    check(r_wp && reset_sig && !slot && !ts1 && !ts2, "R_WP and Reset_Sig at the edge");
    #(T_RST);
    check(!reset_sig, "Reset_Sig ended");
    @(posedge r_w_ok);
    check(near($realtime - t0, T_REPLICA), "R_W_OK after replica delay (S0)");
    #(EPS);
    check(ts1 && !ts2 && !r_wp, "TS1 set and R_WP ended");
    if (s1) begin
      @(posedge r_wp);
      check(!r_w_ok, "second R_WP after R_W_OK ended");
      check(near($realtime - t0, T_REPLICA + T_OK + T_GAP), "second R_WP after gap");
      check(slot && ts1 && !ts2, "slot S1 running");
      @(posedge ts2);
      check(near($realtime - t0, 2 * T_REPLICA + T_OK + T_GAP), "TS2 after replica delay (S1)");
      #(T_OK + EPS);
      check(!r_w_ok && !r_wp && ts1 && ts2, "both slots finished");
    end else begin
      #(T_OK + T_GAP + T_REPLICA + EPS);
      check(!r_wp && !ts2, "no S1 pulse when WEN_S1 is low");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1ns rst_n = 1;
    for (int i = 0; i < 20; i++) one_cycle(1'($urandom_range(1)));
    check(overruns == 0, "no overrun at a slow clock");
    // clock faster than two slots: the edges arrive while the sequence runs
    fast = 1;
    wen_s1 = 1;
    repeat (10) @(posedge clk);
    check(overruns > 0, "overrun counted at a fast clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
