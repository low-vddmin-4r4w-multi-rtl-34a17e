// rf_slot_timer: behavioural model (not synthesizable) of the replica-timed double-pump
// slot control of one register-file port.
//
// In silicon the two access slots of a clock cycle are timed by a replica bit line,
// not by a faster clock: at the rising clock edge a short Reset_Sig pulse clears the
// slot flags and the replica word-line pulse R_WP starts slot S0. When the replica
// column has completed its worst-case access it returns R_W_OK, which sets TS1
// (slot S0 finished) and ends R_WP. If a second access is enabled (wen_s1), R_WP
// starts again after a short gap, so slot S1 begins only after S0 has finished (a
// write of S1 thus never overlaps the read of S0); its R_W_OK raises TS2 (slot S1
// finished) and ends R_WP. With wen_s1 low only S0 runs, saving the second pulse.
// The replica delay, R_W_OK width, gap and reset-pulse width are parameters standing
// for the analog delays. The clock period must exceed the whole sequence; an edge
// arriving earlier is counted in overruns.
//
// Follows the document: the signal names, R_WP rising at the clock edge, R_W_OK
// closing R_WP and setting TS1/TS2, the gap before the second pulse, S1 waiting for
// S0 and skipped when WEN_S1 is 0. The delay values are this model's own.
`timescale 1ns / 1ps
module rf_slot_timer #(
  parameter realtime T_RST     = 0.2ns,   // Reset_Sig pulse width
  parameter realtime T_REPLICA = 1.5ns,   // replica access time
  parameter realtime T_OK      = 0.2ns,   // R_W_OK pulse width
  parameter realtime T_GAP     = 0.3ns    // wait before the second pulse
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wen_s1,      // second slot used this cycle
  output logic reset_sig,
  output logic r_wp,        // replica / word-line pulse
  output logic r_w_ok,      // replica access finished
  output logic ts1,         // slot S0 finished
  output logic ts2,         // slot S1 finished
  output logic slot,        // slot of the current R_WP pulse
  output int   overruns
);

  logic busy;

  initial begin
    reset_sig = 1'b0;
    r_wp      = 1'b0;
    r_w_ok    = 1'b0;
    ts1       = 1'b0;
    ts2       = 1'b0;
    slot      = 1'b0;
    busy      = 1'b0;
    overruns  = 0;
  end

  // one slot sequence, started by a clock edge
  task automatic run_slots();
    busy      = 1'b1;
    reset_sig = 1'b1;
    ts1       = 1'b0;
    ts2       = 1'b0;
    // slot S0
    slot      = 1'b0;
    r_wp      = 1'b1;
    #(T_RST) reset_sig = 1'b0;
    #(T_REPLICA - T_RST) r_w_ok = 1'b1;
    ts1       = 1'b1;
    r_wp      = 1'b0;
    #(T_OK) r_w_ok = 1'b0;
    // slot S1, only after S0 has finished
    if (wen_s1) begin
      #(T_GAP) slot = 1'b1;
      r_wp      = 1'b1;
      #(T_REPLICA) r_w_ok = 1'b1;
      ts2       = 1'b1;
      r_wp      = 1'b0;
      #(T_OK) r_w_ok = 1'b0;
    end
    busy      = 1'b0;
  endtask

  // an edge that finds the previous sequence still running is an overrun and is
  // not served
  always @(posedge clk) begin
    if (busy)       overruns++;
    else if (rst_n) fork run_slots(); join_none
  end

endmodule
