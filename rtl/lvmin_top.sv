// lvmin_top: the two low-voltage multi-port memories of this design, side by side.
//
//   * rf4r4w   - 2 Kbit 4R4W four-thread register file: two 2R2W banks, two-level
//                conflict detection with data slot switching, two slots per cycle.
//   * sram2r2w - 8 Kbit 2R2W multi-port SRAM with 8:1 bit interleaving and
//                read-over-write conflict detection.
//   * rf_slot_timer - behavioural model of the register file's replica-timed
//                double-pump pulses, run from the same clock, for observing slot
//                timing in simulation (it drives no logic).
// The two memories are independent macros; they share only clock and reset. All
// their ports are brought out unchanged (SRAM ports prefixed sram_). See each
// module for its interface and timing.
module lvmin_top
  import rf_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // ---- 4R4W register file
  input  logic [NUM_BANKS-1:0] rf_cen,
  input  logic                 rf_dual_slot,
  input  req_t                 rf_rd_req      [NUM_PORTS][NUM_SLOTS],
  input  req_t                 rf_wr_req      [NUM_PORTS][NUM_SLOTS],
  input  logic [DATA_W-1:0]    rf_wr_data     [NUM_PORTS][NUM_SLOTS],
  output logic [DATA_W-1:0]    rf_rd_data     [NUM_PORTS][NUM_SLOTS],
  output logic                 rf_rd_valid    [NUM_PORTS][NUM_SLOTS],
  output logic                 rf_rd_conflict [NUM_PORTS][NUM_SLOTS],
  output logic                 rf_wr_done     [NUM_PORTS][NUM_SLOTS],
  output logic                 rf_wr_conflict [NUM_PORTS][NUM_SLOTS],
  output logic                 rf_wr_dropped  [NUM_PORTS][NUM_SLOTS],
  output logic [1:0]           rf_wchange     [NUM_BANKS],
  output dscs_state_e          rf_dscs_state  [NUM_BANKS][2],
  output logic [PHYS_COLS-1:0] rf_neg_cap1    [NUM_BANKS][NUM_SLOTS],
  output logic [PHYS_COLS-1:0] rf_neg_cap2    [NUM_BANKS][NUM_SLOTS],
  // replica slot timing (behavioural)
  output logic                 rf_reset_sig,
  output logic                 rf_r_wp,
  output logic                 rf_r_w_ok,
  output logic                 rf_ts1,
  output logic                 rf_ts2,
  output logic                 rf_slot,
  output int                   rf_slot_overruns,
  // ---- 2R2W SRAM
  input  logic                 sram_cen,
  input  logic                 sram_ren_a,
  input  sram_pkg::saddr_t     sram_radd_a,
  input  logic                 sram_ren_b,
  input  sram_pkg::saddr_t     sram_radd_b,
  input  logic                 sram_wen_a,
  input  sram_pkg::saddr_t     sram_wadd_a,
  input  logic [sram_pkg::DATA_W-1:0] sram_din_a,
  input  logic                 sram_wen_b,
  input  sram_pkg::saddr_t     sram_wadd_b,
  input  logic [sram_pkg::DATA_W-1:0] sram_din_b,
  output logic [sram_pkg::DATA_W-1:0] sram_q_out_a,
  output logic [sram_pkg::DATA_W-1:0] sram_q_out_b,
  output logic                 sram_stall_a,
  output logic                 sram_stall_b,
  output logic [sram_pkg::DATA_W*sram_pkg::INTERLEAVE-1:0] sram_neg
);

  rf4r4w u_rf (
    .clk         (clk),
    .rst_n       (rst_n),
    .cen         (rf_cen),
    .dual_slot   (rf_dual_slot),
    .rd_req      (rf_rd_req),
    .wr_req      (rf_wr_req),
    .wr_data     (rf_wr_data),
    .rd_data     (rf_rd_data),
    .rd_valid    (rf_rd_valid),
    .rd_conflict (rf_rd_conflict),
    .wr_done     (rf_wr_done),
    .wr_conflict (rf_wr_conflict),
    .wr_dropped  (rf_wr_dropped),
    .wchange     (rf_wchange),
    .dscs_state  (rf_dscs_state),
    .neg_cap1    (rf_neg_cap1),
    .neg_cap2    (rf_neg_cap2)
  );

  rf_slot_timer u_slot_timer (
    .clk       (clk),
    .rst_n     (rst_n),
    .wen_s1    (rf_dual_slot),
    .reset_sig (rf_reset_sig),
    .r_wp      (rf_r_wp),
    .r_w_ok    (rf_r_w_ok),
    .ts1       (rf_ts1),
    .ts2       (rf_ts2),
    .slot      (rf_slot),
    .overruns  (rf_slot_overruns)
  );

  sram2r2w u_sram (
    .clk     (clk),
    .rst_n   (rst_n),
    .cen     (sram_cen),
    .ren_a   (sram_ren_a),
    .radd_a  (sram_radd_a),
    .ren_b   (sram_ren_b),
    .radd_b  (sram_radd_b),
    .wen_a   (sram_wen_a),
    .wadd_a  (sram_wadd_a),
    .din_a   (sram_din_a),
    .wen_b   (sram_wen_b),
    .wadd_b  (sram_wadd_b),
    .din_b   (sram_din_b),
    .q_out_a (sram_q_out_a),
    .q_out_b (sram_q_out_b),
    .stall_a (sram_stall_a),
    .stall_b (sram_stall_b),
    .neg     (sram_neg)
  );

endmodule
