// rf_bank: one 1 Kbit, 2R2W, double-pumped bank of the 4R4W register file.
//
// Works on the intra-port requests that the first-level arbiters stored at the last
// clock edge (reads and writes of intra-ports A and B, for slots S0 and S1):
//   * CEN low puts the bank to sleep: every request to it is ignored.
//   * Each write intra-port has its own data slot conflict switch (rf_dscs), which
//     gives reads priority over writes to the same word and trades the S0 and S1
//     writes when that avoids the conflict.
//   * Should A and B still write the same word in the same slot, A is kept and B is
//     dropped (the cell would otherwise be left in an unknown state).
//   * rf_neg_vvss_ctrl derives the negative-VVSS capacitor enables of each slot.
//   * rf_bank_array performs slot S0, then slot S1.
// At the next rising edge the read data, the write outcome and the DSCS state are
// stored (the read output latch), so results appear one cycle after the requests
// were registered. Write outcomes are reported per requested slot.
//
// Follows the document: bank enable CEN with sleep, second-level detection inside
// the bank, read priority, slot switch, write assist control, two slots per cycle.
// This design's choices: the A-over-B rule for equal write words, a synchronous
// active-low reset of the output registers, registered (not latched) outputs.
module rf_bank
  import rf_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cen,
  input  ireq_t                rreq     [NUM_SLOTS][2],
  input  ireq_t                wreq     [NUM_SLOTS][2],
  input  logic [DATA_W-1:0]    wdata    [NUM_SLOTS][2],
  // registered results, [slot][A/B]
  output logic [DATA_W-1:0]    rdata    [NUM_SLOTS][2],
  output ireq_t                rdone    [NUM_SLOTS][2],   // read that was performed
  output ireq_t                wdone    [NUM_SLOTS][2],   // write that was performed
  output logic                 wdrop    [NUM_SLOTS][2],   // requested write dropped
  output logic [1:0]           wchange,                   // per write intra-port
  output dscs_state_e          dstate   [2],
  // write-assist enables, combinational, per slot
  output logic [PHYS_COLS-1:0] neg_cap1 [NUM_SLOTS],
  output logic [PHYS_COLS-1:0] neg_cap2 [NUM_SLOTS]
);

  ireq_t              rq   [NUM_SLOTS][2];
  ireq_t              wq   [NUM_SLOTS][2];
  ireq_t              wsw  [2][NUM_SLOTS];   // [A/B][slot], after the switch
  logic [DATA_W-1:0]  wdsw [2][NUM_SLOTS];
  logic               drp  [2][NUM_SLOTS];   // [A/B][requested slot]
  logic               wchg [2];
  dscs_state_e        dst  [2];
  ireq_t              wiss [NUM_SLOTS][2];   // writes issued to the array
  logic [DATA_W-1:0]  wdis [NUM_SLOTS][2];
  logic               drop_b [NUM_SLOTS];    // B write of issued slot lost to A
  logic [DATA_W-1:0]  rd   [NUM_SLOTS][2];

  // sleep gating
  always_comb begin
    for (int s = 0; s < NUM_SLOTS; s++) begin
      for (int p = 0; p < 2; p++) begin
        rq[s][p]    = rreq[s][p];
        wq[s][p]    = wreq[s][p];
        rq[s][p].en = rreq[s][p].en && cen;
        wq[s][p].en = wreq[s][p].en && cen;
      end
    end
  end

  for (genvar p = 0; p < 2; p++) begin : g_dscs
    rf_dscs u_dscs (
      .w       ('{wq[0][p], wq[1][p]}),
      .wd      ('{wdata[0][p], wdata[1][p]}),
      .rd      (rq),
      .wo      (wsw[p]),
      .wdo     (wdsw[p]),
      .dropped (drp[p]),
      .wchange (wchg[p]),
      .state   (dst[p])
    );
  end

  // A and B on the same word in the same slot: A wins
  always_comb begin
    for (int s = 0; s < NUM_SLOTS; s++) begin
      drop_b[s]  = wsw[0][s].en && wsw[1][s].en && (wsw[0][s].loc == wsw[1][s].loc);
      wiss[s][0] = wsw[0][s];
      wiss[s][1] = wsw[1][s];
      wdis[s][0] = wdsw[0][s];
      wdis[s][1] = wdsw[1][s];
      if (drop_b[s]) wiss[s][1] = '0;
    end
  end

  for (genvar s = 0; s < NUM_SLOTS; s++) begin : g_neg
    rf_neg_vvss_ctrl u_neg (
      .wa      (wiss[s][0]),
      .da      (wdis[s][0]),
      .wb      (wiss[s][1]),
      .db      (wdis[s][1]),
      .cap1_en (neg_cap1[s]),
      .cap2_en (neg_cap2[s])
    );
  end

  rf_bank_array u_array (
    .clk   (clk),
    .rreq  (rq),
    .rdata (rd),
    .wreq  (wiss),
    .wdata (wdis)
  );

  // output latch stage
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_SLOTS; s++) begin
        for (int p = 0; p < 2; p++) begin
          rdata[s][p] <= '0;
          rdone[s][p] <= '0;
          wdone[s][p] <= '0;
          wdrop[s][p] <= 1'b0;
        end
      end
      wchange <= '0;
      dstate  <= '{DSCS_S0, DSCS_S0};
    end else begin
      for (int s = 0; s < NUM_SLOTS; s++) begin
        for (int p = 0; p < 2; p++) begin
          rdata[s][p] <= rd[s][p];
          rdone[s][p] <= rq[s][p];
          wdone[s][p] <= wiss[s][p];
        end
        wdrop[s][0] <= drp[0][s];
        // B's requested slot is the issued slot unless B's writes were switched
        wdrop[s][1] <= drp[1][s] || (wchg[1] ? drop_b[1-s] : drop_b[s]);
      end
      wchange <= {wchg[1], wchg[0]};
      dstate  <= dst;
    end
  end

  // a write must never meet a read of the same word in the same slot
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < NUM_SLOTS; s++)
        for (int w = 0; w < 2; w++)
          for (int r = 0; r < 2; r++)
            assert (!(wiss[s][w].en && rq[s][r].en && wiss[s][w].loc == rq[s][r].loc))
              else $error("read/write conflict reached the array in slot %0d", s);
    end
  end

endmodule
