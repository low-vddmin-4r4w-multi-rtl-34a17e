// rf4r4w: 2 Kbit, four-read four-write, four-thread register file built from two
// 2R2W banks and used twice per clock cycle (double pumping, slots S0 and S1).
//
// Each external port presents one request per slot: an enable and an address
// {bank, ab, thread, reg}. Port-count doubling comes from the two banks: the bank
// bit and the A/B bit route a port to one of the four intra-ports (2 banks x A/B).
// Conflicts are resolved in two levels:
//   1. Before the clock edge, rf_port_arbiter (one per direction and slot) grants
//      each intra-port to the highest-priority requesting port (Port0 > Port1 >
//      Port2 > Port3); the losers get a conflict flag. Grants are stored at the edge.
//   2. During the next cycle each bank (rf_bank) compares write and read words, keeps
//      the read and switches or drops the write (data slot conflict switch).
// Reads in S1 see the writes of S0. With dual_slot low only S0 is used (low-power
// single-access mode); S1 requests are ignored.
//
// Timing: requests, write data and CEN are sampled at rising edge k (cycle k-1
// presents them); read data and all status flags are valid after edge k+1, for one cycle.
// Results are reported per external port and requested slot.
//
// Follows the document: sizes, two banks of 2R2W, two-level conflict detection,
// priority order, read-over-write, slot switch, one/two slot mode, bank enables
// CEN0/CEN1, four threads read through the column thread switch. This design's own:
// the address layout, the flag outputs, the cycle-level (not self-timed) slots.
//
// Some outputs of the sub-blocks are left unconnected on purpose: the arbiters'
// per-port grant flags and the read arbiters' one-bit payload (the source port
// already travels with each grant), and the banks' wdone (write results are reported
// per requested slot from the registered grants and the banks' wdrop).
module rf4r4w
  import rf_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_BANKS-1:0] cen,          // bank enable; low = bank sleeps
  input  logic                 dual_slot,    // 1: S0 and S1 per cycle, 0: S0 only
  input  req_t                 rd_req      [NUM_PORTS][NUM_SLOTS],
  input  req_t                 wr_req      [NUM_PORTS][NUM_SLOTS],
  input  logic [DATA_W-1:0]    wr_data     [NUM_PORTS][NUM_SLOTS],
  output logic [DATA_W-1:0]    rd_data     [NUM_PORTS][NUM_SLOTS],
  output logic                 rd_valid    [NUM_PORTS][NUM_SLOTS],
  output logic                 rd_conflict [NUM_PORTS][NUM_SLOTS],  // lost level 1
  output logic                 wr_done     [NUM_PORTS][NUM_SLOTS],
  output logic                 wr_conflict [NUM_PORTS][NUM_SLOTS],  // lost level 1
  output logic                 wr_dropped  [NUM_PORTS][NUM_SLOTS],  // lost level 2
  output logic [1:0]           wchange     [NUM_BANKS],             // per A/B
  output dscs_state_e          dscs_state  [NUM_BANKS][2],
  output logic [PHYS_COLS-1:0] neg_cap1    [NUM_BANKS][NUM_SLOTS],
  output logic [PHYS_COLS-1:0] neg_cap2    [NUM_BANKS][NUM_SLOTS]
);

  localparam int NI = NUM_BANKS * 2;

  // ---- level 1: port arbitration, one arbiter per direction and slot
  req_t              rq_in [NUM_SLOTS][NUM_PORTS];
  req_t              wq_in [NUM_SLOTS][NUM_PORTS];
  logic [DATA_W-1:0] wd_in [NUM_SLOTS][NUM_PORTS];
  logic [0:0]        rpay  [NUM_PORTS];
  ireq_t             r_ireq [NUM_SLOTS][NI];
  ireq_t             w_ireq [NUM_SLOTS][NI];
  logic [0:0]        r_ipay [NUM_SLOTS][NI];
  logic [DATA_W-1:0] w_ipay [NUM_SLOTS][NI];
  logic              r_cfl  [NUM_SLOTS][NUM_PORTS];
  logic              w_cfl  [NUM_SLOTS][NUM_PORTS];
  logic              r_gnt  [NUM_SLOTS][NUM_PORTS];
  logic              w_gnt  [NUM_SLOTS][NUM_PORTS];

  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      rpay[p] = 1'b0;
      for (int s = 0; s < NUM_SLOTS; s++) begin
        rq_in[s][p] = rd_req[p][s];
        wq_in[s][p] = wr_req[p][s];
        wd_in[s][p] = wr_data[p][s];
        if (s != 0 && !dual_slot) begin
          rq_in[s][p].en = 1'b0;
          wq_in[s][p].en = 1'b0;
        end
      end
    end
  end

  for (genvar s = 0; s < NUM_SLOTS; s++) begin : g_arb
    rf_port_arbiter #(.PAY_W(1)) u_rarb (
      .clk (clk), .rst_n (rst_n),
      .req (rq_in[s]), .pay (rpay),
      .ireq (r_ireq[s]), .ipay (r_ipay[s]),
      .conflict (r_cfl[s]), .granted (r_gnt[s])
    );
    rf_port_arbiter #(.PAY_W(DATA_W)) u_warb (
      .clk (clk), .rst_n (rst_n),
      .req (wq_in[s]), .pay (wd_in[s]),
      .ireq (w_ireq[s]), .ipay (w_ipay[s]),
      .conflict (w_cfl[s]), .granted (w_gnt[s])
    );
  end

  // ---- bank enables travel with the requests they apply to
  logic [NUM_BANKS-1:0] cen_s;

  always_ff @(posedge clk) begin
    if (!rst_n) cen_s <= '0;
    else        cen_s <= cen;
  end

  // ---- level 2 and storage: the banks
  ireq_t             b_rreq  [NUM_BANKS][NUM_SLOTS][2];
  ireq_t             b_wreq  [NUM_BANKS][NUM_SLOTS][2];
  logic [DATA_W-1:0] b_wdata [NUM_BANKS][NUM_SLOTS][2];
  logic [DATA_W-1:0] b_rdata [NUM_BANKS][NUM_SLOTS][2];
  ireq_t             b_rdone [NUM_BANKS][NUM_SLOTS][2];
  ireq_t             b_wdone [NUM_BANKS][NUM_SLOTS][2];
  logic              b_wdrop [NUM_BANKS][NUM_SLOTS][2];

  always_comb begin
    for (int b = 0; b < NUM_BANKS; b++)
      for (int s = 0; s < NUM_SLOTS; s++)
        for (int p = 0; p < 2; p++) begin
          b_rreq[b][s][p]  = r_ireq[s][b*2+p];
          b_wreq[b][s][p]  = w_ireq[s][b*2+p];
          b_wdata[b][s][p] = w_ipay[s][b*2+p];
        end
  end

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    rf_bank u_bank (
      .clk      (clk),
      .rst_n    (rst_n),
      .cen      (cen_s[b]),
      .rreq     (b_rreq[b]),
      .wreq     (b_wreq[b]),
      .wdata    (b_wdata[b]),
      .rdata    (b_rdata[b]),
      .rdone    (b_rdone[b]),
      .wdone    (b_wdone[b]),
      .wdrop    (b_wdrop[b]),
      .wchange  (wchange[b]),
      .dstate   (dscs_state[b]),
      .neg_cap1 (neg_cap1[b]),
      .neg_cap2 (neg_cap2[b])
    );
  end

  // ---- second register stage for the status that must line up with the bank results
  ireq_t             w_ireq_q [NUM_SLOTS][NI];
  logic              r_cfl_q  [NUM_SLOTS][NUM_PORTS];
  logic              w_cfl_q  [NUM_SLOTS][NUM_PORTS];
  logic [NUM_BANKS-1:0] cen_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_SLOTS; s++) begin
        for (int i = 0; i < NI; i++) w_ireq_q[s][i] <= '0;
        for (int p = 0; p < NUM_PORTS; p++) begin
          r_cfl_q[s][p] <= 1'b0;
          w_cfl_q[s][p] <= 1'b0;
        end
      end
      cen_q <= '0;
    end else begin
      w_ireq_q <= w_ireq;
      r_cfl_q  <= r_cfl;
      w_cfl_q  <= w_cfl;
      cen_q    <= cen_s;
    end
  end

  // ---- route results back to the external ports
  always_comb begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      for (int s = 0; s < NUM_SLOTS; s++) begin
        rd_data[p][s]     = '0;
        rd_valid[p][s]    = 1'b0;
        wr_done[p][s]     = 1'b0;
        wr_dropped[p][s]  = 1'b0;
        rd_conflict[p][s] = r_cfl_q[s][p];
        wr_conflict[p][s] = w_cfl_q[s][p];
      end
    end
    for (int b = 0; b < NUM_BANKS; b++) begin
      for (int s = 0; s < NUM_SLOTS; s++) begin
        for (int i = 0; i < 2; i++) begin
          if (b_rdone[b][s][i].en) begin
            rd_data[b_rdone[b][s][i].src][s]  = b_rdata[b][s][i];
            rd_valid[b_rdone[b][s][i].src][s] = 1'b1;
          end
          if (w_ireq_q[s][b*2+i].en && cen_q[b]) begin
            wr_done[w_ireq_q[s][b*2+i].src][s]    = !b_wdrop[b][s][i];
            wr_dropped[w_ireq_q[s][b*2+i].src][s] = b_wdrop[b][s][i];
          end
        end
      end
    end
  end

endmodule
