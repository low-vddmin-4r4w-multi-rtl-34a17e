// rf_ref_pkg: cycle-level reference model of the 4R4W register file, for testbenches.
//
// Written independently of the RTL: storage is a plain [bank][thread][register]
// array with no interleaving or subcells. One call of step() takes the requests of
// one cycle and returns what the register file must report for them one cycle after
// they are registered. It counts how often each conflict mechanism occurred.
package rf_ref_pkg;
  import rf_pkg::*;

  typedef struct {
    logic              rd_valid    [NUM_PORTS][NUM_SLOTS];
    logic [DATA_W-1:0] rd_data     [NUM_PORTS][NUM_SLOTS];
    logic              rd_conflict [NUM_PORTS][NUM_SLOTS];
    logic              wr_done     [NUM_PORTS][NUM_SLOTS];
    logic              wr_conflict [NUM_PORTS][NUM_SLOTS];
    logic              wr_dropped  [NUM_PORTS][NUM_SLOTS];
    logic [1:0]        wchange     [NUM_BANKS];
    int                state       [NUM_BANKS][2];   // 0 = S0, 2 = S2, 3 = S3
    logic              rd_chk      [NUM_PORTS][NUM_SLOTS];  // read word is known
  } rf_expect_t;

  class rf_model;
    logic [DATA_W-1:0] mem [NUM_BANKS][NUM_THREADS][2**REG_W];
    bit                known [NUM_BANKS][NUM_THREADS][2**REG_W];
    // mechanism counters
    int n_rd_l1_conflict, n_wr_l1_conflict, n_case5_drop, n_switch_ok, n_switch_fail;
    int n_case4_drop, n_ab_collision, n_sleep_ignored, n_single_slot, n_sub1_read;
    int n_sub0_read, n_s1_sees_s0;

    function new();
      foreach (known[b, t, r]) known[b][t][r] = 0;
    endfunction

    // true if a known word matches; unknown words (never written) are not compared
    function bit rd_known(int b, int t, int r);
      return known[b][t][r];
    endfunction

    function void step(input req_t rd [NUM_PORTS][NUM_SLOTS],
                       input req_t wr [NUM_PORTS][NUM_SLOTS],
                       input logic [DATA_W-1:0] wd [NUM_PORTS][NUM_SLOTS],
                       input logic [NUM_BANKS-1:0] cen, input logic dual,
                       output rf_expect_t e);
      // owner[slot][bank][ab] = port number, -1 for none
      int rown [NUM_SLOTS][NUM_BANKS][2];
      int wown [NUM_SLOTS][NUM_BANKS][2];
      int iss  [NUM_SLOTS][NUM_BANKS][2];   // port whose write is issued in slot, -1
      int issrq[NUM_SLOTS][NUM_BANKS][2];   // its requested slot
      bit s1_written [NUM_BANKS][NUM_THREADS][2**REG_W];

      foreach (e.rd_valid[p, s]) begin
        e.rd_valid[p][s] = 0; e.rd_data[p][s] = '0; e.rd_conflict[p][s] = 0;
        e.wr_done[p][s] = 0; e.wr_conflict[p][s] = 0; e.wr_dropped[p][s] = 0;
        e.rd_chk[p][s] = 0;
      end
      foreach (s1_written[b, t, r]) s1_written[b][t][r] = 0;
      for (int s = 0; s < NUM_SLOTS; s++)
        for (int b = 0; b < NUM_BANKS; b++)
          for (int a = 0; a < 2; a++) begin
            rown[s][b][a] = -1; wown[s][b][a] = -1; iss[s][b][a] = -1; issrq[s][b][a] = -1;
          end
      if (!dual) begin
        for (int p = 0; p < NUM_PORTS; p++)
          if (rd[p][1].en || wr[p][1].en) n_single_slot++;
      end

      // level 1: fixed priority, port 0 highest
      for (int s = 0; s < NUM_SLOTS; s++) begin
        if (s == 1 && !dual) continue;
        for (int p = 0; p < NUM_PORTS; p++) begin
          if (rd[p][s].en) begin
            if (rown[s][rd[p][s].addr.bank][rd[p][s].addr.ab] < 0)
              rown[s][rd[p][s].addr.bank][rd[p][s].addr.ab] = p;
            else begin
              e.rd_conflict[p][s] = 1; n_rd_l1_conflict++;
            end
          end
          if (wr[p][s].en) begin
            if (wown[s][wr[p][s].addr.bank][wr[p][s].addr.ab] < 0)
              wown[s][wr[p][s].addr.bank][wr[p][s].addr.ab] = p;
            else begin
              e.wr_conflict[p][s] = 1; n_wr_l1_conflict++;
            end
          end
        end
      end

      // level 2, per bank
      for (int b = 0; b < NUM_BANKS; b++) begin
        e.wchange[b] = 2'b00;
        e.state[b][0] = 0; e.state[b][1] = 0;
        if (!cen[b]) begin
          for (int s = 0; s < NUM_SLOTS; s++)
            for (int a = 0; a < 2; a++)
              if (rown[s][b][a] >= 0 || wown[s][b][a] >= 0) n_sleep_ignored++;
          continue;
        end
        for (int a = 0; a < 2; a++) begin
          int w0, w1;
          bit c0, c1, c0s, c1s;
          w0 = wown[0][b][a]; w1 = wown[1][b][a];
          c0  = (w0 >= 0) && read_hits(rd, rown, 0, b, wr[w0 < 0 ? 0 : w0][0].addr.loc);
          c1  = (w1 >= 0) && read_hits(rd, rown, 1, b, wr[w1 < 0 ? 0 : w1][1].addr.loc);
          c0s = (w1 >= 0) && read_hits(rd, rown, 0, b, wr[w1 < 0 ? 0 : w1][1].addr.loc);
          c1s = (w0 >= 0) && read_hits(rd, rown, 1, b, wr[w0 < 0 ? 0 : w0][0].addr.loc);
          if (!c0) begin
            if (w0 >= 0) begin iss[0][b][a] = w0; issrq[0][b][a] = 0; end
            if (w1 >= 0 && !c1) begin iss[1][b][a] = w1; issrq[1][b][a] = 1; end
            if (w1 >= 0 && c1) begin e.wr_dropped[w1][1] = 1; n_case5_drop++; end
          end else if (w1 < 0) begin
            e.wr_dropped[w0][0] = 1; e.state[b][a] = 3; n_case4_drop++;
          end else begin
            e.wchange[b][a] = 1'b1;
            if (!c0s && !c1s) begin
              iss[0][b][a] = w1; issrq[0][b][a] = 1;
              iss[1][b][a] = w0; issrq[1][b][a] = 0;
              e.state[b][a] = 2; n_switch_ok++;
            end else begin
              e.wr_dropped[w0][0] = 1; e.wr_dropped[w1][1] = 1;
              e.state[b][a] = 3; n_switch_fail++;
            end
          end
        end
        // A and B writing one word in one slot: B loses
        for (int s = 0; s < NUM_SLOTS; s++) begin
          if (iss[s][b][0] >= 0 && iss[s][b][1] >= 0 &&
              wr[iss[s][b][0]][issrq[s][b][0]].addr.loc == wr[iss[s][b][1]][issrq[s][b][1]].addr.loc) begin
            e.wr_dropped[iss[s][b][1]][issrq[s][b][1]] = 1;
            iss[s][b][1] = -1;
            n_ab_collision++;
          end
        end
      end

      // reads and writes, slot by slot
      for (int s = 0; s < NUM_SLOTS; s++) begin
        for (int b = 0; b < NUM_BANKS; b++) begin
          if (!cen[b]) continue;
          for (int a = 0; a < 2; a++) begin
            int p;
            p = rown[s][b][a];
            if (p >= 0) begin
              e.rd_valid[p][s] = 1;
              e.rd_data[p][s]  = mem[b][rd[p][s].addr.loc.thread][rd[p][s].addr.loc.rnum];
              e.rd_chk[p][s]   = known[b][rd[p][s].addr.loc.thread][rd[p][s].addr.loc.rnum];
              if (rd[p][s].addr.loc.thread[1]) n_sub1_read++; else n_sub0_read++;
              if (s == 1 && s1_written[b][rd[p][s].addr.loc.thread][rd[p][s].addr.loc.rnum])
                n_s1_sees_s0++;
            end
          end
          for (int a = 0; a < 2; a++) begin
            int p, q;
            p = iss[s][b][a]; q = issrq[s][b][a];
            if (p >= 0) begin
              mem[b][wr[p][q].addr.loc.thread][wr[p][q].addr.loc.rnum] = wd[p][q];
              known[b][wr[p][q].addr.loc.thread][wr[p][q].addr.loc.rnum] = 1;
              if (s == 0) s1_written[b][wr[p][q].addr.loc.thread][wr[p][q].addr.loc.rnum] = 1;
            end
          end
        end
      end
      for (int p = 0; p < NUM_PORTS; p++)
        for (int s = 0; s < NUM_SLOTS; s++)
          if (wr[p][s].en && !e.wr_conflict[p][s] && !(s == 1 && !dual) && cen[wr[p][s].addr.bank])
            e.wr_done[p][s] = !e.wr_dropped[p][s];
    endfunction

    function bit read_hits(input req_t rd [NUM_PORTS][NUM_SLOTS], input int rown [NUM_SLOTS][NUM_BANKS][2],
                           int s, int b, baddr_t loc);
      for (int a = 0; a < 2; a++)
        if (rown[s][b][a] >= 0 && rd[rown[s][b][a]][s].addr.loc == loc) return 1;
      return 0;
    endfunction
  endclass

endpackage
