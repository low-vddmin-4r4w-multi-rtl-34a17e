// rf_dscs: data slot conflict switch (second-level conflict detector) for one write
// intra-port of one register-file bank.
//
// Reads never disturb a cell and writes do, so a read always wins over a write to
// the same word in the same slot. The write of slot S0 is compared with the read
// addresses of both intra-ports (A and B) in S0:
//   * no conflict (FSM state S0): the S0 write goes out; the S1 write is compared
//     with the S1 reads and dropped if it conflicts (case 5), else it goes out.
//   * conflict, and an S1 write exists: WChange is raised and the two writes trade
//     slots (S1's write goes first, S0's second). Both are compared again with the
//     reads of their new slots. No conflict left: both writes succeed (state S2,
//     case 2). Conflict left: no write is issued this cycle (state S3, case 3).
//   * conflict, and no S1 write: there is nothing to trade with and the write is
//     dropped (case 4).
// The block is combinational: it works on the requests registered at the clock edge
// and its result is used within the same cycle, and WChange returns to 0 with each
// new cycle as the document's reset pulse does.
//
// Follows the document: read-over-write priority, comparing with both A and B read
// addresses, the slot switch, the four FSM states and the five cases. This design's
// choices: in state S3 both writes are dropped; a conflict in S0 without an S1 write
// is not moved to S1 (the document's case 4 drops it).
module rf_dscs
  import rf_pkg::*;
(
  input  ireq_t              w      [NUM_SLOTS],      // write requests, per slot
  input  logic [DATA_W-1:0]  wd     [NUM_SLOTS],
  input  ireq_t              rd     [NUM_SLOTS][2],   // reads of A and B, per slot
  output ireq_t              wo     [NUM_SLOTS],      // writes actually issued
  output logic [DATA_W-1:0]  wdo    [NUM_SLOTS],
  output logic               dropped[NUM_SLOTS],      // per requested slot
  output logic               wchange,
  output dscs_state_e        state
);

  function automatic logic hits(input ireq_t wr, input ireq_t r0, input ireq_t r1);
    return wr.en && ((r0.en && r0.loc == wr.loc) || (r1.en && r1.loc == wr.loc));
  endfunction

  logic c0, c1, c0_sw, c1_sw;

  assign c0    = hits(w[0], rd[0][0], rd[0][1]);
  assign c1    = hits(w[1], rd[1][0], rd[1][1]);
  assign c0_sw = hits(w[1], rd[0][0], rd[0][1]);   // S1's write placed in S0
  assign c1_sw = hits(w[0], rd[1][0], rd[1][1]);   // S0's write placed in S1

  always_comb begin
    wo[0]      = w[0];
    wo[1]      = w[1];
    wdo[0]     = wd[0];
    wdo[1]     = wd[1];
    dropped[0] = 1'b0;
    dropped[1] = 1'b0;
    wchange    = 1'b0;
    state      = DSCS_S0;
    if (!c0) begin
      if (c1) begin
        wo[1]      = '0;
        dropped[1] = 1'b1;
      end
    end else if (!w[1].en) begin
      wo[0]      = '0;
      dropped[0] = 1'b1;
      state      = DSCS_S3;
    end else begin
      wchange = 1'b1;
      if (!c0_sw && !c1_sw) begin
        wo[0]  = w[1];
        wo[1]  = w[0];
        wdo[0] = wd[1];
        wdo[1] = wd[0];
        state  = DSCS_S2;
      end else begin
        wo[0]      = '0;
        wo[1]      = '0;
        dropped[0] = 1'b1;
        dropped[1] = 1'b1;
        state      = DSCS_S3;
      end
    end
  end

endmodule
