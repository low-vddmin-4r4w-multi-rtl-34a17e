// rf_bank_array: storage of one 1 Kbit register-file bank, with two read and two
// write intra-ports (A and B) used in two slots per clock cycle.
//
// Organisation: two subcells per cell (subcell 0 for threads 0/1, subcell 1 for
// threads 2/3), 8 physical rows, 64 physical columns. A 32-bit word is 2:1
// bit-interleaved: bit b of the word in interleave column c sits in physical column
// 2*b+c. The word index in a subcell is {thread[0], reg}; its low bit is the
// interleave column, the rest the row.
//
// Read: a read port raises one read word line, and the row of both subcells appears
// on their separate read bit lines at once; the 2:1 column multiplexer takes the
// addressed word out of each subcell and rf_thread_switch hands on the subcell of the
// requested thread. Only the addressed columns are sensed, so there is no dummy read
// of the half-selected words. Write: the single-ended shared write bit line changes
// only the addressed interleave column of the addressed row (row select crossed with
// column select), leaving the other word of the row untouched without a read-back.
//
// Timing: reads are combinational from the stored state. Slot S0 happens before slot
// S1: the S1 reads see the S0 writes of the same cycle, and all writes of both slots
// are committed at the next rising clock edge. Within a slot the caller must not
// read and write the same word, nor write it from both A and B (the conflict
// detectors guarantee both). The array has no reset, like the SRAM it stands for.
module rf_bank_array
  import rf_pkg::*;
(
  input  logic              clk,
  input  ireq_t             rreq  [NUM_SLOTS][2],   // [slot][A/B]
  output logic [DATA_W-1:0] rdata [NUM_SLOTS][2],
  input  ireq_t             wreq  [NUM_SLOTS][2],
  input  logic [DATA_W-1:0] wdata [NUM_SLOTS][2]
);

  logic [PHYS_COLS-1:0] mem    [NUM_SUBCELLS][ROWS];
  logic [PHYS_COLS-1:0] mem_s0 [NUM_SUBCELLS][ROWS];   // after the S0 writes
  logic [PHYS_COLS-1:0] mem_nx [NUM_SUBCELLS][ROWS];   // after the S1 writes

  // physical row and interleave column of a word: index {thread[0], reg}
  function automatic int row_of(input baddr_t a);
    return int'({a.thread[0], a.rnum}) / INTERLEAVE;
  endfunction

  function automatic int col_of(input baddr_t a);
    return int'({a.thread[0], a.rnum}) % INTERLEAVE;
  endfunction

  function automatic logic sub_of(input baddr_t a);
    return a.thread[THREAD_W-1];
  endfunction

  // slot S0 writes on a copy of the array, then slot S1 writes on top of them
  always_comb begin
    mem_s0 = mem;
    for (int p = 0; p < 2; p++)
      if (wreq[0][p].en)
        for (int b = 0; b < DATA_W; b++)
          mem_s0[sub_of(wreq[0][p].loc)][row_of(wreq[0][p].loc)]
                [phys_col(b, col_of(wreq[0][p].loc))] = wdata[0][p][b];
    mem_nx = mem_s0;
    for (int p = 0; p < 2; p++)
      if (wreq[1][p].en)
        for (int b = 0; b < DATA_W; b++)
          mem_nx[sub_of(wreq[1][p].loc)][row_of(wreq[1][p].loc)]
                [phys_col(b, col_of(wreq[1][p].loc))] = wdata[1][p][b];
  end

  always_ff @(posedge clk) mem <= mem_nx;

  // read bit lines of both subcells, column multiplexer, thread switch
  for (genvar s = 0; s < NUM_SLOTS; s++) begin : g_slot
    for (genvar p = 0; p < 2; p++) begin : g_port
      logic [DATA_W-1:0] rbl [NUM_SUBCELLS];
      always_comb begin
        for (int sc = 0; sc < NUM_SUBCELLS; sc++) begin
          for (int b = 0; b < DATA_W; b++) begin
            if (s == 0)
              rbl[sc][b] = mem[sc][row_of(rreq[s][p].loc)][phys_col(b, col_of(rreq[s][p].loc))];
            else
              rbl[sc][b] = mem_s0[sc][row_of(rreq[s][p].loc)][phys_col(b, col_of(rreq[s][p].loc))];
          end
        end
      end
      rf_thread_switch u_tsw (
        .thread  (rreq[s][p].loc.thread),
        .rbl_sub (rbl),
        .dout    (rdata[s][p])
      );
    end
  end

endmodule
