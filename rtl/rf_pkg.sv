// rf_pkg: shared sizes and request types of the 4R4W multi-thread register file.
//
// The register file holds 2 Kbit as two 1 Kbit banks. Each bank is a 2R2W array
// (intra-ports A and B) whose cells have two subcells: subcell 0 holds threads 0/1,
// subcell 1 holds threads 2/3. A 32-bit word is stored 2:1 bit-interleaved. Each
// clock cycle is split into two access slots, S0 and S1 (double pumping), so every
// external port carries one request per slot.
//
// The sizes (2 banks, 1 Kbit each, 32-bit data, 4 threads, 4R4W, 2:1 interleaving)
// are the document's. The address layout is this design's choice:
//   {bank, ab, thread[1:0], reg[2:0]}
// bank and ab are the two "port enable" bits that pick the bank and its A or B
// intra-port; thread[1] picks the subcell, {thread[0], reg} the word in the subcell.
// That gives 8 registers per thread per bank, 16 per thread in total (2 Kbit / 32 /4).
package rf_pkg;

  localparam int NUM_PORTS    = 4;    // external read ports and write ports (4R4W)
  localparam int NUM_BANKS    = 2;    // two 1 Kbit banks
  localparam int NUM_SLOTS    = 2;    // double pump: S0 and S1
  localparam int DATA_W       = 32;   // data width
  localparam int NUM_THREADS  = 4;
  localparam int NUM_SUBCELLS = 2;    // subcell 0: threads 0/1, subcell 1: threads 2/3
  localparam int INTERLEAVE   = 2;    // 2:1 bit interleaving
  localparam int BANK_BITS    = 1024;
  localparam int REG_W        = 3;    // registers per thread per bank = 2**REG_W

  localparam int THREAD_W     = $clog2(NUM_THREADS);
  // word index inside one subcell: {thread[0], reg}
  localparam int WORD_W       = REG_W + THREAD_W - 1;
  localparam int SUB_WORDS    = 2 ** WORD_W;                 // 16 words per subcell
  localparam int COL_W        = $clog2(INTERLEAVE);
  localparam int ROWS         = SUB_WORDS / INTERLEAVE;      // 8 physical rows
  localparam int PHYS_COLS    = DATA_W * INTERLEAVE;         // 64 physical columns
  localparam int BADDR_W      = THREAD_W + REG_W;            // address inside a bank

  // address inside a bank, as seen after the port arbiter
  typedef struct packed {
    logic [THREAD_W-1:0] thread;
    logic [REG_W-1:0]    rnum;
  } baddr_t;

  // full external port address
  typedef struct packed {
    logic   bank;   // which bank
    logic   ab;     // 0: intra-port A, 1: intra-port B
    baddr_t loc;
  } raddr_t;

  // one access request of one external port in one slot
  typedef struct packed {
    logic   en;
    raddr_t addr;
  } req_t;

  // request as delivered to one intra-port of one bank, one slot
  typedef struct packed {
    logic                          en;
    baddr_t                        loc;
    logic [$clog2(NUM_PORTS)-1:0]  src;   // external port that owns it
  } ireq_t;

  // state names of the data slot conflict switch (DSCS) finite state machine
  typedef enum logic [1:0] {
    DSCS_S0 = 2'd0,   // S0 checked, no conflict: writes go out as requested
    DSCS_S1 = 2'd1,   // conflict in S0 detected, slots being switched
    DSCS_S2 = 2'd2,   // switched, no conflict remains: both writes done
    DSCS_S3 = 2'd3    // switched, conflict remains: no write this cycle
  } dscs_state_e;

  // position of a word bit in the interleaved physical row
  function automatic int phys_col(input int bitpos, input int col);
    return bitpos * INTERLEAVE + col;
  endfunction

endpackage
