// rf_test_pattern_tb: the register file's five-cycle functional test pattern.
//
// Runs back to back, after a set-up cycle that fills the words used with known data:
//   cycle 1  a single write of all zeros to the nearest word (bank 0, thread 0, reg 0)
//   cycle 2  a double write (S0: the furthest word, thread 3 reg 7, all ones;
//            S1: another word) while the word of cycle 1 is read
//   cycle 3  two reads (S0 and S1) of the words written in cycle 2
//   cycle 4  a read/write conflict on one word with no S1 write: the write is dropped
//   cycle 5  a data slot switch: S0 write conflicts with a read, S1 write does not;
//            the two writes swap slots (WChange high) and both complete
// then reads everything back. Results must appear exactly one cycle after the
// requests are registered: each is checked at that cycle and must be absent the
// cycle before.
`timescale 1ns / 1ps
module rf_test_pattern_tb;
  import rf_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [NUM_BANKS-1:0] cen = '1;
  logic dual_slot = 1;
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
  always #10 clk = ~clk;   // 50 MHz test clock

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  function automatic req_t a(bit b, bit ab, int t, int r);
    req_t q;
    q.en = 1; q.addr.bank = b; q.addr.ab = ab;
    q.addr.loc.thread = 2'(t); q.addr.loc.rnum = 3'(r);
    return q;
  endfunction

  task automatic idle();
    for (int p = 0; p < NUM_PORTS; p++)
      for (int s = 0; s < NUM_SLOTS; s++) begin
        rd_req[p][s] = '0; wr_req[p][s] = '0; wr_data[p][s] = '0;
      end
  endtask

  // present the inputs of one cycle; return at the falling edge after they were registered
  task automatic step();
    @(negedge clk);
  endtask

  initial begin
    #2000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    idle();
    repeat (2) @(negedge clk);
    rst_n = 1;
    // set-up: fill the words used
    wr_req[0][0] = a(0, 0, 0, 0); wr_data[0][0] = 32'hFFFF_FFFF;
    wr_req[0][1] = a(0, 0, 3, 7); wr_data[0][1] = 32'h0000_0000;
    wr_req[1][0] = a(0, 1, 0, 1); wr_data[1][0] = 32'h0;
    wr_req[2][0] = a(1, 0, 1, 2); wr_data[2][0] = 32'h1111_1111;
    wr_req[2][1] = a(1, 0, 2, 3); wr_data[2][1] = 32'h2222_2222;
    step();
    // cycle 1: single write 0
    idle();
    wr_req[0][0] = a(0, 0, 0, 0); wr_data[0][0] = 32'h0000_0000;
    step();
    check(wr_done[0][0] && wr_done[0][1] && wr_done[1][0] && wr_done[2][0] && wr_done[2][1], "set-up writes done");
    // cycle 2: double write, read of cycle 1's word
    idle();
    wr_req[0][0] = a(0, 0, 3, 7); wr_data[0][0] = 32'hFFFF_FFFF;
    wr_req[1][1] = a(0, 1, 0, 1); wr_data[1][1] = 32'hA5A5_A5A5;
    rd_req[2][0] = a(0, 0, 0, 0);
    step();
    check(wr_done[0][0] && !wr_done[0][1], "cycle 1: single write done");
    check(!rd_valid[2][0], "cycle 2 read not yet valid (latency)");
    // cycle 3: two reads
    idle();
    rd_req[0][0] = a(0, 0, 3, 7);
    rd_req[1][1] = a(0, 1, 0, 1);
    step();
    check(rd_valid[2][0] && rd_data[2][0] == 32'h0, "cycle 2: read of the zero word");
    check(wr_done[0][0] && wr_done[1][1], "cycle 2: double write done");
    check(!rd_valid[0][0] && !rd_valid[1][1], "cycle 3 reads not yet valid (latency)");
    // cycle 4: read/write conflict, no S1 write
    idle();
    rd_req[0][0] = a(0, 0, 0, 0);
    wr_req[1][0] = a(0, 1, 0, 0); wr_data[1][0] = 32'h1234_5678;
    step();
    check(rd_valid[0][0] && rd_data[0][0] == 32'hFFFF_FFFF, "cycle 3: S0 read of the furthest word");
    check(rd_valid[1][1] && rd_data[1][1] == 32'hA5A5_A5A5, "cycle 3: S1 read");
    // cycle 5: data slot switch in bank 1, intra-port B
    idle();
    rd_req[0][0] = a(1, 0, 1, 2);
    rd_req[3][1] = a(1, 1, 3, 0);
    wr_req[1][0] = a(1, 1, 1, 2); wr_data[1][0] = 32'hCAFE_F00D;
    wr_req[1][1] = a(1, 1, 2, 3); wr_data[1][1] = 32'h0BAD_BEEF;
    step();
    check(rd_valid[0][0] && rd_data[0][0] == 32'h0, "cycle 4: read wins");
    check(wr_dropped[1][0] && !wr_done[1][0] && dscs_state[0][1] == DSCS_S3, "cycle 4: write dropped");
    check(wchange[0] == 2'b00, "cycle 4: no switch");
    // read back
    idle();
    rd_req[0][0] = a(1, 0, 1, 2);
    rd_req[3][1] = a(1, 1, 2, 3);
    rd_req[2][0] = a(0, 1, 0, 0);
    step();
    check(rd_valid[0][0] && rd_data[0][0] == 32'h1111_1111, "cycle 5: read sees the old word");
    check(wchange[1] == 2'b10 && dscs_state[1][1] == DSCS_S2, "cycle 5: WChange and state S2");
    check(wr_done[1][0] && wr_done[1][1] && !wr_dropped[1][0] && !wr_dropped[1][1], "cycle 5: both writes done");
    idle();
    step();
    check(rd_data[0][0] == 32'hCAFE_F00D && rd_data[3][1] == 32'h0BAD_BEEF, "switched writes stored");
    check(rd_data[2][0] == 32'h0, "dropped write left the word unchanged");
    check(wchange[1] == 2'b00, "WChange reset next cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
