// rf_thread_switch: column-based thread switch of one register-file read port.
//
// A cell of the register file has two subcells: subcell 0 keeps the data of threads
// 0 and 1, subcell 1 that of threads 2 and 3. Both subcells drive their own read bit
// lines at the same time (shared read bit line structure); this switch, one per
// column group and read port, passes on the subcell that belongs to the requested
// thread, so each of the four read ports can read any thread. Purely combinational,
// it sits between the read bit lines and the output latch.
//
// Follows the document: two subcells read together, per-port choice of thread, one
// switch per column rather than per cell. This design's choice: thread[1] is the
// subcell select (threads 0/1 -> subcell 0, threads 2/3 -> subcell 1).
module rf_thread_switch
  import rf_pkg::*;
(
  input  logic [THREAD_W-1:0] thread,
  input  logic [DATA_W-1:0]   rbl_sub [NUM_SUBCELLS],
  output logic [DATA_W-1:0]   dout
);

  always_comb begin
    dout = rbl_sub[0];
    for (int s = 1; s < NUM_SUBCELLS; s++)
      if (thread[THREAD_W-1:1] == s[THREAD_W-2:0]) dout = rbl_sub[s];
  end

endmodule
