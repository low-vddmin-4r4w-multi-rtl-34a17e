// rf_thread_switch_tb: threads 0/1 must read subcell 0, threads 2/3 subcell 1.
`timescale 1ns / 1ps
module rf_thread_switch_tb;
  import rf_pkg::*;
  logic [THREAD_W-1:0] thread;
  logic [DATA_W-1:0]   rbl_sub [NUM_SUBCELLS];
  logic [DATA_W-1:0]   dout;
  rf_thread_switch dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int it = 0; it < 400; it++) begin
      thread = 2'(it % 4);
      rbl_sub[0] = $urandom;
      rbl_sub[1] = $urandom;
      #1;
      checks++;
      if (dout !== ((thread >= 2) ? rbl_sub[1] : rbl_sub[0])) begin
        failures++;
        $display("FAIL thread %0d dout %h", thread, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
