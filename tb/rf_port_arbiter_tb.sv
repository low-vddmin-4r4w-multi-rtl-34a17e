// rf_port_arbiter_tb: checks the first-level port arbiter of the register file.
// Random requests from four ports; the expected owner of each intra-port is the
// lowest-numbered requesting port, all other requesters must see conflict. Results
// are checked after the clock edge that stores them (one-cycle latency).
`timescale 1ns / 1ps
module rf_port_arbiter_tb;
  import rf_pkg::*;

  logic clk = 0, rst_n = 0;
  req_t              req      [NUM_PORTS];
  logic [DATA_W-1:0] pay      [NUM_PORTS];
  ireq_t             ireq     [NUM_BANKS*2];
  logic [DATA_W-1:0] ipay     [NUM_BANKS*2];
  logic              conflict [NUM_PORTS];
  logic              granted  [NUM_PORTS];

  rf_port_arbiter #(.PAY_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_conf = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int owner [NUM_BANKS*2];
    bit econf [NUM_PORTS];
    for (int p = 0; p < NUM_PORTS; p++) begin req[p] = '0; pay[p] = '0; end
    repeat (2) @(negedge clk);
    // during reset nothing is granted
    @(negedge clk);
    for (int i = 0; i < NUM_BANKS*2; i++) check(!ireq[i].en, "reset");
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        req[p] = req_t'($urandom);
        req[p].en = ($urandom_range(3) != 0);
        pay[p] = $urandom;
      end
      foreach (owner[i]) owner[i] = -1;
      for (int p = 0; p < NUM_PORTS; p++) begin
        econf[p] = 0;
        if (req[p].en) begin
          if (owner[{req[p].addr.bank, req[p].addr.ab}] < 0) owner[{req[p].addr.bank, req[p].addr.ab}] = p;
          else begin econf[p] = 1; n_conf++; end
        end
      end
      @(posedge clk); #1;
      for (int i = 0; i < NUM_BANKS*2; i++) begin
        check(ireq[i].en == (owner[i] >= 0), $sformatf("it %0d intra %0d en", it, i));
        if (owner[i] >= 0) begin
          check(ireq[i].src == owner[i], $sformatf("it %0d intra %0d src", it, i));
          check(ireq[i].loc == req[owner[i]].addr.loc, "loc");
          check(ipay[i] == pay[owner[i]], "payload");
        end
      end
      for (int p = 0; p < NUM_PORTS; p++) begin
        check(conflict[p] == econf[p], $sformatf("it %0d conflict p%0d", it, p));
        check(granted[p] == (req[p].en && !econf[p]), "granted");
      end
      @(negedge clk);
    end
    check(n_conf > 0, "no conflicts generated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
