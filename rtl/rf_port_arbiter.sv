// rf_port_arbiter: first-level conflict detector of the 4R4W register file.
//
// Each of the four external ports names, with two address bits, a bank and one of
// that bank's two intra-ports (A or B). Four external ports thus compete for four
// intra-ports. Fixed priority Port0 > Port1 > Port2 > Port3 decides: the highest
// priority requester of an intra-port gets it, every lower one is turned off and
// raises its conflict flag. The decision is combinational ahead of the clock edge and
// is stored in flip-flops at the rising edge, so the outputs hold the granted
// requests (O_Px_WEN in the document's terms) for the whole following cycle.
// One copy serves one slot of one direction; the register file uses four (read and
// write, slots S0 and S1). The payload (write data) travels with the request.
//
// Follows the document: the two routing bits, the fixed priority order, turning off
// the loser with a conflict signal, the DFF stage at the clock edge. This design's
// choices: synchronous active-low reset, the src field telling which port won.
module rf_port_arbiter
  import rf_pkg::*;
#(
  parameter int PAY_W = DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  req_t              req      [NUM_PORTS],
  input  logic [PAY_W-1:0]  pay      [NUM_PORTS],
  // index = bank*2 + ab
  output ireq_t             ireq     [NUM_BANKS*2],
  output logic [PAY_W-1:0]  ipay     [NUM_BANKS*2],
  output logic              conflict [NUM_PORTS],   // port lost arbitration
  output logic              granted  [NUM_PORTS]
);

  localparam int NI = NUM_BANKS * 2;

  ireq_t             ireq_d     [NI];
  logic [PAY_W-1:0]  ipay_d     [NI];
  logic              conflict_d [NUM_PORTS];
  logic              granted_d  [NUM_PORTS];

  always_comb begin
    for (int i = 0; i < NI; i++) begin
      ireq_d[i] = '0;
      ipay_d[i] = '0;
    end
    for (int p = 0; p < NUM_PORTS; p++) begin
      conflict_d[p] = 1'b0;
      granted_d[p]  = 1'b0;
    end
    // walk from the highest priority port down; first claimant keeps the intra-port
    for (int p = 0; p < NUM_PORTS; p++) begin
      if (req[p].en) begin
        if (ireq_d[{req[p].addr.bank, req[p].addr.ab}].en) begin
          conflict_d[p] = 1'b1;
        end else begin
          ireq_d[{req[p].addr.bank, req[p].addr.ab}].en  = 1'b1;
          ireq_d[{req[p].addr.bank, req[p].addr.ab}].loc = req[p].addr.loc;
          ireq_d[{req[p].addr.bank, req[p].addr.ab}].src = p[$clog2(NUM_PORTS)-1:0];
          ipay_d[{req[p].addr.bank, req[p].addr.ab}]     = pay[p];
          granted_d[p] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NI; i++) begin
        ireq[i] <= '0;
        ipay[i] <= '0;
      end
      for (int p = 0; p < NUM_PORTS; p++) begin
        conflict[p] <= 1'b0;
        granted[p]  <= 1'b0;
      end
    end else begin
      ireq     <= ireq_d;
      ipay     <= ipay_d;
      conflict <= conflict_d;
      granted  <= granted_d;
    end
  end

  // a granted intra-port has exactly one owner, and an owner never also conflicts
  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < NUM_PORTS; p++)
        assert (!(conflict_d[p] && granted_d[p]))
          else $error("port %0d both granted and in conflict", p);
    end
  end

endmodule
