// sram_conflict_detect: write/read conflict detector of the 2R2W SRAM.
//
// A read leaves the cell intact and a write flips it, so reads have priority: when
// an enabled write port (A or B) addresses the same word as an enabled read port (A
// or B) in the same cycle, only the read proceeds and the write is stalled, that is,
// not performed. The surviving write enables are the internal WEN signals passed on
// to the write replica and drivers. Combinational; it works on the registered port
// inputs during the access cycle.
//
// Follows the document: the read-over-write rule and stalling the write. This
// design's choice: when both write ports address the same word, port A writes and
// port B is stalled.
module sram_conflict_detect
  import sram_pkg::*;
(
  input  logic   ren_a,
  input  saddr_t radd_a,
  input  logic   ren_b,
  input  saddr_t radd_b,
  input  logic   wen_a,
  input  saddr_t wadd_a,
  input  logic   wen_b,
  input  saddr_t wadd_b,
  output logic   wen_a_int,
  output logic   wen_b_int,
  output logic   stall_a,
  output logic   stall_b
);

  logic rhit_a, rhit_b, wwhit;

  assign rhit_a = (ren_a && radd_a == wadd_a) || (ren_b && radd_b == wadd_a);
  assign rhit_b = (ren_a && radd_a == wadd_b) || (ren_b && radd_b == wadd_b);
  assign wwhit  = wen_a && (wadd_a == wadd_b);

  assign stall_a   = wen_a && rhit_a;
  assign stall_b   = wen_b && (rhit_b || (wwhit && !stall_a));
  assign wen_a_int = wen_a && !stall_a;
  assign wen_b_int = wen_b && !stall_b;

endmodule
