// sram_ref_pkg: cycle-level reference model of the 2R2W SRAM, for testbenches.
//
// Storage is a plain array of 512 16-bit words (no banks or interleaving). step()
// takes the port inputs sampled at one clock edge and returns the read words, stall
// flags and negative-VVSS enables they must produce: neg during the access cycle,
// data and stalls after the next edge. Reads see the words before the writes of
// their own cycle; a write to a word that is read in the same cycle is stalled, and
// of two writes to one word port A's is performed. It counts the stalls.
package sram_ref_pkg;
  import sram_pkg::*;

  typedef struct {
    logic [DATA_W-1:0]            q_a, q_b;
    logic                         stall_a, stall_b;
    logic [DATA_W*INTERLEAVE-1:0] neg;
  } sram_expect_t;

  class sram_model;
    logic [DATA_W-1:0] mem [2**ADDR_W];
    logic [DATA_W-1:0] q_a = '0, q_b = '0;
    int n_rw_stall, n_ww_stall, n_neg;

    function void step(input bit cen,
                       input bit ren_a, input saddr_t radd_a, input bit ren_b, input saddr_t radd_b,
                       input bit wen_a, input saddr_t wadd_a, input logic [DATA_W-1:0] din_a,
                       input bit wen_b, input saddr_t wadd_b, input logic [DATA_W-1:0] din_b,
                       output sram_expect_t e);
      bit ra, rb, wa, wb;
      ra = ren_a && cen; rb = ren_b && cen; wa = wen_a && cen; wb = wen_b && cen;
      e.stall_a = wa && ((ra && radd_a == wadd_a) || (rb && radd_b == wadd_a));
      e.stall_b = wb && ((ra && radd_a == wadd_b) || (rb && radd_b == wadd_b) ||
                         (wa && !e.stall_a && wadd_a == wadd_b));
      if (e.stall_a) n_rw_stall++;
      if (e.stall_b) begin
        if ((ra && radd_a == wadd_b) || (rb && radd_b == wadd_b)) n_rw_stall++;
        else n_ww_stall++;
      end
      if (ra) q_a = mem[radd_a];
      if (rb) q_b = mem[radd_b];
      e.q_a = q_a; e.q_b = q_b;
      e.neg = '0;
      for (int b = 0; b < DATA_W; b++) begin
        if (wa && !e.stall_a && din_a[b]) e.neg[b*INTERLEAVE + int'(wadd_a.ysel)] = 1'b1;
        if (wb && !e.stall_b && din_b[b]) e.neg[b*INTERLEAVE + int'(wadd_b.ysel)] = 1'b1;
      end
      if (e.neg != '0) n_neg++;
      if (wa && !e.stall_a) mem[wadd_a] = din_a;
      if (wb && !e.stall_b) mem[wadd_b] = din_b;
    endfunction
  endclass
endpackage
