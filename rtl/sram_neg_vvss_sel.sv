// sram_neg_vvss_sel: negative-VVSS write-assist selection of the 2R2W SRAM.
//
// Writing a 1 through the cell's two stacked NMOS is the weak case, so while a 1 is
// written the virtual ground of the written column is pulled negative. For each data
// bit, the negative-VVSS circuit fires when write port A or B (WEN_A, WEN_B) writes a
// 1 on that bit, and the 8:1 multiplexer, steered by the column selects Y_A_Sel and
// Y_B_Sel, applies it to the written column of the 8-column group only; the other
// columns keep VVSS at ground. Writing 0 never fires it. Combinational.
// Follows the document: enable by WEN_A/WEN_B, only for data 1, 8:1 column steering.
// The negative level itself is analog and not modelled.
module sram_neg_vvss_sel
  import sram_pkg::*;
(
  input  logic                 wen_a,
  input  logic [YSEL_W-1:0]    y_a_sel,
  input  logic [DATA_W-1:0]    din_a,
  input  logic                 wen_b,
  input  logic [YSEL_W-1:0]    y_b_sel,
  input  logic [DATA_W-1:0]    din_b,
  output logic [DATA_W*INTERLEAVE-1:0] neg   // [bit*8 + column]
);

  always_comb begin
    for (int b = 0; b < DATA_W; b++)
      for (int y = 0; y < INTERLEAVE; y++)
        neg[b*INTERLEAVE + y] = (wen_a && din_a[b] && y_a_sel == y[YSEL_W-1:0])
                             || (wen_b && din_b[b] && y_b_sel == y[YSEL_W-1:0]);
  end

endmodule
