// sram_bank_array: one 64 x 64 bank of the 2R2W SRAM with 8:1 bit interleaving.
//
// Each row holds eight interleaved 8-bit words; bit b of the word in column y sits
// in physical column 8*b+y. Two read ports (A, B) each raise a read word line and
// take the addressed word through the 8:1 column multiplexers. Two write ports (A,
// B) each drive the shared single-ended write bit lines of the addressed word only:
// row select crossed with column select means the other seven words of the row are
// neither read back nor disturbed.
// Timing: reads are combinational from the stored state (a read in the same cycle
// as a write returns the old word); writes take effect at the rising clock edge.
// When both write ports address the same word, B is applied last; the conflict
// detector prevents this case in the SRAM. No reset, like the cell array it models.
module sram_bank_array
  import sram_pkg::*;
(
  input  logic                clk,
  input  saddr_t              radd  [2],
  output logic [BANK_DW-1:0]  rdata [2],
  input  logic                wen   [2],
  input  saddr_t              wadd  [2],
  input  logic [BANK_DW-1:0]  wdata [2]
);

  logic [PHYS_COLS-1:0] mem [ROWS];

  always_comb begin
    for (int p = 0; p < 2; p++)
      for (int b = 0; b < BANK_DW; b++)
        rdata[p][b] = mem[radd[p].row][b*INTERLEAVE + int'(radd[p].ysel)];
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++)
      if (wen[p])
        for (int b = 0; b < BANK_DW; b++)
          mem[wadd[p].row][b*INTERLEAVE + int'(wadd[p].ysel)] <= wdata[p][b];
  end

endmodule
