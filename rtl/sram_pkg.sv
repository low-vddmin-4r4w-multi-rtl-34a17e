// sram_pkg: shared sizes and types of the 2R2W 8 Kbit multi-port SRAM.
//
// The SRAM has two banks of 64 x 64 cells (4 Kbit each) with 8:1 bit interleaving,
// so one bank row carries 8 interleaved 8-bit words. The two banks work side by
// side: bank 0 holds bits 7:0 and bank 1 bits 15:8 of each 16-bit word, giving
// 512 words of 16 bits. An address is a 6-bit row and a 3-bit column select
// (Y select); bit b of the word in column y sits in physical column 8*b+y.
// Sizes, interleaving and the 6+3 address split are the document's; placing the
// high and low byte in different banks is this design's reading of them.
package sram_pkg;

  localparam int ROWS        = 64;
  localparam int PHYS_COLS   = 64;
  localparam int INTERLEAVE  = 8;
  localparam int NUM_BANKS   = 2;
  localparam int DATA_W      = 16;
  localparam int BANK_DW     = DATA_W / NUM_BANKS;           // 8 bits per bank
  localparam int ROW_W       = $clog2(ROWS);                 // 6
  localparam int YSEL_W      = $clog2(INTERLEAVE);           // 3
  localparam int ADDR_W      = ROW_W + YSEL_W;               // 9

  typedef struct packed {
    logic [ROW_W-1:0]  row;
    logic [YSEL_W-1:0] ysel;
  } saddr_t;

endpackage
