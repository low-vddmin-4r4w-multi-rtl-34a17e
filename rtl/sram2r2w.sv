// sram2r2w: 8 Kbit two-read two-write multi-port SRAM (512 words x 16 bits).
//
// Two read ports (A, B) and two write ports (A, B) may all be used in the same
// cycle. The array is two 64 x 64 banks with 8:1 bit interleaving; bank 0 stores the
// low byte and bank 1 the high byte of each word, both with the same row and column
// select. Because the cell has separate, single-ended write paths selected by row
// and column, writes need no read-back of the half-selected words of the row.
// A read and a write to the same word in one cycle would disturb the read, so the
// conflict detector keeps the read and stalls the write; the stall is reported.
// While a 1 is written, the negative-VVSS enable of the written column is raised.
// CEN low puts the SRAM to sleep (no access).
//
// Timing: all port inputs are captured at rising edge k. During that cycle conflict
// detection and the access take place; at edge k+1 the writes are committed and the
// read data (Q_OUT_A/B) and stall flags are stored. A read returns the word as it was
// before the writes of its own cycle. Q holds its value until the next read.
//
// Follows the document: 2R2W, 8 Kbit, two 64 x 64 banks, 16-bit data, 8:1
// interleaving, 6-bit row and 3-bit column address, read-over-write priority, DFFs on
// the inputs, negative VVSS for write 1. This design's choices: the byte split between
// banks, the A-over-B rule for two writes to one word, the stall flags, active-high CEN.
module sram2r2w
  import sram_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cen,
  input  logic                 ren_a,
  input  saddr_t               radd_a,
  input  logic                 ren_b,
  input  saddr_t               radd_b,
  input  logic                 wen_a,
  input  saddr_t               wadd_a,
  input  logic [DATA_W-1:0]    din_a,
  input  logic                 wen_b,
  input  saddr_t               wadd_b,
  input  logic [DATA_W-1:0]    din_b,
  output logic [DATA_W-1:0]    q_out_a,
  output logic [DATA_W-1:0]    q_out_b,
  output logic                 stall_a,      // write A was stalled by a read
  output logic                 stall_b,
  output logic [DATA_W*INTERLEAVE-1:0] neg   // negative-VVSS column enables
);

  // input DFF stage
  logic              ren_a_q, ren_b_q, wen_a_q, wen_b_q;
  saddr_t            radd_a_q, radd_b_q, wadd_a_q, wadd_b_q;
  logic [DATA_W-1:0] din_a_q, din_b_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ren_a_q <= 1'b0;
      ren_b_q <= 1'b0;
      wen_a_q <= 1'b0;
      wen_b_q <= 1'b0;
    end else begin
      ren_a_q <= ren_a && cen;
      ren_b_q <= ren_b && cen;
      wen_a_q <= wen_a && cen;
      wen_b_q <= wen_b && cen;
    end
    radd_a_q <= radd_a;
    radd_b_q <= radd_b;
    wadd_a_q <= wadd_a;
    wadd_b_q <= wadd_b;
    din_a_q  <= din_a;
    din_b_q  <= din_b;
  end

  logic wen_a_int, wen_b_int, stall_a_d, stall_b_d;

  sram_conflict_detect u_cd (
    .ren_a (ren_a_q), .radd_a (radd_a_q),
    .ren_b (ren_b_q), .radd_b (radd_b_q),
    .wen_a (wen_a_q), .wadd_a (wadd_a_q),
    .wen_b (wen_b_q), .wadd_b (wadd_b_q),
    .wen_a_int (wen_a_int), .wen_b_int (wen_b_int),
    .stall_a (stall_a_d), .stall_b (stall_b_d)
  );

  sram_neg_vvss_sel u_neg (
    .wen_a (wen_a_int), .y_a_sel (wadd_a_q.ysel), .din_a (din_a_q),
    .wen_b (wen_b_int), .y_b_sel (wadd_b_q.ysel), .din_b (din_b_q),
    .neg   (neg)
  );

  logic [BANK_DW-1:0] rd [NUM_BANKS][2];

  for (genvar k = 0; k < NUM_BANKS; k++) begin : g_bank
    sram_bank_array u_bank (
      .clk   (clk),
      .radd  ('{radd_a_q, radd_b_q}),
      .rdata (rd[k]),
      .wen   ('{wen_a_int, wen_b_int}),
      .wadd  ('{wadd_a_q, wadd_b_q}),
      .wdata ('{din_a_q[k*BANK_DW +: BANK_DW], din_b_q[k*BANK_DW +: BANK_DW]})
    );
  end

  // output latch: holds the last read word
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_out_a <= '0;
      q_out_b <= '0;
      stall_a <= 1'b0;
      stall_b <= 1'b0;
    end else begin
      if (ren_a_q) q_out_a <= {rd[1][0], rd[0][0]};
      if (ren_b_q) q_out_b <= {rd[1][1], rd[0][1]};
      stall_a <= stall_a_d;
      stall_b <= stall_b_d;
    end
  end

endmodule
