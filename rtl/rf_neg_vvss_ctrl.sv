// rf_neg_vvss_ctrl: control of the negative-VVSS write assist of one register-file
// bank, for one slot.
//
// Writing a 1 through the single-ended NMOS write path is the hard case at low
// supply, so the column's virtual ground VVSS is pulled below ground by capacitor
// coupling while a 1 is written. Per physical column the control follows the
// document's truth table: with no write, or with only 0s written, both capacitors
// stay off and VVSS stays at ground; if port A or port B writes a 1 into the column,
// capacitor 1 fires; if both ports write a 1 into it, capacitor 2 fires as well, since
// the write bit line load is then larger. Only the selected interleave column of each
// word is written, so only those columns can fire. Combinational.
//
// Follows the document: the truth table and its per-port data conditions. The
// capacitors themselves and the negative level are analog and are not modelled.
module rf_neg_vvss_ctrl
  import rf_pkg::*;
(
  input  ireq_t             wa,            // write of intra-port A in this slot
  input  logic [DATA_W-1:0] da,
  input  ireq_t             wb,            // write of intra-port B in this slot
  input  logic [DATA_W-1:0] db,
  output logic [PHYS_COLS-1:0] cap1_en,
  output logic [PHYS_COLS-1:0] cap2_en
);

  logic [PHYS_COLS-1:0] one_a, one_b;   // column receives a 1 from A / from B

  always_comb begin
    one_a = '0;
    one_b = '0;
    for (int b = 0; b < DATA_W; b++) begin
      for (int c = 0; c < INTERLEAVE; c++) begin
        one_a[phys_col(b, c)] = wa.en && da[b] && (wa.loc[COL_W-1:0] == c[COL_W-1:0]);
        one_b[phys_col(b, c)] = wb.en && db[b] && (wb.loc[COL_W-1:0] == c[COL_W-1:0]);
      end
    end
    cap1_en = one_a | one_b;
    cap2_en = one_a & one_b;
  end

endmodule
