// sd: singleton detector (SD) of a subCORE generator block.
//
// Takes the word of one comparator (one bit per condition attribute) and
// passes it to `single_out` only if exactly one bit is set, i.e. the
// discernibility-matrix cell holds a single attribute; otherwise the output
// is all zeros. `is_single` is the one-bit form of the same test, which
// gates one stage of the OR cascade (line 16 of CORE-PHIDM). The one-hot test
// is written as "non-zero and no two bits set", which needs no adder.
//
// Purely combinational.
module sd #(
  parameter int unsigned N_COND = rs_pkg::N_COND_DEF
) (
  input  logic [N_COND-1:0] diff,
  output logic              is_single,
  output logic [N_COND-1:0] single_out
);

  always_comb begin
    // diff & (diff - 1) clears the lowest set bit: zero for 0 or 1 bits set.
    is_single  = (diff != '0) && ((diff & (diff - 1'b1)) == '0);
    single_out = is_single ? diff : '0;
  end

endmodule
