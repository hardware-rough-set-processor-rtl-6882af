// cb: comparator block (CB) of a subCORE generator block.
//
// Compares two decision-table objects x and y. For every condition attribute
// a, bit a of `diff` is 1 when the ATTR_W-bit codes of a differ in x and y.
// When the two objects carry the same decision code, or when the comparator
// is disabled (`en` = 0, the x slot of RAM_cmn is empty), the whole word is
// zero: only pairs from different decision classes can yield discernibility
// entries. This is line 8 and line 11 of the CORE-PHIDM algorithm done for
// all attributes at once, and matches the comparator words of the worked
// example, where pairs with equal decisions give 0000. Folding the decision
// test and the enable into the comparator is this design's choice.
//
// Purely combinational: the result is valid in the same cycle as the inputs.
module cb #(
  parameter int unsigned ATTR_W = rs_pkg::ATTR_W_DEF,
  parameter int unsigned N_COND = rs_pkg::N_COND_DEF,
  localparam int unsigned OBJ_W = ATTR_W * (N_COND + 1)
) (
  input  logic              en,
  input  logic [OBJ_W-1:0]  x,
  input  logic [OBJ_W-1:0]  y,
  output logic [N_COND-1:0] diff
);

  logic dec_differs;

  always_comb begin
    dec_differs = (x[N_COND*ATTR_W +: ATTR_W] != y[N_COND*ATTR_W +: ATTR_W]);
    for (int unsigned a = 0; a < N_COND; a++) begin
      diff[a] = en && dec_differs && (x[a*ATTR_W +: ATTR_W] != y[a*ATTR_W +: ATTR_W]);
    end
  end

endmodule
