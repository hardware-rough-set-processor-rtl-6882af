// rs_pkg: constants shared by the CORE-PHIDM rough-set core engine.
//
// A decision-table object is packed into one word of ATTR_W-bit fields.
// Field 0 .. N_COND-1 hold the condition attributes (field 0 in the least
// significant bits) and field N_COND, the most significant one, holds the
// decision attribute. The defaults describe the main configuration: 4-bit
// attribute codes in a 64-bit word, i.e. 15 condition attributes plus the
// decision; unused condition fields are filled with zeros by the host so
// they never differ. The small worked example (4 binary condition attributes
// and a binary decision, 5-bit words) uses ATTR_W = 1, N_COND = 4.
package rs_pkg;

  // Bits per attribute code (four-bit codes in the main configuration).
  parameter int unsigned ATTR_W_DEF = 4;
  // Condition attributes per object word (64-bit word = 16 fields, one is
  // the decision).
  parameter int unsigned N_COND_DEF = 15;
  // Objects per part of the decision table (capacity of RAM_cmn and of each
  // RAM_n). This value is this design's choice.
  parameter int unsigned N_PART_DEF = 64;
  // Number of subCORE generator blocks working in parallel.
  parameter int unsigned P_SUB_DEF  = 4;
  // Width of the busy-cycle counter of the time measurement unit.
  parameter int unsigned TIMER_W    = 48;

  // Object word width for a given attribute width and attribute count.
  function automatic int unsigned obj_width(int unsigned attr_w, int unsigned n_cond);
    return attr_w * (n_cond + 1);
  endfunction

endpackage
