// or_cascade: gated OR-gate cascade of a subCORE generator block.
//
// Stage i (i = 0 .. N_PART-1, stage 0 first) receives the comparator word
// IN_CB = cb_word[i], the output of the previous stage IN_PREV (zero for the
// first stage) and the singleton flag IN_SD = sd_bit[i]. Its output is
// IN_PREV | IN_CB when IN_SD is 1 and IN_PREV otherwise. The output of the
// last stage is the sub-core of this cycle: the union of all single-attribute
// discernibility entries found among the N_PART comparisons. Stage order
// follows the worked example, where the comparator of the first object of the
// part drives the first gate.
//
// Purely combinational; written as a chain as in the description, which a
// synthesis tool is free to rebalance into a tree.
module or_cascade #(
  parameter int unsigned N_COND = rs_pkg::N_COND_DEF,
  parameter int unsigned N_PART = rs_pkg::N_PART_DEF
) (
  input  logic [N_PART-1:0][N_COND-1:0] cb_word,
  input  logic [N_PART-1:0]             sd_bit,
  output logic [N_COND-1:0]             sub_core
);

  // chain[i] is IN_PREV of stage i, chain[i+1] its OUT.
  logic [N_PART:0][N_COND-1:0] chain;

  assign chain[0] = '0;
  for (genvar i = 0; i < N_PART; i++) begin : g_stage
    assign chain[i+1] = sd_bit[i] ? (chain[i] | cb_word[i]) : chain[i];
  end
  assign sub_core = chain[N_PART];

endmodule
