// ram_cmn: common part memory (RAM_cmn) of the CORE-PHIDM engine.
//
// Holds one part of the decision table, up to N_PART objects. The host
// writes one object per clock through the write port (wr_en, wr_addr,
// wr_data); the write takes effect at the next rising edge. All stored
// objects are presented at once on `obj`, because every comparator of every
// subCORE block compares one of them in the same cycle. `count` tells how
// many slots (0 .. count-1) hold valid objects; `slot_en[i]` is 1 for those
// slots and disables the comparators of the others, so a last, shorter part
// of the table needs no padding. The count input and the slot enables are
// this design's choice; the description only says that the memory holds a
// part of the table that is compared with all subCORE blocks.
//
// The contents are not reset: the engine never reads a slot at or above
// `count`, and the host loads the slots before starting a run.
module ram_cmn #(
  parameter int unsigned ATTR_W = rs_pkg::ATTR_W_DEF,
  parameter int unsigned N_COND = rs_pkg::N_COND_DEF,
  parameter int unsigned N_PART = rs_pkg::N_PART_DEF,
  localparam int unsigned OBJ_W  = ATTR_W * (N_COND + 1),
  localparam int unsigned ADDR_W = (N_PART > 1) ? $clog2(N_PART) : 1,
  localparam int unsigned CNT_W  = $clog2(N_PART + 1)
) (
  input  logic                           clk,
  input  logic                           wr_en,
  input  logic [ADDR_W-1:0]              wr_addr,
  input  logic [OBJ_W-1:0]               wr_data,
  input  logic [CNT_W-1:0]               count,
  output logic [N_PART-1:0][OBJ_W-1:0]   obj,
  output logic [N_PART-1:0]              slot_en
);

  logic [N_PART-1:0][OBJ_W-1:0] mem;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_comb begin
    obj = mem;
    for (int unsigned i = 0; i < N_PART; i++) slot_en[i] = (i < count);
  end

endmodule
