// ram_n: local part memory (RAM_n) of one subCORE generator block.
//
// Holds up to N_PART objects of the part of the decision table assigned to
// this subCORE. The host writes one object per clock (wr_en, wr_addr,
// wr_data, effective at the next rising edge). All words are exposed on
// `obj` for the MUX_n multiplexer, which picks one per cycle. The contents
// are not reset; the control logic only selects slots below the object count
// given by the host.
module ram_n #(
  parameter int unsigned ATTR_W = rs_pkg::ATTR_W_DEF,
  parameter int unsigned N_COND = rs_pkg::N_COND_DEF,
  parameter int unsigned N_PART = rs_pkg::N_PART_DEF,
  localparam int unsigned OBJ_W  = ATTR_W * (N_COND + 1),
  localparam int unsigned ADDR_W = (N_PART > 1) ? $clog2(N_PART) : 1
) (
  input  logic                         clk,
  input  logic                         wr_en,
  input  logic [ADDR_W-1:0]            wr_addr,
  input  logic [OBJ_W-1:0]             wr_data,
  output logic [N_PART-1:0][OBJ_W-1:0] obj
);

  logic [N_PART-1:0][OBJ_W-1:0] mem;

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign obj = mem;

endmodule
