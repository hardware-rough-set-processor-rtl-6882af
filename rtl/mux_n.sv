// mux_n: object multiplexer (MUX_n) of one subCORE generator block.
//
// Selects the object of RAM_n with index `sel`, chosen by the control logic,
// and broadcasts it to the second input of every comparator of the block.
// An index at or above N_PART selects slot 0 (never produced by the control
// logic). Purely combinational.
module mux_n #(
  parameter int unsigned OBJ_W  = rs_pkg::obj_width(rs_pkg::ATTR_W_DEF, rs_pkg::N_COND_DEF),
  parameter int unsigned N_PART = rs_pkg::N_PART_DEF,
  localparam int unsigned ADDR_W = (N_PART > 1) ? $clog2(N_PART) : 1
) (
  input  logic [N_PART-1:0][OBJ_W-1:0] obj,
  input  logic [ADDR_W-1:0]            sel,
  output logic [OBJ_W-1:0]             y
);

  always_comb begin
    y = obj[0];
    for (int unsigned i = 0; i < N_PART; i++) begin
      if (sel == ADDR_W'(i)) y = obj[i];
    end
  end

endmodule
