// cycle_timer: hardware time measurement unit.
//
// Counts the clock cycles during which `run` is high, so that the processing
// time of the engine can be read in cycles (at 50 MHz one cycle is 20 ns).
// `clear` (synchronous, has priority) sets the count to zero. The counter
// saturates at its maximum instead of wrapping. Only the existence of such
// a unit is documented; its form here is this design's choice.
module cycle_timer #(
  parameter int unsigned W = rs_pkg::TIMER_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         run,
  output logic [W-1:0] cycles
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) cycles <= '0;
    else if (run && cycles != '1) cycles <= cycles + 1'b1;
  end

endmodule
