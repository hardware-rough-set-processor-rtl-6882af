// subcore_ctrl: control logic of one subCORE generator block.
//
// Generates the sequence of RAM_n indices 0, 1, ..., count-1 that MUX_n
// walks through during a run, one index per clock cycle (the inner loop over
// the objects y of RAM_n in CORE-PHIDM). A run starts on the rising edge at
// which `start` is high: from the next cycle on `active` is 1 and `sel`
// holds index 0, then 1, and so on; `active` falls after index count-1 has
// been presented for one cycle. A run with count = 0 presents nothing.
// `start` while a run is active is ignored. The start/active handshake is
// this design's choice.
module subcore_ctrl #(
  parameter int unsigned N_PART = rs_pkg::N_PART_DEF,
  localparam int unsigned ADDR_W = (N_PART > 1) ? $clog2(N_PART) : 1,
  localparam int unsigned CNT_W  = $clog2(N_PART + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CNT_W-1:0]  count,
  output logic              active,
  output logic [ADDR_W-1:0] sel
);

  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t state;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      sel   <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          sel <= '0;
          if (start && count != '0) state <= S_RUN;
        end
        S_RUN: begin
          if (CNT_W'(sel) == count - 1'b1) begin
            state <= S_IDLE;
            sel   <= '0;
          end else begin
            sel <= sel + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign active = (state == S_RUN);

endmodule
