// subcore: subCORE generator block of the CORE-PHIDM engine.
//
// One subCORE compares the part of the decision table in the common memory
// (RAM_cmn, N_PART objects presented in parallel on `cmn_obj`) with its own
// part, stored in RAM_n. Each clock cycle of a run, MUX_n (steered by the
// control logic) picks one object y of RAM_n and broadcasts it to N_PART
// comparators CB, whose first inputs are the N_PART objects of RAM_cmn. Each
// comparator word (one bit per condition attribute, zero for equal decisions)
// goes to a singleton detector SD; the SD flags gate an OR-gate cascade whose
// last output, the sub-core of this cycle, is captured in the TEMP register.
// So one run of `count` cycles covers count x N_PART object pairs, and the
// attribute loop costs no time at all.
//
// Timing: `start` sampled high at a rising edge begins a run; object y = i of
// RAM_n is compared in cycle i+1 after that edge and its sub-core appears in
// `temp` (with `temp_valid` = 1) one cycle later. `temp` is zero when
// `temp_valid` is 0, so the engine may OR it into the core every cycle.
// `active` is 1 while the control logic is still stepping through RAM_n.
//
// The structure (RAM_n, MUX_n, CB, SD, OR cascade, control logic, TEMP)
// follows the description. Which side is broadcast: the block diagram text
// connects MUX_n to RAM_n and RAM_cmn to all comparators, which is what is
// built here; the worked example instead speaks of picking objects of RAM_cmn,
// which gives the same set of compared pairs.
module subcore #(
  parameter int unsigned ATTR_W = rs_pkg::ATTR_W_DEF,
  parameter int unsigned N_COND = rs_pkg::N_COND_DEF,
  parameter int unsigned N_PART = rs_pkg::N_PART_DEF,
  localparam int unsigned OBJ_W  = ATTR_W * (N_COND + 1),
  localparam int unsigned ADDR_W = (N_PART > 1) ? $clog2(N_PART) : 1,
  localparam int unsigned CNT_W  = $clog2(N_PART + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host write port into RAM_n
  input  logic                         wr_en,
  input  logic [ADDR_W-1:0]            wr_addr,
  input  logic [OBJ_W-1:0]             wr_data,
  // objects of RAM_cmn and their valid flags
  input  logic [N_PART-1:0][OBJ_W-1:0] cmn_obj,
  input  logic [N_PART-1:0]            cmn_en,
  // run control
  input  logic                         start,
  input  logic [CNT_W-1:0]             count,
  output logic                         active,
  // TEMP register
  output logic [N_COND-1:0]            temp,
  output logic                         temp_valid
);

  logic [N_PART-1:0][OBJ_W-1:0]  ram_obj;
  logic [ADDR_W-1:0]             sel;
  logic [OBJ_W-1:0]              y;
  logic [N_PART-1:0][N_COND-1:0] cb_word;
  logic [N_PART-1:0][N_COND-1:0] sd_word;
  logic [N_PART-1:0]             sd_bit;
  logic [N_COND-1:0]             sub_core;

  ram_n #(.ATTR_W(ATTR_W), .N_COND(N_COND), .N_PART(N_PART)) u_ram (
    .clk, .wr_en, .wr_addr, .wr_data, .obj(ram_obj)
  );

  subcore_ctrl #(.N_PART(N_PART)) u_ctrl (
    .clk, .rst_n, .start, .count, .active, .sel
  );

  mux_n #(.OBJ_W(OBJ_W), .N_PART(N_PART)) u_mux (
    .obj(ram_obj), .sel, .y
  );

  for (genvar i = 0; i < N_PART; i++) begin : g_cmp
    cb #(.ATTR_W(ATTR_W), .N_COND(N_COND)) u_cb (
      .en(cmn_en[i] && active), .x(cmn_obj[i]), .y, .diff(cb_word[i])
    );
    sd #(.N_COND(N_COND)) u_sd (
      .diff(cb_word[i]), .is_single(sd_bit[i]), .single_out(sd_word[i])
    );
  end

  // Every SD output is OR'ed into the cascade, each stage gated by its SD
  // flag as in the worked example (the two are redundant: a word that is not
  // a singleton is already zero at the SD output).
  or_cascade #(.N_COND(N_COND), .N_PART(N_PART)) u_or (
    .cb_word(sd_word), .sd_bit, .sub_core
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      temp       <= '0;
      temp_valid <= 1'b0;
    end else begin
      temp       <= active ? sub_core : '0;
      temp_valid <= active;
    end
  end

endmodule
