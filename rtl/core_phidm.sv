// core_phidm: CORE-PHIDM rough-set core engine (top level).
//
// Finds the core of a decision table: the condition attributes that appear
// alone in some cell of the discernibility matrix, i.e. the attributes a for
// which two objects exist that differ only in a but have different
// decisions. The matrix is never stored. Instead the table is cut into parts
// of up to N_PART objects. A host (a soft processor in the reference system)
// loads one part into the common memory RAM_cmn and up to P_SUB further parts
// into the RAM_n memories of the P_SUB subCORE generator blocks, then pulses
// `start`. In every clock cycle each subCORE compares one of its own objects
// with all N_PART objects of RAM_cmn, so a run takes max(count) cycles and
// covers P_SUB x N_PART x max(count) object pairs. The per-cycle sub-cores
// (TEMP registers) of all subCOREs are OR'ed into the CORE register, which
// keeps accumulating over runs until `clear_core`. The host walks the outer
// loops: for each part i in RAM_cmn, the parts j >= i go through the RAM_n
// memories, P_SUB at a time; after the last run `core` is the core.
//
// Interface (all synchronous to clk, reset rst_n active low and synchronous):
//   wr_en/wr_sel/wr_addr/wr_data  write one object; wr_sel 0 selects RAM_cmn,
//                                 wr_sel k (1..P_SUB) selects RAM_k.
//   cmn_count, sub_count[k-1]     valid objects in RAM_cmn and in RAM_k; a
//                                 subCORE with count 0 sits the run out.
//                                 Hold them stable during a run.
//   start                         pulse, accepted when busy is 0.
//   clear_core                    pulse, empties CORE and the cycle counter;
//                                 only while busy is 0.
//   busy, done                    busy is 1 from the cycle after start until
//                                 done; done is a one-cycle pulse that comes
//                                 max(count)+2 cycles after the start edge,
//                                 when every TEMP has been merged into CORE.
//   core                          bit a = condition attribute a is in the core.
//   busy_cycles                   time measurement unit: cycles spent busy.
// Writes and start are not allowed while busy (checked by assertions).
//
// The block structure (RAM_cmn, subCOREs, OR into CORE) follows the
// description. The host interface, the object counts, the busy/done handshake
// and the cycle counter's form are this design's choices.
module core_phidm #(
  parameter int unsigned ATTR_W = rs_pkg::ATTR_W_DEF,
  parameter int unsigned N_COND = rs_pkg::N_COND_DEF,
  parameter int unsigned N_PART = rs_pkg::N_PART_DEF,
  parameter int unsigned P_SUB  = rs_pkg::P_SUB_DEF,
  localparam int unsigned OBJ_W  = ATTR_W * (N_COND + 1),
  localparam int unsigned ADDR_W = (N_PART > 1) ? $clog2(N_PART) : 1,
  localparam int unsigned CNT_W  = $clog2(N_PART + 1),
  localparam int unsigned SEL_W  = $clog2(P_SUB + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          wr_en,
  input  logic [SEL_W-1:0]              wr_sel,
  input  logic [ADDR_W-1:0]             wr_addr,
  input  logic [OBJ_W-1:0]              wr_data,
  input  logic [CNT_W-1:0]              cmn_count,
  input  logic [P_SUB-1:0][CNT_W-1:0]   sub_count,
  input  logic                          start,
  input  logic                          clear_core,
  output logic                          busy,
  output logic                          done,
  output logic [N_COND-1:0]             core,
  output logic [rs_pkg::TIMER_W-1:0]    busy_cycles
);

  logic [N_PART-1:0][OBJ_W-1:0]  cmn_obj;
  logic [N_PART-1:0]             cmn_en;
  logic [P_SUB-1:0]              sub_active;
  logic [P_SUB-1:0]              sub_temp_valid;
  logic [P_SUB-1:0][N_COND-1:0]  sub_temp;
  logic [N_COND-1:0]             temp_or;
  logic                          start_ok;

  assign start_ok = start && !busy;

  ram_cmn #(.ATTR_W(ATTR_W), .N_COND(N_COND), .N_PART(N_PART)) u_ram_cmn (
    .clk,
    .wr_en   (wr_en && wr_sel == '0),
    .wr_addr,
    .wr_data,
    .count   (cmn_count),
    .obj     (cmn_obj),
    .slot_en (cmn_en)
  );

  for (genvar k = 0; k < P_SUB; k++) begin : g_sub
    subcore #(.ATTR_W(ATTR_W), .N_COND(N_COND), .N_PART(N_PART)) u_subcore (
      .clk,
      .rst_n,
      .wr_en      (wr_en && wr_sel == SEL_W'(k + 1)),
      .wr_addr,
      .wr_data,
      .cmn_obj,
      .cmn_en,
      .start      (start_ok),
      .count      (sub_count[k]),
      .active     (sub_active[k]),
      .temp       (sub_temp[k]),
      .temp_valid (sub_temp_valid[k])
    );
  end

  always_comb begin
    temp_or = '0;
    for (int unsigned k = 0; k < P_SUB; k++) temp_or |= sub_temp[k];
  end

  // CORE register and run sequencing.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      core <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear_core && !busy) core <= '0;
      else                     core <= core | temp_or;
      if (start_ok) begin
        busy <= 1'b1;
      end else if (busy && sub_active == '0 && sub_temp_valid == '0) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  cycle_timer #(.W(rs_pkg::TIMER_W)) u_timer (
    .clk, .rst_n, .clear(clear_core && !busy), .run(busy), .cycles(busy_cycles)
  );

  // Host protocol rules.
  a_no_start_busy : assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("start while busy");
  a_no_write_busy : assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> !busy)
    else $error("write while busy");
  a_done_ends_run : assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);

endmodule
