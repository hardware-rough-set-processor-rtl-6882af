// core_phidm_host: testbench helper that wraps one CORE-PHIDM engine with
// P_SUB subCOREs (other sizes at their defaults) together with the host
// procedure that drives it.
//
// On the rising edge of `go` it builds a decision table of N_OBJ objects from
// a fixed pseudo-random recipe (a 32-bit linear congruential generator
// seeded with SEED, so every instance with the same SEED sees the same
// table), runs the CORE-PHIDM outer loops over it (part i in RAM_cmn, parts
// j >= i in the P_SUB local memories, P_SUB at a time) and raises `finished`
// with the resulting core, the engine's busy cycles, the cycles including
// object loading, and the busy cycles expected from the run lengths
// (sum over runs of max(count) + 2).
//
// Table recipe: 10 condition attributes with codes 0..2; half of the objects
// copy an earlier object and change one attribute; the decision is
// (sum over a < 6 of (a+1) * code_a) mod 3.
module core_phidm_host #(
  parameter int P_SUB = 4,
  parameter int N_OBJ = 700,
  parameter int unsigned SEED = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        go,
  output logic        finished,
  output logic [14:0] core,
  output longint      busy_total,
  output longint      all_total,
  output longint      busy_expected
);
  localparam int NP = 64, AW = 4;
  localparam int SEL_W = $clog2(P_SUB + 1);

  logic                    wr_en = 0;
  logic [SEL_W-1:0]        wr_sel = 0;
  logic [5:0]              wr_addr = 0;
  logic [63:0]             wr_data = 0;
  logic [6:0]              cmn_count = 0;
  logic [P_SUB-1:0][6:0]   sub_count = '0;
  logic                    start = 0, clear_core = 0;
  logic                    busy, done;
  logic [47:0]             busy_cycles;

  core_phidm #(.P_SUB(P_SUB)) dut (
    .clk, .rst_n, .wr_en, .wr_sel, .wr_addr, .wr_data, .cmn_count, .sub_count,
    .start, .clear_core, .busy, .done, .core, .busy_cycles);

  logic [63:0] tbl [N_OBJ];
  int unsigned lcg_state = SEED;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  function automatic int unsigned rnd(int unsigned range);
    lcg_state = lcg_state * 32'd1664525 + 32'd1013904223;
    return (lcg_state >> 8) % range;
  endfunction

  task automatic load_part(int sel, int part);
    for (int k = 0; k < NP && part * NP + k < N_OBJ; k++) begin
      @(negedge clk);
      wr_en = 1; wr_sel = SEL_W'(sel); wr_addr = 6'(k); wr_data = tbl[part * NP + k];
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  function automatic int part_len(int part);
    int r;
    r = N_OBJ - part * NP;
    return (r > NP) ? NP : r;
  endfunction

  initial begin
    int m, c_max, cnt;
    longint t0;
    logic [63:0] o;
    finished = 0; busy_total = 0; all_total = 0; busy_expected = 0;
    @(posedge go);
    for (int i = 0; i < N_OBJ; i++) begin
      int s, a;
      if (i > 0 && rnd(2) == 1) begin
        o = tbl[rnd(i)];
        a = int'(rnd(10));
        o[a*AW +: AW] = 4'((o[a*AW +: AW] + 1) % 3);
      end else begin
        o = '0;
        for (int b = 0; b < 10; b++) o[b*AW +: AW] = 4'(rnd(3));
      end
      s = 0;
      for (int b = 0; b < 6; b++) s += int'(o[b*AW +: AW]) * (b + 1);
      o[63:60] = 4'(s % 3);
      tbl[i] = o;
    end
    @(negedge clk);
    clear_core = 1;
    @(negedge clk);
    clear_core = 0;
    t0 = cyc;
    m = (N_OBJ + NP - 1) / NP;
    for (int i = 0; i < m; i++) begin
      load_part(0, i);
      for (int j = i; j < m; j += P_SUB) begin
        c_max = 0;
        for (int k = 0; k < P_SUB; k++) begin
          if (j + k < m) begin
            load_part(k + 1, j + k);
            cnt = part_len(j + k);
          end else cnt = 0;
          sub_count[k] = 7'(cnt);
          if (cnt > c_max) c_max = cnt;
        end
        cmn_count = 7'(part_len(i));
        start = 1;
        @(negedge clk);
        start = 0;
        while (!done) @(negedge clk);
        busy_expected += c_max + 2;
      end
    end
    busy_total = longint'(busy_cycles);
    all_total  = cyc - t0;
    finished   = 1;
  end
endmodule
