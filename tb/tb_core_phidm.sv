// tb_core_phidm: end-to-end testbench of the CORE-PHIDM engine at its
// default size (4 subCOREs, 64-object parts, 64-bit objects of sixteen
// 4-bit fields).
//
// The testbench plays the host processor: it cuts a decision table into
// parts of 64 objects, loads part i into RAM_cmn and parts i, i+1, ... into
// RAM_1..RAM_4 (four at a time, leaving subCOREs idle with count 0 when fewer
// parts remain), starts a run and waits for done, for every i. The final
// core is compared with a reference computed in the testbench straight from
// the definition (attribute a is in the core if some pair of objects with
// different decisions differs in a alone).
//
// Table A: 300 objects, 10 condition attributes with values 0..2 and a
//   decision that depends only on attributes 0..5, so attributes 6..9 can
//   never be in the core (300 is not a multiple of 64: the last part is
//   short).
// Table B: a base of 107 objects with 12 condition attributes, repeated to
//   1000 objects the way the larger tables of the evaluation were made; its
//   reference core is computed on the 107-object base only.
// Between the two tables the core is cleared.
//
// Also checked: done comes max(count)+2 cycles after each start edge, and
// the cycle counter equals the sum of those run lengths. Each mechanism is
// counted and must occur: short part, idle subCORE, singleton entries
// found, multi-attribute entries rejected, equal-decision pairs masked,
// core growing over several runs, core clear.
module tb_core_phidm;
  localparam int NP = 64, PS = 4, NC = 15, AW = 4;

  int checks = 0, failures = 0;

  logic              clk = 0, rst_n = 0;
  logic              wr_en = 0;
  logic [2:0]        wr_sel = 0;
  logic [5:0]        wr_addr = 0;
  logic [63:0]       wr_data = 0;
  logic [6:0]        cmn_count = 0;
  logic [3:0][6:0]   sub_count = '0;
  logic              start = 0, clear_core = 0;
  logic              busy, done;
  logic [14:0]       core;
  logic [47:0]       busy_cycles;

  core_phidm dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  // mechanism counters
  int n_short_part = 0, n_idle_sub = 0, n_singleton = 0, n_multi = 0;
  int n_same_dec = 0, n_growth = 0, n_clear = 0;
  longint exp_cycles = 0;

  // singleton / multi-difference events seen inside the engine
  always @(posedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < NP; i++) begin
        if (dut.g_sub[0].u_subcore.sd_bit[i]) n_singleton++;
        else if (dut.g_sub[0].u_subcore.cb_word[i] != '0) n_multi++;
      end
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] table_q [$];

  function automatic logic [14:0] diff_of(logic [63:0] x, logic [63:0] y);
    logic [14:0] d = '0;
    if (x[63:60] != y[63:60])
      for (int a = 0; a < NC; a++) d[a] = (x[a*AW +: AW] != y[a*AW +: AW]);
    return d;
  endfunction

  // Reference core of the first n objects of t, by definition.
  function automatic logic [14:0] ref_core(ref logic [63:0] t [$], input int n);
    logic [14:0] c = '0, d;
    for (int i = 0; i < n; i++)
      for (int j = i + 1; j < n; j++) begin
        d = diff_of(t[i], t[j]);
        if ($countones(d) == 1) c |= d;
      end
    return c;
  endfunction

  // Pairs with a single differing attribute but equal decisions (masked).
  function automatic int same_dec_singles(ref logic [63:0] t [$], input int n);
    int s = 0;
    for (int i = 0; i < n; i++)
      for (int j = i + 1; j < n; j++)
        if (t[i][63:60] == t[j][63:60] && $countones(t[i][59:0] ^ t[j][59:0]) > 0) begin
          logic [14:0] d;
          for (int a = 0; a < NC; a++) d[a] = (t[i][a*AW +: AW] != t[j][a*AW +: AW]);
          if ($countones(d) == 1) s++;
        end
    return s;
  endfunction

  task automatic load_part(int sel, int part, int n_obj);
    for (int k = 0; k < NP && part * NP + k < n_obj; k++) begin
      @(negedge clk);
      wr_en = 1; wr_sel = 3'(sel); wr_addr = 6'(k); wr_data = table_q[part * NP + k];
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  function automatic int part_len(int part, int n_obj);
    int r;
    r = n_obj - part * NP;
    return (r > NP) ? NP : r;
  endfunction

  task automatic run_engine(int c_cmn, int c0, int c1, int c2, int c3);
    int lat = 0, c_max;
    logic [14:0] core_before;
    c_max = c0;
    if (c1 > c_max) c_max = c1;
    if (c2 > c_max) c_max = c2;
    if (c3 > c_max) c_max = c3;
    core_before = core;
    @(negedge clk);
    cmn_count = 7'(c_cmn);
    sub_count = {7'(c3), 7'(c2), 7'(c1), 7'(c0)};
    start = 1;
    @(posedge clk);
    @(negedge clk);
    start = 0;
    while (!done) begin
      @(posedge clk); lat++;
      #1;
    end
    checks++;
    if (lat != c_max + 2) begin
      failures++; $display("FAIL run latency %0d, expected %0d", lat, c_max + 2);
    end
    exp_cycles += c_max + 2;
    if (core_before != '0 && core != core_before) n_growth++;
  endtask

  // Host side of CORE-PHIDM for the first n_obj objects of table_q.
  task automatic host_core(int n_obj);
    int m;
    m = (n_obj + NP - 1) / NP;
    for (int i = 0; i < m; i++) begin
      load_part(0, i, n_obj);
      if (part_len(i, n_obj) < NP) n_short_part++;
      for (int j = i; j < m; j += PS) begin
        int cnt [PS];
        for (int k = 0; k < PS; k++) begin
          if (j + k < m) begin
            load_part(k + 1, j + k, n_obj);
            cnt[k] = part_len(j + k, n_obj);
          end else begin
            cnt[k] = 0;
            n_idle_sub++;
          end
        end
        run_engine(part_len(i, n_obj), cnt[0], cnt[1], cnt[2], cnt[3]);
      end
    end
  endtask

  task automatic clear();
    @(negedge clk);
    clear_core = 1;
    @(negedge clk);
    clear_core = 0;
    checks++;
    if (core != '0 || busy_cycles != '0) begin failures++; $display("FAIL clear"); end
    else n_clear++;
    exp_cycles = 0;
  endtask

  task automatic check_result(string name, logic [14:0] exp);
    checks++;
    if (core !== exp) begin
      failures++; $display("FAIL %s: core %b expected %b", name, core, exp);
    end else $display("%s: core %b", name, core);
    checks++;
    if (busy_cycles !== 48'(exp_cycles)) begin
      failures++; $display("FAIL %s: busy cycles %0d expected %0d", name, busy_cycles, exp_cycles);
    end
  endtask

  initial begin
    logic [14:0] exp;
    logic [63:0] o;
    repeat (3) @(negedge clk);
    rst_n = 1;
    clear();

    // ---- table A ----
    table_q.delete();
    for (int i = 0; i < 300; i++) begin
      int s;
      s = 0;
      o = '0;
      for (int a = 0; a < 10; a++) o[a*AW +: AW] = 4'($urandom_range(2));
      for (int a = 0; a < 6; a++) s += int'(o[a*AW +: AW]) * (a + 1);
      o[63:60] = 4'(s % 3);
      table_q.push_back(o);
    end
    exp = ref_core(table_q, 300);
    n_same_dec += same_dec_singles(table_q, 300);
    host_core(300);
    check_result("table A", exp);
    checks++;
    if (exp[14:6] != '0) begin failures++; $display("FAIL table A reference has attributes 6..14"); end

    clear();

    // ---- table B ----
    table_q.delete();
    for (int i = 0; i < 107; i++) begin
      o = '0;
      for (int a = 0; a < 12; a++) o[a*AW +: AW] = 4'($urandom_range(a < 4 ? 3 : 1));
      o[63:60] = 4'((o[3:0] + o[7:4] + o[35:32] + (o[47:44] & o[43:40])) % 2);
      table_q.push_back(o);
    end
    exp = ref_core(table_q, 107);
    for (int i = 107; i < 1000; i++) table_q.push_back(table_q[i % 107]);
    host_core(1000);
    check_result("table B", exp);

    $display("mechanisms: short_part=%0d idle_subcore=%0d singleton=%0d multi_rejected=%0d same_decision_masked=%0d growth=%0d clear=%0d",
             n_short_part, n_idle_sub, n_singleton, n_multi, n_same_dec, n_growth, n_clear);
    if (n_short_part == 0) begin failures++; $display("FAIL no short part"); end
    if (n_idle_sub == 0)   begin failures++; $display("FAIL no idle subCORE"); end
    if (n_singleton == 0)  begin failures++; $display("FAIL no singleton"); end
    if (n_multi == 0)      begin failures++; $display("FAIL no multi-attribute entry"); end
    if (n_same_dec == 0)   begin failures++; $display("FAIL no equal-decision pair"); end
    if (n_growth == 0)     begin failures++; $display("FAIL core never grew over runs"); end
    if (n_clear == 0)      begin failures++; $display("FAIL no clear"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
