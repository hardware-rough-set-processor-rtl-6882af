// tb_workloads: the two kinds of decision tables of the evaluation, run
// through the CORE-PHIDM engine at its default size (4 subCOREs, 64-object
// parts, 64-bit objects).
//
// Poker-hand tables: each object is a hand of five distinct cards, ten
//   condition attributes (suit 1..4 and rank 1..13 of each card, 4-bit codes)
//   and the hand class 0..9 as decision (nothing, one pair, two pairs, three
//   of a kind, straight, flush, full house, four of a kind, straight flush,
//   royal flush), computed here from the cards. Half of the hands are made
//   from an earlier hand by changing one card, so that pairs of hands that
//   differ in a single attribute exist. 44 bits are used; the rest of the
//   64-bit word is zero. Sizes: 1000, 2500 and 5000 objects.
// Diabetes-style tables: twelve condition attributes and a binary decision,
//   a base of 107 objects repeated to the table size, as the larger tables of
//   the evaluation were built. The clinical data itself is not available to
//   this testbench, so the base rows are synthetic. 52 bits are used. Sizes:
//   1000, 2500, 5000 and 10000 objects.
//
// For every table the engine's core is compared with a reference from the
// definition (on the whole table for poker hands, on the 107-row base for the
// repeated tables), and the busy-cycle counter with the sum over runs of
// max(count)+2. The total cycle count including the host's object writes is
// printed for comparison with the processing times of the evaluation.
module tb_workloads;
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

  always #10 clk = ~clk;

  longint exp_cycles = 0, total_cycles = 0;
  always @(posedge clk) total_cycles++;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] table_q [$];

  function automatic logic [14:0] ref_core(ref logic [63:0] t [$], input int n);
    logic [14:0] c = '0, d;
    for (int i = 0; i < n; i++)
      for (int j = i + 1; j < n; j++)
        if (t[i][63:60] != t[j][63:60]) begin
          for (int a = 0; a < NC; a++) d[a] = (t[i][a*AW +: AW] != t[j][a*AW +: AW]);
          if ($countones(d) == 1) c |= d;
        end
    return c;
  endfunction

  // ---------------- poker hands ----------------
  function automatic int hand_class(logic [63:0] h);
    int suit [5], rank [5], cnt [14], pairs, threes, fours, mn, mx;
    bit flush, straight, royal;
    for (int r = 0; r < 14; r++) cnt[r] = 0;
    for (int k = 0; k < 5; k++) begin
      suit[k] = int'(h[(2*k)*AW +: AW]);
      rank[k] = int'(h[(2*k+1)*AW +: AW]);
      cnt[rank[k]]++;
    end
    flush = 1;
    for (int k = 1; k < 5; k++) if (suit[k] != suit[0]) flush = 0;
    pairs = 0; threes = 0; fours = 0; mn = 14; mx = 0;
    for (int r = 1; r < 14; r++) begin
      if (cnt[r] == 2) pairs++;
      if (cnt[r] == 3) threes++;
      if (cnt[r] == 4) fours++;
      if (cnt[r] > 0 && r < mn) mn = r;
      if (cnt[r] > 0 && r > mx) mx = r;
    end
    royal    = (cnt[1] == 1 && cnt[10] == 1 && cnt[11] == 1 && cnt[12] == 1 && cnt[13] == 1);
    straight = (pairs == 0 && threes == 0 && fours == 0 && (mx - mn == 4 || royal));
    if (straight && flush && royal) return 9;
    if (straight && flush)          return 8;
    if (fours == 1)                 return 7;
    if (threes == 1 && pairs == 1)  return 6;
    if (flush)                      return 5;
    if (straight)                   return 4;
    if (threes == 1)                return 3;
    if (pairs == 2)                 return 2;
    if (pairs == 1)                 return 1;
    return 0;
  endfunction

  function automatic bit cards_distinct(logic [63:0] h);
    for (int i = 0; i < 5; i++)
      for (int j = i + 1; j < 5; j++)
        if (h[(2*i)*AW +: 2*AW] == h[(2*j)*AW +: 2*AW]) return 0;
    return 1;
  endfunction

  function automatic logic [63:0] random_hand();
    logic [63:0] h;
    do begin
      h = '0;
      for (int k = 0; k < 5; k++) begin
        h[(2*k)*AW +: AW]   = 4'($urandom_range(4, 1));
        h[(2*k+1)*AW +: AW] = 4'($urandom_range(13, 1));
      end
    end while (!cards_distinct(h));
    return h;
  endfunction

  task automatic make_poker(int n);
    logic [63:0] h;
    int a;
    table_q.delete();
    for (int i = 0; i < n; i++) begin
      if (i > 0 && $urandom_range(1) == 1) begin
        do begin
          h = table_q[$urandom_range(i - 1)];
          h[63:60] = '0;
          a = $urandom_range(9);
          h[a*AW +: AW] = (a % 2 == 0) ? 4'($urandom_range(4, 1)) : 4'($urandom_range(13, 1));
        end while (!cards_distinct(h));
      end else h = random_hand();
      h[63:60] = 4'(hand_class(h));
      table_q.push_back(h);
    end
  endtask

  // ---------------- diabetes-style ----------------
  task automatic make_repeated(int n);
    logic [63:0] o;
    table_q.delete();
    // half of the base rows are an earlier row with one attribute changed
    for (int i = 0; i < 107; i++) begin
      if (i > 0 && $urandom_range(1) == 1) begin
        int a;
        o = table_q[$urandom_range(i - 1)];
        a = $urandom_range(11);
        o[a*AW +: AW] = 4'(o[a*AW +: AW] == 0);
      end else begin
        o = '0;
        for (int a = 0; a < 12; a++) o[a*AW +: AW] = 4'($urandom_range(1));
      end
      o[63:60] = 4'((o[3:0] + o[11:8] + o[23:20] + (o[31:28] & o[43:40]) + o[47:44]) % 2);
      table_q.push_back(o);
    end
    for (int i = 107; i < n; i++) table_q.push_back(table_q[i % 107]);
  endtask

  // ---------------- host ----------------
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

  task automatic run_engine(int c_cmn, int cnt [PS]);
    int c_max = 0;
    for (int k = 0; k < PS; k++) if (cnt[k] > c_max) c_max = cnt[k];
    @(negedge clk);
    cmn_count = 7'(c_cmn);
    for (int k = 0; k < PS; k++) sub_count[k] = 7'(cnt[k]);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    exp_cycles += c_max + 2;
  endtask

  task automatic host_core(int n_obj);
    int m, cnt [PS];
    m = (n_obj + NP - 1) / NP;
    for (int i = 0; i < m; i++) begin
      load_part(0, i, n_obj);
      for (int j = i; j < m; j += PS) begin
        for (int k = 0; k < PS; k++) begin
          if (j + k < m) begin
            load_part(k + 1, j + k, n_obj);
            cnt[k] = part_len(j + k, n_obj);
          end else cnt[k] = 0;
        end
        run_engine(part_len(i, n_obj), cnt);
      end
    end
  endtask

  task automatic run_table(string name, int n, logic [14:0] exp);
    longint t0;
    @(negedge clk);
    clear_core = 1;
    @(negedge clk);
    clear_core = 0;
    exp_cycles = 0;
    t0 = total_cycles;
    host_core(n);
    checks++;
    if (core !== exp) begin
      failures++; $display("FAIL %s: core %b expected %b", name, core, exp);
    end
    checks++;
    if (busy_cycles !== 48'(exp_cycles)) begin
      failures++; $display("FAIL %s: busy cycles %0d expected %0d", name, busy_cycles, exp_cycles);
    end
    $display("%s, %0d objects: core %b, engine busy %0d cycles, with object loading %0d cycles",
             name, n, core, busy_cycles, total_cycles - t0);
  endtask

  initial begin
    logic [14:0] exp;
    int sizes_p [3] = '{1000, 2500, 5000};
    int sizes_d [4] = '{1000, 2500, 5000, 10000};
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (sizes_p[s]) begin
      make_poker(sizes_p[s]);
      exp = ref_core(table_q, sizes_p[s]);
      run_table("poker hands", sizes_p[s], exp);
    end
    foreach (sizes_d[s]) begin
      make_repeated(sizes_d[s]);
      exp = ref_core(table_q, 107);
      run_table("diabetes-style", sizes_d[s], exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
