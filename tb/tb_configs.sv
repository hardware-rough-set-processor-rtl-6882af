// tb_configs: the three evaluated engine configurations, with 1, 2 and 4
// subCORE blocks, run side by side on the same 700-object table.
//
// Each configuration is a core_phidm_host instance (engine plus host
// procedure). All three must return the same core, equal to a reference
// computed here from the definition on the same table, and each must report
// exactly the busy cycles its run lengths predict. The busy-cycle and
// total-cycle ratios between the configurations are printed; the engine's
// own time falls almost as 1/P_SUB, while the time spent loading objects
// does not, which is what limits the gain of more subCOREs when the host
// copies the data.
module tb_configs;
  localparam int N = 700;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, go = 0;
  always #10 clk = ~clk;

  logic        fin [3];
  logic [14:0] core [3];
  longint      busy [3], all [3], bexp [3];

  core_phidm_host #(.P_SUB(1), .N_OBJ(N), .SEED(7)) h1 (.clk, .rst_n, .go, .finished(fin[0]),
    .core(core[0]), .busy_total(busy[0]), .all_total(all[0]), .busy_expected(bexp[0]));
  core_phidm_host #(.P_SUB(2), .N_OBJ(N), .SEED(7)) h2 (.clk, .rst_n, .go, .finished(fin[1]),
    .core(core[1]), .busy_total(busy[1]), .all_total(all[1]), .busy_expected(bexp[1]));
  core_phidm_host #(.P_SUB(4), .N_OBJ(N), .SEED(7)) h4 (.clk, .rst_n, .go, .finished(fin[2]),
    .core(core[2]), .busy_total(busy[2]), .all_total(all[2]), .busy_expected(bexp[2]));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [14:0] exp, d;
    int p [3] = '{1, 2, 4};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    go = 1;
    wait (fin[0] && fin[1] && fin[2]);
    // reference on the table built by the P_SUB = 1 instance
    exp = '0;
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++)
        if (h1.tbl[i][63:60] != h1.tbl[j][63:60]) begin
          for (int a = 0; a < 15; a++) d[a] = (h1.tbl[i][a*4 +: 4] != h1.tbl[j][a*4 +: 4]);
          if ($countones(d) == 1) exp |= d;
        end
    checks++;
    if (exp == '0 || exp[14:6] != '0) begin failures++; $display("FAIL reference core %b", exp); end
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (core[c] !== exp) begin failures++; $display("FAIL P_SUB=%0d core %b expected %b", p[c], core[c], exp); end
      checks++;
      if (busy[c] != bexp[c]) begin failures++; $display("FAIL P_SUB=%0d busy %0d expected %0d", p[c], busy[c], bexp[c]); end
      $display("P_SUB=%0d: core %b, busy %0d cycles, with loading %0d cycles, speed-up vs 1: busy %0.3f, total %0.3f",
               p[c], core[c], busy[c], all[c], real'(busy[0]) / real'(busy[c]), real'(all[0]) / real'(all[c]));
    end
    checks++;
    if (!(busy[1] < busy[0] && busy[2] < busy[1])) begin failures++; $display("FAIL busy time does not fall with P_SUB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
