// tb_example: the worked example of a binary decision table with twelve
// objects, four binary condition attributes (outlook, temp, humidity,
// windy) and a binary decision (mixing), run through the whole engine
// configured as in the example: one subCORE, 1-bit attributes, parts of 12
// objects, so the table fits in one part held in both RAM_cmn and RAM_1.
//
// Checks: the first TEMP value (object 1 of RAM_1 against all twelve objects)
// is 0111; the final core is 1111 (all four attributes); done comes 12+2
// cycles after the start edge. Then the six-object sub-table whose
// discernibility matrix is worked by hand (cells {o},{t},{h} in column 1 and
// {w} for objects 5 and 6) is run and must also give 1111, and a sub-table of
// objects 1..5 (no {w} cell) must give 0111.
module tb_example;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0;
  logic        wr_en = 0;
  logic [0:0]  wr_sel = 0;
  logic [3:0]  wr_addr = 0;
  logic [4:0]  wr_data = 0;
  logic [3:0]  cmn_count = 0;
  logic [0:0][3:0] sub_count = '0;
  logic        start = 0, clear_core = 0;
  logic        busy, done;
  logic [3:0]  core;
  logic [47:0] busy_cycles;

  core_phidm #(.ATTR_W(1), .N_COND(4), .N_PART(12), .P_SUB(1)) dut (.*);

  always #10 clk = ~clk;

  // MSB = mixing (decision), then windy, humidity, temp, outlook (LSB)
  localparam logic [4:0] EX [12] = '{5'b00111, 5'b01111, 5'b10110, 5'b10101, 5'b10011, 5'b01011,
                                     5'b11010, 5'b00101, 5'b10011, 5'b10001, 5'b11001, 5'b11100};

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_table(int n, logic [3:0] exp, bit check_first);
    int lat = 0;
    @(negedge clk);
    clear_core = 1;
    @(negedge clk);
    clear_core = 0;
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < n; i++) begin
        wr_en = 1; wr_sel = 1'(s); wr_addr = 4'(i); wr_data = EX[i];
        @(negedge clk);
      end
    wr_en = 0;
    cmn_count = 4'(n);
    sub_count[0] = 4'(n);
    start = 1;
    @(posedge clk);
    @(negedge clk);
    start = 0;
    @(negedge clk);          // TEMP now holds the result for object 1
    if (check_first) begin
      checks++;
      if (dut.g_sub[0].u_subcore.temp !== 4'b0111) begin
        failures++; $display("FAIL first TEMP %b", dut.g_sub[0].u_subcore.temp);
      end
    end
    lat = 1;
    while (!done) begin
      @(negedge clk); lat++;
    end
    checks++;
    if (lat != n + 2) begin failures++; $display("FAIL latency %0d expected %0d", lat, n + 2); end
    checks++;
    if (core !== exp) begin failures++; $display("FAIL %0d objects: core %b expected %b", n, core, exp); end
    else $display("%0d objects: core %b", n, core);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_table(12, 4'b1111, 1);
    run_table(6, 4'b1111, 1);
    run_table(5, 4'b0111, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
