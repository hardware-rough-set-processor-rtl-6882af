// tb_cycle_timer: self-checking testbench of the time measurement unit.
//
// Toggles `run` randomly and checks the count against a model counter every
// cycle; checks the synchronous clear, and saturation with an 8-bit counter.
module tb_cycle_timer;
  int checks = 0, failures = 0;

  logic        clk = 0, rst_n = 0, clear = 0, run = 0;
  logic [47:0] cycles;
  logic [7:0]  c8;
  longint      model = 0;
  int          model8 = 0;

  cycle_timer         dut  (.clk, .rst_n, .clear, .run, .cycles);
  cycle_timer #(.W(8)) dut8 (.clk, .rst_n, .clear(1'b0), .run(1'b1), .cycles(c8));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      run   = ($urandom_range(1) == 1);
      clear = ($urandom_range(99) == 0);
      @(posedge clk);
      if (clear) model = 0; else if (run) model++;
      if (model8 < 255) model8++;
      @(negedge clk);
      checks++;
      if (cycles !== 48'(model)) begin failures++; $display("FAIL t %0d: %0d vs %0d", t, cycles, model); end
    end
    checks++;
    if (c8 !== 8'hff) begin failures++; $display("FAIL saturation %0d", c8); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
