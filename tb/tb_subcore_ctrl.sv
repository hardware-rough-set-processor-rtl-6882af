// tb_subcore_ctrl: self-checking testbench of the subCORE control logic.
//
// For object counts 0, 1, 2, a random set and the full 64, starts a run and
// checks that the index sequence 0 .. count-1 appears one per cycle starting
// in the cycle after the start edge, that `active` lasts exactly `count`
// cycles, and that a start during a run is ignored.
module tb_subcore_ctrl;
  int checks = 0, failures = 0;

  logic       clk = 0, rst_n = 0, start = 0;
  logic [6:0] count = 0;
  logic       active;
  logic [5:0] sel;

  subcore_ctrl dut (.clk, .rst_n, .start, .count, .active, .sel);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int c, bit restart_mid);
    int n_active = 0;
    count = 7'(c);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    // now in the first cycle after the start edge
    for (int k = 0; k < c; k++) begin
      if (restart_mid && k == c / 2) start = 1;
      checks++;
      if (!active || sel !== 6'(k)) begin
        failures++; $display("FAIL count %0d step %0d: active %b sel %0d", c, k, active, sel);
      end
      @(negedge clk); start = 0;
    end
    checks++;
    if (active) begin failures++; $display("FAIL count %0d: still active", c); end
    repeat (3) begin
      @(negedge clk);
      if (active) n_active++;
    end
    checks++;
    if (n_active != 0) begin failures++; $display("FAIL count %0d: restarted", c); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 0);
    run(1, 0);
    run(2, 0);
    run(64, 0);
    run(40, 1);
    for (int t = 0; t < 20; t++) run($urandom_range(64, 1), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
