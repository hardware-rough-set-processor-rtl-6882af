// tb_ram_n: self-checking testbench of the subCORE part memory.
//
// Writes random 64-bit objects into all 64 slots, then random overwrites
// with some writes suppressed by wr_en = 0, and checks every slot's word on
// the output against a model array.
module tb_ram_n;
  int checks = 0, failures = 0;

  logic              clk = 0;
  logic              wr_en;
  logic [5:0]        wr_addr;
  logic [63:0]       wr_data;
  logic [63:0][63:0] obj;
  logic [63:0]       model [64];

  ram_n dut (.clk, .wr_en, .wr_addr, .wr_data, .obj);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_addr = 0; wr_data = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(i); wr_data = {$urandom(), $urandom()};
      model[i] = wr_data;
    end
    for (int r = 0; r < 5; r++) begin
      for (int t = 0; t < 100; t++) begin
        @(negedge clk);
        wr_en = ($urandom_range(3) != 0); wr_addr = 6'($urandom_range(63)); wr_data = {$urandom(), $urandom()};
        if (wr_en) model[wr_addr] = wr_data;
      end
      @(negedge clk);
      wr_en = 0;
      @(negedge clk);
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (obj[i] !== model[i]) begin failures++; $display("FAIL round %0d slot %0d", r, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
