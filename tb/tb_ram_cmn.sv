// tb_ram_cmn: self-checking testbench of the common part memory.
//
// Writes random 64-bit objects into all 64 slots (in random order, with
// some writes suppressed by wr_en = 0), checks that every slot shows its
// last written object on the parallel output, and checks the slot enables
// for every object count 0 .. 64.
module tb_ram_cmn;
  int checks = 0, failures = 0;

  logic              clk = 0;
  logic              wr_en;
  logic [5:0]        wr_addr;
  logic [63:0]       wr_data;
  logic [6:0]        count;
  logic [63:0][63:0] obj;
  logic [63:0]       slot_en;
  logic [63:0]       model [64];

  ram_cmn dut (.clk, .wr_en, .wr_addr, .wr_data, .count, .obj, .slot_en);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_addr = 0; wr_data = 0; count = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(i); wr_data = {$urandom(), $urandom()};
      model[i] = wr_data;
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      wr_en = ($urandom_range(3) != 0); wr_addr = 6'($urandom_range(63)); wr_data = {$urandom(), $urandom()};
      if (wr_en) model[wr_addr] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    @(negedge clk);
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (obj[i] !== model[i]) begin failures++; $display("FAIL slot %0d", i); end
    end
    for (int c = 0; c <= 64; c++) begin
      count = 7'(c);
      #1;
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (slot_en[i] !== (i < c)) begin failures++; $display("FAIL count %0d slot %0d", c, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
