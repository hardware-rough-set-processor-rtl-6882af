// tb_mux_n: self-checking testbench of the RAM_n object multiplexer.
//
// Fills the 64 input words with random 64-bit objects and checks, for every
// index and for random reloads, that the selected word comes out.
module tb_mux_n;
  int checks = 0, failures = 0;

  logic [63:0][63:0] obj;
  logic [5:0]        sel;
  logic [63:0]       y;

  mux_n dut (.obj, .sel, .y);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < 64; i++) obj[i] = {$urandom(), $urandom()};
      for (int i = 0; i < 64; i++) begin
        sel = 6'(i);
        #1;
        checks++;
        if (y !== obj[i]) begin failures++; $display("FAIL sel %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
