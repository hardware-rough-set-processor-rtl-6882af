// tb_sd: self-checking testbench of the singleton detector.
//
// Exhaustive over all 2^12 words of a 12-attribute detector, plus random
// words at the default 15 attributes. The reference counts set bits with
// $countones: a word passes only if exactly one bit is set.
module tb_sd;
  int checks = 0, failures = 0;

  logic [11:0] d12, o12;
  logic        s12;
  logic [14:0] d15, o15;
  logic        s15;

  sd #(.N_COND(12)) dut12 (.diff(d12), .is_single(s12), .single_out(o12));
  sd                dut15 (.diff(d15), .is_single(s15), .single_out(o15));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      d12 = 12'(v);
      #1;
      checks++;
      if (s12 !== ($countones(d12) == 1) || o12 !== (($countones(d12) == 1) ? d12 : 12'b0)) begin
        failures++;
        $display("FAIL word %b: flag %b out %b", d12, s12, o12);
      end
    end
    for (int t = 0; t < 1000; t++) begin
      d15 = (t % 2) ? 15'(1 << $urandom_range(14)) : 15'($urandom());
      #1;
      checks++;
      if (s15 !== ($countones(d15) == 1) || o15 !== (($countones(d15) == 1) ? d15 : 15'b0)) begin
        failures++;
        $display("FAIL word %b: flag %b out %b", d15, s15, o15);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
