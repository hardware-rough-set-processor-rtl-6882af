// tb_or_cascade: self-checking testbench of the gated OR cascade.
//
// First replays the worked example: twelve 4-bit comparator words with their
// singleton flags (first object against all twelve), whose last stage must
// give 0111. Then drives random words and flags at the default size
// (64 stages, 15 attributes) against a reference OR of the flagged words.
module tb_or_cascade;
  int checks = 0, failures = 0;

  logic [11:0][3:0] ex_word;
  logic [11:0]      ex_bit;
  logic [3:0]       ex_out;
  or_cascade #(.N_COND(4), .N_PART(12)) dut_ex (.cb_word(ex_word), .sd_bit(ex_bit), .sub_core(ex_out));

  localparam int unsigned NC = 15, NP = 64;
  logic [NP-1:0][NC-1:0] word;
  logic [NP-1:0]         sbit;
  logic [NC-1:0]         out, exp_out;
  or_cascade dut (.cb_word(word), .sd_bit(sbit), .sub_core(out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // stage 0 is the first gate (IN_1), stage 11 the last
    ex_word = '{4'b1011, 4'b1110, 4'b0110, 4'b0100, 4'b0000, 4'b1101,
                4'b0000, 4'b0100, 4'b0010, 4'b0001, 4'b0000, 4'b0000};
    ex_bit  = 12'b0001_0001_1100;   // bit i = SD flag of stage i
    #1;
    checks++;
    if (ex_out !== 4'b0111) begin failures++; $display("FAIL example: %b", ex_out); end
    for (int t = 0; t < 500; t++) begin
      exp_out = '0;
      for (int i = 0; i < NP; i++) begin
        word[i] = NC'($urandom());
        sbit[i] = ($urandom_range(7) == 0);
        if (sbit[i]) exp_out |= word[i];
      end
      #1;
      checks++;
      if (out !== exp_out) begin failures++; $display("FAIL random %0d: %h vs %h", t, out, exp_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
