// tb_cb: self-checking testbench of the comparator block.
//
// Drives random object pairs at the default 4-bit x 15-attribute format
// (half of them with equal decisions, many with only a few differing
// fields) and compares `diff` with a reference built field by field in the
// testbench. Also checks the disable input and the two comparator words of
// the worked example (5-bit objects, binary attributes) with a second
// instance.
module tb_cb;
  localparam int unsigned AW = 4;
  localparam int unsigned NC = 15;
  localparam int unsigned OW = AW * (NC + 1);

  int checks = 0, failures = 0;

  logic          en;
  logic [OW-1:0] x, y;
  logic [NC-1:0] diff, exp_diff;

  cb #(.ATTR_W(AW), .N_COND(NC)) dut (.en, .x, .y, .diff);

  // worked-example format
  logic [4:0] ex_x, ex_y;
  logic [3:0] ex_diff;
  cb #(.ATTR_W(1), .N_COND(4)) dut_ex (.en(1'b1), .x(ex_x), .y(ex_y), .diff(ex_diff));

  function automatic logic [NC-1:0] ref_diff(logic e, logic [OW-1:0] a, logic [OW-1:0] b);
    logic [NC-1:0] r = '0;
    if (e && a[OW-1 -: AW] != b[OW-1 -: AW])
      for (int i = 0; i < NC; i++)
        for (int k = 0; k < AW; k++)
          if (a[i*AW+k] != b[i*AW+k]) r[i] = 1'b1;
    return r;
  endfunction

  task automatic check(string what, logic [NC-1:0] got, logic [NC-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned fld, n_flip;
    for (int t = 0; t < 2000; t++) begin
      en = (t % 10) != 9;
      x  = {$urandom(), $urandom()};
      y  = x;
      // flip 0..3 random fields
      n_flip = $urandom_range(3);
      for (int f = 0; f < n_flip; f++) begin
        fld = $urandom_range(NC - 1);
        y[fld*AW +: AW] = y[fld*AW +: AW] ^ AW'($urandom_range(15, 1));
      end
      if (t % 2 == 0) y[OW-1 -: AW] = ~x[OW-1 -: AW];
      #1;
      exp_diff = ref_diff(en, x, y);
      check($sformatf("random pair %0d", t), diff, exp_diff);
    end
    // Worked example: object 1 = 00111 against object 3 = 10110 -> 0001,
    // against object 7 = 11010 -> 1101, against object 2 (same decision) -> 0.
    ex_x = 5'b00111; ex_y = 5'b10110; #1; checks++; if (ex_diff !== 4'b0001) begin failures++; $display("FAIL ex 1-3 %b", ex_diff); end
    ex_y = 5'b11010; #1; checks++; if (ex_diff !== 4'b1101) begin failures++; $display("FAIL ex 1-7 %b", ex_diff); end
    ex_y = 5'b01111; #1; checks++; if (ex_diff !== 4'b0000) begin failures++; $display("FAIL ex 1-2 %b", ex_diff); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
