// tb_subcore: self-checking testbench of the subCORE generator block.
//
// Part 1 replays the worked example (12 objects, 4 binary condition
// attributes, one subCORE holding the whole table in RAM_n and the same
// table on the RAM_cmn side). The first TEMP value (object 1 against all
// twelve) must be 0111 and the OR of all TEMP values 1111. Every TEMP value
// is also compared with a reference computed in the testbench, and TEMP must
// be valid for exactly `count` cycles, starting two cycles after the start
// edge. In the first compare cycle the comparator words, the singleton flags
// and the output of each of the twelve OR stages are compared with the values
// listed for the example.
// Part 2 runs the default size (64 objects of 16 four-bit fields) with
// random data built so that single-attribute differences occur, and partial
// object counts on both sides.
module tb_subcore;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- part 1: worked example ----------------
  localparam logic [4:0] EX [12] = '{5'b00111, 5'b01111, 5'b10110, 5'b10101, 5'b10011, 5'b01011,
                                     5'b11010, 5'b00101, 5'b10011, 5'b10001, 5'b11001, 5'b11100};
  // comparator word (IN_CB), SD word (first gate in the MSB) and gate
  // outputs OUT_1 .. OUT_12 for object 1 against objects 1 .. 12
  localparam logic [3:0] EX_CB  [12] = '{4'b0000, 4'b0000, 4'b0001, 4'b0010, 4'b0100, 4'b0000,
                                         4'b1101, 4'b0000, 4'b0100, 4'b0110, 4'b1110, 4'b1011};
  localparam logic [11:0] EX_SD = 12'b001110001000;
  localparam logic [3:0] EX_OUT [12] = '{4'b0000, 4'b0000, 4'b0001, 4'b0011, 4'b0111, 4'b0111,
                                         4'b0111, 4'b0111, 4'b0111, 4'b0111, 4'b0111, 4'b0111};
  logic             e_wr_en = 0, e_start = 0;
  logic [3:0]       e_wr_addr = 0;
  logic [4:0]       e_wr_data = 0;
  logic [11:0][4:0] e_cmn;
  logic [3:0]       e_count = 12;
  logic             e_active, e_tv;
  logic [3:0]       e_temp;

  subcore #(.ATTR_W(1), .N_COND(4), .N_PART(12)) dut_ex (
    .clk, .rst_n, .wr_en(e_wr_en), .wr_addr(e_wr_addr), .wr_data(e_wr_data),
    .cmn_obj(e_cmn), .cmn_en(12'hfff), .start(e_start), .count(e_count),
    .active(e_active), .temp(e_temp), .temp_valid(e_tv));

  // ---------------- part 2: default size ----------------
  logic              d_wr_en = 0, d_start = 0;
  logic [5:0]        d_wr_addr = 0;
  logic [63:0]       d_wr_data = 0;
  logic [63:0][63:0] d_cmn;
  logic [63:0]       d_en;
  logic [6:0]        d_count = 0;
  logic              d_active, d_tv;
  logic [14:0]       d_temp;
  logic [63:0]       d_ram [64];

  subcore dut (
    .clk, .rst_n, .wr_en(d_wr_en), .wr_addr(d_wr_addr), .wr_data(d_wr_data),
    .cmn_obj(d_cmn), .cmn_en(d_en), .start(d_start), .count(d_count),
    .active(d_active), .temp(d_temp), .temp_valid(d_tv));

  function automatic logic [14:0] ref_sub64(logic [63:0] y, logic [63:0][63:0] c, logic [63:0] en);
    logic [14:0] r = '0;
    logic [14:0] d;
    for (int i = 0; i < 64; i++) begin
      d = '0;
      if (en[i] && c[i][63:60] != y[63:60])
        for (int a = 0; a < 15; a++) d[a] = (c[i][a*4 +: 4] != y[a*4 +: 4]);
      if ($countones(d) == 1) r |= d;
    end
    return r;
  endfunction

  function automatic logic [3:0] ref_sub5(logic [4:0] y);
    logic [3:0] r = '0;
    for (int i = 0; i < 12; i++) begin
      logic [3:0] d = (EX[i][4] != y[4]) ? (EX[i][3:0] ^ y[3:0]) : 4'b0;
      if ($countones(d) == 1) r |= d;
    end
    return r;
  endfunction

  function automatic logic [63:0] rand_obj();
    logic [63:0] o = '0;
    for (int a = 0; a < 10; a++) o[a*4 +: 4] = 4'($urandom_range(1));
    o[63:60] = 4'($urandom_range(2));
    return o;
  endfunction

  initial begin
    logic [3:0]  acc;
    logic [14:0] acc64, exp64;
    int          n_valid;
    for (int i = 0; i < 12; i++) e_cmn[i] = EX[i];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 12; i++) begin
      e_wr_en = 1; e_wr_addr = 4'(i); e_wr_data = EX[i];
      @(negedge clk);
    end
    e_wr_en = 0;
    e_start = 1;
    @(negedge clk);          // start edge passed: first compare cycle
    e_start = 0;
    // y = object 1: the comparator words, singleton flags and the output of
    // every OR stage listed in the worked example (stage i = RAM_cmn slot i)
    for (int i = 0; i < 12; i++) begin
      checks++;
      if (dut_ex.cb_word[i] !== EX_CB[i] || dut_ex.sd_bit[i] !== EX_SD[11-i] ||
          dut_ex.u_or.chain[i+1] !== EX_OUT[i]) begin
        failures++;
        $display("FAIL example stage %0d: CB %b SD %b OUT %b", i + 1, dut_ex.cb_word[i],
                 dut_ex.sd_bit[i], dut_ex.u_or.chain[i+1]);
      end
    end
    checks++;
    if (e_tv) begin failures++; $display("FAIL example: TEMP valid too early"); end
    @(negedge clk);          // TEMP of object 1
    acc = '0;
    for (int k = 0; k < 12; k++) begin
      checks++;
      if (!e_tv || e_temp !== ref_sub5(EX[k])) begin
        failures++; $display("FAIL example step %0d: valid %b temp %b exp %b", k, e_tv, e_temp, ref_sub5(EX[k]));
      end
      if (k == 0) begin
        checks++;
        if (e_temp !== 4'b0111) begin failures++; $display("FAIL example first TEMP %b", e_temp); end
      end
      acc |= e_temp;
      @(negedge clk);
    end
    checks++;
    if (e_tv || e_temp !== 4'b0) begin failures++; $display("FAIL example: TEMP valid too long"); end
    checks++;
    if (acc !== 4'b1111) begin failures++; $display("FAIL example core %b", acc); end

    // part 2
    for (int r = 0; r < 6; r++) begin
      int c_cmn, c_n;
      c_cmn = (r == 0) ? 64 : $urandom_range(64, 1);
      c_n   = (r == 1) ? 64 : $urandom_range(64, 1);
      for (int i = 0; i < 64; i++) d_ram[i] = rand_obj();
      // half of the RAM_cmn objects are near copies of early RAM_n objects,
      // so that single-attribute differences are common
      for (int i = 0; i < 64; i++) begin
        d_cmn[i] = rand_obj();
        if (i % 2 == 0) begin
          int unsigned src, fld;
          src = $urandom_range(c_n - 1);
          fld = $urandom_range(9);
          d_cmn[i] = d_ram[src];
          d_cmn[i][fld*4 +: 4] = ~d_cmn[i][fld*4 +: 4];
          d_cmn[i][63:60] = 4'($urandom_range(2));
        end
        d_en[i]  = (i < c_cmn);
      end
      for (int i = 0; i < 64; i++) begin
        d_wr_en = 1; d_wr_addr = 6'(i); d_wr_data = d_ram[i];
        @(negedge clk);
      end
      d_wr_en = 0;
      d_count = 7'(c_n);
      d_start = 1;
      @(negedge clk);
      d_start = 0;
      @(negedge clk);
      acc64 = '0; exp64 = '0; n_valid = 0;
      for (int k = 0; k < c_n; k++) begin
        logic [14:0] e;
        e = ref_sub64(d_ram[k], d_cmn, d_en);
        checks++;
        if (!d_tv || d_temp !== e) begin
          failures++; $display("FAIL run %0d step %0d: %h vs %h", r, k, d_temp, e);
        end
        acc64 |= d_temp; exp64 |= e;
        @(negedge clk);
      end
      checks++;
      if (d_tv) begin failures++; $display("FAIL run %0d: TEMP valid too long", r); end
      checks++;
      if (acc64 !== exp64 || exp64 == '0) begin failures++; $display("FAIL run %0d sub-core %h vs %h", r, acc64, exp64); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
