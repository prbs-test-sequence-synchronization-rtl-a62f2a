// Self-checking testbench of prbs_lfsr.
//
// 1. A 2^23-1 generator (taps 23, 18) is compared bit by bit with the
//    recurrence b[k] = b[k-18] ^ b[k-23] kept in the testbench, started from
//    the all-ones reset state.
// 2. A 2^7-1 generator (taps 7, 6) must repeat after exactly 127 bits, not
//    earlier, and hold 64 ones per period.
// 3. A second 23-bit register in load mode takes 23 generator bits and must
//    then predict the generator exactly.
// 4. With en_i low the state must not move.
module prbs_lfsr_tb;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // 23-bit generator and 23-bit receiver reference
  logic en_g, prbs_g;
  logic [22:0] st_g;
  logic en_r, load_r, prbs_r;
  logic [22:0] st_r;
  // 7-bit generator
  logic en7, prbs7;
  logic [6:0] st7;

  prbs_lfsr #(.N(23), .TAP1(18), .TAP2(23)) u_gen (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en_g), .load_i(1'b0), .din_i(1'b0),
    .prbs_o(prbs_g), .state_o(st_g));
  prbs_lfsr #(.N(23), .TAP1(18), .TAP2(23)) u_ref (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en_r), .load_i(load_r), .din_i(prbs_g),
    .prbs_o(prbs_r), .state_o(st_r));
  prbs_lfsr #(.N(7), .TAP1(6), .TAP2(7)) u_p7 (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en7), .load_i(1'b0), .din_i(1'b0),
    .prbs_o(prbs7), .state_o(st7));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // history of generated bits, hist[0] is the newest
  bit hist[23];
  bit exp_bit;
  int ones;
  logic [6:0] st7_start;
  int period;

  initial begin
    en_g = 0; en_r = 0; load_r = 0; en7 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    foreach (hist[i]) hist[i] = 1'b1;
    @(negedge clk);
    // 1: generator against recurrence; 3: reference loads the first 23 bits
    en_g = 1; en_r = 1; load_r = 1;
    for (int k = 0; k < 3000; k++) begin
      exp_bit = hist[17] ^ hist[22];
      check(prbs_g == exp_bit, $sformatf("gen bit %0d", k));
      if (k >= 23) check(prbs_r == prbs_g, $sformatf("ref prediction bit %0d", k));
      if (k == 22) begin
        @(posedge clk);
        for (int i = 22; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = exp_bit;
        @(negedge clk);
        load_r = 0;
        check(st_r == st_g, "ref state equals generator after 23 loads");
        continue;
      end
      @(posedge clk);
      for (int i = 22; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = exp_bit;
      @(negedge clk);
    end
    // 4: hold
    en_g = 0; en_r = 0;
    begin
      logic [22:0] s;
      s = st_g;
      repeat (5) @(negedge clk);
      check(st_g == s, "state held with en low");
    end
    // 2: period of the 7-bit sequence
    st7_start = st7;
    en7 = 1; ones = 0; period = 0;
    for (int k = 1; k <= 127; k++) begin
      ones += int'(prbs7);
      @(posedge clk); @(negedge clk);
      if (st7 == st7_start && period == 0) period = k;
    end
    check(period == 127, $sformatf("PRBS7 period %0d", period));
    check(ones == 64, $sformatf("PRBS7 ones per period %0d", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
