// Self-checking testbench of err_window at its default size (64-bit span,
// threshold 6). Random error flags, random bit enables and occasional
// clears are applied; a queue in the testbench holds the last 64 flags and
// gives the expected count and threshold flag after every clock edge.
module err_window_tb;
  localparam int SPAN = 64, THRESH = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, en, err;
  logic [6:0] count;
  logic over;
  int checks = 0, failures = 0;
  int n_over = 0, n_clr = 0;
  bit win[$];
  int exp_cnt;

  always #5 clk = ~clk;

  err_window #(.SPAN(SPAN), .THRESH(THRESH)) dut (
    .clk_i(clk), .rst_ni(rst_n), .clr_i(clr), .en_i(en), .err_i(err),
    .count_o(count), .over_o(over));

  initial begin
    clr = 0; en = 0; err = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < SPAN; i++) win.push_back(1'b0);
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      // error density changes in phases so the threshold is crossed both ways
      en  = ($urandom_range(0, 3) != 0);
      err = ($urandom_range(0, 99) < (((k / 500) % 3 == 1) ? 15 : 3));
      clr = ($urandom_range(0, 999) == 0);
      @(posedge clk);
      if (clr) begin
        win.delete();
        for (int i = 0; i < SPAN; i++) win.push_back(1'b0);
        n_clr++;
      end else if (en) begin
        void'(win.pop_front());
        win.push_back(err);
      end
      #1;
      exp_cnt = 0;
      foreach (win[i]) exp_cnt += int'(win[i]);
      checks++;
      if (int'(count) != exp_cnt || over != (exp_cnt >= THRESH)) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d count=%0d exp=%0d over=%b", k, count, exp_cnt, over);
      end
      if (over) n_over++;
    end
    checks++;
    if (n_over == 0 || n_clr == 0) begin
      failures++;
      $display("FAIL threshold reached %0d times, clear %0d times", n_over, n_clr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
