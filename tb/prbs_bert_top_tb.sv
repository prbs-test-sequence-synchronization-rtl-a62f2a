// End-to-end testbench of prbs_bert_top with every parameter at its default
// (2^23-1 sequence, span 64, T_a = 6, T_m = 8, verify 32, 48-bit counters).
// The scenarios (start-up and the three error-burst cases of the dual
// reference) are in bert_scenario; this wrapper gives the clock, the
// watchdog and the result line.
module prbs_bert_top_tb;
  logic clk = 1'b0;
  bit   done;

  always #5 clk = ~clk;

  bert_scenario #(.FULL(1'b1)) u_s (.clk(clk), .done(done));

  initial begin
    fork
      wait (done);
      repeat (20000) @(posedge clk);
    join_any
    if (!done) begin
      u_s.failures++;
      $display("watchdog expired");
    end
    $display("TB_RESULT checks=%0d failures=%0d", u_s.checks, u_s.failures);
    $finish;
  end
endmodule
