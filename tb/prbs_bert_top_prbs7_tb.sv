// End-to-end testbench of prbs_bert_top configured for the 2^7-1 sequence
// (7-bit register, taps 7 and 6; other parameters at their defaults). It
// runs the same start-up and three error-burst scenarios as the default
// configuration, from bert_scenario, with a watchdog.
module prbs_bert_top_prbs7_tb;
  logic clk = 1'b0;
  bit   done;

  always #5 clk = ~clk;

  bert_scenario #(.N(7), .TAP1(6), .TAP2(7), .FULL(1'b0)) u_s (.clk(clk), .done(done));

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
