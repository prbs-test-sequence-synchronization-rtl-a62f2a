// Self-checking testbench of ber_counter. Random per-bit inputs are applied
// and five integer models are kept alongside; the counter outputs must
// match them one cycle after every bit. A narrow instance (4-bit counters)
// is driven with errors on every bit to check saturation, and a clear in
// the middle must zero everything.
module ber_counter_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, en, valid, err, susp;
  logic [47:0] bits, errs, sbits, serrs, nbits;
  logic [3:0]  b4, e4, sb4, se4, nb4;
  longint m_bits, m_errs, m_sbits, m_serrs, m_nbits;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ber_counter dut (
    .clk_i(clk), .rst_ni(rst_n), .clr_i(clr), .bit_en_i(en),
    .ref_valid_i(valid), .err_i(err), .suspect_i(susp),
    .bits_o(bits), .errs_o(errs), .suspect_bits_o(sbits),
    .suspect_errs_o(serrs), .nosync_bits_o(nbits));

  ber_counter #(.CNT_W(4)) dut4 (
    .clk_i(clk), .rst_ni(rst_n), .clr_i(1'b0), .bit_en_i(1'b1),
    .ref_valid_i(1'b1), .err_i(1'b1), .suspect_i(1'b1),
    .bits_o(b4), .errs_o(e4), .suspect_bits_o(sb4),
    .suspect_errs_o(se4), .nosync_bits_o(nb4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    clr = 0; en = 0; valid = 0; err = 0; susp = 0;
    m_bits = 0; m_errs = 0; m_sbits = 0; m_serrs = 0; m_nbits = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      en    = $urandom_range(0, 4) != 0;
      valid = $urandom_range(0, 9) != 0;
      err   = $urandom_range(0, 3) == 0;
      susp  = $urandom_range(0, 2) == 0;
      clr   = (k == 2500);
      @(posedge clk);
      if (clr) begin
        m_bits = 0; m_errs = 0; m_sbits = 0; m_serrs = 0; m_nbits = 0;
      end else if (en) begin
        if (valid) begin
          m_bits++;
          if (err) m_errs++;
          if (susp) m_sbits++;
          if (susp && err) m_serrs++;
        end else begin
          m_nbits++;
        end
      end
      @(negedge clk);
      check(bits == 48'(m_bits) && errs == 48'(m_errs) && sbits == 48'(m_sbits) &&
            serrs == 48'(m_serrs) && nbits == 48'(m_nbits),
            $sformatf("k=%0d counts %0d/%0d/%0d/%0d/%0d exp %0d/%0d/%0d/%0d/%0d", k,
                      bits, errs, sbits, serrs, nbits, m_bits, m_errs, m_sbits, m_serrs, m_nbits));
    end
    check(m_errs > 100 && m_nbits > 50, "stimulus exercised all counters");
    check(b4 == 4'hF && e4 == 4'hF && sb4 == 4'hF && se4 == 4'hF && nb4 == 4'h0,
          "4-bit counters saturate at 15");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
