// Self-checking testbench of dual_ref_ctrl: all 32 combinations of its five
// inputs are applied and every output is compared with the rules of the
// dual reference written out here as a table: MAIN may resynchronize only
// while AUX is synchronized; MAIN is the reference when synchronized unless
// its request is about to be accepted, else AUX when synchronized, else
// none; results are suspect while MAIN is the reference and its request is
// pending.
module dual_ref_ctrl_tb;
  import prbs_pkg::*;
  logic ms, mrq, merr, as, aerr;
  logic men, valid, err, susp;
  ref_sel_t sel;
  ref_sel_t e_sel;
  logic e_err;
  int checks = 0, failures = 0;

  dual_ref_ctrl dut (
    .main_synced_i(ms), .main_rq_i(mrq), .main_err_i(merr),
    .aux_synced_i(as), .aux_err_i(aerr), .main_resync_en_o(men),
    .ref_sel_o(sel), .ref_valid_o(valid), .err_o(err), .suspect_o(susp));

  initial begin
    for (int v = 0; v < 32; v++) begin
      {ms, mrq, merr, as, aerr} = 5'(v);
      #1;
      // MAIN with a request and AUX synchronized is handed over to AUX
      if (ms && !(mrq && as))  begin e_sel = REF_MAIN; e_err = merr; end
      else if (as)             begin e_sel = REF_AUX;  e_err = aerr; end
      else                     begin e_sel = REF_NONE; e_err = 1'b0; end
      checks++;
      if (men !== as || sel !== e_sel || valid !== (e_sel != REF_NONE) ||
          err !== e_err || susp !== (e_sel == REF_MAIN && mrq)) begin
        failures++;
        $display("FAIL inputs %b: en=%b sel=%0d err=%b susp=%b", 5'(v), men, sel, err, susp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
