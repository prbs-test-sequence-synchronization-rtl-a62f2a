// Scenario driver shared by the end-to-end testbenches of prbs_bert_top.
//
// With FULL set it instantiates the top with no parameter override (the
// 2^23-1 default); otherwise with the given register length and taps. The
// top's own transmitter drives a channel model here that flips chosen bits
// and can drop a bit (a clock recovery slip); both sides run on one clock.
// The transmitted bits are also checked against the LFSR recurrence
// b[k] = b[k-TAP1] ^ b[k-TAP2]. The scenarios follow the three cases of the
// dual-reference method:
//   start   both references load and verify; NONE, then MAIN is used, after
//           exactly N + 32 bits;
//   case 1  a burst reaching T_a only: AUX resynchronizes, MAIN stays the
//           reference and every injected error is counted;
//   case 2  a burst above T_m: MAIN's request rises but is refused while AUX
//           is out of synchronization, and is gone when AUX recovers; every
//           injected error is still counted;
//   case 3  a burst with a bit slip: MAIN's request stays up, results are
//           marked suspect, AUX recovers and becomes the reference while
//           MAIN resynchronizes (N + 32 bits), then MAIN takes over again.
// Each mechanism is counted and must occur at least once. checks and
// failures are read by the wrapping testbench, which prints the result.
module bert_scenario
  import prbs_pkg::*;
#(
  parameter int unsigned N    = prbs_pkg::PRBS_N,
  parameter int unsigned TAP1 = prbs_pkg::PRBS_TAP1,
  parameter int unsigned TAP2 = prbs_pkg::PRBS_TAP2,
  parameter bit          FULL = 1'b1
) (
  input  logic clk,
  output bit   done
);
  localparam int unsigned VER = prbs_pkg::VERIFY_BITS;
  logic rst_n = 1'b0;
  logic tx_en, rx_en, rx_bit, clr;
  logic tx_bit, err, suspect, main_rq, main_resyn, aux_resyn;
  ref_sel_t sel;
  sync_state_t mst, ast;
  logic [6:0] mwin, awin;
  logic [47:0] bits, errs, sbits, serrs, nbits;
  int checks = 0, failures = 0;
  bit hist[N];
  bit exp_tx;
  int nb;
  // mechanism counters
  int n_aux_resync = 0, n_main_rq_refused = 0, n_main_resync = 0;
  int n_ref_none = 0, n_ref_aux = 0, n_ref_main = 0, n_suspect = 0, n_slip = 0;
  int n_aux_only_case = 0;
  sync_state_t prev_ast, prev_mst;
  logic prev_aux_synced;

  // FULL selects the top at its defaults, with no parameter override.
  if (FULL) begin : g_full
    prbs_bert_top dut (
      .tx_clk_i(clk), .tx_rst_ni(rst_n), .tx_en_i(tx_en), .tx_bit_o(tx_bit),
      .rx_clk_i(clk), .rx_rst_ni(rst_n), .rx_en_i(rx_en), .rx_bit_i(rx_bit),
      .cnt_clr_i(clr), .err_o(err), .ref_sel_o(sel), .suspect_o(suspect),
      .main_state_o(mst), .aux_state_o(ast), .main_rq_o(main_rq),
      .main_resyn_o(main_resyn), .aux_resyn_o(aux_resyn),
      .main_win_count_o(mwin), .aux_win_count_o(awin),
      .bits_o(bits), .errs_o(errs), .suspect_bits_o(sbits),
      .suspect_errs_o(serrs), .nosync_bits_o(nbits));
  end else begin : g_param
    prbs_bert_top #(.N(N), .TAP1(TAP1), .TAP2(TAP2)) dut (
      .tx_clk_i(clk), .tx_rst_ni(rst_n), .tx_en_i(tx_en), .tx_bit_o(tx_bit),
      .rx_clk_i(clk), .rx_rst_ni(rst_n), .rx_en_i(rx_en), .rx_bit_i(rx_bit),
      .cnt_clr_i(clr), .err_o(err), .ref_sel_o(sel), .suspect_o(suspect),
      .main_state_o(mst), .aux_state_o(ast), .main_rq_o(main_rq),
      .main_resyn_o(main_resyn), .aux_resyn_o(aux_resyn),
      .main_win_count_o(mwin), .aux_win_count_o(awin),
      .bits_o(bits), .errs_o(errs), .suspect_bits_o(sbits),
      .suspect_errs_o(serrs), .nosync_bits_o(nbits));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s (bit %0d)", what, nb);
    end
  endtask

  // One link bit. inj flips it; slip makes the receiver miss it.
  // chk: the receiver is known to be in step, so err_o must equal inj.
  task automatic send(input bit inj, input bit slip, input bit chk);
    tx_en = 1'b1;
    rx_en = !slip;
    rx_bit = tx_bit ^ inj;
    #1;
    exp_tx = hist[TAP1-1] ^ hist[TAP2-1];
    check(tx_bit == exp_tx, "transmitted bit follows the LFSR recurrence");
    if (chk && rx_en && sel != REF_NONE) check(err == inj, "err_o equals injected error");
    if (rx_en) begin
      unique case (sel)
        REF_NONE: n_ref_none++;
        REF_AUX:  n_ref_aux++;
        default:  n_ref_main++;
      endcase
      if (suspect) n_suspect++;
      if (main_rq && aux_resyn) n_main_rq_refused++;
    end
    if (slip) n_slip++;
    prev_ast = ast; prev_mst = mst; prev_aux_synced = !aux_resyn;
    @(posedge clk);
    for (int i = N - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = exp_tx;
    nb++;
    @(negedge clk);
    if (prev_ast == ST_SYNCED && ast == ST_RESYNC) n_aux_resync++;
    if (prev_mst == ST_SYNCED && mst == ST_RESYNC) begin
      n_main_resync++;
      check(prev_aux_synced, "MAIN resynchronizes only while AUX is synchronized");
    end
  endtask

  // Zero the result counters with the link paused for one cycle.
  task automatic clear_counters();
    tx_en = 1'b0; rx_en = 1'b0; clr = 1'b1;
    @(posedge clk);
    @(negedge clk);
    clr = 1'b0;
  endtask

  task automatic idle(input int n);
    repeat (n) send(0, 0, 1);
  endtask

  int inj_cnt, sent_cnt, t;

  initial begin
    done = 1'b0;
    tx_en = 0; rx_en = 0; rx_bit = 0; clr = 0; nb = 0;
    foreach (hist[i]) hist[i] = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // start-up: NONE until both references have loaded and verified
    t = 0;
    while (sel != REF_MAIN && t < 500) begin send(0, 0, 0); t++; end
    check(t == int'(N + VER), $sformatf("start-up to MAIN reference took %0d bits", t));
    check(nbits == 48'(N + VER) && bits == 0, "start-up bits counted as unsynchronized");
    idle(200);

    // case 1: 6 errors in 40 bits, then quiet
    clear_counters();
    inj_cnt = 0; sent_cnt = 0;
    for (int i = 0; i < 40; i++) begin
      send(i % 7 == 3, 0, 1); inj_cnt += int'(i % 7 == 3); sent_cnt++;
    end
    check(aux_resyn && !main_resyn && sel == REF_MAIN, "case 1: AUX resynchronizing, MAIN in use");
    for (int i = 0; i < 300; i++) begin send(0, 0, 1); sent_cnt++; end
    check(!aux_resyn && !main_resyn && !main_rq, "case 1: both synchronized again");
    n_aux_only_case = n_main_resync;
    check(errs == 48'(inj_cnt) && bits == 48'(sent_cnt),
          $sformatf("case 1: counted %0d errors in %0d bits, expected %0d in %0d", errs, bits, inj_cnt, sent_cnt));

    // case 2: 12 errors in 36 bits (T_m reached), then quiet
    clear_counters();
    inj_cnt = 0; sent_cnt = 0;
    for (int i = 0; i < 36; i++) begin
      send(i % 3 == 0, 0, 1); inj_cnt += int'(i % 3 == 0); sent_cnt++;
    end
    check(main_rq && aux_resyn && !main_resyn, "case 2: MAIN request refused while AUX resynchronizes");
    // sparse tail: keeps AUX from verifying while MAIN's window drains
    for (int i = 0; i < 32; i++) begin
      send(i % 8 == 7, 0, 1); inj_cnt += int'(i % 8 == 7); sent_cnt++;
    end
    for (int i = 0; i < 300; i++) begin send(0, 0, 1); sent_cnt++; end
    check(!aux_resyn && !main_resyn && !main_rq && n_main_resync == n_aux_only_case,
          "case 2: request gone without MAIN resynchronization");
    check(errs == 48'(inj_cnt) && bits == 48'(sent_cnt) && sbits > 0,
          $sformatf("case 2: counted %0d errors in %0d bits, expected %0d in %0d", errs, bits, inj_cnt, sent_cnt));

    // case 3: burst with a bit slip in the middle, then quiet
    clear_counters();
    for (int i = 0; i < 20; i++) send(i % 3 == 0, 0, 1);
    send(0, 1, 0);
    for (int i = 0; i < 20; i++) send(i % 3 == 0, 0, 0);
    // quiet link: MAIN is out of step, its request stays until AUX recovers
    t = 0;
    while (aux_resyn && t < 500) begin
      send(0, 0, 0); t++;
    end
    check(!aux_resyn && sel == REF_AUX && main_rq && !main_resyn && !suspect,
          "case 3: AUX recovered and used at once while MAIN request still pending");
    send(0, 0, 0);
    check(main_resyn && sel == REF_AUX, "case 3: MAIN resynchronizes, AUX is the reference");
    t = 0;
    while (main_resyn && t < 500) begin send(0, 0, 1); t++; end
    check(t == int'(N + VER), $sformatf("case 3: MAIN resynchronization took %0d more bits", t));
    check(sel == REF_MAIN, "case 3: MAIN is the reference again");
    idle(300);
    check(sbits > 0 && serrs > 0, "case 3: suspect results counted");
    check(errs > 0, "case 3: slip produced counted errors");

    // mechanism coverage
    check(n_aux_resync > 0,      "AUX resynchronization occurred");
    check(n_main_rq_refused > 0, "refused MAIN request occurred");
    check(n_main_resync > 0,     "MAIN resynchronization occurred");
    check(n_ref_none > 0 && n_ref_aux > 0 && n_ref_main > 0, "all three reference selections occurred");
    check(n_suspect > 0,         "suspect measurement occurred");
    check(n_slip > 0,            "bit slip occurred");
    $display("mechanisms: aux_resync=%0d main_rq_refused=%0d main_resync=%0d ref_none=%0d ref_aux=%0d ref_main=%0d suspect=%0d slip=%0d",
             n_aux_resync, n_main_rq_refused, n_main_resync, n_ref_none, n_ref_aux, n_ref_main, n_suspect, n_slip);
    done = 1'b1;
  end
endmodule
