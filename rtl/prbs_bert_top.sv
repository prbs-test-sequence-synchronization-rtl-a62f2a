// PRBS bit error tester with a dual reference data source.
//
// Transmit side: a free-running PRBS generator (tx_clk_i domain) produces
// the test sequence, one bit per cycle with tx_en_i high.
// Receive side (rx_clk_i domain, the recovered clock of an external clock
// and data recovery unit): two identical reference channels, MAIN and AUX,
// each a Fibonacci LFSR with the transmitter's polynomial plus its own
// Resynchronize / Verify / Synchronized controller and sliding error window.
// AUX resynchronizes at T_a = AUX_THRESH errors in SPAN bits; MAIN at the
// slightly higher T_m = MAIN_THRESH, and only while AUX is synchronized. The
// measured errors are taken from MAIN when it is synchronized, else (and
// from the cycle MAIN's pending request is accepted) from AUX, and counted
// by the result counters.
//
// The two clock domains share nothing: the generator is only the source of
// the link's data. Both use an asynchronous active-low reset. Outputs per
// received bit (err_o, ref_sel_o, suspect_o) are combinational in the cycle
// of the bit; the counters are updated one cycle later.
//
// The structure (two LFSR references, thresholds, gating of MAIN's request,
// reference selection) follows the description; the value of T_m, the
// counters and the separate transmit clock are this design's choices.
module prbs_bert_top #(
  parameter int unsigned N           = prbs_pkg::PRBS_N,
  parameter int unsigned TAP1        = prbs_pkg::PRBS_TAP1,
  parameter int unsigned TAP2        = prbs_pkg::PRBS_TAP2,
  parameter int unsigned SPAN        = prbs_pkg::ERR_SPAN,
  parameter int unsigned AUX_THRESH  = prbs_pkg::AUX_THRESH,
  parameter int unsigned MAIN_THRESH = prbs_pkg::MAIN_THRESH,
  parameter int unsigned VERIFY_LEN  = prbs_pkg::VERIFY_BITS,
  parameter int unsigned CNT_W       = prbs_pkg::BER_CNT_W,
  localparam int unsigned WCW        = $clog2(SPAN + 1)
) (
  // transmitter
  input  logic             tx_clk_i,
  input  logic             tx_rst_ni,
  input  logic             tx_en_i,
  output logic             tx_bit_o,
  // receiver
  input  logic             rx_clk_i,
  input  logic             rx_rst_ni,
  input  logic             rx_en_i,
  input  logic             rx_bit_i,
  input  logic             cnt_clr_i,
  output logic             err_o,
  output prbs_pkg::ref_sel_t    ref_sel_o,
  output logic             suspect_o,
  output prbs_pkg::sync_state_t main_state_o,
  output prbs_pkg::sync_state_t aux_state_o,
  output logic             main_rq_o,
  output logic             main_resyn_o,
  output logic             aux_resyn_o,
  output logic [WCW-1:0]   main_win_count_o,
  output logic [WCW-1:0]   aux_win_count_o,
  output logic [CNT_W-1:0] bits_o,
  output logic [CNT_W-1:0] errs_o,
  output logic [CNT_W-1:0] suspect_bits_o,
  output logic [CNT_W-1:0] suspect_errs_o,
  output logic [CNT_W-1:0] nosync_bits_o
);

  // ---------------- transmitter ----------------
  prbs_lfsr #(.N(N), .TAP1(TAP1), .TAP2(TAP2)) u_tx_gen (
    .clk_i   (tx_clk_i),
    .rst_ni  (tx_rst_ni),
    .en_i    (tx_en_i),
    .load_i  (1'b0),
    .din_i   (1'b0),
    .prbs_o  (tx_bit_o),
    .state_o ()
  );

  // ---------------- receiver ----------------
  logic main_err, main_synced, main_resync_en;
  logic aux_err, aux_synced;
  logic ref_valid;

  prbs_ref_channel #(
    .N(N), .TAP1(TAP1), .TAP2(TAP2),
    .SPAN(SPAN), .THRESH(MAIN_THRESH), .VERIFY_LEN(VERIFY_LEN)
  ) u_main (
    .clk_i       (rx_clk_i),
    .rst_ni      (rx_rst_ni),
    .bit_en_i    (rx_en_i),
    .rx_bit_i    (rx_bit_i),
    .resync_en_i (main_resync_en),
    .ref_bit_o   (),
    .err_o       (main_err),
    .synced_o    (main_synced),
    .resyn_o     (main_resyn_o),
    .rq_o        (main_rq_o),
    .state_o     (main_state_o),
    .win_count_o (main_win_count_o)
  );

  prbs_ref_channel #(
    .N(N), .TAP1(TAP1), .TAP2(TAP2),
    .SPAN(SPAN), .THRESH(AUX_THRESH), .VERIFY_LEN(VERIFY_LEN)
  ) u_aux (
    .clk_i       (rx_clk_i),
    .rst_ni      (rx_rst_ni),
    .bit_en_i    (rx_en_i),
    .rx_bit_i    (rx_bit_i),
    .resync_en_i (1'b1),
    .ref_bit_o   (),
    .err_o       (aux_err),
    .synced_o    (aux_synced),
    .resyn_o     (aux_resyn_o),
    .rq_o        (),
    .state_o     (aux_state_o),
    .win_count_o (aux_win_count_o)
  );

  dual_ref_ctrl u_ctrl (
    .main_synced_i    (main_synced),
    .main_rq_i        (main_rq_o),
    .main_err_i       (main_err),
    .aux_synced_i     (aux_synced),
    .aux_err_i        (aux_err),
    .main_resync_en_o (main_resync_en),
    .ref_sel_o        (ref_sel_o),
    .ref_valid_o      (ref_valid),
    .err_o            (err_o),
    .suspect_o        (suspect_o)
  );

  ber_counter #(.CNT_W(CNT_W)) u_cnt (
    .clk_i          (rx_clk_i),
    .rst_ni         (rx_rst_ni),
    .clr_i          (cnt_clr_i),
    .bit_en_i       (rx_en_i),
    .ref_valid_i    (ref_valid),
    .err_i          (err_o),
    .suspect_i      (suspect_o),
    .bits_o         (bits_o),
    .errs_o         (errs_o),
    .suspect_bits_o (suspect_bits_o),
    .suspect_errs_o (suspect_errs_o),
    .nosync_bits_o  (nosync_bits_o)
  );

  initial begin
    assert (MAIN_THRESH >= AUX_THRESH)
      else $error("prbs_bert_top: T_m must not be below T_a");
  end

endmodule
