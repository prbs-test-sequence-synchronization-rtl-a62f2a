// One PRBS reference data source with its own synchronization control.
//
// Combines a reference LFSR, the bit comparator, a sliding error window and
// the three-state controller. The LFSR predicts each received bit; in RESYNC
// it is loaded with the received bits instead, in VERIFY and SYNCED its
// prediction is XORed with the received bit to give err_o. The dual
// reference receiver uses two of these: AUX with resync_en_i tied high and
// the lower threshold, MAIN with a slightly higher threshold and its
// requests gated by AUX's synchronization.
//
// Interface: bit_en_i/rx_bit_i carry the recovered data, one bit per enabled
// clock. ref_bit_o is the predicted bit and err_o its mismatch, both valid
// in the cycle of the bit (combinational from registered state). synced_o,
// rq_o (threshold reached while synchronized) and resyn_o (not synchronized)
// correspond to the signals of the dual-reference timing diagram.
module prbs_ref_channel
  import prbs_pkg::*;
#(
  parameter int unsigned N          = prbs_pkg::PRBS_N,
  parameter int unsigned TAP1       = prbs_pkg::PRBS_TAP1,
  parameter int unsigned TAP2       = prbs_pkg::PRBS_TAP2,
  parameter int unsigned SPAN       = prbs_pkg::ERR_SPAN,
  parameter int unsigned THRESH     = prbs_pkg::AUX_THRESH,
  parameter int unsigned VERIFY_LEN = prbs_pkg::VERIFY_BITS,
  localparam int unsigned CW        = $clog2(SPAN + 1)
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          bit_en_i,
  input  logic          rx_bit_i,
  input  logic          resync_en_i,
  output logic          ref_bit_o,
  output logic          err_o,
  output logic          synced_o,
  output logic          resyn_o,
  output logic          rq_o,
  output sync_state_t   state_o,
  output logic [CW-1:0] win_count_o
);

  logic load, over, win_clr, win_en;

  prbs_lfsr #(.N(N), .TAP1(TAP1), .TAP2(TAP2)) u_lfsr (
    .clk_i   (clk_i),
    .rst_ni  (rst_ni),
    .en_i    (bit_en_i),
    .load_i  (load),
    .din_i   (rx_bit_i),
    .prbs_o  (ref_bit_o),
    .state_o ()
  );

  assign err_o = rx_bit_i ^ ref_bit_o;

  err_window #(.SPAN(SPAN), .THRESH(THRESH)) u_win (
    .clk_i   (clk_i),
    .rst_ni  (rst_ni),
    .clr_i   (win_clr),
    .en_i    (win_en),
    .err_i   (err_o),
    .count_o (win_count_o),
    .over_o  (over)
  );

  sync_ctrl #(.LOAD_LEN(N), .VERIFY_LEN(VERIFY_LEN)) u_ctrl (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .en_i        (bit_en_i),
    .err_i       (err_o),
    .over_i      (over),
    .resync_en_i (resync_en_i),
    .state_o     (state_o),
    .load_o      (load),
    .synced_o    (synced_o),
    .rq_o        (rq_o),
    .win_clr_o   (win_clr),
    .win_en_o    (win_en)
  );

  assign resyn_o = !synced_o;

endmodule
