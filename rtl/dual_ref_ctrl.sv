// Control logic of the dual (MAIN + AUX) PRBS reference.
//
// AUX is a conventional reference that resynchronizes whenever its error
// window reaches the lower threshold T_a. MAIN has a slightly higher
// threshold T_m, and its resynchronization request is accepted only while
// AUX is synchronized: a burst of errors that upsets AUX therefore cannot
// throw away MAIN's reference, while a real bit slip (MAIN's error rate
// stays high after the burst) is repaired as soon as AUX has recovered.
//
// The measured errors come from MAIN whenever MAIN is synchronized and not
// about to be resynchronized, from AUX while MAIN is being (or in this cycle
// starts being) resynchronized and AUX is synchronized, and from neither
// otherwise. While MAIN's request is pending the result cannot be
// trusted (a bit slip may have happened at an unknown time), so suspect_o
// marks those bits.
//
// Purely combinational: every output follows its inputs in the same cycle.
// The gating and the selection order follow the description; marking the
// suspect bits as a separate output is this design's choice.
module dual_ref_ctrl
  import prbs_pkg::*;
(
  input  logic     main_synced_i,
  input  logic     main_rq_i,
  input  logic     main_err_i,
  input  logic     aux_synced_i,
  input  logic     aux_err_i,
  output logic     main_resync_en_o,
  output ref_sel_t ref_sel_o,
  output logic     ref_valid_o,
  output logic     err_o,
  output logic     suspect_o
);

  assign main_resync_en_o = aux_synced_i;

  // MAIN is handed over to AUX as soon as its request is about to be
  // accepted, i.e. in the same cycle AUX reaches synchronization.
  logic main_usable;
  assign main_usable = main_synced_i && !(main_rq_i && aux_synced_i);

  always_comb begin
    if (main_usable) begin
      ref_sel_o = REF_MAIN;
      err_o     = main_err_i;
    end else if (aux_synced_i) begin
      ref_sel_o = REF_AUX;
      err_o     = aux_err_i;
    end else begin
      ref_sel_o = REF_NONE;
      err_o     = 1'b0;
    end
  end

  assign ref_valid_o = (ref_sel_o != REF_NONE);
  assign suspect_o   = main_usable && main_rq_i;

endmodule
