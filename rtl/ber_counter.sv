// Bit error rate result counters.
//
// For each received bit (bit_en_i) the counter adds one to:
//   bits_o          if a valid reference evaluated the bit,
//   errs_o          if it also was in error,
//   suspect_bits_o  and suspect_errs_o for the subset evaluated while the
//                   result is marked suspect (MAIN request pending),
//   nosync_bits_o   if no reference was valid.
// The measured error rate is errs_o / bits_o; the suspect counts let a
// reader discount the stretch after a possible clock-recovery bit slip.
// clr_i zeroes all counters. Counters are CNT_W bits wide and saturate at
// their maximum. Registered outputs, one cycle after the bit. Which
// quantities are counted and their width are this design's choice; the
// description only says that errors against the reference are detected and
// that results are wrong while MAIN's request is active.
module ber_counter #(
  parameter int unsigned CNT_W = prbs_pkg::BER_CNT_W
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             clr_i,
  input  logic             bit_en_i,
  input  logic             ref_valid_i,
  input  logic             err_i,
  input  logic             suspect_i,
  output logic [CNT_W-1:0] bits_o,
  output logic [CNT_W-1:0] errs_o,
  output logic [CNT_W-1:0] suspect_bits_o,
  output logic [CNT_W-1:0] suspect_errs_o,
  output logic [CNT_W-1:0] nosync_bits_o
);

  function automatic logic [CNT_W-1:0] incr(logic [CNT_W-1:0] v, logic inc);
    return (inc && v != '1) ? v + 1'b1 : v;
  endfunction

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      bits_o         <= '0;
      errs_o         <= '0;
      suspect_bits_o <= '0;
      suspect_errs_o <= '0;
      nosync_bits_o  <= '0;
    end else if (clr_i) begin
      bits_o         <= '0;
      errs_o         <= '0;
      suspect_bits_o <= '0;
      suspect_errs_o <= '0;
      nosync_bits_o  <= '0;
    end else if (bit_en_i) begin
      bits_o         <= incr(bits_o, ref_valid_i);
      errs_o         <= incr(errs_o, ref_valid_i && err_i);
      suspect_bits_o <= incr(suspect_bits_o, ref_valid_i && suspect_i);
      suspect_errs_o <= incr(suspect_errs_o, ref_valid_i && suspect_i && err_i);
      nosync_bits_o  <= incr(nosync_bits_o, !ref_valid_i);
    end
  end

endmodule
