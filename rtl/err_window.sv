// Sliding-window error counter over the last SPAN evaluated bits.
//
// A SPAN-bit shift register holds the error flag of each evaluated bit; a
// counter adds the new flag and subtracts the one that leaves the window, so
// count_o is always the number of errors among the last SPAN bits. over_o is
// high while that count has reached THRESH: with the defaults, 6 errors out
// of 64 bits, the point at which the conventional receiver resynchronizes.
//
// Interface: en_i marks one evaluated bit with error flag err_i. clr_i
// empties the window (used while the reference is not synchronized).
// Timing: count_o and over_o are registered and include a bit from the clock
// edge that takes it. The span, the threshold and a shift register as the
// store follow the description; the clear input is this design's choice.
module err_window #(
  parameter int unsigned SPAN   = prbs_pkg::ERR_SPAN,
  parameter int unsigned THRESH = prbs_pkg::AUX_THRESH,
  localparam int unsigned CW    = $clog2(SPAN + 1)
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          clr_i,
  input  logic          en_i,
  input  logic          err_i,
  output logic [CW-1:0] count_o,
  output logic          over_o
);

  logic [SPAN-1:0] hist_q;
  logic [CW-1:0]   count_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      hist_q  <= '0;
      count_q <= '0;
    end else if (clr_i) begin
      hist_q  <= '0;
      count_q <= '0;
    end else if (en_i) begin
      hist_q  <= {hist_q[SPAN-2:0], err_i};
      count_q <= count_q + CW'(err_i) - CW'(hist_q[SPAN-1]);
    end
  end

  assign count_o = count_q;
  assign over_o  = (count_q >= CW'(THRESH));

  initial begin
    assert (SPAN >= 2 && THRESH >= 1 && THRESH <= SPAN)
      else $error("err_window: need 1 <= THRESH <= SPAN");
  end

endmodule
