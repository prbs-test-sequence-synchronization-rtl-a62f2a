// Fibonacci (many-to-one) linear feedback shift register with two XOR taps.
//
// The register holds N stages; stage k is state_o[k-1]. The XOR of stages
// TAP1 and TAP2 is the next sequence bit: it is presented on prbs_o and, on
// an enabled clock edge, shifted into stage 1 while every stage moves one
// place on. With taps 23 and 18 (x^23 + x^18 + 1) the output is the 2^23-1
// maximum-length sequence; taps 7 and 6 give the 2^7-1 one.
//
// The same module serves the transmitter and the receiver reference. In load
// mode (load_i high) the received bit din_i is shifted into stage 1 instead
// of the feedback, so after N error-free received bits the register holds
// exactly the transmitter's state and from then on predicts its output.
// prbs_o is then still the predicted bit for the current received bit.
//
// Timing: prbs_o is combinational from the registered state and valid in the
// cycle en_i is high; the state advances on that clock edge. Reset (async,
// active low) loads all ones, since the all-zero state locks an XOR LFSR.
// Taps, XOR feedback and load-by-received-bits follow the description; the
// reset value and the enable are this design's choices.
module prbs_lfsr #(
  parameter int unsigned N    = prbs_pkg::PRBS_N,
  parameter int unsigned TAP1 = prbs_pkg::PRBS_TAP1,
  parameter int unsigned TAP2 = prbs_pkg::PRBS_TAP2
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         en_i,
  input  logic         load_i,
  input  logic         din_i,
  output logic         prbs_o,
  output logic [N-1:0] state_o
);

  logic [N-1:0] state_q;

  assign prbs_o  = state_q[TAP1-1] ^ state_q[TAP2-1];
  assign state_o = state_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= '1;
    end else if (en_i) begin
      state_q <= {state_q[N-2:0], load_i ? din_i : prbs_o};
    end
  end

  initial begin
    assert (N >= 2 && TAP1 >= 1 && TAP1 <= N && TAP2 >= 1 && TAP2 <= N && TAP1 != TAP2)
      else $error("prbs_lfsr: taps must be distinct stages 1..N");
  end

endmodule
