// Resynchronization controller of one PRBS reference.
//
// Three states, as in the conventional receiver:
//   RESYNC  the reference LFSR is loaded with received bits (load_o high);
//           after LOAD_LEN bits the controller moves to VERIFY.
//   VERIFY  the new reference is compared with the received data; any error
//           sends it back to RESYNC at once, VERIFY_LEN consecutive
//           error-free bits take it to SYNCED.
//   SYNCED  errors are evaluated and fed to the error window. While the
//           window reports its threshold reached, rq_o asks for a new
//           resynchronization; it is taken only while resync_en_i is high.
//           With resync_en_i tied high this is the conventional receiver;
//           the MAIN reference of the dual scheme gets it from AUX's state.
//
// Interface: en_i marks a received bit, err_i is that bit's mismatch with
// this channel's reference, over_i comes from the error window.
// win_clr_o keeps the window empty outside SYNCED, win_en_o feeds it.
// Timing: state and counters are registered. The RESYNC-to-VERIFY and
// VERIFY-to-SYNCED moves happen on the edge that takes the last needed bit;
// an accepted request moves SYNCED to RESYNC on the next clock edge, with or
// without a bit. Reset enters RESYNC. The states, the 32-bit verify interval
// and the error-triggered returns follow the description; the exact load
// length (N bits, the minimum it names) and the request gating input are
// this design's reading of it.
module sync_ctrl
  import prbs_pkg::*;
#(
  parameter int unsigned LOAD_LEN   = prbs_pkg::PRBS_N,
  parameter int unsigned VERIFY_LEN = prbs_pkg::VERIFY_BITS,
  localparam int unsigned MAXLEN    = (LOAD_LEN > VERIFY_LEN) ? LOAD_LEN : VERIFY_LEN,
  localparam int unsigned CW        = $clog2(MAXLEN + 1)
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  input  logic        en_i,
  input  logic        err_i,
  input  logic        over_i,
  input  logic        resync_en_i,
  output sync_state_t state_o,
  output logic        load_o,
  output logic        synced_o,
  output logic        rq_o,
  output logic        win_clr_o,
  output logic        win_en_o
);

  sync_state_t   state_q;
  logic [CW-1:0] cnt_q;

  assign state_o   = state_q;
  assign load_o    = (state_q == ST_RESYNC);
  assign synced_o  = (state_q == ST_SYNCED);
  assign rq_o      = synced_o && over_i;
  assign win_clr_o = !synced_o;
  assign win_en_o  = synced_o && en_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= ST_RESYNC;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        ST_RESYNC: if (en_i) begin
          if (cnt_q == CW'(LOAD_LEN - 1)) begin
            state_q <= ST_VERIFY;
            cnt_q   <= '0;
          end else begin
            cnt_q   <= cnt_q + 1'b1;
          end
        end
        ST_VERIFY: if (en_i) begin
          if (err_i) begin
            state_q <= ST_RESYNC;
            cnt_q   <= '0;
          end else if (cnt_q == CW'(VERIFY_LEN - 1)) begin
            state_q <= ST_SYNCED;
            cnt_q   <= '0;
          end else begin
            cnt_q   <= cnt_q + 1'b1;
          end
        end
        ST_SYNCED: if (rq_o && resync_en_i) begin
          state_q <= ST_RESYNC;
          cnt_q   <= '0;
        end
        default: begin
          state_q <= ST_RESYNC;
          cnt_q   <= '0;
        end
      endcase
    end
  end

  // The loading and verify counts restart from zero on every entry.
  a_cnt_zero_in_synced: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (state_q == ST_SYNCED) |-> (cnt_q == '0));

endmodule
