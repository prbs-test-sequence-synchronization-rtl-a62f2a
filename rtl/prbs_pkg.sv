// Shared types and default sizes of the PRBS bit error tester.
//
// The defaults follow the published description of the dual-reference PRBS
// receiver: a 2^23-1 sequence from a 23-bit Fibonacci LFSR with taps 18 and
// 23, a verify interval of 32 error-free bits, and an error span of 64 bits
// with a resynchronization threshold of 6 errors for the conventional (AUX)
// reference. The MAIN threshold of 8 is this design's own choice: the method
// only asks for it to be slightly higher than the AUX threshold.
package prbs_pkg;

  // State of one reference channel's resynchronization controller.
  typedef enum logic [1:0] {
    ST_RESYNC = 2'd0,  // LFSR is being loaded with received bits
    ST_VERIFY = 2'd1,  // new reference checked over error-free interval
    ST_SYNCED = 2'd2   // reference in use, errors are evaluated
  } sync_state_t;

  // Which reference currently defines the measured errors.
  typedef enum logic [1:0] {
    REF_NONE = 2'd0,
    REF_MAIN = 2'd1,
    REF_AUX  = 2'd2
  } ref_sel_t;

  localparam int unsigned PRBS_N      = 23;  // register length
  localparam int unsigned PRBS_TAP1   = 18;  // first feedback tap (stage)
  localparam int unsigned PRBS_TAP2   = 23;  // second feedback tap (stage)
  localparam int unsigned VERIFY_BITS = 32;  // error-free bits to verify
  localparam int unsigned ERR_SPAN    = 64;  // monitored span, bits
  localparam int unsigned AUX_THRESH  = 6;   // T_a: errors in span
  localparam int unsigned MAIN_THRESH = 8;   // T_m: errors in span
  localparam int unsigned BER_CNT_W   = 48;  // width of result counters

endpackage
