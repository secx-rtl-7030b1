// secx_verifier: checks a decrypted digest at the receiving meter.  The
// timestamp put in by the sending meter must not lie in the future and must
// be at most TAU cycles old (a larger gap means one side held the message
// back), and the nonce must be the next one of the shared secret sequence
// (a mismatch means a replayed or forged message).  Purely combinational; the
// caller registers the outcome.  TAU is this design's choice: the SecX paper
// names the threshold tau without a value.
module secx_verifier
  import secx_pkg::*;
#(
  parameter int unsigned TAU = 16
) (
  input  logic [TS_W-1:0]    now,
  input  logic [TS_W-1:0]    stamp,
  input  logic [NONCE_W-1:0] nonce,
  input  logic [NONCE_W-1:0] exp_nonce,
  output logic [TS_W-1:0]    delay,
  output logic               timing_err,
  output logic               nonce_err
);
  always_comb begin
    delay      = now - stamp;
    timing_err = (stamp > now) || (delay > TS_W'(TAU));
    nonce_err  = (nonce != exp_nonce);
  end
endmodule
