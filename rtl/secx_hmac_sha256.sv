// secx_hmac_sha256: HMAC-SHA256 (RFC 2104) of a fixed-length message, used
// by mGW to sign a job log and by the Auditor-Comptroller to check the
// signature.  The key (256 bits, zero-padded to the 64-byte block) is shared
// by all auditor hardware.  On `start` the inner stream
//   (key ^ ipad) || msg || 0x80 || 0...0 || bit length (64 bits)
// is loaded into a block shift register and fed one 512-bit block at a time
// to secx_sha256_core; the outer stream (key ^ opad) || inner hash || padding
// follows.  msg and key must stay stable only in the start cycle.  The
// message length is the parameter MSG_BYTES (the 546-byte log body).  `done`
// pulses for one cycle with `mac` valid; about 66 cycles per block, 12
// blocks for the default length.  Message byte 0 is msg[MSG_BYTES*8-1 -: 8].
module secx_hmac_sha256 #(
  parameter int unsigned MSG_BYTES = 546
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [255:0]           key,
  input  logic [MSG_BYTES*8-1:0] msg,
  output logic                   busy,
  output logic                   done,
  output logic [255:0]           mac
);
  localparam int unsigned IN_BYTES = 64 + MSG_BYTES;
  localparam int unsigned NB_IN    = (IN_BYTES + 9 + 63) / 64;
  localparam int unsigned SR_W     = NB_IN * 512;
  localparam int unsigned PADZ_IN  = SR_W - IN_BYTES * 8 - 8 - 64;
  localparam int unsigned PADZ_OUT = 1024 - 96 * 8 - 8 - 64;

  logic [511:0] kblk;
  assign kblk = {key, 256'b0};

  logic [SR_W-1:0] sr;
  logic [7:0]      blocks_left;
  logic            outer, first;
  logic [511:0]    ipad_blk, opad_blk;
  assign ipad_blk = kblk ^ {64{8'h36}};
  assign opad_blk = kblk ^ {64{8'h5c}};

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT} st_e;
  st_e st;

  logic         c_init, c_next, c_ready;
  logic [255:0] c_digest;
  assign c_init = (st == S_ISSUE) && first;
  assign c_next = (st == S_ISSUE) && !first;

  secx_sha256_core u_core (
    .clk, .rst_n, .init(c_init), .next(c_next),
    .block(sr[SR_W-1 -: 512]), .ready(c_ready), .digest(c_digest)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_IDLE; sr <= '0; blocks_left <= '0; outer <= 1'b0; first <= 1'b0;
      done <= 1'b0; mac <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          sr          <= {ipad_blk, msg, 8'h80, {PADZ_IN{1'b0}}, 64'(IN_BYTES * 8)};
          blocks_left <= 8'(NB_IN);
          outer       <= 1'b0;
          first       <= 1'b1;
          st          <= S_ISSUE;
        end
        S_ISSUE: begin
          first       <= 1'b0;
          sr          <= sr << 512;
          blocks_left <= blocks_left - 1'b1;
          st          <= S_WAIT;
        end
        S_WAIT: if (c_ready) begin
          if (blocks_left != 0) st <= S_ISSUE;
          else if (!outer) begin
            sr          <= {opad_blk, c_digest, 8'h80, {PADZ_OUT{1'b0}}, 64'(96 * 8), {(SR_W-1024){1'b0}}};
            blocks_left <= 8'd2;
            outer       <= 1'b1;
            first       <= 1'b1;
            st          <= S_ISSUE;
          end else begin
            mac  <= c_digest;
            done <= 1'b1;
            st   <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end

  assign busy = (st != S_IDLE);
endmodule
