// secx_logger: turns the metrics of one finished job into a signed log and
// streams it towards the Auditor-Comptroller (the "Logger" of mGW).
//
// On `start` it captures the job's fields: completion time, job-id,
// guest-id, job type, latency in cycles, bytes written to the output region,
// the R x nbins latency bins and the HoI and HoO digests.  It then divides
// to get the average throughput in output bytes per second,
//   throughput = out_bytes * FREQ_HZ / latency,
// with a restoring divider (one quotient bit per cycle, 64 cycles), signs
// the 546-byte log body with HMAC-SHA256 and sends the 578-byte log as 73
// 64-bit words (most significant first, zero padded at the end) on a
// valid/ready stream with `log_last` on the final word.  Latency and
// throughput saturate at 32 bits.  The log layout follows the SecX paper's log
// table; the divider, the word stream and the saturation are this design's
// choices.  `ready` is high while idle.
module secx_logger
  import secx_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [255:0]                log_key,
  input  logic                        start,
  input  logic [TS_W-1:0]             f_time,
  input  logic [JOB_ID_W-1:0]         f_job_id,
  input  logic [7:0]                  f_guest_id,
  input  logic [7:0]                  f_job_type,
  input  logic [TS_W-1:0]             f_latency,
  input  logic [31:0]                 f_out_bytes,
  input  logic [LOG_R*LOG_NBINS*32-1:0] f_qoe,
  input  logic [DIGEST_W-1:0]         f_hoi,
  input  logic [DIGEST_W-1:0]         f_hoo,
  output logic                        ready,
  output logic                        log_valid,
  input  logic                        log_ready,
  output logic [63:0]                 log_data,
  output logic                        log_last
);
  typedef enum logic [2:0] {S_IDLE, S_DIV, S_MAC, S_MACW, S_SEND} st_e;
  st_e st;

  log_body_t       body;
  logic [63:0]     num, quo, rem, den;
  logic [6:0]      div_cnt;
  logic [255:0]    mac;
  log_flat_t       flat;
  logic [6:0]      widx;

  logic [64:0] rem_sh;
  assign rem_sh = {rem, num[63]};
  logic [63:0] q_final;
  assign q_final = {quo[62:0], (rem_sh >= {1'b0, den})};

  logic hm_start, hm_busy, hm_done;
  logic [255:0] hm_mac;
  assign hm_start = (st == S_MAC);

  secx_hmac_sha256 #(.MSG_BYTES(LOG_BODY_BYTES)) u_hmac (
    .clk, .rst_n, .start(hm_start), .key(log_key), .msg(body),
    .busy(hm_busy), .done(hm_done), .mac(hm_mac)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= S_IDLE; body <= '0; num <= '0; quo <= '0; rem <= '0; den <= '0;
      div_cnt <= '0; mac <= '0; widx <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          body.timestamp      <= 128'(f_time);
          body.job_id         <= f_job_id;
          body.guest_id       <= f_guest_id;
          body.job_type       <= f_job_type;
          body.qos_latency    <= (f_latency > 64'hFFFF_FFFF) ? 32'hFFFF_FFFF : f_latency[31:0];
          body.qos_throughput <= '0;
          body.qoe            <= f_qoe;
          body.hoi            <= 1024'(f_hoi);
          body.hoo            <= 1024'(f_hoo);
          num     <= 64'(f_out_bytes) * FREQ_HZ;
          den     <= (f_latency == '0) ? 64'd1 : f_latency;
          rem     <= '0;
          quo     <= '0;
          div_cnt <= '0;
          st      <= S_DIV;
        end
        S_DIV: begin
          if (rem_sh >= {1'b0, den}) begin
            rem <= 64'(rem_sh - {1'b0, den});
            quo <= {quo[62:0], 1'b1};
          end else begin
            rem <= rem_sh[63:0];
            quo <= {quo[62:0], 1'b0};
          end
          num     <= num << 1;
          div_cnt <= div_cnt + 1'b1;
          if (div_cnt == 7'd63) st <= S_MAC;
        end
        S_MAC: st <= S_MACW;  // the HMAC captures the finished body here
        S_MACW: if (hm_done) begin
          mac  <= hm_mac;
          widx <= '0;
          st   <= S_SEND;
        end
        S_SEND: if (log_ready) begin
          widx <= widx + 1'b1;
          if (widx == 7'(LOG_WORDS - 1)) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
      // the last quotient bit is formed in the final divider cycle
      if (st == S_DIV && div_cnt == 7'd63)
        body.qos_throughput <= (q_final > 64'hFFFF_FFFF) ? 32'hFFFF_FFFF : q_final[31:0];
    end

  assign flat      = {body, mac, {(LOG_WORDS*64 - LOG_BYTES*8){1'b0}}};
  assign log_valid = (st == S_SEND);
  assign log_data  = flat[LOG_WORDS*64-1 - 64*widx -: 64];
  assign log_last  = (st == S_SEND) && (widx == 7'(LOG_WORDS - 1));
  assign ready     = (st == S_IDLE);

  logic unused;
  assign unused = hm_busy;
endmodule
