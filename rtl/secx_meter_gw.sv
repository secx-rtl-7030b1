// secx_meter_gw: the gateway meter mGW, the host-side half of a SecX meter
// pair.  It keeps, for each of T active jobs, the job-id and start time (a
// CAM), the job type, the input and output address ranges, the HoI, HoO and
// HoT digests and the count of bytes written to the output; for each
// outstanding resource request (a CAM of MAX_N_REQ entries) the req-id,
// send time, resource, job slot, operation and address; and the QoE latency
// bins of every job and resource.
//
// Operations (each accepted in one cycle, results registered one cycle
// later unless said otherwise):
//  * nonce setup: `ns_start` fills the 1024-byte nonce sequence from a
//    16-bit LFSR seeded by ns_seed, one byte per cycle, and sends each byte,
//    XOR-encrypted with the GMK, to the companion mG (ns_valid/addr/data).
//  * job create (jc_*): allocates a job slot, makes a job-id, records the
//    start time, clears bins, digests and counters, and returns a digest
//    XOR(GMK, job_id || time || nonce) that the guest meter checks.
//  * request (rq_*): decrypts the guest's request digest, checks the
//    timestamp (at most TAU cycles old) and the nonce, looks up the job, and
//    if the gateway's access check passed records the request.  Write data
//    to the job's output range is added to HoO, all request data to HoT.
//    Results (rq_done, rq_ok, rq_req_id, error flags) are valid two cycles
//    after rq_valid: one for decryption, one registered check.
//  * response (rs_*): finds the request, puts its latency (now - send time)
//    into the bins of its job and resource, adds read data from the input
//    range to HoI and all response data to HoT, and returns a digest
//    XOR(GMK, req_id || time || nonce) for the guest meter.
//  * completion (cp_*): compares the guest's HoT with its own, frees the job
//    slot and, unless the guest reports the job dropped, hands the job's
//    metrics to the logger, which signs the log and streams it out (log_*).
//
// Rules for the caller: jc_valid and rs_valid are never high together (both
// take the next send nonce), and nonce setup is not overlapped with traffic.
// Following the SecX paper: dual timestamps with tau check, nonce sequence,
// XOR encryption, CAMs for job and request start times, frequency binning,
// tabulation hashes, HoT comparison, SHA-signed logs.  This design's own
// choices: widths of ids, LFSR as the random source, equal-width bins,
// completion message in clear, send time taken when mGW records the request.
module secx_meter_gw
  import secx_pkg::*;
#(
  parameter int unsigned T           = 4,
  parameter int unsigned R           = 4,
  parameter int unsigned NBINS       = 16,
  parameter int unsigned BIN_SHIFT   = 4,
  parameter int unsigned MAX_N_REQ   = 16,
  parameter int unsigned TAU         = 16,
  parameter int unsigned NONCE_DEPTH = 1024,
  localparam int unsigned TW = (T > 1) ? $clog2(T) : 1,
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1,
  localparam int unsigned NAW = $clog2(NONCE_DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [7:0]            guest_id,
  // secrets and setup
  input  logic                  gmk_we,
  input  digest_t               gmk,
  input  logic                  tbl_we,
  input  logic [7:0]            tbl_addr,
  input  logic [DIGEST_W-1:0]   tbl_data,
  input  logic                  log_key_we,
  input  logic [255:0]          log_key_in,
  input  logic                  ns_start,
  input  logic [15:0]           ns_seed,
  output logic                  ns_busy,
  output logic                  ns_valid,
  output logic [NAW-1:0]        ns_addr,
  output logic [NONCE_W-1:0]    ns_data,
  // job create
  input  logic                  jc_valid,
  input  job_cmd_t              jc_cmd,
  output logic                  jc_done,
  output logic                  jc_ok,
  output logic [JOB_ID_W-1:0]   jc_job_id,
  output logic [TW-1:0]         jc_slot,
  output digest_t               jc_digest,
  // guest request
  input  logic                  rq_valid,
  input  digest_t               rq_digest,
  input  payload_t              rq_payload,
  input  logic                  rq_allow,
  output logic                  rq_done,
  output logic                  rq_ok,
  output logic [REQ_ID_W-1:0]   rq_req_id,
  output logic                  rq_timing_err,
  output logic                  rq_nonce_err,
  // resource response
  input  logic                  rs_valid,
  input  logic [REQ_ID_W-1:0]   rs_req_id,
  input  logic [DATA_W-1:0]     rs_data,
  output logic                  rs_done,
  output logic                  rs_ok,
  output digest_t               rs_digest,
  // job completion
  input  logic                  cp_valid,
  output logic                  cp_ready,
  input  logic [JOB_ID_W-1:0]   cp_job_id,
  input  logic [DIGEST_W-1:0]   cp_hot,
  input  logic                  cp_dropped,
  output logic                  cp_done,
  output logic                  cp_ok,
  output logic [TW-1:0]         cp_slot,
  output logic                  cp_hot_mismatch,
  // signed log stream
  output logic                  log_valid,
  input  logic                  log_ready,
  output logic [63:0]           log_data,
  output logic                  log_last
);
  // ---------------------------------------------------------------- time
  logic [TS_W-1:0] now;
  secx_timer #(.W(TS_W)) u_timer (.clk, .rst_n, .now);

  // ---------------------------------------------------------------- nonce
  logic [15:0]          lfsr;
  logic [NAW:0]         ns_cnt;
  logic                 ns_we;
  logic [NONCE_W-1:0]   tx_nonce, rx_nonce;
  logic                 adv_tx, adv_rx;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ns_busy <= 1'b0; ns_cnt <= '0; lfsr <= 16'h1;
    end else if (ns_start && !ns_busy) begin
      ns_busy <= 1'b1; ns_cnt <= '0;
      lfsr    <= (ns_seed == '0) ? 16'h1 : ns_seed;
    end else if (ns_busy) begin
      lfsr   <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0);
      ns_cnt <= ns_cnt + 1'b1;
      if (ns_cnt == (NAW+1)'(NONCE_DEPTH - 1)) ns_busy <= 1'b0;
    end
  assign ns_we = ns_busy;

  secx_nonce_seq #(.DEPTH(NONCE_DEPTH), .W(NONCE_W)) u_nonce (
    .clk, .rst_n, .ld_we(ns_we), .ld_addr(ns_cnt[NAW-1:0]), .ld_data(lfsr[7:0]),
    .restart(ns_start && !ns_busy), .adv_tx, .adv_rx, .tx_nonce, .rx_nonce
  );

  // ---------------------------------------------------------------- cipher
  // ports: 0 job digest, 1 request decrypt, 2 response digest, 3 nonce setup
  logic    c_iv [4];
  digest_t c_id [4];
  logic    c_ov [4];
  digest_t c_od [4];
  secx_xor_cipher #(.NPORTS(4)) u_xor (
    .clk, .rst_n, .key_we(gmk_we), .key_in(gmk),
    .in_valid(c_iv), .in_data(c_id), .out_valid(c_ov), .out_data(c_od)
  );

  logic [NAW-1:0] ns_addr_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ns_addr_q <= '0;
    else        ns_addr_q <= ns_cnt[NAW-1:0];
  assign ns_valid = c_ov[3];
  assign ns_addr  = ns_addr_q;
  assign ns_data  = c_od[3][NONCE_W-1:0];

  // ---------------------------------------------------------------- job CAM
  logic [JOB_ID_W-1:0] jc_id;
  logic                jc_take;
  secx_id_gen #(.W(JOB_ID_W), .PFX_W(8)) u_jid (
    .clk, .rst_n, .prefix(guest_id), .take(jc_take), .id(jc_id)
  );

  logic [JOB_ID_W-1:0] jk_srch [2];
  logic                jk_hit  [2];
  logic [TW-1:0]       jk_idx  [2];
  logic [TS_W-1:0]     jk_data [2];
  logic                jk_ins_ok, jk_del;
  logic [TW-1:0]       jk_ins_idx;
  logic                jk_full;
  secx_cam #(.ENTRIES(T), .KEY_W(JOB_ID_W), .DATA_W(TS_W), .NSRCH(2)) u_jcam (
    .clk, .rst_n, .ins(jc_valid), .ins_key(jc_id), .ins_data(now),
    .ins_ok(jk_ins_ok), .ins_idx(jk_ins_idx),
    .srch_key(jk_srch), .hit(jk_hit), .hit_idx(jk_idx), .hit_data(jk_data),
    .del(jk_del), .del_idx(jk_idx[1]), .full(jk_full)
  );
  assign jc_take = jc_valid && jk_ins_ok;

  // per-slot job state
  logic [7:0]          s_type    [T];
  logic [ADDR_W-1:0]   s_in_lo   [T];
  logic [ADDR_W-1:0]   s_in_hi   [T];
  logic [ADDR_W-1:0]   s_out_lo  [T];
  logic [ADDR_W-1:0]   s_out_hi  [T];
  logic [DIGEST_W-1:0] s_hoi     [T];
  logic [DIGEST_W-1:0] s_hoo     [T];
  logic [DIGEST_W-1:0] s_hot     [T];
  logic [31:0]         s_obytes  [T];

  // ---------------------------------------------------------------- request CAM
  typedef struct packed {
    logic [TS_W-1:0]   send_time;
    logic [RW-1:0]     res;
    logic [TW-1:0]     slot;
    op_e               op;
    logic [ADDR_W-1:0] addr;
  } rrec_t;

  logic [REQ_ID_W-1:0] rk_srch [1];
  logic                rk_hit  [1];
  logic [$clog2(MAX_N_REQ)-1:0] rk_idx [1];
  rrec_t               rk_data [1];
  logic                rk_ins, rk_ins_ok, rk_full;
  logic [$clog2(MAX_N_REQ)-1:0] rk_ins_idx;
  rrec_t               rk_rec;
  req_msg_t            rm;
  secx_cam #(.ENTRIES(MAX_N_REQ), .KEY_W(REQ_ID_W), .DATA_W($bits(rrec_t)), .NSRCH(1)) u_rcam (
    .clk, .rst_n, .ins(rk_ins), .ins_key(rm.req_id), .ins_data(rk_rec),
    .ins_ok(rk_ins_ok), .ins_idx(rk_ins_idx),
    .srch_key(rk_srch), .hit(rk_hit), .hit_idx(rk_idx), .hit_data(rk_data),
    .del(rs_valid && rk_hit[0]), .del_idx(rk_idx[0]), .full(rk_full)
  );
  assign rk_srch[0] = rs_req_id;

  // ---------------------------------------------------------------- hashing
  logic [DATA_W-1:0]   h_data [2];
  logic [7:0]          h_mask [2];
  logic [DIGEST_W-1:0] h_code [2];
  secx_tab_hash #(.NPORTS(2)) u_hash (
    .clk, .tbl_we, .tbl_addr, .tbl_data, .data(h_data), .mask(h_mask), .code(h_code)
  );

  // ---------------------------------------------------------------- bins
  logic [R*NBINS*32-1:0] bins_rd;
  rrec_t                 rsp_rec;
  assign rsp_rec = rk_data[0];
  secx_freq_bins #(.T(T), .R(R), .NBINS(NBINS), .BIN_SHIFT(BIN_SHIFT), .LAT_W(TS_W)) u_bins (
    .clk, .rst_n,
    .clr(jc_take), .clr_slot(jk_ins_idx),
    .inc(rs_valid && rk_hit[0]), .inc_slot(rsp_rec.slot), .inc_res(rsp_rec.res),
    .inc_lat(now - rsp_rec.send_time),
    .rd_slot(jk_idx[1]), .rd_bins(bins_rd)
  );

  // ---------------------------------------------------------------- job create
  job_msg_t jm;
  always_comb begin
    jm            = '0;
    jm.job_id     = jc_id;
    jm.time_stamp = now;
    jm.nonce      = tx_nonce;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      jc_done <= 1'b0; jc_ok <= 1'b0; jc_job_id <= '0; jc_slot <= '0;
    end else begin
      jc_done <= jc_valid;
      jc_ok   <= jc_take;
      if (jc_valid) begin
        jc_job_id <= jc_id;
        jc_slot   <= jk_ins_idx;
      end
    end
  assign jc_digest = c_od[0];

  // ---------------------------------------------------------------- request stage
  logic     rq_v1, allow1;
  payload_t pl1;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rq_v1 <= 1'b0; allow1 <= 1'b0; pl1 <= '0;
    end else begin
      rq_v1 <= rq_valid;
      if (rq_valid) begin
        pl1    <= rq_payload;
        allow1 <= rq_allow;
      end
    end

  logic [TS_W-1:0] v_delay;
  logic            v_terr, v_nerr, rq_job_hit, rq_res_ok, rq_rec, rq_in_out;
  logic [TW-1:0]   rq_slot;
  assign rm = req_msg_t'(c_od[1]);
  secx_verifier #(.TAU(TAU)) u_ver (
    .now, .stamp(rm.time_stamp), .nonce(rm.nonce), .exp_nonce(rx_nonce),
    .delay(v_delay), .timing_err(v_terr), .nonce_err(v_nerr)
  );
  assign jk_srch[0] = rm.job_id;
  assign rq_job_hit = jk_hit[0];
  assign rq_slot    = jk_idx[0];
  assign rq_res_ok  = (pl1.res_id == rm.res_id) && (pl1.res_id < RES_ID_W'(R));
  assign rq_rec     = rq_v1 && allow1 && rq_job_hit && rq_res_ok && rk_ins_ok;
  assign rk_ins     = rq_rec;
  assign rq_in_out  = (pl1.addr >= s_out_lo[rq_slot]) && (pl1.addr < s_out_hi[rq_slot]);
  always_comb begin
    rk_rec           = '0;
    rk_rec.send_time = now;
    rk_rec.res       = pl1.res_id[RW-1:0];
    rk_rec.slot      = rq_slot;
    rk_rec.op        = pl1.op;
    rk_rec.addr      = pl1.addr;
  end
  assign rq_done       = rq_v1;
  assign rq_ok         = rq_rec;
  assign rq_req_id     = rm.req_id;
  assign rq_timing_err = rq_v1 && v_terr;
  assign rq_nonce_err  = rq_v1 && v_nerr;
  assign adv_rx        = rq_v1;

  // ---------------------------------------------------------------- response stage
  rsp_msg_t rsm;
  logic     rs_in_in;
  always_comb begin
    rsm            = '0;
    rsm.req_id     = rs_req_id;
    rsm.time_stamp = now;
    rsm.nonce      = tx_nonce;
  end
  assign rs_in_in = (rsp_rec.addr >= s_in_lo[rsp_rec.slot]) && (rsp_rec.addr < s_in_hi[rsp_rec.slot]);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rs_done <= 1'b0; rs_ok <= 1'b0;
    end else begin
      rs_done <= rs_valid;
      rs_ok   <= rs_valid && rk_hit[0];
    end
  assign rs_digest = c_od[2];

  assign adv_tx = jc_take || (rs_valid && rk_hit[0]);

  // cipher inputs
  assign c_iv[0] = jc_take;                 assign c_id[0] = digest_t'(jm);
  assign c_iv[1] = rq_valid;                assign c_id[1] = rq_digest;
  assign c_iv[2] = rs_valid && rk_hit[0];   assign c_id[2] = digest_t'(rsm);
  assign c_iv[3] = ns_busy;                 assign c_id[3] = digest_t'(lfsr[7:0]);

  // hash inputs: port 0 request data, port 1 response data
  assign h_data[0] = pl1.data;
  assign h_mask[0] = '1;
  assign h_data[1] = rs_data;
  assign h_mask[1] = '1;

  // ---------------------------------------------------------------- completion
  logic lg_ready, cp_go;
  assign jk_srch[1] = cp_job_id;
  assign cp_ready   = lg_ready;
  assign cp_go      = cp_valid && cp_ready;
  assign jk_del     = cp_go && jk_hit[1];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cp_done <= 1'b0; cp_ok <= 1'b0; cp_slot <= '0; cp_hot_mismatch <= 1'b0;
    end else begin
      cp_done <= cp_go;
      cp_ok   <= cp_go && jk_hit[1];
      if (cp_go) begin
        cp_slot         <= jk_idx[1];
        cp_hot_mismatch <= jk_hit[1] && (cp_hot != s_hot[jk_idx[1]]);
      end
    end

  // ---------------------------------------------------------------- slot state
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int t = 0; t < T; t++) begin
        s_type[t] <= '0; s_in_lo[t] <= '0; s_in_hi[t] <= '0;
        s_out_lo[t] <= '0; s_out_hi[t] <= '0;
        s_hoi[t] <= '0; s_hoo[t] <= '0; s_hot[t] <= '0; s_obytes[t] <= '0;
      end
    end else begin
      for (int t = 0; t < T; t++) begin
        if (jc_take && jk_ins_idx == TW'(t)) begin
          s_type[t]   <= jc_cmd.taskcode;
          s_in_lo[t]  <= jc_cmd.in_addr;
          s_in_hi[t]  <= jc_cmd.in_addr + ADDR_W'(jc_cmd.in_len);
          s_out_lo[t] <= jc_cmd.out_addr;
          s_out_hi[t] <= jc_cmd.out_addr + ADDR_W'(jc_cmd.out_len);
          s_hoi[t] <= '0; s_hoo[t] <= '0; s_hot[t] <= '0; s_obytes[t] <= '0;
        end else begin
          if (rq_v1 && rq_job_hit && rq_slot == TW'(t)) begin
            if (rq_rec && pl1.op == OP_WRITE && rq_in_out) begin
              s_hoo[t]    <= s_hoo[t] ^ h_code[0];
              s_obytes[t] <= s_obytes[t] + 32'(DATA_W / 8);
            end
          end
          if (rs_valid && rk_hit[0] && rsp_rec.slot == TW'(t) && rsp_rec.op == OP_READ && rs_in_in)
            s_hoi[t] <= s_hoi[t] ^ h_code[1];
          s_hot[t] <= s_hot[t]
                      ^ ((rq_v1 && rq_job_hit && rq_slot == TW'(t)) ? h_code[0] : '0)
                      ^ ((rs_valid && rk_hit[0] && rsp_rec.slot == TW'(t)) ? h_code[1] : '0);
        end
      end
    end

  // ---------------------------------------------------------------- logger
  logic [255:0] log_key;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          log_key <= '0;
    else if (log_key_we) log_key <= log_key_in;

  logic [LOG_R*LOG_NBINS*32-1:0] qoe_log;
  assign qoe_log = (LOG_R*LOG_NBINS*32)'(bins_rd);

  secx_logger u_log (
    .clk, .rst_n, .log_key,
    .start(cp_go && jk_hit[1] && !cp_dropped),
    .f_time(now), .f_job_id(cp_job_id), .f_guest_id(guest_id),
    .f_job_type(s_type[jk_idx[1]]), .f_latency(now - jk_data[1]),
    .f_out_bytes(s_obytes[jk_idx[1]]), .f_qoe(qoe_log),
    .f_hoi(s_hoi[jk_idx[1]]), .f_hoo(s_hoo[jk_idx[1]]),
    .ready(lg_ready), .log_valid, .log_ready, .log_data, .log_last
  );

  logic unused;
  assign unused = ^{v_delay, rk_full, jk_full, rk_ins_idx};

  // both take the next send nonce, so they must not coincide
  a_tx_nonce_once: assert property (@(posedge clk) disable iff (!rst_n) !(jc_valid && rs_valid));
endmodule
