// secx_meter_g: the guest meter mG, the guest-side half of a SecX meter
// pair.  It sits inside the third-party accelerator and only the accelerator
// talks to it.
//
//  * nonce setup: receives the nonce sequence from mGW, XOR-encrypted with
//    the GMK (ns_valid/addr/data), decrypts it and stores it; address 0
//    restarts both pointers.
//  * job accept (ja_*): the guest hands over the digest that came with a
//    "job create" message; mG decrypts it and checks that mGW's timestamp is
//    at most TAU cycles old and that the nonce is the expected one.  If so the
//    job gets a HoT slot (ja_ok), usable from the next cycle; otherwise the
//    job must be dropped.
//  * request (rq_*): for each resource request of a job, mG makes a req-id,
//    and returns digest = XOR(GMK, job_id || req_id || resource_id || time ||
//    nonce), which the guest sends with its payload to the gateway.  The
//    request data is added to the job's HoT.  Result one cycle after rq_valid.
//  * response (rs_*): the guest hands over the digest and data of a response;
//    mG decrypts, checks timestamp and nonce, adds the data to HoT and frees
//    the req-id.  Results (rs_done, rs_ok, rs_req_id, error flags) come two
//    cycles after rs_valid.  rs_ready is low while a job accept is presented,
//    because both use the next receive nonce.
//  * completion (cp_*): gives the job's HoT for the completion message and
//    frees its slot.
// The protocol follows the SecX paper's guest resource request table; widths,
// the HoT input (the data field of every payload) and the ready rule are
// this design's choices.
module secx_meter_g
  import secx_pkg::*;
#(
  parameter int unsigned T           = 4,
  parameter int unsigned MAX_N_REQ   = 16,
  parameter int unsigned TAU         = 16,
  parameter int unsigned NONCE_DEPTH = 1024,
  localparam int unsigned TW  = (T > 1) ? $clog2(T) : 1,
  localparam int unsigned NAW = $clog2(NONCE_DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // secrets and setup
  input  logic                  gmk_we,
  input  digest_t               gmk,
  input  logic                  tbl_we,
  input  logic [7:0]            tbl_addr,
  input  logic [DIGEST_W-1:0]   tbl_data,
  input  logic                  ns_valid,
  input  logic [NAW-1:0]        ns_addr,
  input  logic [NONCE_W-1:0]    ns_data,
  // job accept
  input  logic                  ja_valid,
  input  digest_t               ja_digest,
  output logic                  ja_done,
  output logic                  ja_ok,
  output logic [JOB_ID_W-1:0]   ja_job_id,
  output logic                  ja_timing_err,
  output logic                  ja_nonce_err,
  // request
  input  logic                  rq_valid,
  input  logic [JOB_ID_W-1:0]   rq_job_id,
  input  payload_t              rq_payload,
  output logic                  rq_done,
  output logic                  rq_ok,
  output logic [REQ_ID_W-1:0]   rq_req_id,
  output digest_t               rq_digest,
  // response
  input  logic                  rs_valid,
  output logic                  rs_ready,
  input  digest_t               rs_digest,
  input  logic [DATA_W-1:0]     rs_data,
  output logic                  rs_done,
  output logic                  rs_ok,
  output logic [REQ_ID_W-1:0]   rs_req_id,
  output logic                  rs_timing_err,
  output logic                  rs_nonce_err,
  // completion
  input  logic                  cp_valid,
  input  logic [JOB_ID_W-1:0]   cp_job_id,
  output logic                  cp_hit,
  output logic [DIGEST_W-1:0]   cp_hot
);
  logic [TS_W-1:0] now;
  secx_timer #(.W(TS_W)) u_timer (.clk, .rst_n, .now);

  // cipher ports: 0 job accept, 1 request digest, 2 response, 3 nonce setup
  logic    c_iv [4];
  digest_t c_id [4];
  logic    c_ov [4];
  digest_t c_od [4];
  secx_xor_cipher #(.NPORTS(4)) u_xor (
    .clk, .rst_n, .key_we(gmk_we), .key_in(gmk),
    .in_valid(c_iv), .in_data(c_id), .out_valid(c_ov), .out_data(c_od)
  );

  // nonce sequence
  logic [NAW-1:0]     ns_addr_q;
  logic [NONCE_W-1:0] tx_nonce, rx_nonce;
  logic               adv_tx, adv_rx;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        ns_addr_q <= '0;
    else if (ns_valid) ns_addr_q <= ns_addr;
  secx_nonce_seq #(.DEPTH(NONCE_DEPTH), .W(NONCE_W)) u_nonce (
    .clk, .rst_n, .ld_we(c_ov[3]), .ld_addr(ns_addr_q), .ld_data(c_od[3][NONCE_W-1:0]),
    .restart(c_ov[3] && ns_addr_q == '0), .adv_tx, .adv_rx, .tx_nonce, .rx_nonce
  );

  // job CAM: job-id -> HoT slot
  job_msg_t            jam;
  logic [JOB_ID_W-1:0] jk_srch [2];
  logic                jk_hit  [2];
  logic [TW-1:0]       jk_idx  [2];
  logic                jk_data [2];
  logic                jk_ins, jk_ins_ok, jk_full;
  logic [TW-1:0]       jk_ins_idx;
  logic                ja_terr, ja_nerr, rs_terr, rs_nerr;
  logic [TS_W-1:0]     ja_dly, rs_dly;
  secx_cam #(.ENTRIES(T), .KEY_W(JOB_ID_W), .DATA_W(1), .NSRCH(2)) u_jcam (
    .clk, .rst_n, .ins(jk_ins), .ins_key(jam.job_id), .ins_data(1'b1),
    .ins_ok(jk_ins_ok), .ins_idx(jk_ins_idx),
    .srch_key(jk_srch), .hit(jk_hit), .hit_idx(jk_idx), .hit_data(jk_data),
    .del(cp_valid && jk_hit[1]), .del_idx(jk_idx[1]), .full(jk_full)
  );
  assign jk_srch[0] = rq_job_id;
  assign jk_srch[1] = cp_job_id;

  // job accept, checked the cycle after ja_valid
  assign jam = job_msg_t'(c_od[0]);
  secx_verifier #(.TAU(TAU)) u_ver_ja (
    .now, .stamp(jam.time_stamp), .nonce(jam.nonce), .exp_nonce(rx_nonce),
    .delay(ja_dly), .timing_err(ja_terr), .nonce_err(ja_nerr)
  );
  assign jk_ins        = c_ov[0] && !ja_terr && !ja_nerr;
  assign ja_done       = c_ov[0];
  assign ja_ok         = jk_ins && jk_ins_ok;
  assign ja_job_id     = jam.job_id;
  assign ja_timing_err = c_ov[0] && ja_terr;
  assign ja_nonce_err  = c_ov[0] && ja_nerr;

  // request CAM: req-id -> job slot
  logic [REQ_ID_W-1:0] req_id;
  logic                rq_go;
  rsp_msg_t            rsm;
  logic [REQ_ID_W-1:0] rk_srch [1];
  logic                rk_hit  [1];
  logic [$clog2(MAX_N_REQ)-1:0] rk_idx [1];
  logic [TW-1:0]       rk_data [1];
  logic                rk_ins_ok, rk_full;
  logic [$clog2(MAX_N_REQ)-1:0] rk_ins_idx;
  secx_cam #(.ENTRIES(MAX_N_REQ), .KEY_W(REQ_ID_W), .DATA_W(TW), .NSRCH(1)) u_rcam (
    .clk, .rst_n, .ins(rq_go), .ins_key(req_id), .ins_data(jk_idx[0]),
    .ins_ok(rk_ins_ok), .ins_idx(rk_ins_idx),
    .srch_key(rk_srch), .hit(rk_hit), .hit_idx(rk_idx), .hit_data(rk_data),
    .del(c_ov[2] && rk_hit[0]), .del_idx(rk_idx[0]), .full(rk_full)
  );

  secx_id_gen #(.W(REQ_ID_W), .PFX_W(0)) u_rid (
    .clk, .rst_n, .prefix(1'b0), .take(rq_go), .id(req_id)
  );

  req_msg_t rqm;
  always_comb begin
    rqm            = '0;
    rqm.job_id     = rq_job_id;
    rqm.req_id     = req_id;
    rqm.res_id     = rq_payload.res_id;
    rqm.time_stamp = now;
    rqm.nonce      = tx_nonce;
  end
  assign rq_go  = rq_valid && jk_hit[0] && rk_ins_ok;
  assign adv_tx = rq_go;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rq_done <= 1'b0; rq_ok <= 1'b0; rq_req_id <= '0;
    end else begin
      rq_done <= rq_valid;
      rq_ok   <= rq_go;
      if (rq_valid) rq_req_id <= req_id;
    end
  assign rq_digest = c_od[1];

  // response, checked the cycle after rs_valid
  logic [DATA_W-1:0] rs_data_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                    rs_data_q <= '0;
    else if (rs_valid && rs_ready) rs_data_q <= rs_data;
  assign rs_ready = !ja_valid;
  assign rsm = rsp_msg_t'(c_od[2]);
  assign rk_srch[0] = rsm.req_id;
  secx_verifier #(.TAU(TAU)) u_ver_rs (
    .now, .stamp(rsm.time_stamp), .nonce(rsm.nonce), .exp_nonce(rx_nonce),
    .delay(rs_dly), .timing_err(rs_terr), .nonce_err(rs_nerr)
  );
  assign rs_done       = c_ov[2];
  assign rs_ok         = c_ov[2] && rk_hit[0];
  assign rs_req_id     = rsm.req_id;
  assign rs_timing_err = c_ov[2] && rs_terr;
  assign rs_nonce_err  = c_ov[2] && rs_nerr;
  assign adv_rx        = c_ov[0] || c_ov[2];

  // cipher inputs
  assign c_iv[0] = ja_valid;             assign c_id[0] = ja_digest;
  assign c_iv[1] = rq_go;                assign c_id[1] = digest_t'(rqm);
  assign c_iv[2] = rs_valid && rs_ready; assign c_id[2] = rs_digest;
  assign c_iv[3] = ns_valid;             assign c_id[3] = digest_t'(ns_data);

  // HoT: port 0 request data, port 1 response data
  logic [DATA_W-1:0]   h_data [2];
  logic [7:0]          h_mask [2];
  logic [DIGEST_W-1:0] h_code [2];
  logic [DIGEST_W-1:0] hot [T];
  assign h_data[0] = rq_payload.data;  assign h_mask[0] = '1;
  assign h_data[1] = rs_data_q;        assign h_mask[1] = '1;
  secx_tab_hash #(.NPORTS(2)) u_hash (
    .clk, .tbl_we, .tbl_addr, .tbl_data, .data(h_data), .mask(h_mask), .code(h_code)
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int t = 0; t < T; t++) hot[t] <= '0;
    end else begin
      for (int t = 0; t < T; t++)
        if (ja_ok && jk_ins_idx == TW'(t)) hot[t] <= '0;
        else
          hot[t] <= hot[t]
                    ^ ((rq_go && jk_idx[0] == TW'(t)) ? h_code[0] : '0)
                    ^ ((rs_ok && rk_data[0] == TW'(t)) ? h_code[1] : '0);
    end

  assign cp_hit = jk_hit[1];
  assign cp_hot = hot[jk_idx[1]];

  logic unused;
  assign unused = ^{ja_dly, rs_dly, jk_full, rk_full, rk_ins_idx, jk_data[0], jk_data[1]};
endmodule
