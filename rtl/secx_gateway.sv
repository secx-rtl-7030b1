// secx_gateway: the host-maintained gateway (GW) of one guest accelerator,
// with its gateway meter mGW, access list and TLB.  Everything the guest
// exchanges with the rest of the chip passes through it.
//
// Guest request (g_rq_*): accepted when the request path is idle and passed
// straight to mGW together with the access-list verdict on its payload.  One
// cycle later mGW has decrypted and checked the digest: a request that is
// denied (ev_denied) or that mGW cannot record (unknown job, bad resource
// id, request table full: ev_rq_drop) is dropped; otherwise memory requests
// (resource 0) are translated by the TLB and issued to the resource on
// m_rq_* with mGW's req-id.  A TLB miss raises tlb_miss_valid with the page
// number and waits for the host's tlb_fill.  Timing or nonce misbehaviour
// found by mGW is reported (ev_timing_err, ev_nonce_err) but the request
// still proceeds: SecX detects, it does not block.
//
// Host-to-guest path: a "job create" from the host (hjc_*) and resource
// responses (m_rs_*) both go through mGW, which stamps them with a digest,
// and then leave on the single guest channel g_h2g_* in the order mGW
// stamped them (kind 0 = job create with its command, kind 1 = response
// with its data).  Only one of them is in mGW at a time, the job create
// first.  On a job create the access list gets the job's input and output
// ranges and the host gets the job-id (hjc_rsp_*).
//
// Guest completion (g_cp_*) goes to mGW, which checks HoT and starts the
// log; the job's windows are removed.  The signed log leaves on log_*.
//
// Following the SecX paper: the gateway as the guest's only door, access lists
// set at job creation, a TLB translating guest requests with misses sent to
// the host, dual metering with mGW, log transfer through the gateway.  This
// design's own: the single in-order host-to-guest channel, the handshakes,
// and proceeding after a detected delay.
module secx_gateway
  import secx_pkg::*;
#(
  parameter int unsigned T           = 4,
  parameter int unsigned R           = 4,
  parameter int unsigned NBINS       = 16,
  parameter int unsigned BIN_SHIFT   = 4,
  parameter int unsigned MAX_N_REQ   = 16,
  parameter int unsigned TAU         = 16,
  parameter int unsigned NONCE_DEPTH = 1024,
  parameter int unsigned TLB_ENTRIES = 32,
  parameter int unsigned TLB_WAYS    = 4,
  parameter int unsigned NWIN        = 4,
  parameter int unsigned PPN_W       = 40,
  localparam int unsigned TW  = (T > 1) ? $clog2(T) : 1,
  localparam int unsigned WIW = (NWIN > 1) ? $clog2(NWIN) : 1,
  localparam int unsigned NAW = $clog2(NONCE_DEPTH),
  localparam int unsigned VPN_W = ADDR_W - 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [7:0]            guest_id,
  // secrets and setup of mGW
  input  logic                  gmk_we,
  input  digest_t               gmk,
  input  logic                  tbl_we,
  input  logic [7:0]            tbl_addr,
  input  logic [DIGEST_W-1:0]   tbl_data,
  input  logic                  log_key_we,
  input  logic [255:0]          log_key,
  input  logic                  ns_start,
  input  logic [15:0]           ns_seed,
  output logic                  ns_busy,
  output logic                  ns_valid,
  output logic [NAW-1:0]        ns_addr,
  output logic [NONCE_W-1:0]    ns_data,
  // access list configuration by the host
  input  logic                  acl_res_we,
  input  logic [R-1:0]          acl_res_allow,
  input  logic                  acl_win_we,
  input  logic [WIW-1:0]        acl_win_idx,
  input  logic [ADDR_W-1:0]     acl_win_base,
  input  logic [ADDR_W-1:0]     acl_win_len,
  input  logic                  acl_win_wr,
  // job create from a host core
  input  logic                  hjc_valid,
  output logic                  hjc_ready,
  input  job_cmd_t              hjc_cmd,
  output logic                  hjc_rsp_valid,
  output logic                  hjc_rsp_ok,
  output logic [JOB_ID_W-1:0]   hjc_rsp_job_id,
  // TLB miss to the host and fill
  output logic                  tlb_miss_valid,
  output logic [VPN_W-1:0]      tlb_miss_vpn,
  input  logic                  tlb_fill_valid,
  input  logic [VPN_W-1:0]      tlb_fill_vpn,
  input  logic [PPN_W-1:0]      tlb_fill_ppn,
  input  logic                  tlb_flush,
  // guest to gateway
  input  logic                  g_rq_valid,
  output logic                  g_rq_ready,
  input  digest_t               g_rq_digest,
  input  payload_t              g_rq_payload,
  input  logic                  g_cp_valid,
  output logic                  g_cp_ready,
  input  logic [JOB_ID_W-1:0]   g_cp_job_id,
  input  logic [DIGEST_W-1:0]   g_cp_hot,
  input  logic                  g_cp_dropped,
  // gateway to guest
  output logic                  g_h2g_valid,
  input  logic                  g_h2g_ready,
  output logic                  g_h2g_kind,
  output digest_t               g_h2g_digest,
  output job_cmd_t              g_h2g_cmd,
  output logic [DATA_W-1:0]     g_h2g_data,
  // resource side
  output logic                  m_rq_valid,
  input  logic                  m_rq_ready,
  output logic [REQ_ID_W-1:0]   m_rq_id,
  output logic [RES_ID_W-1:0]   m_rq_res,
  output op_e                   m_rq_op,
  output logic [ADDR_W-1:0]     m_rq_addr,
  output logic [DATA_W-1:0]     m_rq_data,
  input  logic                  m_rs_valid,
  output logic                  m_rs_ready,
  input  logic [REQ_ID_W-1:0]   m_rs_id,
  input  logic [DATA_W-1:0]     m_rs_data,
  // signed log towards the AC
  output logic                  log_valid,
  input  logic                  log_ready,
  output logic [63:0]           log_data,
  output logic                  log_last,
  // events, one-cycle pulses
  output logic                  ev_denied,
  output logic                  ev_rq_drop,
  output logic                  ev_timing_err,
  output logic                  ev_nonce_err,
  output logic                  ev_unknown_rsp,
  output logic                  ev_hot_mismatch,
  output logic                  ev_cp_unknown
);
  // ------------------------------------------------------------ mGW
  logic jc_valid, jc_done, jc_ok;
  logic [JOB_ID_W-1:0] jc_job_id;
  logic [TW-1:0] jc_slot;
  digest_t jc_digest;
  logic rq_valid, rq_allow, rq_done, rq_ok, rq_terr, rq_nerr;
  logic [REQ_ID_W-1:0] rq_req_id;
  logic rs_valid, rs_done, rs_ok;
  digest_t rs_digest;
  logic cp_valid, cp_ready, cp_done, cp_ok, cp_mism;
  logic [TW-1:0] cp_slot;

  secx_meter_gw #(
    .T(T), .R(R), .NBINS(NBINS), .BIN_SHIFT(BIN_SHIFT), .MAX_N_REQ(MAX_N_REQ),
    .TAU(TAU), .NONCE_DEPTH(NONCE_DEPTH)
  ) u_mgw (
    .clk, .rst_n, .guest_id,
    .gmk_we, .gmk, .tbl_we, .tbl_addr, .tbl_data, .log_key_we, .log_key_in(log_key),
    .ns_start, .ns_seed, .ns_busy, .ns_valid, .ns_addr, .ns_data,
    .jc_valid, .jc_cmd(hjc_cmd), .jc_done, .jc_ok, .jc_job_id, .jc_slot, .jc_digest,
    .rq_valid, .rq_digest(g_rq_digest), .rq_payload(g_rq_payload), .rq_allow,
    .rq_done, .rq_ok, .rq_req_id, .rq_timing_err(rq_terr), .rq_nonce_err(rq_nerr),
    .rs_valid, .rs_req_id(m_rs_id), .rs_data(m_rs_data), .rs_done, .rs_ok, .rs_digest,
    .cp_valid, .cp_ready, .cp_job_id(g_cp_job_id), .cp_hot(g_cp_hot), .cp_dropped(g_cp_dropped),
    .cp_done, .cp_ok, .cp_slot, .cp_hot_mismatch(cp_mism),
    .log_valid, .log_ready, .log_data, .log_last
  );

  // ------------------------------------------------------------ access list
  job_cmd_t jc_cmd_q;
  secx_access_list #(.NWIN(NWIN), .T(T), .R(R)) u_acl (
    .clk, .rst_n,
    .res_we(acl_res_we), .res_allow(acl_res_allow),
    .win_we(acl_win_we), .win_idx(acl_win_idx), .win_base(acl_win_base),
    .win_len(acl_win_len), .win_wr(acl_win_wr),
    .job_set(jc_done && jc_ok), .job_slot(jc_slot), .job_cmd(jc_cmd_q),
    .job_clr(cp_done && cp_ok), .job_clr_slot(cp_slot),
    .chk_res(g_rq_payload.res_id), .chk_op(g_rq_payload.op), .chk_addr(g_rq_payload.addr),
    .allow(rq_allow)
  );

  // ------------------------------------------------------------ TLB
  payload_t pl_q;
  logic [REQ_ID_W-1:0] rid_q;
  logic tlb_hit;
  logic [PPN_W-1:0] tlb_ppn;
  logic allow_q;
  secx_tlb #(.ENTRIES(TLB_ENTRIES), .WAYS(TLB_WAYS), .VPN_W(VPN_W), .PPN_W(PPN_W)) u_tlb (
    .clk, .rst_n, .flush(tlb_flush), .lk_vpn(pl_q.addr[ADDR_W-1:12]),
    .lk_hit(tlb_hit), .lk_ppn(tlb_ppn),
    .fill(tlb_fill_valid), .fill_vpn(tlb_fill_vpn), .fill_ppn(tlb_fill_ppn)
  );

  // ------------------------------------------------------------ request path
  typedef enum logic [2:0] {R_IDLE, R_CHK, R_XL, R_MISS, R_ISS} rst_e;
  rst_e rs;
  logic needs_tlb;
  assign needs_tlb  = (pl_q.res_id == '0);
  assign g_rq_ready = (rs == R_IDLE);
  assign rq_valid   = g_rq_valid && g_rq_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rs <= R_IDLE; pl_q <= '0; rid_q <= '0; allow_q <= 1'b0;
      m_rq_valid <= 1'b0; m_rq_id <= '0; m_rq_res <= '0; m_rq_op <= OP_READ;
      m_rq_addr <= '0; m_rq_data <= '0;
    end else begin
      unique case (rs)
        R_IDLE: if (rq_valid) begin
          pl_q    <= g_rq_payload;
          allow_q <= rq_allow;
          rs      <= R_CHK;
        end
        R_CHK: begin
          rid_q <= rq_req_id;
          if (allow_q && rq_ok) rs <= R_XL;
          else                  rs <= R_IDLE;
        end
        R_XL: begin
          if (!needs_tlb || tlb_hit) begin
            m_rq_valid <= 1'b1;
            m_rq_id    <= rid_q;
            m_rq_res   <= pl_q.res_id;
            m_rq_op    <= pl_q.op;
            m_rq_addr  <= needs_tlb ? ((ADDR_W'(tlb_ppn) << 12) | ADDR_W'(pl_q.addr[11:0])) : pl_q.addr;
            m_rq_data  <= pl_q.data;
            rs         <= R_ISS;
          end else rs <= R_MISS;
        end
        R_MISS: if (tlb_fill_valid) rs <= R_XL;
        R_ISS: if (m_rq_ready) begin
          m_rq_valid <= 1'b0;
          rs         <= R_IDLE;
        end
        default: rs <= R_IDLE;
      endcase
    end

  assign tlb_miss_valid = (rs == R_XL) && needs_tlb && !tlb_hit;
  assign tlb_miss_vpn   = pl_q.addr[ADDR_W-1:12];

  // ------------------------------------------------------------ host-to-guest path
  logic inflight;
  logic [DATA_W-1:0] rs_data_q;
  assign hjc_ready  = !g_h2g_valid && !inflight;
  assign jc_valid   = hjc_valid && hjc_ready;
  assign m_rs_ready = !g_h2g_valid && !inflight && !hjc_valid;
  assign rs_valid   = m_rs_valid && m_rs_ready;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      inflight <= 1'b0; jc_cmd_q <= '0; rs_data_q <= '0;
      g_h2g_valid <= 1'b0; g_h2g_kind <= 1'b0; g_h2g_digest <= '0;
      g_h2g_cmd <= '0; g_h2g_data <= '0;
    end else begin
      if (jc_valid) begin
        inflight <= 1'b1;
        jc_cmd_q <= hjc_cmd;
      end
      if (rs_valid) begin
        inflight  <= 1'b1;
        rs_data_q <= m_rs_data;
      end
      if (g_h2g_valid && g_h2g_ready) g_h2g_valid <= 1'b0;
      if (jc_done) begin
        inflight <= 1'b0;
        if (jc_ok) begin
          g_h2g_valid  <= 1'b1;
          g_h2g_kind   <= 1'b0;
          g_h2g_digest <= jc_digest;
          g_h2g_cmd    <= jc_cmd_q;
          g_h2g_data   <= '0;
        end
      end
      if (rs_done) begin
        inflight <= 1'b0;
        if (rs_ok) begin
          g_h2g_valid  <= 1'b1;
          g_h2g_kind   <= 1'b1;
          g_h2g_digest <= rs_digest;
          g_h2g_cmd    <= '0;
          g_h2g_data   <= rs_data_q;
        end
      end
    end

  assign hjc_rsp_valid  = jc_done;
  assign hjc_rsp_ok     = jc_ok;
  assign hjc_rsp_job_id = jc_job_id;

  // ------------------------------------------------------------ completion
  assign g_cp_ready = cp_ready;
  assign cp_valid   = g_cp_valid;

  // ------------------------------------------------------------ events
  assign ev_denied       = (rs == R_CHK) && !allow_q;
  assign ev_rq_drop      = (rs == R_CHK) && allow_q && !rq_ok;
  assign ev_timing_err   = rq_done && rq_terr;
  assign ev_nonce_err    = rq_done && rq_nerr;
  assign ev_unknown_rsp  = rs_done && !rs_ok;
  assign ev_hot_mismatch = cp_done && cp_ok && cp_mism;
  assign ev_cp_unknown   = cp_done && !cp_ok;
endmodule
