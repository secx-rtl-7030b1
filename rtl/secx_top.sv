// secx_top: the SecX auditing hardware of an SoC with N_GUESTS third-party
// accelerators (guests).  For each guest it holds the guest meter mG (which
// the accelerator vendor embeds in the guest) and the host gateway GW with
// its gateway meter mGW; one Auditor-Comptroller (AC) collects the signed
// job logs of all gateways through a round-robin log arbiter.  The nonce
// sequence of each pair runs from mGW to mG inside the top.
//
// Everything outside the auditor domain is a port: the guest accelerators
// (the mg_* ports are the guest's side of mG, the g_* ports its side of GW),
// the host cores (job create, TLB miss and fill, access-list setup), the
// resources behind the gateways (m_*), and the key and table loading that a
// PUF-based setup would perform.  All per-guest ports are arrays indexed by
// guest; setup buses shared by all guests have per-guest write enables.
// The AC's logs are read through ac_rd_*.
//
// The structure (dual meters per guest, gateways, central AC) follows the
// SecX paper's hardware architecture figure; the log arbiter stands for the
// system NoC, which is not part of SecX.  Defaults are the SecX paper's
// configuration: 24 guests, T = 4 tasks, R = 4 resources, 16 bins, a
// 32-entry 4-way TLB per gateway and storage for 7000 logs.
module secx_top
  import secx_pkg::*;
#(
  parameter int unsigned N_GUESTS    = 24,
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
  parameter int unsigned NJA         = 7000,
  localparam int unsigned N   = N_GUESTS,
  localparam int unsigned WIW = (NWIN > 1) ? $clog2(NWIN) : 1,
  localparam int unsigned VPN_W = ADDR_W - 12,
  localparam int unsigned SW  = $clog2(NJA)
) (
  input  logic                clk,
  input  logic                rst_n,
  // secrets and setup
  input  logic                gmk_we,
  input  digest_t             gmk,
  input  logic                log_key_we,
  input  logic [255:0]        log_key,
  input  logic                tbl_we   [N],
  input  logic [7:0]          tbl_addr,
  input  logic [DIGEST_W-1:0] tbl_data,
  input  logic                ns_start [N],
  input  logic [15:0]         ns_seed,
  output logic                ns_busy  [N],
  // host: access lists, job create, TLB
  input  logic                acl_res_we [N],
  input  logic [R-1:0]        acl_res_allow,
  input  logic                acl_win_we [N],
  input  logic [WIW-1:0]      acl_win_idx,
  input  logic [ADDR_W-1:0]   acl_win_base,
  input  logic [ADDR_W-1:0]   acl_win_len,
  input  logic                acl_win_wr,
  input  logic                hjc_valid      [N],
  output logic                hjc_ready      [N],
  input  job_cmd_t            hjc_cmd        [N],
  output logic                hjc_rsp_valid  [N],
  output logic                hjc_rsp_ok     [N],
  output logic [JOB_ID_W-1:0] hjc_rsp_job_id [N],
  output logic                tlb_miss_valid [N],
  output logic [VPN_W-1:0]    tlb_miss_vpn   [N],
  input  logic                tlb_fill_valid [N],
  input  logic [VPN_W-1:0]    tlb_fill_vpn   [N],
  input  logic [PPN_W-1:0]    tlb_fill_ppn   [N],
  input  logic                tlb_flush      [N],
  // guest side of mG
  input  logic                mg_ja_valid  [N],
  input  digest_t             mg_ja_digest [N],
  output logic                mg_ja_done   [N],
  output logic                mg_ja_ok     [N],
  output logic [JOB_ID_W-1:0] mg_ja_job_id [N],
  output logic                mg_ja_terr   [N],
  output logic                mg_ja_nerr   [N],
  input  logic                mg_rq_valid  [N],
  input  logic [JOB_ID_W-1:0] mg_rq_job_id [N],
  input  payload_t            mg_rq_payload[N],
  output logic                mg_rq_done   [N],
  output logic                mg_rq_ok     [N],
  output logic [REQ_ID_W-1:0] mg_rq_req_id [N],
  output digest_t             mg_rq_digest [N],
  input  logic                mg_rs_valid  [N],
  output logic                mg_rs_ready  [N],
  input  digest_t             mg_rs_digest [N],
  input  logic [DATA_W-1:0]   mg_rs_data   [N],
  output logic                mg_rs_done   [N],
  output logic                mg_rs_ok     [N],
  output logic [REQ_ID_W-1:0] mg_rs_req_id [N],
  output logic                mg_rs_terr   [N],
  output logic                mg_rs_nerr   [N],
  input  logic                mg_cp_valid  [N],
  input  logic [JOB_ID_W-1:0] mg_cp_job_id [N],
  output logic                mg_cp_hit    [N],
  output logic [DIGEST_W-1:0] mg_cp_hot    [N],
  // guest side of GW
  input  logic                g_rq_valid   [N],
  output logic                g_rq_ready   [N],
  input  digest_t             g_rq_digest  [N],
  input  payload_t            g_rq_payload [N],
  input  logic                g_cp_valid   [N],
  output logic                g_cp_ready   [N],
  input  logic [JOB_ID_W-1:0] g_cp_job_id  [N],
  input  logic [DIGEST_W-1:0] g_cp_hot     [N],
  input  logic                g_cp_dropped [N],
  output logic                g_h2g_valid  [N],
  input  logic                g_h2g_ready  [N],
  output logic                g_h2g_kind   [N],
  output digest_t             g_h2g_digest [N],
  output job_cmd_t            g_h2g_cmd    [N],
  output logic [DATA_W-1:0]   g_h2g_data   [N],
  // resource side of GW
  output logic                m_rq_valid [N],
  input  logic                m_rq_ready [N],
  output logic [REQ_ID_W-1:0] m_rq_id    [N],
  output logic [RES_ID_W-1:0] m_rq_res   [N],
  output op_e                 m_rq_op    [N],
  output logic [ADDR_W-1:0]   m_rq_addr  [N],
  output logic [DATA_W-1:0]   m_rq_data  [N],
  input  logic                m_rs_valid [N],
  output logic                m_rs_ready [N],
  input  logic [REQ_ID_W-1:0] m_rs_id    [N],
  input  logic [DATA_W-1:0]   m_rs_data  [N],
  // misbehaviour events of the gateways
  output logic                ev_denied       [N],
  output logic                ev_rq_drop      [N],
  output logic                ev_timing_err   [N],
  output logic                ev_nonce_err    [N],
  output logic                ev_unknown_rsp  [N],
  output logic                ev_hot_mismatch [N],
  output logic                ev_cp_unknown   [N],
  // Auditor-Comptroller
  input  logic                ac_rd_en,
  input  logic [SW-1:0]       ac_rd_slot,
  input  logic [6:0]          ac_rd_word,
  output logic [63:0]         ac_rd_data,
  output logic [31:0]         ac_stored,
  output logic [31:0]         ac_rejected,
  output logic [31:0]         ac_overflows,
  output logic [SW-1:0]       ac_wr_slot
);
  localparam int unsigned NAW = $clog2(NONCE_DEPTH);

  logic        lg_valid [N];
  logic        lg_ready [N];
  logic [63:0] lg_data  [N];
  logic        lg_last  [N];

  for (genvar g = 0; g < N; g++) begin : g_guest
    logic               ns_valid;
    logic [NAW-1:0]     ns_addr;
    logic [NONCE_W-1:0] ns_data;

    secx_meter_g #(.T(T), .MAX_N_REQ(MAX_N_REQ), .TAU(TAU), .NONCE_DEPTH(NONCE_DEPTH)) u_mg (
      .clk, .rst_n,
      .gmk_we, .gmk, .tbl_we(tbl_we[g]), .tbl_addr, .tbl_data,
      .ns_valid, .ns_addr, .ns_data,
      .ja_valid(mg_ja_valid[g]), .ja_digest(mg_ja_digest[g]), .ja_done(mg_ja_done[g]),
      .ja_ok(mg_ja_ok[g]), .ja_job_id(mg_ja_job_id[g]),
      .ja_timing_err(mg_ja_terr[g]), .ja_nonce_err(mg_ja_nerr[g]),
      .rq_valid(mg_rq_valid[g]), .rq_job_id(mg_rq_job_id[g]), .rq_payload(mg_rq_payload[g]),
      .rq_done(mg_rq_done[g]), .rq_ok(mg_rq_ok[g]), .rq_req_id(mg_rq_req_id[g]),
      .rq_digest(mg_rq_digest[g]),
      .rs_valid(mg_rs_valid[g]), .rs_ready(mg_rs_ready[g]), .rs_digest(mg_rs_digest[g]),
      .rs_data(mg_rs_data[g]), .rs_done(mg_rs_done[g]), .rs_ok(mg_rs_ok[g]),
      .rs_req_id(mg_rs_req_id[g]), .rs_timing_err(mg_rs_terr[g]), .rs_nonce_err(mg_rs_nerr[g]),
      .cp_valid(mg_cp_valid[g]), .cp_job_id(mg_cp_job_id[g]), .cp_hit(mg_cp_hit[g]),
      .cp_hot(mg_cp_hot[g])
    );

    secx_gateway #(
      .T(T), .R(R), .NBINS(NBINS), .BIN_SHIFT(BIN_SHIFT), .MAX_N_REQ(MAX_N_REQ),
      .TAU(TAU), .NONCE_DEPTH(NONCE_DEPTH), .TLB_ENTRIES(TLB_ENTRIES),
      .TLB_WAYS(TLB_WAYS), .NWIN(NWIN), .PPN_W(PPN_W)
    ) u_gw (
      .clk, .rst_n, .guest_id(8'(g)),
      .gmk_we, .gmk, .tbl_we(tbl_we[g]), .tbl_addr, .tbl_data, .log_key_we, .log_key,
      .ns_start(ns_start[g]), .ns_seed, .ns_busy(ns_busy[g]), .ns_valid, .ns_addr, .ns_data,
      .acl_res_we(acl_res_we[g]), .acl_res_allow, .acl_win_we(acl_win_we[g]), .acl_win_idx,
      .acl_win_base, .acl_win_len, .acl_win_wr,
      .hjc_valid(hjc_valid[g]), .hjc_ready(hjc_ready[g]), .hjc_cmd(hjc_cmd[g]),
      .hjc_rsp_valid(hjc_rsp_valid[g]), .hjc_rsp_ok(hjc_rsp_ok[g]),
      .hjc_rsp_job_id(hjc_rsp_job_id[g]),
      .tlb_miss_valid(tlb_miss_valid[g]), .tlb_miss_vpn(tlb_miss_vpn[g]),
      .tlb_fill_valid(tlb_fill_valid[g]), .tlb_fill_vpn(tlb_fill_vpn[g]),
      .tlb_fill_ppn(tlb_fill_ppn[g]),
      .tlb_flush(tlb_flush[g]),
      .g_rq_valid(g_rq_valid[g]), .g_rq_ready(g_rq_ready[g]), .g_rq_digest(g_rq_digest[g]),
      .g_rq_payload(g_rq_payload[g]),
      .g_cp_valid(g_cp_valid[g]), .g_cp_ready(g_cp_ready[g]), .g_cp_job_id(g_cp_job_id[g]),
      .g_cp_hot(g_cp_hot[g]), .g_cp_dropped(g_cp_dropped[g]),
      .g_h2g_valid(g_h2g_valid[g]), .g_h2g_ready(g_h2g_ready[g]), .g_h2g_kind(g_h2g_kind[g]),
      .g_h2g_digest(g_h2g_digest[g]), .g_h2g_cmd(g_h2g_cmd[g]), .g_h2g_data(g_h2g_data[g]),
      .m_rq_valid(m_rq_valid[g]), .m_rq_ready(m_rq_ready[g]), .m_rq_id(m_rq_id[g]),
      .m_rq_res(m_rq_res[g]), .m_rq_op(m_rq_op[g]), .m_rq_addr(m_rq_addr[g]),
      .m_rq_data(m_rq_data[g]),
      .m_rs_valid(m_rs_valid[g]), .m_rs_ready(m_rs_ready[g]), .m_rs_id(m_rs_id[g]),
      .m_rs_data(m_rs_data[g]),
      .log_valid(lg_valid[g]), .log_ready(lg_ready[g]), .log_data(lg_data[g]),
      .log_last(lg_last[g]),
      .ev_denied(ev_denied[g]), .ev_rq_drop(ev_rq_drop[g]), .ev_timing_err(ev_timing_err[g]),
      .ev_nonce_err(ev_nonce_err[g]), .ev_unknown_rsp(ev_unknown_rsp[g]),
      .ev_hot_mismatch(ev_hot_mismatch[g]), .ev_cp_unknown(ev_cp_unknown[g])
    );
  end

  logic        ac_valid, ac_ready, ac_last;
  logic [63:0] ac_data;
  logic [(N > 1 ? $clog2(N) : 1)-1:0] ac_src;
  secx_log_arb #(.N(N)) u_arb (
    .clk, .rst_n, .in_valid(lg_valid), .in_ready(lg_ready), .in_data(lg_data),
    .in_last(lg_last), .out_valid(ac_valid), .out_ready(ac_ready), .out_data(ac_data),
    .out_last(ac_last), .out_src(ac_src)
  );

  secx_ac #(.NJA(NJA)) u_ac (
    .clk, .rst_n, .log_key_we, .log_key_in(log_key),
    .log_valid(ac_valid), .log_ready(ac_ready), .log_data(ac_data), .log_last(ac_last),
    .rd_en(ac_rd_en), .rd_slot(ac_rd_slot), .rd_word(ac_rd_word), .rd_data(ac_rd_data),
    .stored(ac_stored), .rejected(ac_rejected), .overflows(ac_overflows), .wr_slot(ac_wr_slot)
  );

  logic unused;
  assign unused = ^ac_src;
endmodule
