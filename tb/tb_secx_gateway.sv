// tb_secx_gateway: one gateway (access list, TLB, gateway meter) with its
// guest meter and the behavioural guest/host/memory model, run through
// three jobs.  Job 0 carries a late request, a request with a forged nonce
// and corrupted write data; job 1 a denied access; job 2 is dropped because
// its digest reaches the guest meter too late.  Every log that leaves the
// gateway is checked: HMAC, ids, HoI/HoO against the reference tabulation
// hash, QoE count and throughput; so is every event the gateway reports.
module tb_secx_gateway;
  import secx_pkg::*;
  import secx_ref_pkg::*;
  localparam int GID = 3, NJOBS = 3, NACC = 4, TAU = 16;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic done_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  initial begin
    #5_000_000;
    $display("FAIL watchdog");
    failures++;
    done_tb();
  end

  // configuration
  logic gmk_we = 0, tbl_we = 0, log_key_we = 0, ns_start = 0;
  digest_t gmk = '0;
  logic [7:0] tbl_addr = 0;
  logic [DIGEST_W-1:0] tbl_data = '0;
  logic [255:0] log_key = '0;
  logic [15:0] ns_seed = 16'h1234;
  logic ns_busy, ns_valid;
  logic [9:0] ns_addr;
  logic [NONCE_W-1:0] ns_data;
  logic acl_res_we = 0, acl_win_we = 0, acl_win_wr = 0, tlb_flush = 0;
  logic [3:0] acl_res_allow = 4'b0001;
  logic [1:0] acl_win_idx = 0;
  logic [ADDR_W-1:0] acl_win_base = 0, acl_win_len = 0;
  logic start = 0;
  // between the parts
  logic hjc_valid, hjc_ready, hjc_rsp_valid, hjc_rsp_ok;
  job_cmd_t hjc_cmd;
  logic [JOB_ID_W-1:0] hjc_rsp_job_id;
  logic tlb_miss_valid, tlb_fill_valid;
  logic [51:0] tlb_miss_vpn, tlb_fill_vpn;
  logic [39:0] tlb_fill_ppn;
  logic mg_ja_valid, mg_ja_done, mg_ja_ok, mg_ja_terr, mg_ja_nerr;
  digest_t mg_ja_digest, mg_rq_digest, mg_rs_digest;
  logic [JOB_ID_W-1:0] mg_ja_job_id, mg_rq_job_id, mg_cp_job_id;
  logic mg_rq_valid, mg_rq_done, mg_rq_ok, mg_rs_valid, mg_rs_ready, mg_rs_done, mg_rs_ok;
  logic mg_rs_terr, mg_rs_nerr, mg_cp_valid, mg_cp_hit;
  payload_t mg_rq_payload, g_rq_payload;
  logic [REQ_ID_W-1:0] mg_rq_req_id, mg_rs_req_id, m_rq_id, m_rs_id;
  logic [DATA_W-1:0] mg_rs_data, g_h2g_data, m_rq_data, m_rs_data;
  logic [DIGEST_W-1:0] mg_cp_hot, g_cp_hot;
  logic g_rq_valid, g_rq_ready, g_cp_valid, g_cp_ready, g_cp_dropped;
  logic [JOB_ID_W-1:0] g_cp_job_id;
  logic g_h2g_valid, g_h2g_ready, g_h2g_kind;
  digest_t g_rq_digest, g_h2g_digest;
  job_cmd_t g_h2g_cmd;
  logic m_rq_valid, m_rq_ready, m_rs_valid, m_rs_ready;
  logic [RES_ID_W-1:0] m_rq_res;
  op_e m_rq_op;
  logic [ADDR_W-1:0] m_rq_addr;
  logic log_valid, log_last, log_ready = 1;
  logic [63:0] log_data;
  logic ev_denied, ev_rq_drop, ev_timing_err, ev_nonce_err, ev_unknown_rsp, ev_hot_mismatch,
        ev_cp_unknown;
  // model results
  logic finished;
  int fails, n_timing_inj, n_nonce_inj, n_corrupt_inj, n_denied_inj, n_dropped, n_tlb_miss, n_mem;
  logic [JOB_ID_W-1:0] rec_job_id [NJOBS];
  logic [7:0] rec_type [NJOBS];
  logic [DIGEST_W-1:0] rec_hoi [NJOBS], rec_hoo [NJOBS];
  int rec_nmem [NJOBS];
  logic rec_logged [NJOBS];

  secx_gateway dut (
    .clk, .rst_n, .guest_id(8'(GID)), .gmk_we, .gmk, .tbl_we, .tbl_addr, .tbl_data,
    .log_key_we, .log_key, .ns_start, .ns_seed, .ns_busy, .ns_valid, .ns_addr, .ns_data,
    .acl_res_we, .acl_res_allow, .acl_win_we, .acl_win_idx, .acl_win_base, .acl_win_len,
    .acl_win_wr, .hjc_valid, .hjc_ready, .hjc_cmd, .hjc_rsp_valid, .hjc_rsp_ok, .hjc_rsp_job_id,
    .tlb_miss_valid, .tlb_miss_vpn, .tlb_fill_valid, .tlb_fill_vpn, .tlb_fill_ppn, .tlb_flush,
    .g_rq_valid, .g_rq_ready, .g_rq_digest, .g_rq_payload, .g_cp_valid, .g_cp_ready,
    .g_cp_job_id, .g_cp_hot, .g_cp_dropped, .g_h2g_valid, .g_h2g_ready, .g_h2g_kind,
    .g_h2g_digest, .g_h2g_cmd, .g_h2g_data, .m_rq_valid, .m_rq_ready, .m_rq_id, .m_rq_res,
    .m_rq_op, .m_rq_addr, .m_rq_data, .m_rs_valid, .m_rs_ready, .m_rs_id, .m_rs_data,
    .log_valid, .log_ready, .log_data, .log_last, .ev_denied, .ev_rq_drop, .ev_timing_err,
    .ev_nonce_err, .ev_unknown_rsp, .ev_hot_mismatch, .ev_cp_unknown
  );
  secx_meter_g mg (
    .clk, .rst_n, .gmk_we, .gmk, .tbl_we, .tbl_addr, .tbl_data, .ns_valid, .ns_addr, .ns_data,
    .ja_valid(mg_ja_valid), .ja_digest(mg_ja_digest), .ja_done(mg_ja_done), .ja_ok(mg_ja_ok),
    .ja_job_id(mg_ja_job_id), .ja_timing_err(mg_ja_terr), .ja_nonce_err(mg_ja_nerr),
    .rq_valid(mg_rq_valid), .rq_job_id(mg_rq_job_id), .rq_payload(mg_rq_payload),
    .rq_done(mg_rq_done), .rq_ok(mg_rq_ok), .rq_req_id(mg_rq_req_id), .rq_digest(mg_rq_digest),
    .rs_valid(mg_rs_valid), .rs_ready(mg_rs_ready), .rs_digest(mg_rs_digest),
    .rs_data(mg_rs_data), .rs_done(mg_rs_done), .rs_ok(mg_rs_ok), .rs_req_id(mg_rs_req_id),
    .rs_timing_err(mg_rs_terr), .rs_nonce_err(mg_rs_nerr), .cp_valid(mg_cp_valid),
    .cp_job_id(mg_cp_job_id), .cp_hit(mg_cp_hit), .cp_hot(mg_cp_hot)
  );
  secx_guest_model #(.GID(GID), .NJOBS(NJOBS), .NACC(NACC), .TAU(TAU), .MODE(1)) gm (.*);

  // events
  int n_ev [7];
  always @(posedge clk) if (rst_n) begin
    n_ev[0] += int'(ev_denied);      n_ev[1] += int'(ev_rq_drop);
    n_ev[2] += int'(ev_timing_err);  n_ev[3] += int'(ev_nonce_err);
    n_ev[4] += int'(ev_unknown_rsp); n_ev[5] += int'(ev_hot_mismatch);
    n_ev[6] += int'(ev_cp_unknown);
  end

  // log collector
  log_flat_t cur;
  int widx = 0, n_logs = 0, n_log_ok = 0;
  log_flat_t logs [$];
  always @(posedge clk) if (rst_n && log_valid && log_ready) begin
    cur[LOG_WORDS*64-1-64*widx -: 64] = log_data;
    if (log_last) begin
      check(widx == LOG_WORDS - 1, $sformatf("log length %0d words", widx + 1));
      logs.push_back(cur);
      widx = 0;
    end else widx++;
  end

  task automatic check_log(log_flat_t f);
    log_body_t b;
    int j;
    b = log_body(f);
    j = -1;
    for (int k = 0; k < NJOBS; k++) if (rec_job_id[k] == b.job_id) j = k;
    check(j >= 0 && rec_logged[j], $sformatf("log for unknown job %h", b.job_id));
    if (j < 0) return;
    check(log_mac_ok(log_key, f), "log HMAC");
    check(b.guest_id == 8'(GID) && b.job_type == rec_type[j], "log ids");
    check(b.hoi == 1024'(rec_hoi[j]), $sformatf("log HoI %h exp %h", b.hoi[127:0], rec_hoi[j]));
    check(b.hoo == 1024'(rec_hoo[j]), $sformatf("log HoO %h exp %h", b.hoo[127:0], rec_hoo[j]));
    check(qoe_total(b) == longint'(rec_nmem[j]),
          $sformatf("log QoE count %0d exp %0d", qoe_total(b), rec_nmem[j]));
    check(b.qos_latency > 0 && b.qos_throughput == thr_exp(NACC * 8, b.qos_latency),
          $sformatf("log throughput %0d latency %0d", b.qos_throughput, b.qos_latency));
    check(b.timestamp != 0, "log timestamp");
    n_log_ok++;
  endtask

  initial begin
    for (int i = 0; i < 7; i++) n_ev[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    gmk = {$urandom, $urandom, $urandom, $urandom, 24'($urandom)}; gmk_we = 1;
    log_key = {8{$urandom}}; log_key_we = 1;
    acl_res_we = 1;
    @(negedge clk);
    gmk_we = 0; log_key_we = 0; acl_res_we = 0;
    // a host window that the jobs never touch
    acl_win_we = 1; acl_win_idx = 0; acl_win_base = 64'h4000_0000; acl_win_len = 64'h1000;
    @(negedge clk);
    acl_win_we = 0;
    for (int i = 0; i < 256; i++) begin
      tbl_we = 1; tbl_addr = 8'(i); tbl_data = tab_entry(GID, i);
      @(negedge clk);
    end
    tbl_we = 0;
    ns_start = 1;
    @(negedge clk);
    ns_start = 0;
    while (ns_busy) @(negedge clk);
    repeat (4) @(negedge clk);
    start = 1;
    while (!finished) @(negedge clk);
    repeat (2000) @(negedge clk);
    check(fails == 0, $sformatf("guest model saw %0d mismatches", fails));
    check(n_timing_inj == 1 && n_nonce_inj == 1 && n_corrupt_inj == 1 && n_denied_inj == 1
          && n_dropped == 1, "injections made");
    check(n_tlb_miss > 0, $sformatf("TLB misses %0d", n_tlb_miss));
    $display("events: denied %0d rq_drop %0d timing %0d nonce %0d unknown_rsp %0d hot %0d cp_unknown %0d, tlb misses %0d, mem %0d",
             n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4], n_ev[5], n_ev[6], n_tlb_miss, n_mem);
    check(n_ev[0] == 1 && n_ev[1] == 0, "denied event, no request dropped");
    check(n_ev[2] == 1, "timing event");
    check(n_ev[3] == 1, "nonce event");
    check(n_ev[4] == 0 && n_ev[6] == 0, "no unknown response or completion");
    check(n_ev[5] == 1, "HoT mismatch event");
    check(n_mem == 4 * NACC, $sformatf("memory accesses %0d", n_mem));
    check(logs.size() == 2, $sformatf("logs %0d", logs.size()));
    foreach (logs[i]) check_log(logs[i]);
    check(n_log_ok == 2, "logs checked");
    done_tb();
  end
endmodule
