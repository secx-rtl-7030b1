// tb_secx_top: end-to-end test of the whole SecX fabric at its full size
// (24 guests, every parameter at its default).  Each guest has its own
// behavioural guest/host/memory model running two jobs; all guests run at
// once, so their logs compete for the path to the Auditor-Comptroller.  The
// guests misbehave by their number (late request, forged nonce, corrupted
// write data, denied access, dropped job), see secx_guest_model.  At the end
// every log in the AC store is read back through the AC read port and
// checked: HMAC, guest and job ids, job type, HoI/HoO against the reference
// tabulation hash, QoE count and throughput.  Each mechanism is counted and
// one that never happened counts as a failure: TLB miss and fill, denied
// access, timing and nonce errors, HoT mismatch, dropped job, log contention
// at the arbiter, use of several QoE bins, logs stored.
module tb_secx_top;
  import secx_pkg::*;
  import secx_ref_pkg::*;
  localparam int N = 24, NJOBS = 2, NACC = 4, TAU = 16;
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
    #20_000_000;
    $display("FAIL watchdog");
    failures++;
    done_tb();
  end

  logic gmk_we = 0, log_key_we = 0, acl_win_wr = 0;
  digest_t gmk = '0;
  logic [255:0] log_key = '0;
  logic tbl_we [N], ns_start [N], ns_busy [N], acl_res_we [N], acl_win_we [N], tlb_flush [N];
  logic [7:0] tbl_addr = 0;
  logic [DIGEST_W-1:0] tbl_data = '0;
  logic [15:0] ns_seed = 0;
  logic [3:0] acl_res_allow = 4'b0001;
  logic [1:0] acl_win_idx = 0;
  logic [ADDR_W-1:0] acl_win_base = 0, acl_win_len = 0;
  logic hjc_valid [N], hjc_ready [N], hjc_rsp_valid [N], hjc_rsp_ok [N];
  job_cmd_t hjc_cmd [N];
  logic [JOB_ID_W-1:0] hjc_rsp_job_id [N];
  logic tlb_miss_valid [N], tlb_fill_valid [N];
  logic [51:0] tlb_miss_vpn [N], tlb_fill_vpn [N];
  logic [39:0] tlb_fill_ppn [N];
  logic mg_ja_valid [N], mg_ja_done [N], mg_ja_ok [N], mg_ja_terr [N], mg_ja_nerr [N];
  digest_t mg_ja_digest [N], mg_rq_digest [N], mg_rs_digest [N], g_rq_digest [N], g_h2g_digest [N];
  logic [JOB_ID_W-1:0] mg_ja_job_id [N], mg_rq_job_id [N], mg_cp_job_id [N], g_cp_job_id [N];
  logic mg_rq_valid [N], mg_rq_done [N], mg_rq_ok [N], mg_rs_valid [N], mg_rs_ready [N];
  logic mg_rs_done [N], mg_rs_ok [N], mg_rs_terr [N], mg_rs_nerr [N], mg_cp_valid [N], mg_cp_hit [N];
  payload_t mg_rq_payload [N], g_rq_payload [N];
  logic [REQ_ID_W-1:0] mg_rq_req_id [N], mg_rs_req_id [N], m_rq_id [N], m_rs_id [N];
  logic [DATA_W-1:0] mg_rs_data [N], g_h2g_data [N], m_rq_data [N], m_rs_data [N];
  logic [DIGEST_W-1:0] mg_cp_hot [N], g_cp_hot [N];
  logic g_rq_valid [N], g_rq_ready [N], g_cp_valid [N], g_cp_ready [N], g_cp_dropped [N];
  logic g_h2g_valid [N], g_h2g_ready [N], g_h2g_kind [N];
  job_cmd_t g_h2g_cmd [N];
  logic m_rq_valid [N], m_rq_ready [N], m_rs_valid [N], m_rs_ready [N];
  logic [RES_ID_W-1:0] m_rq_res [N];
  op_e m_rq_op [N];
  logic [ADDR_W-1:0] m_rq_addr [N];
  logic ev_denied [N], ev_rq_drop [N], ev_timing_err [N], ev_nonce_err [N], ev_unknown_rsp [N];
  logic ev_hot_mismatch [N], ev_cp_unknown [N];
  logic ac_rd_en = 0;
  logic [12:0] ac_rd_slot = 0;
  logic [6:0] ac_rd_word = 0;
  logic [63:0] ac_rd_data;
  logic [31:0] ac_stored, ac_rejected, ac_overflows;
  logic [12:0] ac_wr_slot;

  secx_top dut (.*);

  // one model per guest
  logic start = 0;
  logic finished [N];
  int fails [N], n_timing_inj [N], n_nonce_inj [N], n_corrupt_inj [N], n_denied_inj [N];
  int n_dropped [N], n_tlb_miss [N], n_mem [N];
  logic [JOB_ID_W-1:0] rec_job_id [N][NJOBS];
  logic [7:0] rec_type [N][NJOBS];
  logic [DIGEST_W-1:0] rec_hoi [N][NJOBS], rec_hoo [N][NJOBS];
  int rec_nmem [N][NJOBS];
  logic rec_logged [N][NJOBS];

  for (genvar g = 0; g < N; g++) begin : g_model
    secx_guest_model #(.GID(g), .NJOBS(NJOBS), .NACC(NACC), .TAU(TAU), .MODE(0)) gm (
      .clk, .start,
      .hjc_valid(hjc_valid[g]), .hjc_ready(hjc_ready[g]), .hjc_cmd(hjc_cmd[g]),
      .hjc_rsp_valid(hjc_rsp_valid[g]), .hjc_rsp_ok(hjc_rsp_ok[g]),
      .hjc_rsp_job_id(hjc_rsp_job_id[g]),
      .tlb_miss_valid(tlb_miss_valid[g]), .tlb_miss_vpn(tlb_miss_vpn[g]),
      .tlb_fill_valid(tlb_fill_valid[g]), .tlb_fill_vpn(tlb_fill_vpn[g]),
      .tlb_fill_ppn(tlb_fill_ppn[g]),
      .mg_ja_valid(mg_ja_valid[g]), .mg_ja_digest(mg_ja_digest[g]), .mg_ja_done(mg_ja_done[g]),
      .mg_ja_ok(mg_ja_ok[g]), .mg_ja_job_id(mg_ja_job_id[g]), .mg_ja_terr(mg_ja_terr[g]),
      .mg_ja_nerr(mg_ja_nerr[g]),
      .mg_rq_valid(mg_rq_valid[g]), .mg_rq_job_id(mg_rq_job_id[g]),
      .mg_rq_payload(mg_rq_payload[g]), .mg_rq_done(mg_rq_done[g]), .mg_rq_ok(mg_rq_ok[g]),
      .mg_rq_req_id(mg_rq_req_id[g]), .mg_rq_digest(mg_rq_digest[g]),
      .mg_rs_valid(mg_rs_valid[g]), .mg_rs_ready(mg_rs_ready[g]),
      .mg_rs_digest(mg_rs_digest[g]), .mg_rs_data(mg_rs_data[g]), .mg_rs_done(mg_rs_done[g]),
      .mg_rs_ok(mg_rs_ok[g]), .mg_rs_req_id(mg_rs_req_id[g]), .mg_rs_terr(mg_rs_terr[g]),
      .mg_rs_nerr(mg_rs_nerr[g]),
      .mg_cp_valid(mg_cp_valid[g]), .mg_cp_job_id(mg_cp_job_id[g]), .mg_cp_hit(mg_cp_hit[g]),
      .mg_cp_hot(mg_cp_hot[g]),
      .g_rq_valid(g_rq_valid[g]), .g_rq_ready(g_rq_ready[g]), .g_rq_digest(g_rq_digest[g]),
      .g_rq_payload(g_rq_payload[g]), .g_cp_valid(g_cp_valid[g]), .g_cp_ready(g_cp_ready[g]),
      .g_cp_job_id(g_cp_job_id[g]), .g_cp_hot(g_cp_hot[g]), .g_cp_dropped(g_cp_dropped[g]),
      .g_h2g_valid(g_h2g_valid[g]), .g_h2g_ready(g_h2g_ready[g]), .g_h2g_kind(g_h2g_kind[g]),
      .g_h2g_digest(g_h2g_digest[g]), .g_h2g_cmd(g_h2g_cmd[g]), .g_h2g_data(g_h2g_data[g]),
      .m_rq_valid(m_rq_valid[g]), .m_rq_ready(m_rq_ready[g]), .m_rq_id(m_rq_id[g]),
      .m_rq_res(m_rq_res[g]), .m_rq_op(m_rq_op[g]), .m_rq_addr(m_rq_addr[g]),
      .m_rq_data(m_rq_data[g]), .m_rs_valid(m_rs_valid[g]), .m_rs_ready(m_rs_ready[g]),
      .m_rs_id(m_rs_id[g]), .m_rs_data(m_rs_data[g]),
      .finished(finished[g]), .fails(fails[g]), .n_timing_inj(n_timing_inj[g]),
      .n_nonce_inj(n_nonce_inj[g]), .n_corrupt_inj(n_corrupt_inj[g]),
      .n_denied_inj(n_denied_inj[g]), .n_dropped(n_dropped[g]), .n_tlb_miss(n_tlb_miss[g]),
      .n_mem(n_mem[g]), .rec_job_id(rec_job_id[g]), .rec_type(rec_type[g]),
      .rec_hoi(rec_hoi[g]), .rec_hoo(rec_hoo[g]), .rec_nmem(rec_nmem[g]),
      .rec_logged(rec_logged[g])
    );
  end

  // mechanism counters
  int ev_cnt [7];
  int contention = 0;
  always @(posedge clk) if (rst_n) begin
    int nv;
    nv = 0;
    for (int g = 0; g < N; g++) begin
      ev_cnt[0] += int'(ev_denied[g]);      ev_cnt[1] += int'(ev_rq_drop[g]);
      ev_cnt[2] += int'(ev_timing_err[g]);  ev_cnt[3] += int'(ev_nonce_err[g]);
      ev_cnt[4] += int'(ev_unknown_rsp[g]); ev_cnt[5] += int'(ev_hot_mismatch[g]);
      ev_cnt[6] += int'(ev_cp_unknown[g]);
      nv += int'(dut.lg_valid[g]);
    end
    if (nv > 1) contention++;
  end

  function automatic bit all_done();
    for (int g = 0; g < N; g++) if (!finished[g]) return 0;
    return 1;
  endfunction

  task automatic read_log(int slot, output log_flat_t f);
    for (int w = 0; w < LOG_WORDS; w++) begin
      ac_rd_en = 1; ac_rd_slot = 13'(slot); ac_rd_word = 7'(w);
      @(negedge clk);
      f[LOG_WORDS*64-1-64*w -: 64] = ac_rd_data;
    end
    ac_rd_en = 0;
  endtask

  initial begin
    int exp_logs, n_ok, max_bins, tot_tlb, tot_drop, tot_mem, tot_fail;
    int exp_ev [7];
    log_flat_t f;
    log_body_t b;
    bit seen [N][NJOBS];
    for (int i = 0; i < 7; i++) begin ev_cnt[i] = 0; exp_ev[i] = 0; end
    for (int g = 0; g < N; g++) begin
      tbl_we[g] = 0; ns_start[g] = 0; acl_res_we[g] = 0; acl_win_we[g] = 0; tlb_flush[g] = 0;
      for (int j = 0; j < NJOBS; j++) seen[g][j] = 0;
    end
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    gmk = {$urandom, $urandom, $urandom, $urandom, 24'($urandom)}; gmk_we = 1;
    log_key = {8{$urandom}}; log_key_we = 1;
    for (int g = 0; g < N; g++) acl_res_we[g] = 1;
    @(negedge clk);
    gmk_we = 0; log_key_we = 0;
    for (int g = 0; g < N; g++) acl_res_we[g] = 0;
    // a secret table per meter pair
    for (int g = 0; g < N; g++) begin
      tbl_we[g] = 1;
      for (int i = 0; i < 256; i++) begin
        tbl_addr = 8'(i); tbl_data = tab_entry(g, i);
        @(negedge clk);
      end
      tbl_we[g] = 0;
    end
    // nonce sequences, one seed per pair, all filled at once
    for (int g = 0; g < N; g++) begin
      ns_seed = 16'($urandom) | 16'h1; ns_start[g] = 1;
      @(negedge clk);
      ns_start[g] = 0;
    end
    for (int g = 0; g < N; g++) while (ns_busy[g]) @(negedge clk);
    repeat (4) @(negedge clk);
    start = 1;
    while (!all_done()) @(negedge clk);
    // expected logs and events
    exp_logs = 0; tot_tlb = 0; tot_drop = 0; tot_mem = 0; tot_fail = 0;
    for (int g = 0; g < N; g++) begin
      for (int j = 0; j < NJOBS; j++) exp_logs += int'(rec_logged[g][j]);
      tot_tlb += n_tlb_miss[g]; tot_drop += n_dropped[g]; tot_mem += n_mem[g];
      tot_fail += fails[g];
      exp_ev[0] += n_denied_inj[g]; exp_ev[2] += n_timing_inj[g];
      exp_ev[3] += n_nonce_inj[g];  exp_ev[5] += n_corrupt_inj[g];
    end
    while (ac_stored + ac_rejected < 32'(exp_logs)) @(negedge clk);
    repeat (10) @(negedge clk);
    $display("logs %0d stored %0d rejected %0d; events denied %0d timing %0d nonce %0d hot %0d; dropped %0d tlb misses %0d mem %0d contention cycles %0d",
             exp_logs, ac_stored, ac_rejected, ev_cnt[0], ev_cnt[2], ev_cnt[3], ev_cnt[5],
             tot_drop, tot_tlb, tot_mem, contention);
    check(tot_fail == 0, $sformatf("guest models saw %0d mismatches", tot_fail));
    check(ac_stored == 32'(exp_logs) && ac_rejected == 0 && ac_overflows == 0, "logs stored");
    check(ac_wr_slot == 13'(exp_logs), "store pointer");
    for (int i = 0; i < 7; i++)
      check(ev_cnt[i] == exp_ev[i], $sformatf("event %0d count %0d exp %0d", i, ev_cnt[i], exp_ev[i]));
    // every stored log
    n_ok = 0; max_bins = 0;
    for (int s = 0; s < exp_logs; s++) begin
      int gg, jj;
      read_log(s, f);
      b = log_body(f);
      gg = int'(b.guest_id); jj = -1;
      if (gg < N) for (int j = 0; j < NJOBS; j++) if (rec_job_id[gg][j] == b.job_id) jj = j;
      check(jj >= 0, $sformatf("slot %0d holds an unknown job %h", s, b.job_id));
      if (jj < 0) continue;
      check(rec_logged[gg][jj] && !seen[gg][jj], "log expected once");
      seen[gg][jj] = 1;
      check(log_mac_ok(log_key, f), "log HMAC");
      check(b.job_type == rec_type[gg][jj], "job type");
      check(b.hoi == 1024'(rec_hoi[gg][jj]) && b.hoo == 1024'(rec_hoo[gg][jj]),
            $sformatf("guest %0d job %0d HoI/HoO", gg, jj));
      check(qoe_total(b) == longint'(rec_nmem[gg][jj]), "QoE count");
      check(b.qos_latency > 0 && b.qos_throughput == thr_exp(NACC * 8, b.qos_latency),
            "throughput");
      if (qoe_bins_used(b) > max_bins) max_bins = qoe_bins_used(b);
      n_ok++;
    end
    // mechanisms that must have happened
    check(n_ok == exp_logs && n_ok > 0, "all logs checked");
    check(tot_tlb > 0, "TLB miss and fill");
    check(ev_cnt[0] > 0, "denied access");
    check(ev_cnt[2] > 0, "timing error");
    check(ev_cnt[3] > 0, "nonce error");
    check(ev_cnt[5] > 0, "HoT mismatch");
    check(tot_drop > 0, "dropped job");
    check(contention > 0, "log contention at the arbiter");
    check(max_bins > 1, "several QoE bins");
    done_tb();
  end
endmodule
