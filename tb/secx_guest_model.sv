// secx_guest_model: behavioural stand-in, for testbenches, of everything
// around one SecX meter pair: the guest accelerator (which talks to its
// guest meter mG and to the gateway), the host core (job create, TLB
// fills) and the memory behind the gateway (fixed contents
// mem_word(paddr), random latency 3..72 cycles, pages mapped to vpn+0x100).
//
// For each of NJOBS jobs the host issues a job create with an input and an
// output range of NACC words; the guest has mG check the job digest, then
// reads each input word and writes word+1 to the output, every access going
// guest -> mG -> gateway -> memory and back, with the response digest
// checked by mG.  It finishes with a completion message carrying mG's HoT.
// It checks every value it gets back and counts mismatches in `fails`.
//
// Misbehaviour is injected on purpose, chosen by MODE: 0 picks by guest
// number (top-level test), 1 puts all of them on one guest:
//   TIMING  the request is held back TAU+4 cycles after mG stamped it
//   NONCE   one bit of the nonce field of the request digest is flipped
//   CORRUPT write data sent to the gateway differs from what mG hashed
//   DENIED  a read outside every granted window
//   DROP    the job digest is handed to mG too late, so the job is dropped
// The model keeps, per job, what the log must contain (job-id, type,
// expected HoI and HoO, number of served accesses).
module secx_guest_model
  import secx_pkg::*;
  import secx_ref_pkg::*;
#(
  parameter int GID   = 0,
  parameter int NJOBS = 2,
  parameter int NACC  = 4,
  parameter int TAU   = 16,
  parameter int MODE  = 0
) (
  input  logic                clk,
  input  logic                start,
  // host core
  output logic                hjc_valid,
  input  logic                hjc_ready,
  output job_cmd_t            hjc_cmd,
  input  logic                hjc_rsp_valid,
  input  logic                hjc_rsp_ok,
  input  logic [JOB_ID_W-1:0] hjc_rsp_job_id,
  input  logic                tlb_miss_valid,
  input  logic [51:0]         tlb_miss_vpn,
  output logic                tlb_fill_valid,
  output logic [51:0]         tlb_fill_vpn,
  output logic [39:0]         tlb_fill_ppn,
  // guest side of mG
  output logic                mg_ja_valid,
  output digest_t             mg_ja_digest,
  input  logic                mg_ja_done,
  input  logic                mg_ja_ok,
  input  logic [JOB_ID_W-1:0] mg_ja_job_id,
  input  logic                mg_ja_terr,
  input  logic                mg_ja_nerr,
  output logic                mg_rq_valid,
  output logic [JOB_ID_W-1:0] mg_rq_job_id,
  output payload_t            mg_rq_payload,
  input  logic                mg_rq_done,
  input  logic                mg_rq_ok,
  input  logic [REQ_ID_W-1:0] mg_rq_req_id,
  input  digest_t             mg_rq_digest,
  output logic                mg_rs_valid,
  input  logic                mg_rs_ready,
  output digest_t             mg_rs_digest,
  output logic [DATA_W-1:0]   mg_rs_data,
  input  logic                mg_rs_done,
  input  logic                mg_rs_ok,
  input  logic [REQ_ID_W-1:0] mg_rs_req_id,
  input  logic                mg_rs_terr,
  input  logic                mg_rs_nerr,
  output logic                mg_cp_valid,
  output logic [JOB_ID_W-1:0] mg_cp_job_id,
  input  logic                mg_cp_hit,
  input  logic [DIGEST_W-1:0] mg_cp_hot,
  // guest side of the gateway
  output logic                g_rq_valid,
  input  logic                g_rq_ready,
  output digest_t             g_rq_digest,
  output payload_t            g_rq_payload,
  output logic                g_cp_valid,
  input  logic                g_cp_ready,
  output logic [JOB_ID_W-1:0] g_cp_job_id,
  output logic [DIGEST_W-1:0] g_cp_hot,
  output logic                g_cp_dropped,
  input  logic                g_h2g_valid,
  output logic                g_h2g_ready,
  input  logic                g_h2g_kind,
  input  digest_t             g_h2g_digest,
  input  job_cmd_t            g_h2g_cmd,
  input  logic [DATA_W-1:0]   g_h2g_data,
  // memory behind the gateway
  input  logic                m_rq_valid,
  output logic                m_rq_ready,
  input  logic [REQ_ID_W-1:0] m_rq_id,
  input  logic [RES_ID_W-1:0] m_rq_res,
  input  op_e                 m_rq_op,
  input  logic [ADDR_W-1:0]   m_rq_addr,
  input  logic [DATA_W-1:0]   m_rq_data,
  output logic                m_rs_valid,
  input  logic                m_rs_ready,
  output logic [REQ_ID_W-1:0] m_rs_id,
  output logic [DATA_W-1:0]   m_rs_data,
  // results
  output logic                finished,
  output int                  fails,
  output int                  n_timing_inj,
  output int                  n_nonce_inj,
  output int                  n_corrupt_inj,
  output int                  n_denied_inj,
  output int                  n_dropped,
  output int                  n_tlb_miss,
  output int                  n_mem,
  output logic [JOB_ID_W-1:0] rec_job_id [NJOBS],
  output logic [7:0]          rec_type   [NJOBS],
  output logic [DIGEST_W-1:0] rec_hoi    [NJOBS],
  output logic [DIGEST_W-1:0] rec_hoo    [NJOBS],
  output int                  rec_nmem   [NJOBS],
  output logic                rec_logged [NJOBS]
);
  typedef enum int {I_NONE, I_TIMING, I_NONCE, I_CORRUPT} inj_e;

  function automatic inj_e inj_of(int j, int idx);
    if (MODE == 1) begin
      if (j == 0 && idx == 0) return I_TIMING;
      if (j == 0 && idx == 1) return I_CORRUPT;
      if (j == 0 && idx == 2) return I_NONCE;
      return I_NONE;
    end
    if (j == 0 && idx == 0 && GID % 4 == 1) return I_TIMING;
    if (j == 0 && idx == 0 && GID % 4 == 2) return I_NONCE;
    if (j == 0 && idx == 1 && GID % 4 == 3) return I_CORRUPT;
    return I_NONE;
  endfunction
  function automatic bit drop_job(int j);
    return (MODE == 1) ? (j == 2) : (j == 1 && GID % 5 == 4);
  endfunction
  function automatic bit denied_job(int j);
    return (MODE == 1) ? (j == 1) : (j == 1);
  endfunction
  function automatic logic [63:0] pa_of(logic [63:0] va);
    return {(va[63:12] + 52'h100), va[11:0]};
  endfunction

  task automatic fail(string what);
    fails++;
    $display("FAIL guest %0d: %s", GID, what);
  endtask

  // ---------------------------------------------------------------- host TLB
  initial begin
    tlb_fill_valid = 0; tlb_fill_vpn = '0; tlb_fill_ppn = '0; n_tlb_miss = 0;
    forever begin
      @(negedge clk);
      if (tlb_miss_valid) begin
        logic [51:0] v;
        v = tlb_miss_vpn;
        n_tlb_miss++;
        repeat (4) @(negedge clk);
        tlb_fill_valid = 1; tlb_fill_vpn = v; tlb_fill_ppn = 40'(v + 52'h100);
        @(negedge clk);
        tlb_fill_valid = 0;
      end
    end
  end

  // ---------------------------------------------------------------- memory
  initial begin
    m_rq_ready = 0; m_rs_valid = 0; m_rs_id = '0; m_rs_data = '0; n_mem = 0;
    forever begin
      @(negedge clk);
      if (m_rq_valid) begin
        logic [REQ_ID_W-1:0] id;
        logic [63:0] d;
        bit hs;
        id = m_rq_id;
        d  = (m_rq_op == OP_READ) ? mem_word(m_rq_addr) : 64'h0;
        if (m_rq_res != 0) fail("resource id");
        m_rq_ready = 1;
        @(negedge clk);
        m_rq_ready = 0;
        n_mem++;
        repeat (3 + $urandom % 70) @(negedge clk);
        m_rs_valid = 1; m_rs_id = id; m_rs_data = d;
        do begin
          #1 hs = m_rs_ready;
          @(negedge clk);
        end while (!hs);
        m_rs_valid = 0;
      end
    end
  end

  // ---------------------------------------------------------------- guest
  task automatic h2g_take(output logic kind, output digest_t dg, output job_cmd_t cmd,
                          output logic [63:0] data, input int max_wait, output bit got);
    int n = 0;
    got = 0;
    while (!g_h2g_valid && n < max_wait) begin @(negedge clk); n++; end
    if (!g_h2g_valid) return;
    got = 1;
    kind = g_h2g_kind; dg = g_h2g_digest; cmd = g_h2g_cmd; data = g_h2g_data;
    g_h2g_ready = 1;
    @(negedge clk);
    g_h2g_ready = 0;
  endtask

  task automatic gw_send(digest_t dg, payload_t pl);
    bit hs;
    g_rq_valid = 1; g_rq_digest = dg; g_rq_payload = pl;
    do begin
      #1 hs = g_rq_ready;
      @(negedge clk);
    end while (!hs);
    g_rq_valid = 0;
  endtask

  task automatic access(int j, op_e op, logic [63:0] va, logic [63:0] wd, inj_e inj,
                        bit denied, output logic [63:0] rd);
    payload_t pl, plg;
    digest_t dg, rdg;
    logic [REQ_ID_W-1:0] rid;
    logic kind;
    job_cmd_t cmd;
    bit got;
    pl = '{res_id: '0, op: op, addr: va, data: wd};
    mg_rq_valid = 1; mg_rq_job_id = rec_job_id[j]; mg_rq_payload = pl;
    @(negedge clk);
    mg_rq_valid = 0;
    if (!(mg_rq_done && mg_rq_ok)) fail($sformatf("mG request refused, job %0d addr %h", j, va));
    rid = mg_rq_req_id; dg = mg_rq_digest;
    plg = pl;
    if (inj == I_TIMING) begin repeat (TAU + 4) @(negedge clk); n_timing_inj++; end
    if (inj == I_NONCE) begin dg[0] = ~dg[0]; n_nonce_inj++; end
    if (inj == I_CORRUPT) begin plg.data = plg.data ^ 64'h1; n_corrupt_inj++; end
    gw_send(dg, plg);
    if (denied) begin
      h2g_take(kind, rdg, cmd, rd, 40, got);
      if (got) fail("denied access answered");
      n_denied_inj++;
      return;
    end
    h2g_take(kind, rdg, cmd, rd, 400, got);
    if (!got || kind != 1'b1) begin fail($sformatf("no response, job %0d addr %h", j, va)); return; end
    if (op == OP_READ && rd != mem_word(pa_of(va))) fail("read data");
    if (op == OP_READ && va >= hjc_cmd.in_addr) rec_hoi[j] ^= tab_code(GID, rd);
    if (op == OP_WRITE) rec_hoo[j] ^= tab_code(GID, plg.data);
    rec_nmem[j]++;
    mg_rs_valid = 1; mg_rs_digest = rdg; mg_rs_data = rd;
    @(negedge clk);
    mg_rs_valid = 0;
    if (!mg_rs_done || !mg_rs_ok || mg_rs_terr || mg_rs_nerr || mg_rs_req_id != rid)
      fail($sformatf("mG response check ok=%0d terr=%0d nerr=%0d", mg_rs_ok, mg_rs_terr, mg_rs_nerr));
  endtask

  initial begin
    hjc_valid = 0; hjc_cmd = '0;
    mg_ja_valid = 0; mg_ja_digest = '0; mg_rq_valid = 0; mg_rq_job_id = '0; mg_rq_payload = '0;
    mg_rs_valid = 0; mg_rs_digest = '0; mg_rs_data = '0; mg_cp_valid = 0; mg_cp_job_id = '0;
    g_rq_valid = 0; g_rq_digest = '0; g_rq_payload = '0; g_cp_valid = 0; g_cp_job_id = '0;
    g_cp_hot = '0; g_cp_dropped = 0; g_h2g_ready = 0;
    finished = 0; fails = 0; n_timing_inj = 0; n_nonce_inj = 0; n_corrupt_inj = 0;
    n_denied_inj = 0; n_dropped = 0;
    for (int j = 0; j < NJOBS; j++) begin
      rec_job_id[j] = '0; rec_type[j] = '0; rec_hoi[j] = '0; rec_hoo[j] = '0;
      rec_nmem[j] = 0; rec_logged[j] = 0;
    end
    @(negedge clk);
    while (!start) @(negedge clk);
    repeat (GID % 7) @(negedge clk);
    for (int j = 0; j < NJOBS; j++) begin
      bit hs, got;
      logic kind;
      digest_t dg;
      job_cmd_t cmd;
      logic [63:0] d, rd;
      logic [DIGEST_W-1:0] hot;
      // host: job create
      hjc_cmd = '{taskcode: 8'(GID * 16 + j + 1),
                  in_addr:  64'h0010_0000 + 64'(j) * 64'h2000,
                  out_addr: 64'h0080_0000 + 64'(j) * 64'h2000,
                  in_len:   32'(NACC * 8), out_len: 32'(NACC * 8)};
      hjc_valid = 1;
      do begin
        #1 hs = hjc_ready;
        @(negedge clk);
      end while (!hs);
      hjc_valid = 0;
      if (!hjc_rsp_valid || !hjc_rsp_ok) fail("job create refused");
      rec_job_id[j] = hjc_rsp_job_id;
      rec_type[j]   = hjc_cmd.taskcode;
      if (hjc_rsp_job_id[63:56] != 8'(GID)) fail("job-id prefix");
      // guest: job create message with its digest
      h2g_take(kind, dg, cmd, d, 100, got);
      if (!got || kind != 1'b0 || cmd != hjc_cmd) fail("job create not forwarded");
      if (drop_job(j)) repeat (TAU + 8) @(negedge clk);
      mg_ja_valid = 1; mg_ja_digest = dg;
      @(negedge clk);
      mg_ja_valid = 0;
      if (!mg_ja_done) fail("mG job accept");
      if (drop_job(j)) begin
        if (mg_ja_ok || !mg_ja_terr) fail("late job digest not caught");
        n_dropped++;
        g_cp_valid = 1; g_cp_job_id = rec_job_id[j]; g_cp_hot = '0; g_cp_dropped = 1;
        do begin
          #1 hs = g_cp_ready;
          @(negedge clk);
        end while (!hs);
        g_cp_valid = 0; g_cp_dropped = 0;
        continue;
      end
      if (!mg_ja_ok || mg_ja_job_id != rec_job_id[j]) fail("job accept");
      @(negedge clk);  // the job is usable the cycle after it was accepted
      if (denied_job(j)) access(j, OP_READ, 64'hDEAD_0000, 64'h0, I_NONE, 1, rd);
      for (int i = 0; i < NACC; i++) begin
        access(j, OP_READ, hjc_cmd.in_addr + 64'(8 * i), 64'h0, inj_of(j, 2 * i), 0, rd);
        access(j, OP_WRITE, hjc_cmd.out_addr + 64'(8 * i), rd + 64'h1, inj_of(j, 2 * i + 1), 0, d);
      end
      // completion
      mg_cp_valid = 1; mg_cp_job_id = rec_job_id[j];
      #1 hot = mg_cp_hot;
      if (!mg_cp_hit) fail("mG completion lookup");
      @(negedge clk);
      mg_cp_valid = 0;
      g_cp_valid = 1; g_cp_job_id = rec_job_id[j]; g_cp_hot = hot; g_cp_dropped = 0;
      do begin
        #1 hs = g_cp_ready;
        @(negedge clk);
      end while (!hs);
      g_cp_valid = 0;
      rec_logged[j] = 1;
    end
    finished = 1;
  end

  logic unused;
  assign unused = ^{m_rq_data, mg_ja_nerr};
endmodule
