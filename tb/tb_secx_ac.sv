// tb_secx_ac: the Auditor-Comptroller with a small store (NJA = 4 slots).
// Sends logs signed with the reference HMAC-SHA256, logs with a bad
// signature and a log cut short; checks which are stored and which
// rejected, the circular store with its overflow count, and reads every
// stored log back word by word.  log_ready is dropped at random by the AC
// only; the sender also pauses at random between words.
module tb_secx_ac;
  import secx_pkg::*;
  import secx_ref_pkg::*;
  localparam int NJA = 4;
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
    #10_000_000;
    $display("FAIL watchdog");
    failures++;
    done_tb();
  end

  logic log_key_we = 0, log_valid = 0, log_last = 0, rd_en = 0;
  logic [255:0] log_key_in = '0;
  logic [63:0] log_data = '0, rd_data;
  logic log_ready;
  logic [1:0] rd_slot = 0, wr_slot;
  logic [6:0] rd_word = 0;
  logic [31:0] stored, rejected, overflows;
  secx_ac #(.NJA(NJA)) dut (.*);

  function automatic log_flat_t make_log(logic [255:0] key, bit good);
    logic [LOG_BODY_BYTES*8-1:0] b;
    bq_t q;
    logic [255:0] mac;
    for (int i = 0; i < LOG_BODY_BYTES; i++) begin
      b[LOG_BODY_BYTES*8-1-8*i -: 8] = 8'($urandom);
      q.push_back(b[LOG_BODY_BYTES*8-1-8*i -: 8]);
    end
    mac = hmac(key, q);
    if (!good) mac[$urandom % 256] ^= 1'b1;
    return {b, mac, {(LOG_WORDS*64 - LOG_BYTES*8){1'b0}}};
  endfunction

  task automatic send(log_flat_t f, int nwords);
    for (int w = 0; w < nwords; w++) begin
      bit hs;
      if ($urandom % 4 == 0) repeat (1 + $urandom % 3) @(negedge clk);
      log_valid = 1; log_data = f[LOG_WORDS*64-1-64*w -: 64]; log_last = (w == nwords - 1);
      do begin
        #1 hs = log_ready;
        @(negedge clk);
      end while (!hs);
      log_valid = 0; log_last = 0;
    end
  endtask

  task automatic wait_idle(int n_before);
    int n = 0;
    while (stored + rejected == 32'(n_before) && n < 5000) begin @(negedge clk); n++; end
    repeat (3) @(negedge clk);
  endtask

  task automatic read_check(int slot, log_flat_t f);
    bit ok = 1;
    for (int w = 0; w < LOG_WORDS; w++) begin
      rd_en = 1; rd_slot = 2'(slot); rd_word = 7'(w);
      @(negedge clk);
      if (rd_data != f[LOG_WORDS*64-1-64*w -: 64]) ok = 0;
    end
    rd_en = 0;
    check(ok, $sformatf("read back slot %0d", slot));
  endtask

  initial begin
    logic [255:0] key;
    log_flat_t kept [NJA];
    int n_good = 0, n_bad = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    key = {8{$urandom}};
    log_key_in = key; log_key_we = 1;
    @(negedge clk);
    log_key_we = 0; log_key_in = '0;
    for (int k = 0; k < 10; k++) begin
      log_flat_t f;
      bit good;
      int n_prev;
      good = (k % 3 != 1);
      f = make_log(key, good);
      n_prev = int'(stored + rejected);
      send(f, (k == 5) ? LOG_WORDS - 3 : LOG_WORDS);
      if (k == 5) begin
        // cut short: `last` on the wrong word
        wait_idle(n_prev);
        n_bad++;
      end else begin
        wait_idle(n_prev);
        if (good) begin kept[n_good % NJA] = f; n_good++; end
        else n_bad++;
      end
      check(stored == 32'(n_good) && rejected == 32'(n_bad),
            $sformatf("log %0d: stored %0d rejected %0d exp %0d %0d", k, stored, rejected, n_good, n_bad));
      check(wr_slot == 2'(n_good % NJA), "write slot");
      check(overflows == 32'((n_good > NJA) ? n_good - NJA : 0), "overflow count");
    end
    for (int s = 0; s < NJA; s++) read_check(s, kept[s]);
    done_tb();
  end
endmodule
