// tb_secx_log_arb: four sources send packets of random length (word =
// {source, packet, word index}) with random gaps; the sink stalls at
// random.  Checks that packets are never interleaved, arrive complete and in
// order per source, that out_src names the sender, and that two sources
// waiting together are both served (round robin).
module tb_secx_log_arb;
  localparam int N = 4, NPKT = 20;
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
    #2_000_000;
    $display("FAIL watchdog");
    failures++;
    done_tb();
  end

  logic in_valid [N], in_ready [N], in_last [N];
  logic [63:0] in_data [N];
  logic out_valid, out_last, out_ready = 0;
  logic [63:0] out_data;
  logic [1:0] out_src;
  secx_log_arb #(.N(N)) dut (.*);

  int sent_done [N];
  for (genvar s = 0; s < N; s++) begin : g_src
    initial begin
      in_valid[s] = 0; in_last[s] = 0; in_data[s] = '0; sent_done[s] = 0;
      @(posedge rst_n);
      for (int p = 0; p < NPKT; p++) begin
        int len;
        len = 1 + $urandom % 8;
        if ($urandom % 2 == 0) repeat ($urandom % 6) @(negedge clk);
        for (int w = 0; w < len; w++) begin
          bit hs;
          @(negedge clk);
          in_valid[s] = 1; in_data[s] = {16'(s), 16'(p), 32'(w)}; in_last[s] = (w == len - 1);
          do begin
            #1 hs = in_ready[s];
            if (!hs) @(negedge clk);
          end while (!hs);
          @(posedge clk);
          #1 in_valid[s] = 0; in_last[s] = 0;
        end
      end
      sent_done[s] = 1;
    end
  end

  always @(negedge clk) out_ready <= ($urandom % 4 != 0);

  int cur_src = -1, next_word = 0, pkt_seen [N], both_wait = 0;
  always @(posedge clk) if (rst_n) begin
    int nw;
    nw = 0;
    for (int s = 0; s < N; s++) nw += int'(in_valid[s]);
    if (nw > 1) both_wait++;
    if (out_valid && out_ready) begin
      int s, p, w;
      s = int'(out_data[63:48]); p = int'(out_data[47:32]); w = int'(out_data[31:0]);
      check(s < N && int'(out_src) == s, "out_src names the sender");
      if (cur_src < 0) begin
        check(w == 0 && p == pkt_seen[s], $sformatf("packet start src %0d pkt %0d word %0d", s, p, w));
        cur_src = s;
      end else
        check(s == cur_src && w == next_word, "no interleaving");
      next_word = w + 1;
      if (out_last) begin cur_src = -1; next_word = 0; pkt_seen[s]++; end
    end
  end

  initial begin
    for (int s = 0; s < N; s++) pkt_seen[s] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int s = 0; s < N; s++) while (!sent_done[s]) @(negedge clk);
    repeat (20) @(negedge clk);
    for (int s = 0; s < N; s++) check(pkt_seen[s] == NPKT, $sformatf("source %0d packets %0d", s, pkt_seen[s]));
    check(both_wait > 0, "sources competed");
    done_tb();
  end
endmodule
