// tb_secx_tlb: fills random pages and checks lookups against a reference
// model of a 32-entry 4-way TLB (invalid way first, then round-robin per
// set), then checks flush.
module tb_secx_tlb;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic flush = 0, fill = 0, lk_hit;
  logic [51:0] lk_vpn = 0, fill_vpn = 0;
  logic [39:0] lk_ppn, fill_ppn = 0;
  logic        mv [8][4];
  logic [51:0] mvpn [8][4];
  logic [39:0] mppn [8][4];
  int          mrr [8];
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic done_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  secx_tlb #(.ENTRIES(32), .WAYS(4), .VPN_W(52), .PPN_W(40)) dut (.*);
  task automatic lookup_check(logic [51:0] v);
    bit h; logic [39:0] p; int s;
    s = int'(v[2:0]); h = 0; p = 0;
    for (int w = 0; w < 4; w++) if (mv[s][w] && mvpn[s][w] == v) begin h = 1; p = mppn[s][w]; end
    lk_vpn = v; #1;
    check(lk_hit == h && (!h || lk_ppn == p), $sformatf("lookup %h hit %0d exp %0d ppn %h exp %h", v, lk_hit, h, lk_ppn, p));
  endtask
  initial begin
    int hits = 0;
    foreach (mv[s, w]) mv[s][w] = 0;
    foreach (mrr[s]) mrr[s] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      logic [51:0] v;
      int s, vw;
      v = 52'($urandom % 96);
      lookup_check(v);
      if (lk_hit) hits++;
      else begin
        s = int'(v[2:0]); vw = -1;
        for (int w = 3; w >= 0; w--) if (!mv[s][w]) vw = w;
        if (vw < 0) begin vw = mrr[s]; mrr[s] = (mrr[s] + 1) % 4; end
        @(negedge clk); fill = 1; fill_vpn = v; fill_ppn = 40'($urandom);
        mv[s][vw] = 1; mvpn[s][vw] = v; mppn[s][vw] = fill_ppn;
        @(negedge clk); fill = 0;
        lookup_check(v);
      end
    end
    check(hits > 20, "some hits");
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    foreach (mv[s, w]) mv[s][w] = 0;
    for (int i = 0; i < 20; i++) lookup_check(52'(i));
    done_tb();
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    done_tb();
  end
endmodule
