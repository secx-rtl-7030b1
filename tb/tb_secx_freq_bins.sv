// tb_secx_freq_bins: feeds random latencies for random slots and resources
// and compares every counter with a reference histogram (bin = latency >> 4,
// last bin open-ended), including clearing a slot.
module tb_secx_freq_bins;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, inc = 0;
  logic [1:0] clr_slot = 0, inc_slot = 0, inc_res = 0, rd_slot = 0;
  logic [63:0] inc_lat = 0;
  logic [4*16*32-1:0] rd_bins;
  int unsigned refc [4][4][16];
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic done_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  secx_freq_bins #(.T(4), .R(4), .NBINS(16), .BIN_SHIFT(4), .LAT_W(64)) dut (.*);
  task automatic compare();
    for (int t = 0; t < 4; t++) begin
      rd_slot = 2'(t); #1;
      for (int r = 0; r < 4; r++)
        for (int b = 0; b < 16; b++)
          check(rd_bins[(r*16+b)*32 +: 32] == refc[t][r][b], $sformatf("bin %0d %0d %0d", t, r, b));
    end
  endtask
  initial begin
    foreach (refc[t, r, b]) refc[t][r][b] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    compare();
    for (int i = 0; i < 500; i++) begin
      int b;
      inc = 1; inc_slot = 2'($urandom); inc_res = 2'($urandom);
      inc_lat = ($urandom % 8 == 0) ? 64'($urandom) : 64'($urandom % 300);
      b = (inc_lat >= 240) ? 15 : int'(inc_lat / 16);
      refc[inc_slot][inc_res][b]++;
      @(negedge clk);
    end
    inc = 0;
    compare();
    clr = 1; clr_slot = 2; inc = 1; inc_slot = 2; inc_res = 1; inc_lat = 5;
    @(negedge clk); clr = 0; inc = 0;
    foreach (refc[t, r, b]) if (t == 2) refc[t][r][b] = 0;
    compare();
    done_tb();
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    done_tb();
  end
endmodule
