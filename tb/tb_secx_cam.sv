// tb_secx_cam: inserts, searches and deletes random keys against a
// reference associative array: lowest-free allocation, hits on two search
// ports, data returned, full flag, and insert plus delete in one cycle.
module tb_secx_cam;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  localparam int E = 8;
  logic ins = 0, del = 0, ins_ok, full;
  logic [15:0] ins_key = 0, srch_key [2];
  logic [31:0] ins_data = 0, hit_data [2];
  logic [2:0] ins_idx, hit_idx [2], del_idx = 0;
  logic hit [2];
  logic [15:0] rk [E];
  logic [31:0] rd [E];
  logic        rv [E];
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic done_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  secx_cam #(.ENTRIES(E), .KEY_W(16), .DATA_W(32), .NSRCH(2)) dut (.*);
  initial begin
    srch_key = '{0, 0};
    for (int i = 0; i < E; i++) rv[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      int lf, vi;
      // reference lowest free
      lf = -1;
      for (int i = E - 1; i >= 0; i--) if (!rv[i]) lf = i;
      check(ins_ok == (lf >= 0) && full == (lf < 0), "free/full");
      if (lf >= 0) check(ins_idx == 3'(lf), "lowest free index");
      // search a present key on port 0 and a random key on port 1
      vi = -1;
      for (int i = 0; i < E; i++) if (rv[i] && vi < 0 && ($urandom % 2)) vi = i;
      srch_key[0] = (vi >= 0) ? rk[vi] : 16'hFFFF;
      srch_key[1] = 16'($urandom % 64);
      #1;
      if (vi >= 0) check(hit[0] && hit_idx[0] == 3'(vi) && hit_data[0] == rd[vi], "hit port 0");
      begin
        bit f; f = 0;
        for (int i = 0; i < E; i++) if (rv[i] && rk[i] == srch_key[1]) f = 1;
        check(hit[1] == f, "hit port 1");
      end
      ins = 1'($urandom); del = (vi >= 0) && ($urandom % 3 == 0);
      del_idx = (vi >= 0) ? 3'(vi) : 0;
      // keys unique: 64 + iteration
      ins_key = 16'(100 + it); ins_data = $urandom;
      @(negedge clk);
      if (del) rv[del_idx] = 0;
      if (ins && lf >= 0) begin rv[lf] = 1; rk[lf] = ins_key; rd[lf] = ins_data; end
      ins = 0; del = 0;
    end
    done_tb();
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    done_tb();
  end
endmodule
