// tb_secx_log_nvm: writes random words at random addresses of a small log
// store and reads them back one cycle later, against a reference array.
module tb_secx_log_nvm;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int D = 4 * 73;
  logic we = 0, re = 0;
  logic [8:0] waddr = 0, raddr = 0;
  logic [63:0] wdata = 0, rdata;
  logic [63:0] refm [D];
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic done_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  secx_log_nvm #(.NJA(4), .LOG_WORDS(73)) dut (.*);
  initial begin
    for (int i = 0; i < D; i++) begin
      refm[i] = {$urandom, $urandom};
      we = 1; waddr = 9'(i); wdata = refm[i]; @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 300; i++) begin
      int a;
      a = int'($urandom % D);
      re = 1; raddr = 9'(a);
      if (i % 5 == 0) begin
        we = 1; waddr = 9'($urandom % D); wdata = {$urandom, $urandom};
      end
      @(negedge clk);
      check(rdata == refm[a], "read back");
      if (we) refm[waddr] = wdata;
      we = 0; re = 0;
    end
    done_tb();
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    done_tb();
  end
endmodule
