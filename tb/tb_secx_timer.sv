// tb_secx_timer: checks that the meter timer is zero after reset and then
// advances by exactly one per clock.
module tb_secx_timer;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic [63:0] now;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic done_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  secx_timer #(.W(64)) dut (.*);
  initial begin
    logic [63:0] t0;
    repeat (3) @(negedge clk);
    check(now == 0, "zero in reset");
    rst_n = 1;
    @(negedge clk); t0 = now;
    check(t0 == 1, "one after first edge");
    for (int i = 1; i <= 50; i++) begin
      @(negedge clk);
      check(now == t0 + 64'(i), "advance by one");
    end
    done_tb();
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    done_tb();
  end
endmodule
