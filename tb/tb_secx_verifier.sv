// tb_secx_verifier: checks the tau window (delays 0..TAU pass, TAU+1 and
// future stamps fail) and the nonce comparison.
module tb_secx_verifier;
  import secx_pkg::*;
  logic clk = 0;
  logic [TS_W-1:0] now, stamp, delay;
  logic [NONCE_W-1:0] nonce, exp_nonce;
  logic timing_err, nonce_err;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic done_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  secx_verifier #(.TAU(16)) dut (.*);
  initial begin
    for (int i = 0; i < 200; i++) begin
      int d;
      d = int'($urandom % 40) - 5;
      now = 64'd1000 + 64'($urandom % 100000);
      stamp = now - 64'(longint'(d));
      nonce = 8'($urandom); exp_nonce = (i % 2) ? nonce : 8'(nonce + 1);
      #1;
      check(timing_err == (d < 0 || d > 16), $sformatf("timing d=%0d", d));
      check(nonce_err == (i % 2 == 0), "nonce");
      if (d >= 0) check(delay == 64'(d), "delay value");
    end
    done_tb();
  end
  initial begin
    #100000 failures++;
    done_tb();
  end
endmodule
