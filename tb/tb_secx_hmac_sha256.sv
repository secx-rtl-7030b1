// tb_secx_hmac_sha256: signs a 546-byte message (byte i = 7i+3 mod 256) with
// the key 01 02 .. 20 and compares the MAC with the value computed for it by
// an independent HMAC-SHA256 implementation, then signs random messages and
// compares with the reference function.  Also checks the signing time: 10
// inner and 2 outer blocks.
module tb_secx_hmac_sha256;
  import secx_ref_pkg::*;
  localparam int MB = 546;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic [255:0] key, mac;
  logic [MB*8-1:0] msg;
  int checks = 0, failures = 0;

  secx_hmac_sha256 #(.MSG_BYTES(MB)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic sign(output int cyc);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    int cyc;
    bq_t q;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 32; i++) key[255-8*i -: 8] = 8'(i + 1);
    for (int i = 0; i < MB; i++) msg[MB*8-1-8*i -: 8] = 8'((i * 7 + 3) & 255);
    sign(cyc);
    check(mac == 256'h0f988a4f601a5ab0c100f0f154b513204fd600d10f63825291339ffbade002a3, "known HMAC");
    check(cyc >= 12 * 65 && cyc <= 12 * 67 + 4, $sformatf("signing time %0d", cyc));
    for (int n = 0; n < 3; n++) begin
      for (int i = 0; i < 8; i++) key[32*i +: 32] = $urandom;
      q.delete();
      for (int i = 0; i < MB; i++) begin
        msg[MB*8-1-8*i -: 8] = 8'($urandom);
        q.push_back(msg[MB*8-1-8*i -: 8]);
      end
      sign(cyc);
      check(mac == hmac(key, q), "random HMAC");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
