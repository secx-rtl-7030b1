// tb_secx_xor_cipher: loads a key, encrypts random messages on one port and
// decrypts on another, checking ciphertext = message XOR key, the round
// trip, and the one-cycle latency.
module tb_secx_xor_cipher;
  import secx_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic key_we = 0;
  digest_t key_in, in_data [2], out_data [2];
  logic in_valid [2], out_valid [2];
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic done_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  secx_xor_cipher #(.NPORTS(2)) dut (.*);
  function automatic digest_t rnd();
    digest_t d;
    for (int i = 0; i < KEY_W; i += 32) d[i +: 32] = $urandom;
    return d;
  endfunction
  initial begin
    digest_t k, m;
    in_valid = '{0, 0}; in_data = '{0, 0};
    repeat (2) @(negedge clk); rst_n = 1;
    k = rnd(); key_in = k; key_we = 1; @(negedge clk); key_we = 0; key_in = '0;
    for (int i = 0; i < 20; i++) begin
      m = rnd();
      in_valid[0] = 1; in_data[0] = m;
      @(negedge clk);
      in_valid[0] = 0;
      check(out_valid[0] && out_data[0] == (m ^ k), "encrypt");
      in_valid[1] = 1; in_data[1] = out_data[0];
      @(negedge clk);
      in_valid[1] = 0;
      check(out_valid[1] && out_data[1] == m, "round trip");
      check(!out_valid[0], "valid lasts one cycle");
    end
    done_tb();
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    done_tb();
  end
endmodule
