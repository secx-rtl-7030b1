// tb_secx_nonce_seq: loads a random 1024-byte sequence, then steps the send
// and receive pointers independently and checks each nonce against the
// loaded table, including the wrap at 1024 and restart.
module tb_secx_nonce_seq;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic ld_we = 0, restart = 0, adv_tx = 0, adv_rx = 0;
  logic [9:0] ld_addr = 0;
  logic [7:0] ld_data = 0, tx_nonce, rx_nonce;
  logic [7:0] ref_t [1024];
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic done_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  secx_nonce_seq #(.DEPTH(1024), .W(8)) dut (.*);
  initial begin
    int tp = 0, rp = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1024; i++) begin
      ref_t[i] = 8'($urandom);
      ld_we = 1; ld_addr = 10'(i); ld_data = ref_t[i];
      @(negedge clk);
    end
    ld_we = 0;
    for (int i = 0; i < 3000; i++) begin
      adv_tx = 1'($urandom); adv_rx = (i % 3 == 0);
      if (i % 100 == 0) check(tx_nonce == ref_t[tp] && rx_nonce == ref_t[rp], "nonce values");
      @(negedge clk);
      if (adv_tx) tp = (tp + 1) % 1024;
      if (adv_rx) rp = (rp + 1) % 1024;
    end
    adv_tx = 0; adv_rx = 0;
    check(tx_nonce == ref_t[tp] && rx_nonce == ref_t[rp], "after wrap");
    restart = 1; @(negedge clk); restart = 0;
    check(tx_nonce == ref_t[0] && rx_nonce == ref_t[0], "restart");
    done_tb();
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    done_tb();
  end
endmodule
