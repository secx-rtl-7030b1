// tb_secx_sha256_core: drives the SHA-256 core with the padded one-block
// message "abc" and the two-block 56-byte message of FIPS 180-4 and checks
// the published digests, the 66-cycle block time, and that the reference
// function used by the other testbenches gives the same digests.
module tb_secx_sha256_core;
  import secx_ref_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic init = 0, next = 0, ready;
  logic [511:0] block;
  logic [255:0] digest;
  int checks = 0, failures = 0;

  secx_sha256_core dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_block(bit first, logic [511:0] b, output int cyc);
    @(negedge clk); block = b; init = first; next = !first;
    @(negedge clk); init = 0; next = 0; cyc = 1;
    while (!ready) begin @(negedge clk); cyc++; end
  endtask

  localparam logic [255:0] ABC = 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad;
  localparam logic [255:0] TWO = 256'h248d6a61d20638b8e5c026930c3e6039a33ce45964ff2167f6ecedd419db06c1;
  string s2 = "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq";

  initial begin
    int cyc;
    logic [511:0] b1, b2;
    bq_t q;
    repeat (2) @(negedge clk); rst_n = 1;
    b1 = {24'h616263, 8'h80, 416'b0, 64'd24};
    run_block(1, b1, cyc);
    check(digest == ABC, "abc digest");
    check(cyc == 66, $sformatf("block time %0d", cyc));
    for (int i = 0; i < 56; i++) b1[511-8*i -: 8] = s2[i];
    b1[63:0] = {8'h80, 56'h0};
    b2 = {448'b0, 64'd448};
    run_block(1, b1, cyc);
    run_block(0, b2, cyc);
    check(digest == TWO, "two-block digest");
    q = {8'h61, 8'h62, 8'h63};
    check(sha256(q) == ABC, "reference abc");
    q.delete();
    for (int i = 0; i < 56; i++) q.push_back(s2[i]);
    check(sha256(q) == TWO, "reference two-block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
