// tb_secx_tab_hash: loads a random table and checks each port's code against
// the XOR of the table entries of the enabled bytes, and that XOR-ing the
// codes of a set of words gives the same digest in any order.
module tb_secx_tab_hash;
  import secx_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic tbl_we = 0;
  logic [7:0] tbl_addr = 0;
  logic [DIGEST_W-1:0] tbl_data = 0, code [2];
  logic [63:0] data [2];
  logic [7:0] mask [2];
  logic [DIGEST_W-1:0] reft [256];
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic done_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  secx_tab_hash #(.NPORTS(2)) dut (.*);
  initial begin
    logic [DIGEST_W-1:0] e, d1, d2;
    logic [63:0] words [8];
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < DIGEST_W; j += 32) reft[i][j +: 32] = $urandom;
      tbl_we = 1; tbl_addr = 8'(i); tbl_data = reft[i];
      @(negedge clk);
    end
    tbl_we = 0;
    for (int it = 0; it < 100; it++) begin
      for (int p = 0; p < 2; p++) begin
        data[p] = {$urandom, $urandom};
        mask[p] = (it % 4 == 0) ? 8'($urandom) : 8'hFF;
      end
      #1;
      for (int p = 0; p < 2; p++) begin
        e = '0;
        for (int k = 0; k < 8; k++) if (mask[p][k]) e ^= reft[data[p][k*8 +: 8]];
        check(code[p] == e, "code");
      end
    end
    for (int i = 0; i < 8; i++) words[i] = {$urandom, $urandom};
    d1 = '0; d2 = '0;
    mask = '{8'hFF, 8'hFF};
    for (int i = 0; i < 8; i++) begin
      data[0] = words[i]; data[1] = words[7 - i]; #1;
      d1 ^= code[0]; d2 ^= code[1];
    end
    check(d1 == d2, "order independent");
    done_tb();
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    done_tb();
  end
endmodule
