// tb_secx_id_gen: checks that ids carry the prefix, advance only on take,
// and wrap after 2^counter-width ids.
module tb_secx_id_gen;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] prefix = 4'hA;
  logic take = 0;
  logic [7:0] id;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic done_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  secx_id_gen #(.W(8), .PFX_W(4)) dut (.*);
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    check(id == 8'hA0, "first id");
    for (int i = 0; i < 20; i++) begin
      logic [7:0] prev_id;
      logic t;
      t = 1'($urandom);
      prev_id = id; take = t;
      @(negedge clk);
      check(id == (t ? {4'hA, 4'(prev_id[3:0] + 1)} : prev_id), "take advances");
    end
    take = 1;
    repeat (16) @(negedge clk);
    check(id[7:4] == 4'hA, "prefix kept after wrap");
    prefix = 4'h3;
    #1 check(id[7:4] == 4'h3, "prefix follows input");
    done_tb();
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    done_tb();
  end
endmodule
