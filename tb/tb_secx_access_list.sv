// tb_secx_access_list: sets resource enables, a host window and a job's
// input and output ranges, then checks reads and writes inside and outside
// them, the read-only input range, removal at job end, and other resources.
module tb_secx_access_list;
  import secx_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  logic res_we = 0, win_we = 0, win_wr = 0, job_set = 0, job_clr = 0, allow;
  logic [3:0] res_allow = 0;
  logic [1:0] win_idx = 0, job_slot = 0, job_clr_slot = 0;
  logic [63:0] win_base = 0, win_len = 0, chk_addr = 0;
  job_cmd_t job_cmd = '0;
  logic [7:0] chk_res = 0;
  op_e chk_op = OP_READ;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic done_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
  secx_access_list #(.NWIN(4), .T(4), .R(4)) dut (.*);
  task automatic probe(logic [7:0] r, op_e op, logic [63:0] a, bit exp, string what);
    chk_res = r; chk_op = op; chk_addr = a; #1;
    check(allow == exp, what);
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    probe(0, OP_READ, 64'h1000, 0, "nothing enabled");
    res_we = 1; res_allow = 4'b0011; @(negedge clk); res_we = 0;
    win_we = 1; win_idx = 1; win_base = 64'h1_0000; win_len = 64'h1000; win_wr = 0;
    @(negedge clk); win_we = 0;
    probe(0, OP_READ, 64'h1_0000, 1, "host window read");
    probe(0, OP_READ, 64'h1_0FFF, 1, "host window top");
    probe(0, OP_READ, 64'h1_1000, 0, "past host window");
    probe(0, OP_WRITE, 64'h1_0010, 0, "host window read-only");
    @(negedge clk); job_set = 1; job_slot = 2;
    job_cmd = '{taskcode: 8'd1, in_addr: 64'h20_0000, out_addr: 64'h30_0000, in_len: 32'h100, out_len: 32'h80};
    @(negedge clk); job_set = 0;
    probe(0, OP_READ, 64'h20_00F8, 1, "input read");
    probe(0, OP_WRITE, 64'h20_0000, 0, "input not writable");
    probe(0, OP_WRITE, 64'h30_0078, 1, "output write");
    probe(0, OP_WRITE, 64'h30_0080, 0, "past output");
    probe(1, OP_WRITE, 64'h9999, 1, "other resource enabled");
    probe(2, OP_READ, 64'h30_0000, 0, "resource disabled");
    probe(7, OP_READ, 64'h30_0000, 0, "resource out of range");
    @(negedge clk); job_clr = 1; job_clr_slot = 2; @(negedge clk); job_clr = 0;
    probe(0, OP_READ, 64'h20_0000, 0, "input removed");
    probe(0, OP_WRITE, 64'h30_0000, 0, "output removed");
    for (int i = 0; i < 50; i++) begin
      logic [63:0] a;
      a = 64'h1_0000 + 64'($urandom % 64'h2000);
      probe(0, OP_READ, a, a < 64'h1_1000, "random in host window");
    end
    done_tb();
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    done_tb();
  end
endmodule
