// secx_access_list: the resource access list of a gateway, which keeps a
// guest from touching anything the host has not granted (against data theft
// and denial of service).  A request is allowed if its resource is enabled
// and, for resource 0 (memory), its address lies in a granted window:
//  * NWIN host windows, written by the host (base, length, write allowed);
//  * for each of T active jobs, the job's input range (read only) and output
//    range (read and write), installed when the gateway forwards the job's
//    "job create" and removed at job completion.
// Resources other than memory are checked only against the enable bits.
// The check (chk_* -> allow) is combinational.  Window layout and the
// read-only input range are this design's choices; the SecX paper says only
// that gateways implement resource access lists configured at job creation.
module secx_access_list
  import secx_pkg::*;
#(
  parameter int unsigned NWIN = 4,
  parameter int unsigned T    = 4,
  parameter int unsigned R    = 4,
  localparam int unsigned TW  = (T > 1) ? $clog2(T) : 1,
  localparam int unsigned WIW = (NWIN > 1) ? $clog2(NWIN) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                res_we,
  input  logic [R-1:0]        res_allow,
  input  logic                win_we,
  input  logic [WIW-1:0]      win_idx,
  input  logic [ADDR_W-1:0]   win_base,
  input  logic [ADDR_W-1:0]   win_len,
  input  logic                win_wr,
  input  logic                job_set,
  input  logic [TW-1:0]       job_slot,
  input  job_cmd_t            job_cmd,
  input  logic                job_clr,
  input  logic [TW-1:0]       job_clr_slot,
  input  logic [RES_ID_W-1:0] chk_res,
  input  op_e                 chk_op,
  input  logic [ADDR_W-1:0]   chk_addr,
  output logic                allow
);
  typedef struct packed {
    logic              v;
    logic              wr;
    logic [ADDR_W-1:0] lo;
    logic [ADDR_W-1:0] hi;
  } win_t;

  logic [R-1:0] res_en;
  win_t hw  [NWIN];
  win_t jin [T];
  win_t jout[T];

  function automatic logic in_win(win_t w, logic [ADDR_W-1:0] a, op_e op);
    return w.v && (a >= w.lo) && (a < w.hi) && (op == OP_READ || w.wr);
  endfunction

  always_comb begin
    logic mem_ok;
    mem_ok = 1'b0;
    for (int i = 0; i < NWIN; i++) mem_ok |= in_win(hw[i], chk_addr, chk_op);
    for (int t = 0; t < T; t++)
      mem_ok |= in_win(jin[t], chk_addr, chk_op) | in_win(jout[t], chk_addr, chk_op);
    if (chk_res >= RES_ID_W'(R))        allow = 1'b0;
    else if (!res_en[chk_res[$clog2(R)-1:0]]) allow = 1'b0;
    else if (chk_res == '0)             allow = mem_ok;
    else                                allow = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      res_en <= '0;
      for (int i = 0; i < NWIN; i++) hw[i] <= '0;
      for (int t = 0; t < T; t++) begin
        jin[t]  <= '0;
        jout[t] <= '0;
      end
    end else begin
      if (res_we) res_en <= res_allow;
      if (win_we) hw[win_idx] <= '{v: win_len != '0, wr: win_wr, lo: win_base, hi: win_base + win_len};
      if (job_clr) begin
        jin[job_clr_slot]  <= '0;
        jout[job_clr_slot] <= '0;
      end
      if (job_set) begin
        jin[job_slot]  <= '{v: 1'b1, wr: 1'b0, lo: job_cmd.in_addr,
                            hi: job_cmd.in_addr + ADDR_W'(job_cmd.in_len)};
        jout[job_slot] <= '{v: 1'b1, wr: 1'b1, lo: job_cmd.out_addr,
                            hi: job_cmd.out_addr + ADDR_W'(job_cmd.out_len)};
      end
    end
endmodule
