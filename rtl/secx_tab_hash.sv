// secx_tab_hash: simple tabulation hashing as used by the meters for HoI,
// HoO and HoT.  A word is cut into 8-bit tokens; each token indexes a secret
// 256 x DIGEST_W table (4 kB for 128-bit codes) and the codes of all enabled
// tokens are XORed.  The caller XORs the result into a running digest, so
// the digest does not depend on the order in which words arrive.  The table
// is written through tbl_we during setup (it is known only to the two meters
// of a pair).  NPORTS words can be coded in the same cycle, each through its
// own set of table reads; code[p] is combinational in data[p] and mask[p]
// (a clear mask bit leaves the token out).  Parallel reads are this design's
// choice to keep hashing from stalling accesses.
module secx_tab_hash
  import secx_pkg::*;
#(
  parameter int unsigned NPORTS = 2,
  parameter int unsigned DW     = DATA_W,
  localparam int unsigned NTOK  = DW / 8
) (
  input  logic                clk,
  input  logic                tbl_we,
  input  logic [7:0]          tbl_addr,
  input  logic [DIGEST_W-1:0] tbl_data,
  input  logic [DW-1:0]       data [NPORTS],
  input  logic [NTOK-1:0]     mask [NPORTS],
  output logic [DIGEST_W-1:0] code [NPORTS]
);
  logic [DIGEST_W-1:0] tbl [TAB_ENTRIES];

  always_ff @(posedge clk)
    if (tbl_we) tbl[tbl_addr] <= tbl_data;

  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      code[p] = '0;
      for (int k = 0; k < NTOK; k++)
        if (mask[p][k]) code[p] = code[p] ^ tbl[data[p][k*8 +: 8]];
    end
endmodule
