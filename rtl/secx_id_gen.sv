// secx_id_gen: identifier generator ("ID gen" of a meter).  mGW uses it for
// job-ids, mG for req-ids.  Each accepted `take` returns the current id and
// advances it by one; ids wrap.  The prefix input (for example the guest
// number) is placed in the upper bits so ids from different meters differ.
// The counting scheme is this design's choice: the SecX paper only says that
// the meters generate the ids.  id is valid in the same cycle as take.
module secx_id_gen #(
  parameter int unsigned W      = 8,
  parameter int unsigned PFX_W  = 0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [(PFX_W>0?PFX_W:1)-1:0] prefix,
  input  logic                   take,
  output logic [W-1:0]           id
);
  localparam int unsigned CW = W - PFX_W;
  logic [CW-1:0] cnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    cnt <= '0;
    else if (take) cnt <= cnt + 1'b1;
  if (PFX_W > 0) begin : g_pfx
    assign id = {prefix[PFX_W-1:0], cnt};
  end else begin : g_nopfx
    assign id = cnt;
    logic unused;
    assign unused = ^prefix;
  end
endmodule
