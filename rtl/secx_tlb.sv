// secx_tlb: the gateway's small TLB, holding the part of the host's page
// table the guest may use, so that guest memory requests are translated by
// host-maintained hardware.  ENTRIES entries, WAYS-way set associative (32
// entries, 4 ways, hence 8 sets, as in the SecX paper), 4 kB pages.  The set
// is chosen by the low bits of the virtual page number.  Lookup is
// combinational (lk_hit, lk_ppn).  On a miss the gateway asks the host core,
// which answers with `fill`; the fill goes into an invalid way of the set if
// there is one, otherwise into the way named by the set's round-robin
// pointer.  `flush` invalidates all entries.  Page size, replacement policy
// and physical address width are this design's choices.
module secx_tlb #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned VPN_W   = 52,
  parameter int unsigned PPN_W   = 40,
  localparam int unsigned SETS   = ENTRIES / WAYS,
  localparam int unsigned SW     = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WW     = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic [VPN_W-1:0] lk_vpn,
  output logic             lk_hit,
  output logic [PPN_W-1:0] lk_ppn,
  input  logic             fill,
  input  logic [VPN_W-1:0] fill_vpn,
  input  logic [PPN_W-1:0] fill_ppn
);
  logic             valid [SETS][WAYS];
  logic [VPN_W-1:0] vpn   [SETS][WAYS];
  logic [PPN_W-1:0] ppn   [SETS][WAYS];
  logic [WW-1:0]    rr    [SETS];

  logic [SW-1:0] lk_set, f_set;
  assign lk_set = lk_vpn[SW-1:0];
  assign f_set  = fill_vpn[SW-1:0];

  always_comb begin
    lk_hit = 1'b0;
    lk_ppn = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[lk_set][w] && vpn[lk_set][w] == lk_vpn) begin
        lk_hit = 1'b1;
        lk_ppn = ppn[lk_set][w];
      end
  end

  logic [WW-1:0] victim;
  logic          have_free;
  always_comb begin
    have_free = 1'b0;
    victim    = rr[f_set];
    for (int w = WAYS - 1; w >= 0; w--)
      if (!valid[f_set][w]) begin
        have_free = 1'b1;
        victim    = WW'(w);
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) valid[s][w] <= 1'b0;
      end
    end else if (flush) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) valid[s][w] <= 1'b0;
    end else if (fill) begin
      valid[f_set][victim] <= 1'b1;
      if (!have_free) rr[f_set] <= rr[f_set] + 1'b1;
    end

  always_ff @(posedge clk)
    if (fill && !flush) begin
      vpn[f_set][victim] <= fill_vpn;
      ppn[f_set][victim] <= fill_ppn;
    end
endmodule
