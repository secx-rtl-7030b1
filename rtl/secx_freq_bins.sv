// secx_freq_bins: the QoE frequency bins of mGW.  For each of T task slots
// and R resources there are NBINS 32-bit counters; a finished resource
// access adds one to the counter of the bin its latency falls in.  The bin of
// a latency L is min(L >> BIN_SHIFT, NBINS-1): bins of equal width 2^BIN_SHIFT
// cycles with the last one open-ended.  The SecX paper leaves the bin ranges to
// the accelerator and resource; equal-width bins and saturating counters are
// this design's choice.  `clr` zeroes the counters of one slot (job create)
// and wins over an increment to the same slot in that cycle.  rd_bins shows
// the counters of slot rd_slot combinationally, resource r bin b at bit
// (r*NBINS+b)*32.
module secx_freq_bins #(
  parameter int unsigned T         = 4,
  parameter int unsigned R         = 4,
  parameter int unsigned NBINS     = 16,
  parameter int unsigned BIN_SHIFT = 4,
  parameter int unsigned LAT_W     = 64,
  localparam int unsigned TW = (T > 1) ? $clog2(T) : 1,
  localparam int unsigned RW = (R > 1) ? $clog2(R) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  logic [TW-1:0]         clr_slot,
  input  logic                  inc,
  input  logic [TW-1:0]         inc_slot,
  input  logic [RW-1:0]         inc_res,
  input  logic [LAT_W-1:0]      inc_lat,
  input  logic [TW-1:0]         rd_slot,
  output logic [R*NBINS*32-1:0] rd_bins
);
  localparam int unsigned NE = T * R * NBINS;
  localparam int unsigned EW = $clog2(NE);
  localparam int unsigned BW = $clog2(NBINS);

  // counters kept flat, entry (t*R + r)*NBINS + b at bit 32*entry of cnt;
  // one shared saturating incrementer
  logic [NE*32-1:0] cnt;
  logic [LAT_W-1:0] bin_full;
  logic [BW-1:0]    bin;
  logic [EW-1:0]    inc_e;
  logic [31:0]      cur, nxt;

  always_comb begin
    bin_full = inc_lat >> BIN_SHIFT;
    bin = (bin_full > LAT_W'(NBINS - 1)) ? BW'(NBINS - 1) : bin_full[BW-1:0];
    inc_e = EW'((int'(inc_slot) * R + int'(inc_res)) * NBINS) + EW'(bin);
    cur = cnt[32*inc_e +: 32];
    nxt = (cur == '1) ? cur : cur + 1'b1;
  end

  for (genvar e = 0; e < NE; e++) begin : g_cnt
    logic [31:0] c;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)
        c <= '0;
      else if (clr && clr_slot == TW'(e / (R * NBINS)))
        c <= '0;
      else if (inc && inc_e == EW'(e))
        c <= nxt;
    assign cnt[32*e +: 32] = c;
  end

  assign rd_bins = cnt[R*NBINS*32*rd_slot +: R*NBINS*32];
endmodule
