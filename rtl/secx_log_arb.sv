// secx_log_arb: merges the signed-log streams of N gateways onto the single
// input of the Auditor-Comptroller.  Round-robin: when idle it grants the
// first requesting input after the one granted last, and holds the grant
// until the word marked `last` has been accepted, so logs are never
// interleaved.  It stands for the path through the system NoC, which the
// SecX paper uses for this transfer but does not design.
module secx_log_arb #(
  parameter int unsigned N = 24,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid [N],
  output logic        in_ready [N],
  input  logic [63:0] in_data  [N],
  input  logic        in_last  [N],
  output logic        out_valid,
  input  logic        out_ready,
  output logic [63:0] out_data,
  output logic        out_last,
  output logic [IW-1:0] out_src
);
  logic          locked;
  logic [IW-1:0] cur, last_g, pick;
  logic          any;

  always_comb begin
    any  = 1'b0;
    pick = last_g;
    for (int k = N; k >= 1; k--) begin
      int unsigned i;
      i = (int'(last_g) + k) % N;
      if (in_valid[i]) begin
        any  = 1'b1;
        pick = IW'(i);
      end
    end
  end

  logic [IW-1:0] sel;
  assign sel = locked ? cur : pick;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      locked <= 1'b0; cur <= '0; last_g <= IW'(N - 1);
    end else if (!locked) begin
      if (any) begin
        cur    <= pick;
        last_g <= pick;
        locked <= !(out_ready && in_last[pick]);
      end
    end else if (out_valid && out_ready && out_last) begin
      locked <= 1'b0;
    end

  assign out_valid = locked ? in_valid[cur] : any;
  assign out_data  = in_data[sel];
  assign out_last  = in_last[sel];
  assign out_src   = sel;
  always_comb
    for (int i = 0; i < N; i++) in_ready[i] = out_ready && (sel == IW'(i)) && (locked || any);
endmodule
