// secx_timer: free-running timestamp counter of a meter (the "Timestamp"
// block of the meter).  Counts clock cycles from reset; the SecX paper only
// says that the meters and the AC generate timestamps, so a plain cycle
// counter that wraps is this design's choice.  The output is registered and
// advances by one every cycle.
module secx_timer #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] now
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
endmodule
