// secx_log_nvm: the Auditor-Comptroller's non-volatile log store, written
// here as a plain synchronous memory of 64-bit words (one write port, one
// read port, read data registered).  It holds NJA logs of LOG_WORDS words
// each; the SecX paper sizes it for 7000 jobs in a 4 MB resistive RAM.
// Non-volatility itself is a property of the process, not of the logic, and
// is not modelled: contents are lost when simulation ends.
module secx_log_nvm #(
  parameter int unsigned NJA       = 7000,
  parameter int unsigned LOG_WORDS = 73,
  localparam int unsigned DEPTH    = NJA * LOG_WORDS,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [63:0]   wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [63:0]   rdata
);
  logic [63:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
