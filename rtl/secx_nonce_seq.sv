// secx_nonce_seq: the secret nonce sequence shared by a pair of meters
// (1024 x 1 byte, as in the meter's area table).  The table is written
// through a load port during setup.  Two read pointers step through it: the
// send pointer gives the nonce put into the next digest this meter creates,
// the receive pointer the nonce expected in the next digest it verifies.  The
// two meters of a pair therefore consume the same sequence in the same order
// in each direction.  Pointers wrap at DEPTH and are cleared by `restart`
// (done when a new sequence is loaded).  Reads are combinational from the
// current pointer; `adv_*` moves the pointer at the next clock edge.
module secx_nonce_seq #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ld_we,
  input  logic [$clog2(DEPTH)-1:0] ld_addr,
  input  logic [W-1:0]             ld_data,
  input  logic                     restart,
  input  logic                     adv_tx,
  input  logic                     adv_rx,
  output logic [W-1:0]             tx_nonce,
  output logic [W-1:0]             rx_nonce
);
  logic [W-1:0] mem [DEPTH];
  logic [$clog2(DEPTH)-1:0] tx_ptr, rx_ptr;

  always_ff @(posedge clk)
    if (ld_we) mem[ld_addr] <= ld_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      tx_ptr <= '0;
      rx_ptr <= '0;
    end else if (restart) begin
      tx_ptr <= '0;
      rx_ptr <= '0;
    end else begin
      if (adv_tx) tx_ptr <= tx_ptr + 1'b1;
      if (adv_rx) rx_ptr <= rx_ptr + 1'b1;
    end

  assign tx_nonce = mem[tx_ptr];
  assign rx_nonce = mem[rx_ptr];
endmodule
