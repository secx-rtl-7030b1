// secx_xor_cipher: the light-weight XOR encryption of a meter.  A plain
// message (fields concatenated, see secx_pkg) is XORed with the Global Meter
// Key (GMK) to make a digest, and a received digest is XORed with it again
// to recover the fields.  The key is held here: it is written through key_we
// by the setup that distributes the GMK and cannot be read from outside.
// NPORTS independent messages can pass in the same cycle (a meter encrypts
// and decrypts in parallel).  Each result is registered, giving the one cycle
// per crossing that the SecX paper budgets for nonce retrieval and encryption;
// out_valid[p] follows in_valid[p] by one cycle.
module secx_xor_cipher
  import secx_pkg::*;
#(
  parameter int unsigned NPORTS = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    key_we,
  input  digest_t key_in,
  input  logic    in_valid  [NPORTS],
  input  digest_t in_data   [NPORTS],
  output logic    out_valid [NPORTS],
  output digest_t out_data  [NPORTS]
);
  digest_t gmk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      gmk <= '0;
    else if (key_we) gmk <= key_in;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int p = 0; p < NPORTS; p++) begin
        out_valid[p] <= 1'b0;
        out_data[p]  <= '0;
      end
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        out_valid[p] <= in_valid[p];
        if (in_valid[p]) out_data[p] <= in_data[p] ^ gmk;
      end
    end
endmodule
