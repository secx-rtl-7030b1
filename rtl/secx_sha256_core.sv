// secx_sha256_core: SHA-256 compression of one 512-bit block (FIPS 180-4),
// one round per clock.  The SecX paper uses SHA-256 to sign logs and takes the
// circuit from a published design; this iterative core is this design's own.
// Pulse `init` with a block to start a new hash from the standard initial
// value, or `next` to continue the running hash.  The message schedule is a
// 16-word sliding window.  `ready` is high when idle; a block takes 66
// cycles from the start pulse until ready returns and `digest` holds the
// updated hash value (big-endian word 0 in the top bits): one cycle to load,
// 64 rounds and one to add the result into the hash value.
module secx_sha256_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         next,
  input  logic [511:0] block,
  output logic         ready,
  output logic [255:0] digest
);
  localparam logic [31:0] K [64] = '{
    32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
    32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
    32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
    32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
    32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
    32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
    32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
    32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2};
  localparam logic [255:0] IV =
    256'h6a09e667_bb67ae85_3c6ef372_a54ff53a_510e527f_9b05688c_1f83d9ab_5be0cd19;

  function automatic logic [31:0] rotr(logic [31:0] x, int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  logic [31:0] h [8];
  logic [31:0] s [8];   // working variables a..h
  logic [31:0] w [16];
  logic [6:0]  rnd;
  logic        busy;

  logic [31:0] t1, t2, wn, s0, s1, bs0, bs1, ch, maj;
  always_comb begin
    bs1 = rotr(s[4], 6) ^ rotr(s[4], 11) ^ rotr(s[4], 25);
    ch  = (s[4] & s[5]) ^ (~s[4] & s[6]);
    t1  = s[7] + bs1 + ch + K[rnd[5:0]] + w[0];
    bs0 = rotr(s[0], 2) ^ rotr(s[0], 13) ^ rotr(s[0], 22);
    maj = (s[0] & s[1]) ^ (s[0] & s[2]) ^ (s[1] & s[2]);
    t2  = bs0 + maj;
    s0  = rotr(w[1], 7) ^ rotr(w[1], 18) ^ (w[1] >> 3);
    s1  = rotr(w[14], 17) ^ rotr(w[14], 19) ^ (w[14] >> 10);
    wn  = s1 + w[9] + s0 + w[0];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0;
      rnd  <= '0;
      for (int i = 0; i < 8; i++) begin
        h[i] <= IV[255-32*i -: 32];
        s[i] <= '0;
      end
      for (int i = 0; i < 16; i++) w[i] <= '0;
    end else if (!busy && (init || next)) begin
      busy <= 1'b1;
      rnd  <= '0;
      for (int i = 0; i < 16; i++) w[i] <= block[511-32*i -: 32];
      for (int i = 0; i < 8; i++) begin
        s[i] <= init ? IV[255-32*i -: 32] : h[i];
        if (init) h[i] <= IV[255-32*i -: 32];
      end
    end else if (busy) begin
      if (rnd == 7'd64) begin
        busy <= 1'b0;
        for (int i = 0; i < 8; i++) h[i] <= h[i] + s[i];
      end else begin
        s[0] <= t1 + t2;
        s[1] <= s[0];
        s[2] <= s[1];
        s[3] <= s[2];
        s[4] <= s[3] + t1;
        s[5] <= s[4];
        s[6] <= s[5];
        s[7] <= s[6];
        for (int i = 0; i < 15; i++) w[i] <= w[i+1];
        w[15] <= wn;
        rnd   <= rnd + 1'b1;
      end
    end

  assign ready = !busy;
  always_comb
    for (int i = 0; i < 8; i++) digest[255-32*i -: 32] = h[i];
endmodule
