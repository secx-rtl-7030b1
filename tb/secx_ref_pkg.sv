// secx_ref_pkg: reference models used only by the testbenches.  A
// whole-message SHA-256 and HMAC-SHA256 written as plain functions over a
// byte queue (FIPS 180-4, RFC 2104), independent of the clocked RTL core;
// the SHA-256 testbench checks this model against published test vectors.
// Also the reference for one tabulation-hash code, the guest memory
// contents and the checks applied to a received job log.
package secx_ref_pkg;
  typedef byte unsigned bq_t[$];

  function automatic logic [31:0] rr(logic [31:0] x, int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic logic [255:0] sha256(bq_t m);
    logic [31:0] k [64] = '{
      32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5, 32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
      32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3, 32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
      32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc, 32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
      32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7, 32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
      32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13, 32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
      32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3, 32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
      32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5, 32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
      32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208, 32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2};
    logic [31:0] h [8] = '{32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
                           32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};
    logic [31:0] w [64];
    logic [31:0] a, b, c, d, e, f, g, hh, t1, t2;
    longint unsigned bits;
    logic [255:0] out;
    bq_t p;
    p = m;
    bits = 64'(m.size()) * 8;
    p.push_back(8'h80);
    while (p.size() % 64 != 56) p.push_back(8'h00);
    for (int i = 7; i >= 0; i--) p.push_back(8'(bits >> (8 * i)));
    for (int blk = 0; blk < p.size() / 64; blk++) begin
      for (int t = 0; t < 16; t++)
        w[t] = {p[blk*64+4*t], p[blk*64+4*t+1], p[blk*64+4*t+2], p[blk*64+4*t+3]};
      for (int t = 16; t < 64; t++)
        w[t] = (rr(w[t-2], 17) ^ rr(w[t-2], 19) ^ (w[t-2] >> 10)) + w[t-7]
             + (rr(w[t-15], 7) ^ rr(w[t-15], 18) ^ (w[t-15] >> 3)) + w[t-16];
      a = h[0]; b = h[1]; c = h[2]; d = h[3]; e = h[4]; f = h[5]; g = h[6]; hh = h[7];
      for (int t = 0; t < 64; t++) begin
        t1 = hh + (rr(e, 6) ^ rr(e, 11) ^ rr(e, 25)) + ((e & f) ^ (~e & g)) + k[t] + w[t];
        t2 = (rr(a, 2) ^ rr(a, 13) ^ rr(a, 22)) + ((a & b) ^ (a & c) ^ (b & c));
        hh = g; g = f; f = e; e = d + t1; d = c; c = b; b = a; a = t1 + t2;
      end
      h[0] += a; h[1] += b; h[2] += c; h[3] += d; h[4] += e; h[5] += f; h[6] += g; h[7] += hh;
    end
    for (int i = 0; i < 8; i++) out[255-32*i -: 32] = h[i];
    return out;
  endfunction

  function automatic logic [255:0] hmac(logic [255:0] key, bq_t m);
    bq_t ip, op;
    logic [255:0] inner;
    for (int i = 0; i < 64; i++) begin
      byte unsigned kb;
      kb = (i < 32) ? key[255-8*i -: 8] : 8'h00;
      ip.push_back(kb ^ 8'h36);
      op.push_back(kb ^ 8'h5c);
    end
    foreach (m[i]) ip.push_back(m[i]);
    inner = sha256(ip);
    for (int i = 0; i < 32; i++) op.push_back(inner[255-8*i -: 8]);
    return sha256(op);
  endfunction

  // Secret tabulation table of meter pair `pair`: a fixed mixing function of
  // pair and index, so that testbench and meters load the same table.
  function automatic logic [127:0] tab_entry(int pair, int idx);
    logic [31:0] x;
    logic [127:0] r;
    x = 32'(pair * 7919 + idx * 104729 + 1);
    for (int i = 0; i < 4; i++) begin
      x = x ^ (x << 13); x = x ^ (x >> 17); x = x ^ (x << 5);
      r[32*i +: 32] = x;
    end
    return r;
  endfunction

  function automatic logic [127:0] tab_code(int pair, logic [63:0] d);
    logic [127:0] c = '0;
    for (int k = 0; k < 8; k++) c ^= tab_entry(pair, int'(d[8*k +: 8]));
    return c;
  endfunction

  // Contents of guest memory at a physical address
  function automatic logic [63:0] mem_word(logic [63:0] pa);
    return {pa[31:0] ^ 32'h5a5a_5a5a, pa[31:0]};
  endfunction

  // A received log: the body, and whether its HMAC-SHA256 under `key` holds
  function automatic secx_pkg::log_body_t log_body(secx_pkg::log_flat_t f);
    return f[secx_pkg::LOG_WORDS*64-1 -: secx_pkg::LOG_BODY_BYTES*8];
  endfunction
  function automatic bit log_mac_ok(logic [255:0] key, secx_pkg::log_flat_t f);
    bq_t q;
    logic [secx_pkg::LOG_BODY_BYTES*8-1:0] b;
    logic [255:0] mac;
    b   = f[secx_pkg::LOG_WORDS*64-1 -: secx_pkg::LOG_BODY_BYTES*8];
    mac = f[secx_pkg::LOG_WORDS*64-1-secx_pkg::LOG_BODY_BYTES*8 -: 256];
    for (int i = 0; i < secx_pkg::LOG_BODY_BYTES; i++)
      q.push_back(b[secx_pkg::LOG_BODY_BYTES*8-1-8*i -: 8]);
    return mac == hmac(key, q);
  endfunction
  // Expected throughput field: output bytes per second, saturated to 32 bits
  function automatic logic [31:0] thr_exp(longint unsigned out_bytes, longint unsigned lat);
    longint unsigned q;
    q = (out_bytes * secx_pkg::FREQ_HZ) / ((lat == 0) ? 1 : lat);
    return (q > 64'hFFFF_FFFF) ? 32'hFFFF_FFFF : q[31:0];
  endfunction
  // Sum of the frequency-bin counters of a log
  function automatic longint unsigned qoe_total(secx_pkg::log_body_t b);
    longint unsigned s = 0;
    for (int i = 0; i < secx_pkg::LOG_R * secx_pkg::LOG_NBINS; i++) s += b.qoe[32*i +: 32];
    return s;
  endfunction
  function automatic int qoe_bins_used(secx_pkg::log_body_t b);
    int n = 0;
    for (int i = 0; i < secx_pkg::LOG_R * secx_pkg::LOG_NBINS; i++) if (b.qoe[32*i +: 32] != 0) n++;
    return n;
  endfunction
endpackage
