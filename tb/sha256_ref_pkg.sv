// sha256_ref_pkg: reference SHA-256 model for the testbenches, written from
// the FIPS 180-4 definition. The round constants and the initial hash value
// are computed here from the cube and square roots of the first primes rather
// than taken from the design, so the model is independent of the RTL tables.
// pad() turns a byte message into big-endian 32-bit words with the standard
// padding; digest() hashes such a word list.
package sha256_ref_pkg;

  typedef logic [31:0] word_t;
  typedef word_t words_q[$];
  typedef logic [7:0] bytes_q[$];

  function automatic int nth_prime(input int n);
    int cnt = 0;
    for (int p = 2; ; p++) begin
      bit isp = 1;
      for (int d = 2; d * d <= p; d++) if (p % d == 0) isp = 0;
      if (isp) begin
        if (cnt == n) return p;
        cnt++;
      end
    end
  endfunction

  function automatic word_t frac32(input real x);
    real f;
    f = x - $floor(x);
    return word_t'(longint'($floor(f * 4294967296.0)));
  endfunction

  function automatic word_t k_of(input int t);
    return frac32($pow(real'(nth_prime(t)), 1.0 / 3.0));
  endfunction

  function automatic word_t h0_of(input int i);
    return frac32($sqrt(real'(nth_prime(i))));
  endfunction

  function automatic word_t rotr(input word_t x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic words_q pad(input bytes_q msg);
    bytes_q b = msg;
    longint unsigned bits = longint'(msg.size()) * 8;
    words_q w;
    b.push_back(8'h80);
    while (b.size() % 64 != 56) b.push_back(8'h00);
    for (int i = 7; i >= 0; i--) b.push_back(bits[8*i +: 8]);
    for (int i = 0; i < b.size(); i += 4) w.push_back({b[i], b[i+1], b[i+2], b[i+3]});
    return w;
  endfunction

  // Hash a padded word list; returns H0..H7 packed, H0 in the top bits
  function automatic logic [255:0] digest(input words_q w);
    word_t h[8], v[8], s[64], t1, t2;
    logic [255:0] r;
    for (int i = 0; i < 8; i++) h[i] = h0_of(i);
    for (int blk = 0; blk < w.size() / 16; blk++) begin
      for (int t = 0; t < 64; t++) begin
        if (t < 16) s[t] = w[16*blk + t];
        else s[t] = (rotr(s[t-2], 17) ^ rotr(s[t-2], 19) ^ (s[t-2] >> 10)) + s[t-7]
                  + (rotr(s[t-15], 7) ^ rotr(s[t-15], 18) ^ (s[t-15] >> 3)) + s[t-16];
      end
      for (int i = 0; i < 8; i++) v[i] = h[i];
      for (int t = 0; t < 64; t++) begin
        t1 = v[7] + (rotr(v[4], 6) ^ rotr(v[4], 11) ^ rotr(v[4], 25))
           + ((v[4] & v[5]) ^ (~v[4] & v[6])) + k_of(t) + s[t];
        t2 = (rotr(v[0], 2) ^ rotr(v[0], 13) ^ rotr(v[0], 22))
           + ((v[0] & v[1]) ^ (v[0] & v[2]) ^ (v[1] & v[2]));
        for (int i = 7; i > 0; i--) v[i] = v[i-1];
        v[4] = v[4] + t1;
        v[0] = t1 + t2;
      end
      for (int i = 0; i < 8; i++) h[i] = h[i] + v[i];
    end
    for (int i = 0; i < 8; i++) r[255 - 32*i -: 32] = h[i];
    return r;
  endfunction

  function automatic bytes_q str_bytes(input string s);
    bytes_q b;
    for (int i = 0; i < s.len(); i++) b.push_back(s[i]);
    return b;
  endfunction

endpackage
