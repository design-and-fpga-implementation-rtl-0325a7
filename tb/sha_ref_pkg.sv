// sha_ref_pkg: reference models used by the testbenches to work out expected
// values independently of the RTL.
//
// It holds a straightforward SHA-1 and SHA-256 compression written from the
// FIPS 180 algorithm description. Both return the working variables after a
// given number of rounds, before the final addition of the chaining value.
// It also holds single-block message padding, the round constants derived
// from their mathematical definitions (square and cube roots of small
// numbers), and a small assembler for the processor's instruction words.
package sha_ref_pkg;

  typedef logic [31:0] w32_t;
  typedef w32_t        blk_t  [16];
  typedef w32_t        vars_t [8];

  function automatic w32_t rl(w32_t x, int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic w32_t rr(w32_t x, int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  // SHA-1 constant of round t: floor(2^30 * sqrt(2, 3, 5, 10)).
  function automatic w32_t k1(int t);
    real r;
    case (t / 20)
      0: r = 2.0;
      1: r = 3.0;
      2: r = 5.0;
      default: r = 10.0;
    endcase
    return w32_t'(longint'($floor($sqrt(r) * 1073741824.0)));
  endfunction

  // SHA-256 constant of round t: first 32 fraction bits of the cube root of the t-th prime.
  function automatic w32_t k2(int t);
    int   n, found;
    real  c;
    n = 1; found = -1;
    while (found < t) begin
      bit prime;
      n++;
      prime = 1;
      for (int d = 2; d * d <= n; d++) if (n % d == 0) prime = 0;
      if (prime) found++;
    end
    c = $pow(real'(n), 1.0 / 3.0);
    c = c - $floor(c);
    return w32_t'(longint'($floor(c * 4294967296.0)));
  endfunction

  function automatic vars_t sha1_iv();
    vars_t v;
    v[0] = 32'h67452301; v[1] = 32'hEFCDAB89; v[2] = 32'h98BADCFE;
    v[3] = 32'h10325476; v[4] = 32'hC3D2E1F0;
    v[5] = '0; v[6] = '0; v[7] = '0;
    return v;
  endfunction

  function automatic vars_t sha256_iv();
    vars_t v;
    v[0] = 32'h6A09E667; v[1] = 32'hBB67AE85; v[2] = 32'h3C6EF372; v[3] = 32'hA54FF53A;
    v[4] = 32'h510E527F; v[5] = 32'h9B05688C; v[6] = 32'h1F83D9AB; v[7] = 32'h5BE0CD19;
    return v;
  endfunction

  function automatic w32_t sha1_w(blk_t m, int t);
    w32_t w [80];
    for (int i = 0; i < 80; i++)
      w[i] = (i < 16) ? m[i] : rl(w[i-3] ^ w[i-8] ^ w[i-14] ^ w[i-16], 1);
    return w[t];
  endfunction

  function automatic w32_t sha256_w(blk_t m, int t);
    w32_t w [64];
    for (int i = 0; i < 64; i++)
      if (i < 16) w[i] = m[i];
      else w[i] = (rr(w[i-2], 17) ^ rr(w[i-2], 19) ^ (w[i-2] >> 10)) + w[i-7] +
                  (rr(w[i-15], 7) ^ rr(w[i-15], 18) ^ (w[i-15] >> 3)) + w[i-16];
    return w[t];
  endfunction

  // SHA-1 working variables after 'rounds' rounds from chaining value 'h'.
  function automatic vars_t sha1_run(blk_t m, vars_t h, int rounds);
    w32_t a, b, c, d, e, f, tmp;
    vars_t r;
    a = h[0]; b = h[1]; c = h[2]; d = h[3]; e = h[4];
    for (int t = 0; t < rounds; t++) begin
      if (t < 20)      f = (b & c) | (~b & d);
      else if (t < 40) f = b ^ c ^ d;
      else if (t < 60) f = (b & c) | (b & d) | (c & d);
      else             f = b ^ c ^ d;
      tmp = rl(a, 5) + f + e + k1(t) + sha1_w(m, t);
      e = d; d = c; c = rl(b, 30); b = a; a = tmp;
    end
    r = h;
    r[0] = a; r[1] = b; r[2] = c; r[3] = d; r[4] = e;
    return r;
  endfunction

  // SHA-256 working variables after 'rounds' rounds from chaining value 'h'.
  function automatic vars_t sha256_run(blk_t m, vars_t h, int rounds);
    w32_t v [8];
    w32_t t1, t2;
    vars_t r;
    for (int i = 0; i < 8; i++) v[i] = h[i];
    for (int t = 0; t < rounds; t++) begin
      t1 = v[7] + (rr(v[4], 6) ^ rr(v[4], 11) ^ rr(v[4], 25)) + ((v[4] & v[5]) ^ (~v[4] & v[6]))
           + k2(t) + sha256_w(m, t);
      t2 = (rr(v[0], 2) ^ rr(v[0], 13) ^ rr(v[0], 22)) + ((v[0] & v[1]) ^ (v[0] & v[2]) ^ (v[1] & v[2]));
      v[7] = v[6]; v[6] = v[5]; v[5] = v[4]; v[4] = v[3] + t1;
      v[3] = v[2]; v[2] = v[1]; v[1] = v[0]; v[0] = t1 + t2;
    end
    for (int i = 0; i < 8; i++) r[i] = v[i];
    return r;
  endfunction

  // Pads a message of at most 55 bytes into one 512-bit block.
  function automatic blk_t pad1(string s);
    logic [7:0] bytes [64];
    blk_t m;
    longint unsigned bits;
    for (int i = 0; i < 64; i++) bytes[i] = 8'h00;
    for (int i = 0; i < s.len(); i++) bytes[i] = s[i];
    bytes[s.len()] = 8'h80;
    bits = 64'(s.len()) * 8;
    for (int i = 0; i < 8; i++) bytes[56 + i] = bits[63 - 8*i -: 8];
    for (int i = 0; i < 16; i++) m[i] = {bytes[4*i], bytes[4*i+1], bytes[4*i+2], bytes[4*i+3]};
    return m;
  endfunction

  // Instruction word: opcode in bits [8:5], address in bits [4:0].
  function automatic w32_t ins(logic [3:0] op, logic [4:0] addr);
    return {23'd0, op, addr};
  endfunction

endpackage
