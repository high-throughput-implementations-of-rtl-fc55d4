// rc6_ref_pkg: software reference model of RC6-32/r/b for the testbenches.
// It follows the cipher's published definition directly (key expansion with
// the magic constants P32 and Q32, then the encryption loop), computes f(X)
// with a full 64-bit product, and shares no code with the RTL.
package rc6_ref_pkg;

  typedef logic [31:0] word_t;
  typedef word_t       keys_t [];

  localparam word_t P32 = 32'hB7E15163;
  localparam word_t Q32 = 32'h9E3779B9;

  function automatic word_t rotl(word_t x, int unsigned n);
    n = n % 32;
    if (n == 0) return x;
    return (x << n) | (x >> (32 - n));
  endfunction

  function automatic word_t f(word_t x);
    logic [63:0] p;
    p = 64'(x) * (64'(x) * 2 + 1);
    return p[31:0];
  endfunction

  // Key expansion of a key of nbytes bytes into 2r+4 round keys.
  function automatic keys_t key_schedule(logic [7:0] key [], int unsigned r);
    int unsigned nk, c, v;
    word_t l [];
    keys_t s;
    word_t a, b;
    int unsigned i, j;
    nk = 2 * r + 4;
    c  = (key.size() + 3) / 4;
    if (c == 0) c = 1;
    l = new[c];
    foreach (l[q]) l[q] = '0;
    for (int q = key.size() - 1; q >= 0; q--) l[q/4] = (l[q/4] << 8) + 32'(key[q]);
    s = new[nk];
    s[0] = P32;
    for (int q = 1; q < nk; q++) s[q] = s[q-1] + Q32;
    a = 0; b = 0; i = 0; j = 0;
    v = 3 * ((c > nk) ? c : nk);
    for (int q = 0; q < v; q++) begin
      a = rotl(s[i] + a + b, 3);
      s[i] = a;
      b = rotl(l[j] + a + b, (a + b) % 32);
      l[j] = b;
      i = (i + 1) % nk;
      j = (j + 1) % c;
    end
    return s;
  endfunction

  // Encrypt one block {D, C, B, A}.
  function automatic logic [127:0] encrypt(logic [127:0] pt, keys_t s, int unsigned r);
    word_t a, b, c, d, t, u, tmp;
    a = pt[31:0]; b = pt[63:32]; c = pt[95:64]; d = pt[127:96];
    b = b + s[0];
    d = d + s[1];
    for (int i = 1; i <= r; i++) begin
      t = rotl(f(b), 5);
      u = rotl(f(d), 5);
      a = rotl(a ^ t, u % 32) + s[2*i];
      c = rotl(c ^ u, t % 32) + s[2*i+1];
      tmp = a; a = b; b = c; c = d; d = tmp;
    end
    a = a + s[2*r+2];
    c = c + s[2*r+3];
    return {d, c, b, a};
  endfunction

  // Block from 16 bytes in cipher byte order (byte 0 = low byte of A).
  function automatic logic [127:0] bytes_to_block(logic [7:0] by [16]);
    logic [127:0] x;
    for (int q = 0; q < 16; q++) x[8*q +: 8] = by[q];
    return x;
  endfunction

endpackage
