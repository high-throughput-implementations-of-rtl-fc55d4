// rc6_pkg: constants and helper functions shared by the RC6 encryption
// processor. The defaults are the cipher parameters RC6-32/20 (word size
// w = 32 bits, r = 20 rounds) and an f(X) operator with one internal
// pipeline stage (alpha = 1), as in the evaluated processors.
//
// key_chain_index() documents the order of the round key shift chain
// (rc6_key_store): chain position p holds round key S[key_chain_index(p)].
// The chain runs from the input round, through the physical rounds, to the
// output round. Physical round j (0-based) keeps one key pair per pass
// n = 0 .. r/k-1; on pass n it computes cipher round i = n*k + j + 1 and
// uses S[2i] and S[2i+1]. With full unrolling (k = r) the chain order is
// simply S[0], S[1], ..., S[2r+3]. This ordering is a choice of this design.
package rc6_pkg;

  localparam int unsigned RC6_W     = 32;  // word size w
  localparam int unsigned RC6_R     = 20;  // number of rounds r
  localparam int unsigned RC6_ALPHA = 1;   // latency of the f(X) operator
  localparam int unsigned RC6_ALGO  = 3;   // f(X) algorithm (1, 2 or 3)

  // Number of round keys, 2r+4.
  function automatic int unsigned num_keys(int unsigned r);
    return 2 * r + 4;
  endfunction

  // Round key index held at chain position p, for r rounds of which k are
  // physically implemented.
  function automatic int unsigned key_chain_index(int unsigned p,
                                                   int unsigned r,
                                                   int unsigned k);
    int unsigned n_pass;
    int unsigned q;
    int unsigned j;
    int unsigned n;
    n_pass = r / k;
    if (p < 2) return p;
    if (p >= 2 + 2 * r) return p;  // output round keys S[2r+2], S[2r+3]
    q = p - 2;
    j = q / (2 * n_pass);          // physical round
    n = (q % (2 * n_pass)) / 2;    // pass
    return 2 * (n * k + j + 1) + (q % 2);
  endfunction

endpackage
