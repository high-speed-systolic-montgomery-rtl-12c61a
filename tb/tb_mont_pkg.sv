// tb_mont_pkg -- reference model and stimulus helpers shared by the
// multiplier testbenches.
//
// mont_ref#(K) checks a carry-save Montgomery result without running the
// Montgomery recurrence: (S + C) is accepted when
//   ((S + C) * 2^K) mod N == (A * B) mod N   and   S + C < 2N,
// which is the definition of the product A*B*2^(-K) mod N left unreduced
// below 2N. It also draws random operands: N odd with its top bit set or
// clear at random, B < N, A any K-bit value.
package tb_mont_pkg;

  class mont_ref #(int unsigned K = 16);
    typedef logic [K-1:0]   word_t;
    typedef logic [K:0]     res_t;
    typedef logic [2*K+3:0] wide_t;

    static function word_t rand_word();
      word_t w;
      for (int i = 0; i < K; i += 32) begin
        for (int j = 0; j < 32 && i + j < K; j++) w[i+j] = 1'($urandom >> j);
      end
      return w;
    endfunction

    // Odd modulus; every other draw has bit K-1 forced, the largest moduli.
    static function word_t rand_mod();
      word_t nn = rand_word();
      nn[0] = 1'b1;
      if ($urandom_range(0, 1) == 1) nn[K-1] = 1'b1;
      if (nn == word_t'(1)) nn = word_t'(3);
      return nn;
    endfunction

    static function word_t rand_below(word_t nn);
      wide_t r = wide_t'(rand_word()) % wide_t'(nn);
      return word_t'(r);
    endfunction

    static function bit check(word_t a, word_t b, word_t nn, res_t s, res_t c);
      wide_t sum = wide_t'(s) + wide_t'(c);
      wide_t lhs = (sum << K) % wide_t'(nn);
      wide_t rhs = (wide_t'(a) * wide_t'(b)) % wide_t'(nn);
      return (lhs == rhs) && (sum < 2 * wide_t'(nn));
    endfunction
  endclass

endpackage
