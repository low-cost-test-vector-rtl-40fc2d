// mdc_tester_pkg: testbench model of the tester side of the decompressor.
//
// A Tester object holds a test set: compressed cubes (BLOCKS operand pairs,
// serial s and parallel p, each N bits; optionally drawn from a shared
// operand pool through indices) and raw cubes (N x L bits). build() lays out
// the two channel bit streams in the order the decompressor consumes them:
//   - N setup bits before a compressed cube that does not follow one;
//   - while block k of a compressed cube expands, block k+1's operands, or
//     the next cube's block 0, or N filler bits before a raw cube;
//   - for a raw cube, per slice, N/2 bits per channel: channel 2 carries
//     chains 0 .. N/2-1 and channel 1 chains N/2 .. N-1.
// expected() gives the vector each cube must leave in the scan cells
// (chain j, cell k at j*L + k; slice r of the cube in cell L-1-r), worked
// out from the GF(2) closed form t[i][j] = XOR_k s[i-k] & p[j+k], with no
// reference to the multiplier's cells.
package mdc_tester_pkg;

  // What a channel bit pair is for (used to count mechanisms from the
  // tester's side as the decompressor consumes the stream).
  typedef enum int {
    PH_SETUP,            // first operands before a compressed cube
    PH_SETUP_AFTER_RAW,  // the same, following a raw cube
    PH_NEXT,             // next block's operands, sent while a block expands
    PH_FILL,             // filler sent while the last block before a raw cube expands
    PH_RAW               // raw cube data
  } phase_e;

  class Tester #(int N = 8, int BLOCKS = 10);
    localparam int L = BLOCKS * N;
    typedef logic [N-1:0] word_t;
    typedef logic [N*L-1:0] vec_t;

    bit       is_raw [$];
    word_t    s_ops  [$][$];   // per cube, per block
    word_t    p_ops  [$][$];
    vec_t     raw_vec[$];
    bit       ch1_q  [$];
    bit       ch2_q  [$];
    phase_e   ph_q   [$];

    function automatic word_t rand_word();
      word_t w;
      for (int i = 0; i < N; i++) w[i] = 1'($urandom);
      return w;
    endfunction

    function automatic vec_t rand_vec();
      vec_t v;
      for (int i = 0; i < N*L; i++) v[i] = 1'($urandom);
      return v;
    endfunction

    function automatic void add_compressed(word_t s[$], word_t p[$]);
      is_raw.push_back(1'b0);
      s_ops.push_back(s);
      p_ops.push_back(p);
      raw_vec.push_back('0);
    endfunction

    function automatic void add_random_compressed();
      word_t s[$], p[$];
      for (int k = 0; k < BLOCKS; k++) begin
        s.push_back(rand_word());
        p.push_back(rand_word());
      end
      add_compressed(s, p);
    endfunction

    function automatic void add_raw();
      word_t none[$];
      is_raw.push_back(1'b1);
      s_ops.push_back(none);
      p_ops.push_back(none);
      raw_vec.push_back(rand_vec());
    endfunction

    function automatic int num_cubes();
      return is_raw.size();
    endfunction

    function automatic int num_compressed();
      int n = 0;
      foreach (is_raw[i]) if (!is_raw[i]) n++;
      return n;
    endfunction

    // GF(2) row i (1-based) of the block with serial s, parallel p
    static function automatic word_t gf_row(word_t s, word_t p, int i);
      word_t r = '0;
      for (int j = 0; j < N; j++)
        for (int k = 0; k < i; k++)
          if (j + k < N) r[j] ^= s[i-1-k] & p[j+k];
      return r;
    endfunction

    function automatic vec_t expected(int c);
      vec_t v;
      if (is_raw[c]) return raw_vec[c];
      for (int k = 0; k < BLOCKS; k++)
        for (int i = 1; i <= N; i++) begin
          word_t row = gf_row(s_ops[c][k], p_ops[c][k], i);
          int r = k * N + (i - 1);
          for (int j = 0; j < N; j++) v[j*L + L-1-r] = row[j];
        end
      return v;
    endfunction

    function automatic void push_operands(word_t s, word_t p, phase_e ph);
      for (int i = 0; i < N; i++) begin
        ch1_q.push_back(s[i]);
        ch2_q.push_back(p[i]);
        ph_q.push_back(ph);
      end
    endfunction

    // Cycles the decompressor needs for the whole set, from its first busy
    // cycle to the last capture inclusive.
    function automatic longint expected_cycles();
      longint t = 0;
      for (int c = 0; c < num_cubes(); c++) begin
        if (is_raw[c]) t += longint'(L) * longint'(N / 2) + 1;
        else begin
          if (c == 0 || is_raw[c-1]) t += longint'(N);
          t += longint'(L) + 1;
        end
      end
      return t;
    endfunction

    function automatic void build();
      ch1_q.delete();
      ch2_q.delete();
      ph_q.delete();
      for (int c = 0; c < num_cubes(); c++) begin
        if (is_raw[c]) begin
          for (int r = 0; r < L; r++)
            for (int i = 0; i < N/2; i++) begin
              ch2_q.push_back(raw_vec[c][i*L + L-1-r]);
              ch1_q.push_back(raw_vec[c][(N/2 + i)*L + L-1-r]);
              ph_q.push_back(PH_RAW);
            end
        end else begin
          if (c == 0)            push_operands(s_ops[c][0], p_ops[c][0], PH_SETUP);
          else if (is_raw[c-1])  push_operands(s_ops[c][0], p_ops[c][0], PH_SETUP_AFTER_RAW);
          for (int k = 0; k < BLOCKS; k++) begin
            if (k < BLOCKS - 1)                           push_operands(s_ops[c][k+1], p_ops[c][k+1], PH_NEXT);
            else if (c + 1 < num_cubes() && !is_raw[c+1]) push_operands(s_ops[c+1][0], p_ops[c+1][0], PH_NEXT);
            else                                          push_operands('0, '0, PH_FILL);
          end
        end
      end
    endfunction
  endclass

endpackage
