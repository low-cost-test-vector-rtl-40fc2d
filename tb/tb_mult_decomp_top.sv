// tb_mult_decomp_top: end-to-end test of the decompressor at its default
// size (8 x 8 multiplier, 8 scan chains of 80 cells, 10 blocks per cube).
//
// A tester model (mdc_tester_pkg) streams operand bits on the two channels
// whenever chan_take is high. Three test sets are applied:
//   1. three compressed cubes, then two raw cubes (mode switch);
//   2. four compressed cubes whose 40 blocks use operands drawn from a
//      shared pool of 6 words through indices (operand sharing);
//   3. two raw cubes, then two compressed ones (raw-first order, setup
//      after raw cubes).
// At every capture the scan cells must hold the cube's expected vector; the
// circuit response is modelled as cells XOR a random mask, and the MISR
// signature at the end of each set must equal a model of the chains'
// shift-out compacted by the polynomial of mdc_pkg. Cycle counts are checked
// against N + BLOCKS*N + 1 per compressed cube (81 here) and
// BLOCKS*N*N/2 + 1 per raw cube. Each mechanism (setup, block expansion,
// operand hand-over to A, capture, raw cube, compressed->raw switch,
// raw->compressed setup, MISR compaction) is counted and must occur. The
// counts are taken at the ports only: from the tester's record of what each
// consumed channel bit was for, from capture and from signature changes.
module tb_mult_decomp_top;
  import mdc_pkg::*;
  import mdc_tester_pkg::*;

  localparam int N = 8, BLOCKS = 10, L = N * BLOCKS, CW = 16;
  typedef Tester #(N, BLOCKS) tester_t;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic cfg_load, raw_first, start, ch1, ch2, chan_take, capture, busy, done;
  logic [CW-1:0] compressed_count, total_count, vector_count;
  logic [N*L-1:0] resp_in, cells, resp_mask;
  logic [N-1:0] signature;
  cube_mode_e cube_mode;

  mult_decomp_top dut (
    .clk, .rst_n, .cfg_load, .raw_first, .compressed_count, .total_count, .start,
    .ch1, .ch2, .chan_take, .resp_in, .cells, .capture,
    .signature, .vector_count, .cube_mode, .busy, .done);

  assign resp_in = cells ^ resp_mask;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  // n_aload: operand pairs streamed behind a block, i.e. hand-overs to the
  // A register whose result the next block's vector check depends on
  int n_setup = 0, n_blocks = 0, n_aload = 0, n_capture = 0, n_raw_cubes = 0,
      n_comp_cubes = 0, n_switch_to_raw = 0, n_setup_after_raw = 0, n_misr = 0;
  logic [N-1:0] sig_prev = '0;
  always @(posedge clk) if (rst_n) begin
    if (capture) n_capture++;
    if (busy && signature != sig_prev) n_misr++;
    sig_prev <= signature;
  end

  logic [N*L-1:0] chain_model = '0;   // scan cells as the model sees them

  function automatic logic [N-1:0] misr_step(logic [N-1:0] s, logic [N-1:0] d);
    localparam logic [63:0] T = misr_taps(N);
    return {s[N-2:0], 1'b0} ^ (s[N-1] ? T[N-1:0] : '0) ^ d;
  endfunction

  task automatic run_set(tester_t t, string name);
    int ncomp = t.num_compressed(), ncubes = t.num_cubes();
    longint cyc = 0;
    int c = 0, ptr = 0;
    logic [N-1:0] sig = '0;
    int ph_bits = 0;
    phase_e ph_prev = PH_RAW;
    t.build();
    resp_mask = {((N*L + 31) / 32){$urandom}};
    @(negedge clk);
    cfg_load = 1; raw_first = t.is_raw[0]; compressed_count = CW'(ncomp); total_count = CW'(ncubes);
    @(negedge clk);
    cfg_load = 0; start = 1;
    @(negedge clk);
    start = 0;
    // one loop turn per clock, inputs set after the negative edge
    while (!done) begin
      ch1 = (ptr < t.ch1_q.size()) ? t.ch1_q[ptr] : 1'b0;
      ch2 = (ptr < t.ch2_q.size()) ? t.ch2_q[ptr] : 1'b0;
      #1;
      if (busy) cyc++;
      if (chan_take && ptr < t.ph_q.size()) begin
        // count each N-bit operand pair once, at its first bit
        if (ph_bits % N == 0 || t.ph_q[ptr] != ph_prev) begin
          if (t.ph_q[ptr] == PH_SETUP) n_setup++;
          if (t.ph_q[ptr] == PH_SETUP_AFTER_RAW) begin n_setup++; n_setup_after_raw++; end
          if (t.ph_q[ptr] inside {PH_NEXT, PH_FILL}) n_blocks++;
          if (t.ph_q[ptr] == PH_NEXT) n_aload++;
        end
        if (t.ph_q[ptr] != ph_prev) ph_bits = 0;
        ph_bits++;
        ph_prev = t.ph_q[ptr];
      end
      if (capture) begin
        check(cells == t.expected(c), $sformatf("%s: cube %0d vector", name, c));
        check(cube_mode == (t.is_raw[c] ? CUBE_RAW : CUBE_COMPRESSED), $sformatf("%s: cube %0d mode", name, c));
        if (t.is_raw[c]) n_raw_cubes++; else n_comp_cubes++;
        if (c > 0 && t.is_raw[c] && !t.is_raw[c-1]) n_switch_to_raw++;
        // the L shifts of this cube pushed the previous contents into the MISR
        for (int r = 0; r < L; r++) begin
          logic [N-1:0] outw;
          for (int j = 0; j < N; j++) outw[j] = chain_model[j*L + L-1-r];
          sig = misr_step(sig, outw);
        end
        chain_model = t.expected(c) ^ resp_mask;
        c++;
      end
      if (chan_take) ptr++;
      @(negedge clk);
    end
    check(c == ncubes, $sformatf("%s: %0d cubes applied", name, c));
    check(vector_count == CW'(ncubes), $sformatf("%s: VECTOR_COUNT", name));
    check(ptr == t.ch1_q.size(), $sformatf("%s: consumed %0d of %0d channel bits", name, ptr, t.ch1_q.size()));
    check(cyc == t.expected_cycles(), $sformatf("%s: %0d cycles, expected %0d", name, cyc, t.expected_cycles()));
    check(signature == sig, $sformatf("%s: signature %h expected %h", name, signature, sig));
    $display("%s: %0d cubes (%0d compressed) in %0d cycles, %0d channel bits per channel",
             name, ncubes, ncomp, cyc, ptr);
  endtask

  initial begin
    tester_t t1, t2, t3;
    cfg_load = 0; raw_first = 0; start = 0; ch1 = 0; ch2 = 0; compressed_count = '0; total_count = '0;
    resp_mask = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. compressed then raw
    t1 = new();
    repeat (3) t1.add_random_compressed();
    repeat (2) t1.add_raw();
    run_set(t1, "set1");

    // 2. shared operand pool
    t2 = new();
    begin
      tester_t::word_t pool[6], s[$], p[$];
      foreach (pool[i]) pool[i] = t2.rand_word();
      for (int c = 0; c < 4; c++) begin
        s.delete(); p.delete();
        for (int k = 0; k < BLOCKS; k++) begin
          s.push_back(pool[$urandom % 6]);
          p.push_back(pool[$urandom % 6]);
        end
        t2.add_compressed(s, p);
      end
    end
    run_set(t2, "set2");

    // 3. raw first, then compressed
    t3 = new();
    repeat (2) t3.add_raw();
    repeat (2) t3.add_random_compressed();
    run_set(t3, "set3");

    check(n_setup > 0, "setup happened");
    check(n_setup_after_raw > 0, "setup after raw cubes happened");
    check(n_blocks == BLOCKS * (3 + 4 + 2), $sformatf("%0d blocks expanded", n_blocks));
    check(n_aload > 0, "operand hand-over to A happened");
    check(n_capture == 13, $sformatf("%0d captures", n_capture));
    check(n_raw_cubes == 4, "raw cubes applied");
    check(n_comp_cubes == 9, "compressed cubes applied");
    check(n_switch_to_raw > 0, "compressed->raw switch happened");
    check(n_misr > 0, "MISR compacted nonzero responses");
    $display("mechanisms: setup=%0d setup_after_raw=%0d blocks=%0d a_load=%0d capture=%0d raw=%0d comp=%0d switch=%0d misr=%0d",
             n_setup, n_setup_after_raw, n_blocks, n_aload, n_capture, n_raw_cubes, n_comp_cubes, n_switch_to_raw, n_misr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
