// mdc_workload_runner: applies a test set of CUBES compressed cubes to one
// mult_decomp_top of size N x N, BLOCKS blocks per cube, and checks every
// applied vector and the total cycle count N + CUBES*(BLOCKS*N + 1).
// Operands are random: only the organisation of the evaluated
// configurations (multiplier size, blocks per cube, cube count) is taken
// over, not their actual test cubes. Reports through checks/failures and
// raises finished when done.
module mdc_workload_runner
  import mdc_pkg::*;
  import mdc_tester_pkg::*;
#(
  parameter int    N      = 8,
  parameter int    BLOCKS = 10,
  parameter int    CUBES  = 4,
  parameter string NAME   = "set"
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int L = N * BLOCKS, CW = 16;
  typedef Tester #(N, BLOCKS) tester_t;

  logic cfg_load, start, ch1, ch2, chan_take, capture, busy, done;
  logic [CW-1:0] vector_count;
  logic [N*L-1:0] cells;
  logic [N-1:0] signature;
  cube_mode_e cube_mode;

  mult_decomp_top #(.N(N), .BLOCKS(BLOCKS)) dut (
    .clk, .rst_n, .cfg_load, .raw_first(1'b0), .compressed_count(CW'(CUBES)), .total_count(CW'(CUBES)),
    .start, .ch1, .ch2, .chan_take, .resp_in(~cells), .cells, .capture,
    .signature, .vector_count, .cube_mode, .busy, .done);

  initial begin
    tester_t t;
    automatic longint cyc = 0;
    automatic int c = 0, ptr = 0, bad = 0;
    checks = 0; failures = 0; finished = 0;
    cfg_load = 0; start = 0; ch1 = 0; ch2 = 0;
    t = new();
    repeat (CUBES) t.add_random_compressed();
    t.build();
    @(posedge rst_n);
    @(negedge clk); cfg_load = 1;
    @(negedge clk); cfg_load = 0; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin
      ch1 = (ptr < t.ch1_q.size()) ? t.ch1_q[ptr] : 1'b0;
      ch2 = (ptr < t.ch2_q.size()) ? t.ch2_q[ptr] : 1'b0;
      #1;
      if (busy) cyc++;
      if (capture) begin
        checks++;
        if (cells != t.expected(c)) begin
          failures++;
          if (bad++ < 3) $display("FAIL %s: cube %0d vector", NAME, c);
        end
        c++;
      end
      if (chan_take) ptr++;
      @(negedge clk);
    end
    checks++;
    if (c != CUBES) begin failures++; $display("FAIL %s: %0d cubes", NAME, c); end
    checks++;
    if (cyc != t.expected_cycles()) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d", NAME, cyc, t.expected_cycles());
    end
    $display("%s: %0dx%0d multiplier, %0d chains x %0d cells, %0d cubes in %0d cycles, %0d stored bits for %0d scan bits",
             NAME, N, N, N, L, CUBES, cyc, CUBES * BLOCKS * 2 * N, CUBES * N * L);
    finished = 1;
  end
endmodule
