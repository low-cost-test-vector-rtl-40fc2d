// tb_decomp_ctrl: self-checking test of the decompressor sequencer at
// N = 4, BLOCKS = 2 (8 cells per chain). A cube list kept in the testbench
// (compressed, compressed, raw, raw, compressed) supplies the mode inputs.
// Checked against the timing formulas: N setup cycles before a compressed
// cube that follows nothing or a raw cube, BLOCKS*N + 1 cycles per
// compressed cube and BLOCKS*N*N/2 + 1 per raw cube; L scan shifts per
// cube; mult_clear on the first step of every block; a_load on the last
// operand shift of every setup and block; one capture per cube; the
// total cycle count.
module tb_decomp_ctrl;
  import mdc_pkg::*;
  localparam int N = 4, BLOCKS = 2, L = N * BLOCKS;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic start, last_cube, all_done;
  cube_mode_e mode, next_mode;
  logic chan_take, a_load, mult_en, mult_clear, scan_shift, slice_raw, capture, cube_done, busy, done;
  decomp_ctrl #(.N(N), .BLOCKS(BLOCKS)) dut (.clk, .rst_n, .start, .mode, .next_mode, .last_cube, .all_done,
    .chan_take, .a_load, .mult_en, .mult_clear, .scan_shift, .slice_raw, .capture, .cube_done, .busy, .done);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam int NC = 5;
  cube_mode_e cubes [NC] = '{CUBE_COMPRESSED, CUBE_COMPRESSED, CUBE_RAW, CUBE_RAW, CUBE_COMPRESSED};
  int cur = 0;
  always_comb begin
    mode      = (cur < NC) ? cubes[cur] : CUBE_RAW;
    next_mode = (cur + 1 < NC) ? cubes[cur+1] : CUBE_RAW;
    last_cube = (cur == NC - 1);
    all_done  = (cur >= NC);
  end
  always_ff @(posedge clk) if (cube_done) cur <= cur + 1;

  initial begin
    int cyc, shifts, takes, loads, clears, expect_cyc, total, exp_total;
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    total = 1; exp_total = 1;
    for (int c = 0; c < NC; c++) begin
      cyc = 0; shifts = 0; takes = 0; loads = 0; clears = 0;
      // count cycles until this cube's capture (inclusive)
      forever begin
        cyc++;
        if (scan_shift) shifts++;
        if (chan_take) takes++;
        if (a_load) loads++;
        if (mult_clear) clears++;
        if (scan_shift) check(slice_raw == (cubes[c] == CUBE_RAW), "slice source");
        if (mult_en) check(cubes[c] == CUBE_COMPRESSED, "multiplier idle in raw mode");
        if (capture) begin
          check(!scan_shift && !chan_take && cube_done, "capture cycle is quiet");
          break;
        end
        @(negedge clk);
      end
      total += cyc;
      if (cubes[c] == CUBE_COMPRESSED) begin
        expect_cyc = BLOCKS * N + 1 + ((c == 0 || cubes[c-1] == CUBE_RAW) ? N : 0);
        check(clears == BLOCKS, $sformatf("cube %0d mult_clear %0d", c, clears));
        check(loads == BLOCKS + ((expect_cyc > BLOCKS * N + 1) ? 1 : 0), $sformatf("cube %0d a_load %0d", c, loads));
      end else begin
        expect_cyc = BLOCKS * N * N / 2 + 1;
        check(clears == 0 && loads == 0, "raw cube uses no operands");
      end
      exp_total += expect_cyc;
      check(cyc == expect_cyc, $sformatf("cube %0d took %0d cycles, expected %0d", c, cyc, expect_cyc));
      check(shifts == L, $sformatf("cube %0d shifted %0d slices", c, shifts));
      check(takes == cyc - 1, $sformatf("cube %0d took %0d channel bits", c, takes));
      @(negedge clk);
    end
    check(done && !busy, "done after last cube");
    check(total == exp_total, "total cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
