// tb_test_mode_ctrl: self-checking test of the VECTOR_COUNT /
// COMPRESSED_COUNT mode switch. For random counts it pulses cube_done once
// per cube and checks, against a count kept in the testbench, the vector
// count, the current and next mode (compressed while fewer than
// COMPRESSED_COUNT cubes are done, or, with raw_first, raw while fewer
// than TOTAL - COMPRESSED cubes are done), last_cube and all_done, and that
// further cube_done pulses after the end change nothing.
module tb_test_mode_ctrl;
  import mdc_pkg::*;
  localparam int CW = 16;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic cfg_load, raw_first, cube_done, last_cube, all_done;
  logic [CW-1:0] compressed_count, total_count, vector_count;
  cube_mode_e mode, next_mode;
  test_mode_ctrl dut (.clk, .rst_n, .cfg_load, .raw_first, .compressed_count, .total_count, .cube_done,
                      .vector_count, .mode, .next_mode, .last_cube, .all_done);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int switches = 0;
  initial begin
    int tot, comp, sw;
    bit rf;
    raw_first = 0;
    cfg_load = 0; cube_done = 0; compressed_count = 0; total_count = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      tot  = 1 + ($urandom % 40);
      comp = (t == 0) ? 0 : (t == 1) ? tot : ($urandom % (tot + 1));
      rf = (t % 2 == 1);
      sw = rf ? tot - comp : comp;   // cubes applied in the first mode
      @(negedge clk);
      raw_first = rf;
      cfg_load = 1; compressed_count = CW'(comp); total_count = CW'(tot);
      @(negedge clk); cfg_load = 0; raw_first = ~rf;  // sampled only with cfg_load
      for (int v = 0; v <= tot + 1; v++) begin
        automatic int vv = (v > tot) ? tot : v;
        check(vector_count == CW'(vv), $sformatf("count %0d exp %0d", vector_count, vv));
        if (vv < tot) begin
          check(mode == (((vv < sw) != rf) ? CUBE_COMPRESSED : CUBE_RAW), $sformatf("mode at %0d of %0d/%0d rf=%0d", vv, comp, tot, rf));
          check(next_mode == (((vv + 1 < sw) != rf) ? CUBE_COMPRESSED : CUBE_RAW), "next_mode");
          check(last_cube == (vv + 1 == tot), "last_cube");
          if (vv + 1 == sw && sw < tot) switches++;
        end
        check(all_done == (vv == tot), "all_done");
        cube_done = 1;
        @(negedge clk);
        cube_done = 0;
      end
    end
    check(switches > 20, "mode switch exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
