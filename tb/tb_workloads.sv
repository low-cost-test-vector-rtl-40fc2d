// tb_workloads: runs the configurations the scheme is evaluated on, with
// random operands in place of the real test cubes (all cubes compressed):
//   - s15850: 8 x 8 multiplier, 8 chains of 80 cells (10 blocks), 142
//     cubes; the total must be (142 x 81) + 8 = 11510 cycles;
//   - s38417: 8 x 8, 26 blocks (1664 cells per cube), 105 cubes;
//   - s38584: 16 x 16, 6 blocks (1536 cells), 192 cubes;
//   - s13207: 32 x 32, 1 block (1024 cells), 255 cubes;
//   - random test sets of 100 cubes with n x n cells for n = 16 and 64
//     (n = 8 and 32 are covered by the circuit sets above).
module tb_workloads;
  localparam int NR = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int ck [NR], fl [NR];
  logic fin [NR];

  mdc_workload_runner #(.N(8),  .BLOCKS(10), .CUBES(142), .NAME("s15850")) r0 (.clk, .rst_n, .checks(ck[0]), .failures(fl[0]), .finished(fin[0]));
  mdc_workload_runner #(.N(8),  .BLOCKS(26), .CUBES(105), .NAME("s38417")) r1 (.clk, .rst_n, .checks(ck[1]), .failures(fl[1]), .finished(fin[1]));
  mdc_workload_runner #(.N(16), .BLOCKS(6),  .CUBES(192), .NAME("s38584")) r2 (.clk, .rst_n, .checks(ck[2]), .failures(fl[2]), .finished(fin[2]));
  mdc_workload_runner #(.N(32), .BLOCKS(1),  .CUBES(255), .NAME("s13207")) r3 (.clk, .rst_n, .checks(ck[3]), .failures(fl[3]), .finished(fin[3]));
  mdc_workload_runner #(.N(16), .BLOCKS(1),  .CUBES(100), .NAME("random_n16")) r4 (.clk, .rst_n, .checks(ck[4]), .failures(fl[4]), .finished(fin[4]));
  mdc_workload_runner #(.N(64), .BLOCKS(1),  .CUBES(100), .NAME("random_n64")) r5 (.clk, .rst_n, .checks(ck[5]), .failures(fl[5]), .finished(fin[5]));

  int checks = 0, failures = 0;
  int s15850_cycles = 0;
  always @(posedge clk) if (rst_n && r0.busy) s15850_cycles++;

  function automatic bit all_fin();
    foreach (fin[i]) if (!fin[i]) return 0;
    return 1;
  endfunction

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!all_fin()) @(posedge clk);
    foreach (ck[i]) begin checks += ck[i]; failures += fl[i]; end
    checks++;
    if (s15850_cycles != 142 * 81 + 8) begin
      failures++;
      $display("FAIL: s15850 took %0d cycles, expected 11510", s15850_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
