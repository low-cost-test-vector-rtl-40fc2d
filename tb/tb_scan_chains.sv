// tb_scan_chains: self-checking test of the N x L scan chains (reduced to
// N = 4, L = 12). Random slices are shifted in and compared, cell by cell,
// with a model in which slice r (0-based) of L ends up in cell L-1-r; the
// chain outputs must present the previous contents in order; a capture
// loads resp_in; shift_en low holds the chains.
module tb_scan_chains;
  localparam int N = 4, L = 12;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic shift_en, capture;
  logic [N-1:0] slice_in, scan_out;
  logic [N*L-1:0] resp_in, cells;
  scan_chains #(.N(N), .L(L)) dut (.clk, .rst_n, .shift_en, .capture, .slice_in, .resp_in, .scan_out, .cells);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [N-1:0] sl [L];
    logic [N*L-1:0] prev, exp_cells;
    shift_en = 0; capture = 0; slice_in = '0; resp_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev = '0;
    for (int t = 0; t < 20; t++) begin
      for (int r = 0; r < L; r++) begin
        sl[r] = N'($urandom);
        @(negedge clk);
        for (int j = 0; j < N; j++)
          check(scan_out[j] == prev[j*L + L-1-r], $sformatf("scan_out chain %0d shift %0d", j, r));
        shift_en = 1; slice_in = sl[r];
      end
      @(negedge clk); shift_en = 0;
      for (int j = 0; j < N; j++)
        for (int r = 0; r < L; r++) exp_cells[j*L + L-1-r] = sl[r][j];
      check(cells == exp_cells, $sformatf("vector %0d in chains", t));
      repeat (2) @(posedge clk); #1;
      check(cells == exp_cells, "hold");
      // capture a response
      @(negedge clk);
      resp_in = {$urandom, $urandom};
      capture = 1;
      @(negedge clk); capture = 0;
      check(cells == resp_in, "capture");
      prev = resp_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
