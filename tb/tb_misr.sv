// tb_misr: self-checking test of the signature register at N = 8. The
// expected signature is computed in the testbench by polynomial arithmetic
// over GF(2): each clock multiplies the signature by x modulo
// x^8 + x^4 + x^3 + x^2 + 1 and adds the input word. Also checks hold,
// clear, that a single flipped input bit changes the signature and that
// with zero input the register cycles with period 255 (primitive polynomial).
module tb_misr;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic clear, en;
  logic [N-1:0] data_in, signature;
  misr #(.N(N)) dut (.clk, .rst_n, .clear, .en, .data_in, .signature);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // multiply by x modulo P(x) = x^8 + x^4 + x^3 + x^2 + 1, add d
  function automatic logic [7:0] step(input logic [7:0] s, input logic [7:0] d);
    logic [8:0] w = {s, 1'b0};
    if (w[8]) w ^= 9'h11D;
    return w[7:0] ^ d;
  endfunction

  initial begin
    logic [7:0] model, words [64], sig_a;
    clear = 0; en = 0; data_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      check(signature == 0, "clear");
      model = 0;
      for (int i = 0; i < 64; i++) begin
        words[i] = 8'($urandom);
        data_in = words[i]; en = 1;
        model = step(model, words[i]);
        @(negedge clk);
        check(signature == model, $sformatf("sig %h exp %h", signature, model));
      end
      en = 0; sig_a = signature;
      repeat (3) @(negedge clk);
      check(signature == sig_a, "hold");
      // one flipped bit must change the signature
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int i = 0; i < 64; i++) begin
        data_in = words[i] ^ ((i == t) ? 8'(1 << (t % 8)) : 8'h00); en = 1;
        @(negedge clk);
      end
      en = 0;
      check(signature != sig_a, "single-bit error detected");
    end
    // period of the autonomous sequence from state 1
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    data_in = 8'h01; en = 1; @(negedge clk); data_in = 0;
    begin
      automatic int period = 0;
      do begin @(negedge clk); period++; end while (signature != 8'h01 && period < 300);
      check(period == 255, $sformatf("period %0d", period));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
