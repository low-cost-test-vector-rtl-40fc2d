// tb_operand_regs: self-checking test of the B, shadow and A operand
// registers. Random bit streams are shifted in on both channels; a model
// kept in the testbench (plain arrays of the bits sent) predicts the B
// register, the serial bit, the A register after a_load (which must see the
// bit shifted in the same cycle), the raw-mode slice after N/2 shifts and
// that nothing moves while shift is low.
module tb_operand_regs;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic shift, a_load, ch1, ch2, b_ser;
  logic [N-1:0] a_par, b_reg, raw_slice;
  operand_regs dut (.clk, .rst_n, .shift, .a_load, .ch1, .ch2, .b_ser, .a_par, .b_reg, .raw_slice);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [N-1:0] s1, s2, exp_raw;
    shift = 0; a_load = 0; ch1 = 0; ch2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      // N shifts: an operand pair, first bit sent lands at bit 0
      s1 = N'($urandom); s2 = N'($urandom);
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        shift = 1; ch1 = s1[i]; ch2 = s2[i]; a_load = (i == N-1);
        if (i == N/2 - 1) begin
          for (int j = 0; j < N/2; j++) begin
            exp_raw[j]       = s2[j];
            exp_raw[N/2 + j] = s1[j];
          end
          #1 check(raw_slice == exp_raw, $sformatf("raw slice %b exp %b", raw_slice, exp_raw));
        end
      end
      @(posedge clk); #1;
      check(b_reg == s1, $sformatf("B %h exp %h", b_reg, s1));
      check(b_ser == s1[0], "serial bit is LSB of B");
      check(a_par == s2, $sformatf("A %h exp %h", a_par, s2));
      // hold
      @(negedge clk); shift = 0; a_load = 0; ch1 = ~ch1; ch2 = ~ch2;
      repeat (2) @(posedge clk); #1;
      check(b_reg == s1 && a_par == s2, "hold while shift low");
      // serial consumption order: LSB first while the next operand enters
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        check(b_ser == s1[i], $sformatf("serial bit %0d", i));
        shift = 1; ch1 = 1'b0; ch2 = 1'b0;
      end
      @(negedge clk); shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
