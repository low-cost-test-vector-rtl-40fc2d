// tb_serial_multiplier: self-checking test of the reconfigurable serial
// multiplier.
//
//  1. The 4-bit worked example: serial operand 1101 (LSB first), parallel
//     operand 1011, GF(2) mode. The four states must be the rows of the
//     example test matrix: 1011, 0101, 1001, 1111 (one row per clock).
//  2. Random GF(2) products at N = 8, every state checked against the
//     closed form t[i][j] = XOR_k s[i-k] & p[j+k] (row i, column j), which
//     is written here independently of the cell structure.
//  3. Random integer products at N = 8: 2N steps, the product bits read on
//     prod_bit must equal a*b computed with '*'.
//  4. clear really discards the previous product.
module tb_serial_multiplier;
  import mdc_pkg::*;

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

  // N = 4 instance for the worked example
  mul_mode_e   m4_mode;
  logic        m4_en, m4_clear, m4_b;
  logic [3:0]  m4_a, m4_next, m4_state;
  logic        m4_pb;
  serial_multiplier #(.N(4)) u4 (
    .clk, .rst_n, .mode(m4_mode), .en(m4_en), .clear(m4_clear), .a_par(m4_a),
    .b_ser(m4_b), .state_next(m4_next), .state(m4_state), .prod_bit(m4_pb));

  // default-size instance
  localparam int N = 8;
  mul_mode_e   m_mode;
  logic        m_en, m_clear, m_b;
  logic [N-1:0] m_a, m_next, m_state;
  logic        m_pb;
  serial_multiplier u8 (
    .clk, .rst_n, .mode(m_mode), .en(m_en), .clear(m_clear), .a_par(m_a),
    .b_ser(m_b), .state_next(m_next), .state(m_state), .prod_bit(m_pb));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Row i (1-based) of the GF(2) test matrix from serial s and parallel p.
  function automatic logic [N-1:0] gf_row(input logic [N-1:0] s, input logic [N-1:0] p, input int i);
    logic [N-1:0] r = '0;
    for (int j = 0; j < N; j++)
      for (int k = 0; k < i; k++)
        if (j + k < N) r[j] ^= s[i-1-k] & p[j+k];
    return r;
  endfunction

  initial begin
    logic [3:0] exp4 [4];
    logic [N-1:0] s, p;
    logic [2*N-1:0] prod;
    exp4 = '{4'b1011, 4'b0101, 4'b1001, 4'b1111};
    m4_mode = MUL_GF2; m4_en = 0; m4_clear = 0; m4_b = 0; m4_a = '0;
    m_mode = MUL_GF2;  m_en = 0;  m_clear = 0;  m_b = 0;  m_a = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. worked example
    begin
      automatic logic [3:0] ser = 4'b1101;
      m4_a = 4'b1011;
      for (int i = 0; i < 4; i++) begin
        m4_en = 1; m4_clear = (i == 0); m4_b = ser[i];
        #1 check(m4_next == exp4[i], $sformatf("example slice %0d next=%b", i+1, m4_next));
        @(posedge clk); #1;
        check(m4_state == exp4[i], $sformatf("example row %0d state=%b exp=%b", i+1, m4_state, exp4[i]));
        @(negedge clk);
      end
      m4_en = 0;
    end

    // 2. random GF(2) products; start each with clear over a dirty state
    for (int t = 0; t < 200; t++) begin
      s = N'($urandom); p = N'($urandom);
      m_mode = MUL_GF2; m_a = p;
      for (int i = 1; i <= N; i++) begin
        m_en = 1; m_clear = (i == 1); m_b = s[i-1];
        @(posedge clk); #1;
        check(m_state == gf_row(s, p, i), $sformatf("gf s=%h p=%h row %0d got %b exp %b", s, p, i, m_state, gf_row(s, p, i)));
        @(negedge clk);
      end
    end

    // 3. random integer products
    for (int t = 0; t < 200; t++) begin
      s = N'($urandom); p = N'($urandom);
      if (t == 0) begin s = '1; p = '1; end
      m_mode = MUL_INT; m_a = p; prod = '0;
      for (int i = 0; i < 2*N; i++) begin
        m_en = 1; m_clear = (i == 0); m_b = (i < N) ? s[i] : 1'b0;
        @(posedge clk); #1;
        prod[i] = m_pb;
        @(negedge clk);
      end
      check(prod == (2*N)'(s) * (2*N)'(p), $sformatf("int %0d*%0d got %0d", s, p, prod));
    end

    // 4. en low holds the state
    m_en = 0; m_b = 1; m_a = '1;
    begin
      automatic logic [N-1:0] held = m_state;
      repeat (3) @(posedge clk);
      #1 check(m_state == held, "state held while en low");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
