// operand_regs: the three N-bit operand registers that sit between the two
// tester channels and the multiplier.
//
//  * B shift register: serial operand. Tester channel 1 shifts in at the MSB
//    while the LSB feeds the multiplier, so while one block is expanded the
//    operand of the next block arrives behind it, LSB first.
//  * Shadow register: parallel operand in transit. Tester channel 2 shifts
//    in at the MSB, LSB first, at the same time.
//  * A register: parallel operand of the multiplier. a_load copies the
//    shadow register into it, taking the value the shadow register holds
//    after this edge, so the operand completed in this cycle is ready for
//    the next block with no extra cycle.
//
// For test cubes stored uncompressed (raw mode) the B and shadow registers
// are reused as plain serial-in registers: after N/2 shifts their upper
// halves hold N/2 new bits each, and raw_slice = {B upper half, shadow upper
// half} as it stands after this edge. Channel 2 therefore carries scan chains
// 0 .. N/2-1 and channel 1 chains N/2 .. N-1, lowest chain first.
//
// The B and A registers and the shadow register with its parallel transfer
// follow the scheme; the raw-mode slice assembly is this design's choice, as
// the scheme does not say how uncompressed cubes are delivered.
module operand_regs #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,      // consume one bit from each tester channel
  input  logic         a_load,     // A <= shadow register (as it is after this edge)
  input  logic         ch1,        // tester channel 1 -> B shift register
  input  logic         ch2,        // tester channel 2 -> shadow register
  output logic         b_ser,      // LSB of B, serial operand bit for the multiplier
  output logic [N-1:0] a_par,      // A register
  output logic [N-1:0] b_reg,      // B shift register contents
  output logic [N-1:0] raw_slice   // raw-mode bit-slice (see above)
);

  logic [N-1:0] b_q, sh_q, a_q;
  logic [N-1:0] b_d, sh_d;

  always_comb begin
    b_d  = shift ? {ch1, b_q[N-1:1]}  : b_q;
    sh_d = shift ? {ch2, sh_q[N-1:1]} : sh_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_q  <= '0;
      sh_q <= '0;
      a_q  <= '0;
    end else begin
      b_q  <= b_d;
      sh_q <= sh_d;
      if (a_load) a_q <= sh_d;
    end
  end

  assign b_ser     = b_q[0];
  assign a_par     = a_q;
  assign b_reg     = b_q;
  assign raw_slice = {b_d[N-1:N/2], sh_d[N-1:N/2]};

endmodule
