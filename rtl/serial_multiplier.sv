// serial_multiplier: reconfigurable bit-serial x bit-parallel multiplier.
//
// One cell per bit of the parallel operand. Cell j ANDs the serial bit with
// a_par[j] to form a partial-product bit, and a full adder adds it to the
// sum register of cell j+1 (the running result shifted right by one place)
// and to the cell's own carry register. Each enabled clock is one step of
// the shift-and-add algorithm, serial operand LSB first.
//
//  * MUL_INT: carry-save binary multiplication. The product leaves the array
//    one bit per step on prod_bit, LSB first; after N steps with the serial
//    bits and N more with b_ser = 0 all 2N product bits have come out.
//  * MUL_GF2: the carry-register outputs are forced to 0, so each full adder
//    acts as an XOR and the array multiplies polynomials over GF(2). After
//    step i of a product the sum registers hold row i of the test matrix:
//    row i = (row i-1 shifted right by one) XOR (b_i ? A : 0).
//
// clear marks the first step of a new product: the previous sum and carry
// registers are taken as zero, so no separate reset cycle is needed between
// products. state_next is the value the sum registers take at this edge; it
// is the bit-slice the decompressor shifts into the scan chains in the same
// cycle. The cell structure and the carry gating follow the scheme; the
// clear input, the state_next tap and the reset are this design's choices.
module serial_multiplier
  import mdc_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mul_mode_e        mode,
  input  logic             en,
  input  logic             clear,
  input  logic [N-1:0]     a_par,
  input  logic             b_ser,
  output logic [N-1:0]     state_next,
  output logic [N-1:0]     state,
  output logic             prod_bit
);

  logic [N-1:0] sum_q, carry_q;
  logic [N-1:0] carry_d;
  logic [N-1:0] pp, sum_in, carry_in;

  always_comb begin
    pp = b_ser ? a_par : '0;
    // Running result shifted right by one place; nothing enters the top cell.
    sum_in   = clear ? '0 : (sum_q >> 1);
    // GF(2) mode gates the carry-register outputs.
    carry_in = (clear || mode == MUL_GF2) ? '0 : carry_q;
    for (int j = 0; j < N; j++) begin
      state_next[j] = sum_in[j] ^ pp[j] ^ carry_in[j];
      carry_d[j]    = (sum_in[j] & pp[j]) | (sum_in[j] & carry_in[j]) | (pp[j] & carry_in[j]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q   <= '0;
      carry_q <= '0;
    end else if (en) begin
      sum_q   <= state_next;
      carry_q <= carry_d;
    end
  end

  assign state    = sum_q;
  assign prod_bit = sum_q[0];

endmodule
