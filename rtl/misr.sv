// misr: N-input multiple-input signature register that compacts the scan
// chain outputs while the next vector is shifted in.
//
// Internal-XOR (Galois) form: on each enabled clock the register shifts
// towards the MSB, the bit leaving the top is fed back into the stages
// selected by the polynomial taps, and the N scan outputs are XORed into the
// N stages. next = {sig[W-2:0],0} ^ (sig[W-1] ? TAPS : 0) ^ data_in. The
// scheme states only that responses are compacted in a MISR; its width (one
// stage per scan chain), its polynomial (mdc_pkg::misr_taps) and the
// synchronous clear are this design's choices.
module misr
  import mdc_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [N-1:0] data_in,
  output logic [N-1:0] signature
);

  localparam logic [63:0] TAPS_ALL = misr_taps(N);
  localparam logic [N-1:0] TAPS    = TAPS_ALL[N-1:0];

  logic [N-1:0] sig_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sig_q <= '0;
    else if (clear)  sig_q <= '0;
    else if (en)     sig_q <= {sig_q[N-2:0], 1'b0} ^ (sig_q[N-1] ? TAPS : '0) ^ data_in;
  end

  assign signature = sig_q;

endmodule
