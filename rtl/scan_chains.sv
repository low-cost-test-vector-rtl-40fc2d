// scan_chains: the circuit's N parallel scan chains of L cells each.
//
// In shift mode every chain moves one place per clock: chain j takes
// slice_in[j] into cell 0 and its cell L-1 leaves on scan_out[j]. One clock
// thus loads one bit-slice (one row of a test matrix) across all chains;
// the first slice shifted ends up in cell L-1. In the capture cycle every
// cell loads the circuit's response from resp_in. cells exposes the
// contents (the vector applied to the circuit between shift and capture).
//
// The scheme gives the chains' role (a cube is cut into bit-slices, one
// slice per shift clock, then one capture cycle) but not their cells; the
// flat cells[j*L + k] layout (chain j, cell k) and the reset to zero are
// this design's choices.
module scan_chains #(
  parameter int unsigned N = 8,
  parameter int unsigned L = 80
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  logic           capture,
  input  logic [N-1:0]   slice_in,
  input  logic [N*L-1:0] resp_in,
  output logic [N-1:0]   scan_out,
  output logic [N*L-1:0] cells
);

  logic [L-1:0] chain_q [N];

  for (genvar j = 0; j < N; j++) begin : g_chain
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        chain_q[j] <= '0;
      end else if (capture) begin
        chain_q[j] <= resp_in[j*L +: L];
      end else if (shift_en) begin
        chain_q[j] <= L'({chain_q[j], slice_in[j]});
      end
    end
    assign scan_out[j]      = chain_q[j][L-1];
    assign cells[j*L +: L]  = chain_q[j];
  end

  // Shift and capture are exclusive phases of scan test.
  a_shift_xor_capture: assert property (@(posedge clk) disable iff (!rst_n)
    !(shift_en && capture))
    else $error("scan_chains: shift_en and capture both high");

endmodule
