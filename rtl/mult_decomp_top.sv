// mult_decomp_top: scan test data decompressor built around a functional
// serial multiplier, with the circuit's scan chains and response MISR.
//
// Each N x N block of a test cube (N scan chains, N slices) is stored as a
// pair of N-bit operands. Two tester channels stream them in: channel 1 into
// the B shift register (serial operand), channel 2 into the shadow
// register, which is copied to the A register (parallel operand) at the end
// of every block. The multiplier, held in GF(2) mode, steps once per clock
// and its new state is shifted into the chains as the next bit-slice, so a
// block of N*N scan bits costs 2*N stored bits and N clocks. While the
// chains shift, their outputs (the previous vector's response) are
// compacted in the MISR. After BLOCKS blocks one capture cycle loads the
// response from resp_in. Cubes that could not be encoded follow the
// compressed ones and are shifted in raw, two bits per clock; the tester
// counters in test_mode_ctrl switch between the two.
//
// Interface: cfg_load sets the cube counts, start begins the test; the
// tester presents one bit on ch1 and ch2 in every cycle with chan_take high.
// cells shows the scan cells (chain j, cell k at j*L + k); applied vectors
// can be read there in the cycle capture is high. Timing: N setup cycles,
// then BLOCKS*N + 1 cycles per compressed cube and BLOCKS*N*N/2 + 1 per raw
// cube. Defaults are the 8 x 8 multiplier and 8 chains of 80 cells used for
// the s15850 circuit. The raw path and the MISR details are this design's
// choices; the rest follows the scheme.
module mult_decomp_top
  import mdc_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned BLOCKS = 10,
  parameter int unsigned CW     = 16,
  localparam int unsigned L     = BLOCKS * N
) (
  input  logic           clk,
  input  logic           rst_n,
  // tester control
  input  logic           cfg_load,
  input  logic           raw_first,
  input  logic [CW-1:0]  compressed_count,
  input  logic [CW-1:0]  total_count,
  input  logic           start,
  // tester channels
  input  logic           ch1,
  input  logic           ch2,
  output logic           chan_take,
  // circuit under test
  input  logic [N*L-1:0] resp_in,
  output logic [N*L-1:0] cells,
  output logic           capture,
  // status
  output logic [N-1:0]   signature,
  output logic [CW-1:0]  vector_count,
  output cube_mode_e     cube_mode,
  output logic           busy,
  output logic           done
);

  cube_mode_e   mode, next_mode;
  logic         last_cube, all_done;
  logic         a_load, mult_en, mult_clear, scan_shift, slice_raw, cube_done;
  logic         b_ser;
  logic [N-1:0] a_par, raw_slice;
  logic [N-1:0] mult_next;
  logic [N-1:0] slice, scan_out;

  test_mode_ctrl #(.CW(CW)) u_mode (
    .clk, .rst_n, .cfg_load, .raw_first, .compressed_count, .total_count, .cube_done,
    .vector_count, .mode, .next_mode, .last_cube, .all_done
  );

  decomp_ctrl #(.N(N), .BLOCKS(BLOCKS)) u_ctrl (
    .clk, .rst_n, .start, .mode, .next_mode, .last_cube, .all_done,
    .chan_take, .a_load, .mult_en, .mult_clear, .scan_shift, .slice_raw,
    .capture, .cube_done, .busy, .done
  );

  operand_regs #(.N(N)) u_ops (
    .clk, .rst_n, .shift(chan_take), .a_load, .ch1, .ch2,
    .b_ser, .a_par, .b_reg(), .raw_slice
  );

  serial_multiplier #(.N(N)) u_mult (
    .clk, .rst_n, .mode(MUL_GF2), .en(mult_en), .clear(mult_clear),
    .a_par, .b_ser, .state_next(mult_next), .state(), .prod_bit()
  );

  assign slice = slice_raw ? raw_slice : mult_next;

  scan_chains #(.N(N), .L(L)) u_scan (
    .clk, .rst_n, .shift_en(scan_shift), .capture, .slice_in(slice),
    .resp_in, .scan_out, .cells
  );

  misr #(.N(N)) u_misr (
    .clk, .rst_n, .clear(cfg_load), .en(scan_shift), .data_in(scan_out),
    .signature
  );

  assign cube_mode = mode;

endmodule
