// test_mode_ctrl: decides whether the next test cube arrives compressed or
// raw.
//
// The test set is stored with all compressed cubes first and the cubes that
// could not be encoded after them, so no per-cube marker bit is needed. The
// number of compressed cubes is held in COMPRESSED_COUNT; VECTOR_COUNT is
// incremented after every applied cube (cube_done, the capture cycle) and
// compared with it, and when they match the mode switches from compressed
// to raw for the rest of the set. TOTAL_COUNT ends the test. The reverse
// order (raw cubes first, raw_first = 1) is also supported: the switch to
// compressed then comes when VECTOR_COUNT reaches TOTAL_COUNT minus
// COMPRESSED_COUNT.
//
// Timing: cfg_load (with the two counts) clears VECTOR_COUNT and sets the
// mode; every output is registered or a function of the registers.
// next_mode and last_cube tell the sequencer, during the capture cycle, what
// follows it. In the scheme these registers live in the tester; the total
// count, the counter width CW and the reset values are this design's choices.
module test_mode_ctrl
  import mdc_pkg::*;
#(
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_load,
  input  logic          raw_first,   // test set holds the raw cubes first
  input  logic [CW-1:0] compressed_count,
  input  logic [CW-1:0] total_count,
  input  logic          cube_done,
  output logic [CW-1:0] vector_count,
  output cube_mode_e    mode,        // mode of the cube now being applied
  output cube_mode_e    next_mode,   // mode of the cube after it
  output logic          last_cube,   // the cube now being applied is the last
  output logic          all_done     // every cube has been applied
);

  logic [CW-1:0] vcount_q, ccount_q, tcount_q;
  cube_mode_e    mode_q;
  logic [CW-1:0] vcount_inc, switch_at;
  cube_mode_e    second_mode;
  logic          rfirst_q;

  assign vcount_inc  = vcount_q + 1'b1;
  // number of cubes applied in the first mode
  assign switch_at   = rfirst_q ? (tcount_q - ccount_q) : ccount_q;
  assign second_mode = rfirst_q ? CUBE_COMPRESSED : CUBE_RAW;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vcount_q <= '0;
      ccount_q <= '0;
      tcount_q <= '0;
      rfirst_q <= 1'b0;
      mode_q   <= CUBE_RAW;
    end else if (cfg_load) begin
      vcount_q <= '0;
      ccount_q <= compressed_count;
      tcount_q <= total_count;
      rfirst_q <= raw_first;
      if (raw_first) mode_q <= (compressed_count == total_count) ? CUBE_COMPRESSED : CUBE_RAW;
      else           mode_q <= (compressed_count == '0) ? CUBE_RAW : CUBE_COMPRESSED;
    end else if (cube_done && !all_done) begin
      vcount_q <= vcount_inc;
      if (vcount_inc == switch_at) mode_q <= second_mode;
    end
  end

  assign vector_count = vcount_q;
  assign mode         = mode_q;
  assign next_mode    = (vcount_inc == switch_at) ? second_mode : mode_q;
  assign last_cube    = (vcount_inc == tcount_q);
  assign all_done     = (vcount_q == tcount_q);

endmodule
