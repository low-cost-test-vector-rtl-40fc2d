// decomp_ctrl: cycle sequencer of the multiplier-based decompressor.
//
// A test cube of N*L bits (L = BLOCKS*N cells per chain) is cut into BLOCKS
// blocks of N bit-slices. A compressed block is expanded in N clocks: on
// each one the multiplier takes one serial bit from the B register, its new
// state is shifted into the scan chains as a bit-slice, and both tester
// channels deliver one bit of the next block's operands. At the last clock
// of a block the shadow register is copied into A. After the last block
// comes one capture cycle. Timing, matching the scheme's own count:
//   setup before the first compressed cube      N cycles
//   compressed cube                             BLOCKS*N + 1 cycles
// (for N = 8, BLOCKS = 10 and 142 cubes: 8 + 142*81 = 11510 cycles).
// A raw (uncompressed) cube shifts one slice every N/2 cycles, two tester
// bits per cycle, so it takes BLOCKS*N*N/2 + 1 cycles. After a raw cube, a
// compressed cube needs the N setup cycles again, since the operand
// registers were not loaded behind it.
//
// chan_take is high in every cycle in which the tester must present one new
// bit on each channel. The per-block and per-cube timing follow the scheme;
// the raw-cube timing, the start/done interface and the state encoding are
// this design's choices.
module decomp_ctrl
  import mdc_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned BLOCKS = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,       // begin applying the test set (from idle or done)
  input  cube_mode_e mode,        // mode of the current cube
  input  cube_mode_e next_mode,   // mode of the following cube
  input  logic       last_cube,   // current cube is the last one
  input  logic       all_done,    // no cube left (checked at start)
  output logic       chan_take,   // operand registers consume one bit per channel
  output logic       a_load,      // shadow register -> A register
  output logic       mult_en,     // multiplier steps
  output logic       mult_clear,  // first step of a block
  output logic       scan_shift,  // scan chains shift one slice
  output logic       slice_raw,   // slice source: 1 raw slice, 0 multiplier state
  output logic       capture,     // capture cycle
  output logic       cube_done,   // pulse in the capture cycle
  output logic       busy,
  output logic       done
);

  typedef enum logic [2:0] {
    S_IDLE,
    S_SETUP,
    S_EXPAND,
    S_RAW,
    S_CAPTURE,
    S_DONE
  } state_e;

  localparam int unsigned L    = BLOCKS * N;
  localparam int unsigned HALF = N / 2;
  localparam int unsigned SW   = $clog2(N + 1);
  localparam int unsigned BW   = $clog2(BLOCKS + 1);
  localparam int unsigned LW   = $clog2(L + 1);

  state_e        state_q, state_d;
  logic [SW-1:0] slice_q, slice_d;   // slice within a block / bit within a raw half-slice
  logic [BW-1:0] block_q, block_d;   // block within a compressed cube
  logic [LW-1:0] row_q,   row_d;     // slice within a raw cube

  always_comb begin
    state_d    = state_q;
    slice_d    = slice_q;
    block_d    = block_q;
    row_d      = row_q;
    chan_take  = 1'b0;
    a_load     = 1'b0;
    mult_en    = 1'b0;
    mult_clear = 1'b0;
    scan_shift = 1'b0;
    slice_raw  = 1'b0;
    capture    = 1'b0;
    cube_done  = 1'b0;

    unique case (state_q)
      S_IDLE, S_DONE: begin
        // a new test set may be started after the previous one is done
        slice_d = '0;
        block_d = '0;
        row_d   = '0;
        if (start) begin
          if (all_done)                     state_d = S_DONE;
          else if (mode == CUBE_COMPRESSED) state_d = S_SETUP;
          else                              state_d = S_RAW;
        end
      end

      S_SETUP: begin
        chan_take = 1'b1;
        if (slice_q == SW'(N - 1)) begin
          a_load  = 1'b1;
          slice_d = '0;
          block_d = '0;
          state_d = S_EXPAND;
        end else begin
          slice_d = slice_q + 1'b1;
        end
      end

      S_EXPAND: begin
        chan_take  = 1'b1;
        mult_en    = 1'b1;
        mult_clear = (slice_q == '0);
        scan_shift = 1'b1;
        if (slice_q == SW'(N - 1)) begin
          a_load  = 1'b1;
          slice_d = '0;
          if (block_q == BW'(BLOCKS - 1)) begin
            block_d = '0;
            state_d = S_CAPTURE;
          end else begin
            block_d = block_q + 1'b1;
          end
        end else begin
          slice_d = slice_q + 1'b1;
        end
      end

      S_RAW: begin
        chan_take = 1'b1;
        slice_raw = 1'b1;
        if (slice_q == SW'(HALF - 1)) begin
          scan_shift = 1'b1;
          slice_d    = '0;
          if (row_q == LW'(L - 1)) begin
            row_d   = '0;
            state_d = S_CAPTURE;
          end else begin
            row_d = row_q + 1'b1;
          end
        end else begin
          slice_d = slice_q + 1'b1;
        end
      end

      S_CAPTURE: begin
        capture   = 1'b1;
        cube_done = 1'b1;
        slice_d   = '0;
        if (last_cube)                        state_d = S_DONE;
        else if (next_mode == CUBE_RAW)       state_d = S_RAW;
        else if (mode == CUBE_COMPRESSED)     state_d = S_EXPAND;  // operands already loaded
        else                                  state_d = S_SETUP;
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      slice_q <= '0;
      block_q <= '0;
      row_q   <= '0;
    end else begin
      state_q <= state_d;
      slice_q <= slice_d;
      block_q <= block_d;
      row_q   <= row_d;
    end
  end

  assign busy = (state_q != S_IDLE) && (state_q != S_DONE);
  assign done = (state_q == S_DONE);

  // The A register is only reloaded while operands stream in.
  a_load_with_shift: assert property (@(posedge clk) disable iff (!rst_n)
    a_load |-> chan_take)
    else $error("decomp_ctrl: a_load outside an operand shift");

  // Elaboration check: raw slices split the chains evenly over two channels.
  if (N < 2 || (N % 2) != 0) begin : g_bad_n
    $error("decomp_ctrl: N must be even and at least 2");
  end

endmodule
