// sst_jacobi2d: one Jacobi-2D time-step on a GRID_W x GRID_H binary32 grid.
//
// A Streaming Stencil Time-step (SST) takes the grid as a raster-order word
// stream and emits the grid after one time-step, so SSTs can be chained into a
// queue, one time-step each.  Interior elements become
//     0.2f * ((((c + w) + e) + s) + n)          (5 FLOPs, as in the benchmark)
// border elements are passed through unchanged.  The 5-point neighbourhood
// comes from a stencil_window with two line buffers (taps at 0, W-1, W, W+1
// and 2W words behind the newest word); the result is written into a
// two-entry output buffer.
//
// Interface: AXI4-Stream style valid/ready, one 32-bit element per beat, no
// TLAST (frames are counted).  Timing: one element per cycle; an unstalled
// frame takes GRID_W*GRID_H + GRID_W + 1 cycles at the input, and the first
// output appears GRID_W + 2 cycles after the first input.  The kernel's
// function and FLOP count follow the benchmark definition; the streaming
// structure, the operation order and the per-frame flush are this design's.
module sst_jacobi2d
  import exafpga_pkg::*;
#(
  parameter int GRID_W = 1000,
  parameter int GRID_H = 1000
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  s_valid,
  output logic  s_ready,
  input  word_t s_data,
  output logic  m_valid,
  input  logic  m_ready,
  output word_t m_data
);
  localparam int NT = 5;
  localparam int OFS [NT] = '{0, GRID_W - 1, GRID_W, GRID_W + 1, 2 * GRID_W};

  word_t       taps [NT];
  logic        pend, take, border, buf_ready;
  logic [31:0] cx, cy, cz;
  word_t       result;

  stencil_window #(
    .DW(32), .GRID_W(GRID_W), .GRID_H(GRID_H), .GRID_D(1),
    .NT(NT), .OFS(OFS), .CTAP(2)
  ) u_win (
    .clk, .rst, .s_valid, .s_ready, .s_data, .taps, .pend, .take,
    .cx, .cy, .cz, .border
  );

  // taps: 0 = south (row+1), 1 = east (col+1), 2 = centre, 3 = west, 4 = north
  always_comb begin
    word_t acc;
    acc    = fp_add(taps[2], taps[3]);
    acc    = fp_add(acc, taps[1]);
    acc    = fp_add(acc, taps[0]);
    acc    = fp_add(acc, taps[4]);
    result = border ? taps[2] : fp_mul(FP_ONE_FIFTH, acc);
  end

  assign take = pend && buf_ready;

  stream_buf2 #(.DW(32)) u_out (
    .clk, .rst, .s_valid(pend), .s_ready(buf_ready), .s_data(result),
    .m_valid, .m_ready, .m_data
  );
endmodule
