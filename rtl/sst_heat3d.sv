// sst_heat3d: one explicit heat-conduction time-step on a GRID_W x GRID_H x
// GRID_D binary32 grid.
//
// Interior elements become
//     c + 0.125f * (((((((xm + xp) + ym) + yp) + zm) + zp) - 6f * c)
// (5 + 1 + 1 + 1 + 1 = 9 FLOPs, matching the benchmark's count); elements on
// any face of the cube are passed through.  The neighbourhood comes from the
// same seven-tap stencil_window as sst_jacobi3d (two plane buffers).
//
// Interface: valid/ready stream in and out, raster order with x fastest, no
// TLAST.  Timing: one element per cycle; an unstalled frame takes
// W*H*D + W*H + 1 cycles at the input.  The exact update formula and the 0.125
// diffusion coefficient are this design's choice within the benchmark's
// 9-FLOP budget.
module sst_heat3d
  import exafpga_pkg::*;
#(
  parameter int GRID_W = 100,
  parameter int GRID_H = 100,
  parameter int GRID_D = 100
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
  localparam int P  = GRID_W * GRID_H;
  localparam int NT = 7;
  localparam int OFS [NT] = '{0, P - GRID_W, P - 1, P, P + 1, P + GRID_W, 2 * P};

  word_t       taps [NT];
  logic        pend, take, border, buf_ready;
  logic [31:0] cx, cy, cz;
  word_t       result;

  stencil_window #(
    .DW(32), .GRID_W(GRID_W), .GRID_H(GRID_H), .GRID_D(GRID_D),
    .NT(NT), .OFS(OFS), .CTAP(3)
  ) u_win (
    .clk, .rst, .s_valid, .s_ready, .s_data, .taps, .pend, .take,
    .cx, .cy, .cz, .border
  );

  // taps: 0 = z+1, 1 = y+1, 2 = x+1, 3 = centre, 4 = x-1, 5 = y-1, 6 = z-1
  always_comb begin
    word_t acc, lap;
    acc    = fp_add(taps[4], taps[2]);
    acc    = fp_add(acc, taps[5]);
    acc    = fp_add(acc, taps[1]);
    acc    = fp_add(acc, taps[6]);
    acc    = fp_add(acc, taps[0]);
    lap    = fp_add(acc, fp_neg(fp_mul(FP_SIX, taps[3])));
    result = border ? taps[3] : fp_add(taps[3], fp_mul(FP_ONE_EIGHTH, lap));
  end

  assign take = pend && buf_ready;

  stream_buf2 #(.DW(32)) u_out (
    .clk, .rst, .s_valid(pend), .s_ready(buf_ready), .s_data(result),
    .m_valid, .m_ready, .m_data
  );
endmodule
