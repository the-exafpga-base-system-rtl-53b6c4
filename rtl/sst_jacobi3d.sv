// sst_jacobi3d: one Jacobi-3D time-step on a GRID_W x GRID_H x GRID_D
// binary32 grid.
//
// Interior elements become the mean of the element and its six face
// neighbours, computed as (1/7f) * ((((((c + xm) + xp) + ym) + yp) + zm) + zp)
// (7 FLOPs); elements on any face of the cube are passed through.  The
// neighbourhood comes from a stencil_window whose taps sit at 0, P-W, P-1, P,
// P+1, P+W and 2P words behind the newest word (P = W*H, one plane), i.e. two
// plane buffers.
//
// Interface: valid/ready stream in and out, raster order with x fastest, no
// TLAST.  Timing: one element per cycle; an unstalled frame takes W*H*D + P + 1
// cycles at the input.  Function and FLOP count follow the benchmark; the 1/7
// coefficient, the operation order and the streaming structure are this
// design's choices.
module sst_jacobi3d
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
    word_t acc;
    acc    = fp_add(taps[3], taps[4]);
    acc    = fp_add(acc, taps[2]);
    acc    = fp_add(acc, taps[5]);
    acc    = fp_add(acc, taps[1]);
    acc    = fp_add(acc, taps[6]);
    acc    = fp_add(acc, taps[0]);
    result = border ? taps[3] : fp_mul(FP_ONE_SEVENTH, acc);
  end

  assign take = pend && buf_ready;

  stream_buf2 #(.DW(32)) u_out (
    .clk, .rst, .s_valid(pend), .s_ready(buf_ready), .s_data(result),
    .m_valid, .m_ready, .m_data
  );
endmodule
