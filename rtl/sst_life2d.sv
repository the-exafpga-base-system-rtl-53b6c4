// sst_life2d: one Game-of-Life generation on a GRID_W x GRID_H integer grid.
//
// Same streaming frame as the other SSTs: the grid enters as a raster-order
// stream of 32-bit words and leaves one generation later.  A cell is alive
// when its word is non-zero.  An interior cell is alive in the next
// generation when it has exactly 3 live neighbours, or 2 and was alive; the
// result is written as 1 or 0.  Border cells are passed through unchanged.
// The 3x3 neighbourhood comes from a stencil_window with two line buffers
// (taps at 0, 1, 2, W, W+1, W+2, 2W, 2W+1, 2W+2).
//
// Interface: valid/ready stream in and out, no TLAST.  Timing: one cell per
// cycle; an unstalled frame takes GRID_W*GRID_H + GRID_W + 2 cycles at the
// input.  The rule is the standard automaton; the integer encoding of cells,
// the border rule and the streaming structure are this design's choices.
module sst_life2d
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
  localparam int NT = 9;
  localparam int OFS [NT] = '{0, 1, 2, GRID_W, GRID_W + 1, GRID_W + 2,
                              2 * GRID_W, 2 * GRID_W + 1, 2 * GRID_W + 2};

  word_t       taps [NT];
  logic        pend, take, border, buf_ready;
  logic [31:0] cx, cy, cz;
  word_t       result;

  stencil_window #(
    .DW(32), .GRID_W(GRID_W), .GRID_H(GRID_H), .GRID_D(1),
    .NT(NT), .OFS(OFS), .CTAP(4)
  ) u_win (
    .clk, .rst, .s_valid, .s_ready, .s_data, .taps, .pend, .take,
    .cx, .cy, .cz, .border
  );

  always_comb begin
    logic [3:0] n;
    logic       alive;
    n = '0;
    for (int i = 0; i < NT; i++)
      if (i != 4 && taps[i] != '0) n = n + 4'd1;
    alive  = (taps[4] != '0);
    result = border ? taps[4] : word_t'((n == 4'd3) || (alive && n == 4'd2));
  end

  assign take = pend && buf_ready;

  stream_buf2 #(.DW(32)) u_out (
    .clk, .rst, .s_valid(pend), .s_ready(buf_ready), .s_data(result),
    .m_valid, .m_ready, .m_data
  );
endmodule
