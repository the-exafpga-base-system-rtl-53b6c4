// sst_seidel2d: one Gauss-Seidel-2D sweep on a GRID_W x GRID_H binary32 grid.
//
// Gauss-Seidel updates in place: when element (r,c) is updated, its
// neighbours above, (r-1,c-1..c+1), and to the left, (r,c-1), already hold
// their new values.  In a raster-order stream those are exactly results this
// SST has already emitted, so they come from an output-history line (a
// register for the left neighbour and a line buffer W-2 words long for the
// row above), while the centre, (r,c+1) and the row below come from the input
// stencil_window (taps at 0, 1, 2, W and W+1).  Interior elements become
//     (1/9f) * ((((((((nw + n) + ne) + w) + c) + e) + sw) + s) + se)
// (8 additions and one multiplication = 9 FLOPs); border elements are passed
// through.  The division of the benchmark is done as a multiplication by 1/9f.
//
// Interface: valid/ready stream in and out, no TLAST.  Timing: one element per
// cycle (the feedback is through registers only); an unstalled frame takes
// GRID_W*GRID_H + GRID_W + 2 cycles at the input.
module sst_seidel2d
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
  localparam int OFS [NT] = '{0, 1, 2, GRID_W, GRID_W + 1};

  word_t       taps [NT];
  logic        pend, take, border, buf_ready;
  logic [31:0] cx, cy, cz;
  word_t       result;
  word_t       h_w, h_ne, h_n, h_nw;   // already-updated neighbours

  stencil_window #(
    .DW(32), .GRID_W(GRID_W), .GRID_H(GRID_H), .GRID_D(1),
    .NT(NT), .OFS(OFS), .CTAP(4)
  ) u_win (
    .clk, .rst, .s_valid, .s_ready, .s_data, .taps, .pend, .take,
    .cx, .cy, .cz, .border
  );

  // output history: h_w = last result, then W-2, 1, 1 more results back
  always_ff @(posedge clk) if (take) h_w <= result;
  delay_line #(.DW(32), .DELAY(GRID_W - 2)) u_h_ne (
    .clk, .rst, .en(take), .d(h_w), .q(h_ne));
  delay_line #(.DW(32), .DELAY(1)) u_h_n (
    .clk, .rst, .en(take), .d(h_ne), .q(h_n));
  delay_line #(.DW(32), .DELAY(1)) u_h_nw (
    .clk, .rst, .en(take), .d(h_n), .q(h_nw));

  // input taps: 0 = se, 1 = s, 2 = sw, 3 = e, 4 = centre
  always_comb begin
    word_t acc;
    acc    = fp_add(h_nw, h_n);
    acc    = fp_add(acc, h_ne);
    acc    = fp_add(acc, h_w);
    acc    = fp_add(acc, taps[4]);
    acc    = fp_add(acc, taps[3]);
    acc    = fp_add(acc, taps[2]);
    acc    = fp_add(acc, taps[1]);
    acc    = fp_add(acc, taps[0]);
    result = border ? taps[4] : fp_mul(FP_ONE_NINTH, acc);
  end

  assign take = pend && buf_ready;

  stream_buf2 #(.DW(32)) u_out (
    .clk, .rst, .s_valid(pend), .s_ready(buf_ready), .s_data(result),
    .m_valid, .m_ready, .m_data
  );
endmodule
