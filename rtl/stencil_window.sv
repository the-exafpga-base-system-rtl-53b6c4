// stencil_window: sliding stencil neighbourhood over a grid streamed in
// raster order (x fastest, then y, then z).
//
// The incoming words are shifted through a delay line with NT taps.  Tap i
// holds the word that entered OFS[i] shifts ago (OFS ascending, OFS[0] = 0),
// so the taps always form the stencil around the element at tap CTAP, the
// "centre", whose position in the grid is given on cx/cy/cz and whose border
// status is given on `border`.  The long gaps between taps are delay_line
// circular buffers (line buffers for 2D, plane buffers for 3D).
//
// Handshake: `s_valid/s_ready` on the input; `pend` says the taps hold a
// centre that has not been consumed yet, and the consumer raises `take` (only
// while `pend`) in the cycle it uses the taps.  A frame of N = W*H*D words
// needs N + C shifts, C = OFS[CTAP]: the first C only fill the window, the
// last C are flush shifts with no input (s_ready low), which push the final
// centres out.  One more cycle is spent to take the last centre, so an
// unstalled frame occupies N + C + 1 cycles.  The flush after each frame is
// this design's choice; s_ready is low during reset.  Neighbours taken from the previous or the next frame
// only ever surround border elements, which the kernels pass through.
module stencil_window #(
  parameter int DW     = 32,
  parameter int GRID_W = 1000,
  parameter int GRID_H = 1000,
  parameter int GRID_D = 1,
  parameter int NT     = 5,
  parameter int OFS [NT] = '{0, 999, 1000, 1001, 2000},
  parameter int CTAP   = 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          s_valid,
  output logic          s_ready,
  input  logic [DW-1:0] s_data,
  output logic [DW-1:0] taps [NT],
  output logic          pend,
  input  logic          take,
  output logic [31:0]   cx,
  output logic [31:0]   cy,
  output logic [31:0]   cz,
  output logic          border
);
  localparam int N = GRID_W * GRID_H * GRID_D;
  localparam int C = OFS[CTAP];

  logic [31:0] k;        // shifts done in the current frame, 0 .. N+C
  logic        shift;
  logic        frame_end;

  assign frame_end = take && (k == 32'(N + C));
  assign s_ready   = !rst && (k < 32'(N)) && (!pend || take);
  assign shift     = ((k < 32'(N)) ? s_valid : (k < 32'(N + C))) && (!pend || take);

  // tap 0 takes the new word (zero while flushing)
  always_ff @(posedge clk) begin
    if (shift) taps[0] <= (k < 32'(N)) ? s_data : '0;
  end

  for (genvar i = 1; i < NT; i++) begin : g_tap
    delay_line #(.DW(DW), .DELAY(OFS[i] - OFS[i-1])) u_dl (
      .clk(clk), .rst(rst), .en(shift), .d(taps[i-1]), .q(taps[i])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      k    <= '0;
      pend <= 1'b0;
    end else if (frame_end) begin
      k    <= '0;
      pend <= 1'b0;
    end else if (shift) begin
      k    <= k + 1;
      pend <= (k + 1 > 32'(C));
    end else if (take) begin
      pend <= 1'b0;
    end
  end

  // position of the centre element
  always_ff @(posedge clk) begin
    if (rst) begin
      cx <= '0; cy <= '0; cz <= '0;
    end else if (take) begin
      if (cx == 32'(GRID_W - 1)) begin
        cx <= '0;
        if (cy == 32'(GRID_H - 1)) begin
          cy <= '0;
          cz <= (cz == 32'(GRID_D - 1)) ? '0 : cz + 1;
        end else begin
          cy <= cy + 1;
        end
      end else begin
        cx <= cx + 1;
      end
    end
  end

  assign border = (cx == 0) || (cx == 32'(GRID_W - 1)) ||
                  (cy == 0) || (cy == 32'(GRID_H - 1)) ||
                  ((GRID_D > 1) && ((cz == 0) || (cz == 32'(GRID_D - 1))));

  assert property (@(posedge clk) disable iff (rst) take |-> pend);
endmodule
