// sst_queue: a chain of N_SST Streaming Stencil Time-steps on one board.
//
// Each SST applies one time-step of the selected stencil kernel to the grid
// stream, so a frame leaving the queue has advanced N_SST time-steps.  The SSTs
// are joined output to input by valid/ready; since every SST registers its
// ready, the chain has no long combinational path and runs at one element per
// cycle.  KERNEL selects the SST type (one type per queue).
//
// Interface: valid/ready word stream in and out, raster order.  Timing: the
// first element of a frame leaves about N_SST * (C + 2) cycles after it
// entered, C being the window delay of the kernel (W+1 for the 2D kernels
// with a 3x3 window, W for Jacobi-2D, W*H for the 3D ones).
module sst_queue
  import exafpga_pkg::*;
#(
  parameter int      N_SST  = 36,
  parameter kernel_e KERNEL = K_JACOBI2D,
  parameter int      GRID_W = 1000,
  parameter int      GRID_H = 1000,
  parameter int      GRID_D = 1
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
  logic  v [N_SST+1];
  logic  r [N_SST+1];
  word_t d [N_SST+1];

  assign v[0]    = s_valid;
  assign d[0]    = s_data;
  assign s_ready = r[0];
  assign m_valid = v[N_SST];
  assign m_data  = d[N_SST];
  assign r[N_SST] = m_ready;

  for (genvar i = 0; i < N_SST; i++) begin : g_sst
    if (KERNEL == K_JACOBI2D) begin : g_k
      sst_jacobi2d #(.GRID_W(GRID_W), .GRID_H(GRID_H)) u_sst (
        .clk, .rst, .s_valid(v[i]), .s_ready(r[i]), .s_data(d[i]),
        .m_valid(v[i+1]), .m_ready(r[i+1]), .m_data(d[i+1]));
    end else if (KERNEL == K_SEIDEL2D) begin : g_k
      sst_seidel2d #(.GRID_W(GRID_W), .GRID_H(GRID_H)) u_sst (
        .clk, .rst, .s_valid(v[i]), .s_ready(r[i]), .s_data(d[i]),
        .m_valid(v[i+1]), .m_ready(r[i+1]), .m_data(d[i+1]));
    end else if (KERNEL == K_LIFE2D) begin : g_k
      sst_life2d #(.GRID_W(GRID_W), .GRID_H(GRID_H)) u_sst (
        .clk, .rst, .s_valid(v[i]), .s_ready(r[i]), .s_data(d[i]),
        .m_valid(v[i+1]), .m_ready(r[i+1]), .m_data(d[i+1]));
    end else if (KERNEL == K_JACOBI3D) begin : g_k
      sst_jacobi3d #(.GRID_W(GRID_W), .GRID_H(GRID_H), .GRID_D(GRID_D)) u_sst (
        .clk, .rst, .s_valid(v[i]), .s_ready(r[i]), .s_data(d[i]),
        .m_valid(v[i+1]), .m_ready(r[i+1]), .m_data(d[i+1]));
    end else begin : g_k
      sst_heat3d #(.GRID_W(GRID_W), .GRID_H(GRID_H), .GRID_D(GRID_D)) u_sst (
        .clk, .rst, .s_valid(v[i]), .s_ready(r[i]), .s_data(d[i]),
        .m_valid(v[i+1]), .m_ready(r[i+1]), .m_data(d[i+1]));
    end
  end
endmodule
