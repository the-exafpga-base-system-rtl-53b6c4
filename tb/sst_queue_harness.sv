// sst_queue_harness: drives one sst_queue with random frames and checks its
// output against NSST reference time-steps per frame (tb_ref_pkg).  Frames 0
// and 1 go with random bubbles and back-pressure, the rest at full rate, for
// which the input period is checked to be N + C + 1 cycles per frame.
module sst_queue_harness
  import tb_ref_pkg::*;
#(
  parameter exafpga_pkg::kernel_e KERNEL = exafpga_pkg::K_JACOBI2D,
  parameter int W = 8, parameter int H = 6, parameter int D = 1,
  parameter int C = 8, parameter int NSST = 2, parameter int FR = 5
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int N = W * H * D;

  logic  s_valid, s_ready, m_valid, m_ready;
  word_t s_data, m_data;

  sst_queue #(.N_SST(NSST), .KERNEL(KERNEL), .GRID_W(W), .GRID_H(H), .GRID_D(D)) dut (
    .clk, .rst, .s_valid, .s_ready, .s_data, .m_valid, .m_ready, .m_data);

  word_t in_q [$];
  word_t exp_q[$];
  int    n_out = 0, sent = 0, cyc = 0;
  logic  calm = 1'b0;
  int    frame_start[FR];

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    for (int f = 0; f < FR; f++) begin
      word_t g[];
      g = new[N];
      for (int i = 0; i < N; i++) g[i] = (KERNEL == exafpga_pkg::K_LIFE2D) ? rand_cell() : rand_f();
      foreach (g[i]) in_q.push_back(g[i]);
      for (int s = 0; s < NSST; s++) step(int'(KERNEL), W, H, D, g);
      foreach (g[i]) exp_q.push_back(g[i]);
    end
  end

  always_ff @(posedge clk) begin
    int idx;
    cyc <= cyc + 1;
    if (rst) begin
      s_valid <= 1'b0;
      s_data  <= '0;
      m_ready <= 1'b0;
    end else begin
      idx = sent;
      if (s_valid && s_ready) begin
        if (sent % N == 0) frame_start[sent / N] = cyc;
        idx = sent + 1;
        sent <= idx;
      end
      calm    <= (idx >= 2 * N);
      s_valid <= (idx < FR * N) && ((idx >= 2 * N) || ($urandom % 4 != 0));
      s_data  <= (idx < FR * N) ? in_q[idx] : '0;
      m_ready <= calm || ($urandom % 3 != 0);
      if (m_valid && m_ready) begin
        checks++;
        if (m_data !== exp_q[n_out]) begin
          failures++;
          if (failures < 6)
            $display("kernel %0d: mismatch at word %0d: got %h expected %h",
                     int'(KERNEL), n_out, m_data, exp_q[n_out]);
        end
        n_out++;
      end
      if (n_out == FR * N && !done) begin
        for (int f = 3; f < FR; f++) begin
          checks++;
          if (frame_start[f] - frame_start[f-1] != N + C + 1) begin
            failures++;
            $display("kernel %0d: frame period %0d, expected %0d", int'(KERNEL),
                     frame_start[f] - frame_start[f-1], N + C + 1);
          end
        end
        done <= 1'b1;
      end
    end
  end
endmodule
