// tb_sst_jacobi2d: self-checking testbench for sst_jacobi2d.
//
// Streams 5 random frames of a 9x7 grid through the SST and compares
// every output word with the reference model in tb_ref_pkg (one time-step per
// frame, computed with independent double-precision arithmetic rounded to
// binary32).  Frames 0 and 1 are sent with random input bubbles and random
// output back-pressure; the remaining frames are sent back to back at full
// rate, and the input side is checked to spend exactly N + C + 1 cycles per
// frame (N elements, C flush cycles, one end-of-frame cycle).
module tb_sst_jacobi2d;
  import tb_ref_pkg::*;

  localparam int W  = 9;
  localparam int H  = 7;
  localparam int D  = 1;
  localparam int N  = W * H * D;
  localparam int C  = W;
  localparam int FR = 5;

  logic  clk = 1'b0, rst = 1'b1;
  logic  s_valid, s_ready, m_valid, m_ready;
  word_t s_data, m_data;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  sst_jacobi2d #(.GRID_W(W), .GRID_H(H)) dut (
    .clk, .rst, .s_valid, .s_ready, .s_data, .m_valid, .m_ready, .m_data);

  word_t in_q [$];
  word_t exp_q[$];
  int    n_out = 0;
  logic  calm  = 1'b0;   // full-rate phase
  int    frame_start[FR];

  initial begin
    for (int f = 0; f < FR; f++) begin
      word_t g[];
      g = new[N];
      for (int i = 0; i < N; i++) g[i] = rand_f();
      foreach (g[i]) in_q.push_back(g[i]);
      step(0, W, H, D, g);
      foreach (g[i]) exp_q.push_back(g[i]);
    end
  end

  // driver
  int sent = 0;
  int cyc  = 0;
  always_ff @(posedge clk) begin
    int idx;
    cyc <= cyc + 1;
    if (rst) begin
      s_valid <= 1'b0;
      s_data  <= '0;
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
    end
  end
  initial begin
    repeat (4) @(posedge clk);
    rst <= 1'b0;
  end

  // sink
  always_ff @(posedge clk) begin
    m_ready <= calm || ($urandom % 3 != 0);
    if (!rst && m_valid && m_ready) begin
      checks++;
      if (m_data !== exp_q[n_out]) begin
        failures++;
        if (failures < 10)
          $display("mismatch at word %0d (frame %0d): got %h expected %h",
                   n_out, n_out / N, m_data, exp_q[n_out]);
      end
      n_out++;
    end
  end

  initial begin
    m_ready = 1'b0;
    wait (n_out == FR * N);
    repeat (5) @(posedge clk);
    // frame-rate check on the full-rate frames
    for (int f = 3; f < FR; f++) begin
      checks++;
      if (frame_start[f] - frame_start[f-1] != N + C + 1) begin
        failures++;
        $display("frame %0d took %0d input cycles, expected %0d", f - 1,
                 frame_start[f] - frame_start[f-1], N + C + 1);
      end
    end
    checks++;
    if (m_valid) begin
      failures++;
      $display("extra output after the last frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * FR * N + 2000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d words received", n_out, FR * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
