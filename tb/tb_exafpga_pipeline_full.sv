// tb_exafpga_pipeline_full: the board chain at its default size.
//
// exafpga_pipeline with all parameters at their defaults: two boards with 36
// Jacobi-2D SSTs each (72 time-steps) on a 1000 x 1000 binary32 grid, joined
// by one Aurora link model that takes a word every second cycle.  One random
// frame is sent from the host and the returned frame is compared word for word
// with 72 reference time-steps.  The cycle count of the frame is reported and
// checked against the link-limited bound of about 2 cycles per element.
module tb_exafpga_pipeline_full;
  import tb_ref_pkg::*;

  localparam int W = 1000, H = 1000, N = W * H, STEPS = 72;

  logic        clk = 1'b0, rst = 1'b1;
  int          checks = 0, failures = 0;

  logic        host_in_valid, host_in_ready, host_out_valid, host_out_ready;
  word_t       host_in_data, host_out_data;
  logic        link_tx_valid [1], link_tx_ready [1], link_rx_valid [1], link_rx_ready [1];
  word_t       link_tx_data [1], link_rx_data [1];
  logic        link_tx_pma_init [1], link_tx_reset_pb [1], link_tx_channel_up [1];
  logic        link_rx_pma_init [1], link_rx_reset_pb [1], link_rx_channel_up [1];
  logic [15:0] link_tx_recoveries [1], link_rx_recoveries [1];
  logic        board_stream_rst [2];

  always #5 clk = ~clk;

  exafpga_pipeline dut (.*);

  aurora_link_model #(.UP_DELAY(20), .LATENCY(8), .RATE_DIV(2)) u_link (
    .clk, .fail(1'b0),
    .tx_reset_pb(link_tx_reset_pb[0]), .rx_reset_pb(link_rx_reset_pb[0]),
    .tx_channel_up(link_tx_channel_up[0]), .rx_channel_up(link_rx_channel_up[0]),
    .tx_valid(link_tx_valid[0]), .tx_ready(link_tx_ready[0]), .tx_data(link_tx_data[0]),
    .rx_valid(link_rx_valid[0]), .rx_ready(link_rx_ready[0]), .rx_data(link_rx_data[0]));

  word_t src[], expd[];
  int    sent = 0, n_got = 0;
  longint cyc = 0, t_first = -1, t_last = -1;
  bit    ready_to_go = 1'b0;

  initial begin
    src  = new[N];
    expd = new[N];
    for (int i = 0; i < N; i++) begin
      src[i]  = rand_f();
      expd[i] = src[i];
    end
    for (int s = 0; s < STEPS; s++) step(0, W, H, 1, expd);
    ready_to_go = 1'b1;
  end

  always_ff @(posedge clk) begin
    int idx;
    cyc <= cyc + 1;
    if (rst || !ready_to_go) begin
      host_in_valid  <= 1'b0;
      host_in_data   <= '0;
      host_out_ready <= 1'b0;
    end else begin
      idx = sent;
      if (host_in_valid && host_in_ready) begin
        if (sent == 0) t_first <= cyc;
        idx = sent + 1;
        sent <= idx;
      end
      host_in_valid  <= (idx < N);
      host_in_data   <= (idx < N) ? src[idx] : '0;
      host_out_ready <= 1'b1;
      if (host_out_valid && host_out_ready) begin
        checks++;
        if (host_out_data !== expd[n_got]) begin
          failures++;
          if (failures < 8) $display("mismatch at word %0d: got %h expected %h",
                                     n_got, host_out_data, expd[n_got]);
        end
        if (n_got == N - 1) t_last <= cyc;
        n_got++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (n_got == N);
    repeat (3) @(posedge clk);
    $display("frame of %0d elements through %0d SSTs in %0d cycles", N, STEPS, t_last - t_first);
    checks++;
    if (t_last - t_first > 2 * N + 200000 || t_last - t_first < 2 * N - 10) begin
      failures++;
      $display("frame time outside the link-limited bound");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d words received", n_got, N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
