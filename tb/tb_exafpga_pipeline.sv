// tb_exafpga_pipeline: end-to-end testbench of the board chain.
//
// Three boards (first, intermediate, last) with two SSTs each, joined by two
// Aurora link models that accept one word every second cycle (the serial
// link is the slowest stage, as in the measured system).  The host source
// sends frames with random gaps, the host sink applies random back-pressure;
// every word returned to the host is checked against six reference Jacobi-2D
// time-steps.  Then the link between boards 1 and 2 is broken: both boards
// must drop into reset, the link controllers must recover the link, and new
// frames must again come back correct.  Each mechanism is counted and must
// occur at least once: stream reset held until link-up, host input gaps,
// host output back-pressure, link back-pressure, end-of-frame flush, link
// recovery.
module tb_exafpga_pipeline;
  import tb_ref_pkg::*;
  import exafpga_pkg::K_JACOBI2D;

  localparam int NB = 3, NS = 2, W = 8, H = 6, N = W * H, NL = NB - 1;

  logic        clk = 1'b0, rst = 1'b1;
  int          checks = 0, failures = 0;

  logic        host_in_valid, host_in_ready, host_out_valid, host_out_ready;
  word_t       host_in_data, host_out_data;
  logic        link_tx_valid [NL], link_tx_ready [NL], link_rx_valid [NL], link_rx_ready [NL];
  word_t       link_tx_data [NL], link_rx_data [NL];
  logic        link_tx_pma_init [NL], link_tx_reset_pb [NL], link_tx_channel_up [NL];
  logic        link_rx_pma_init [NL], link_rx_reset_pb [NL], link_rx_channel_up [NL];
  logic [15:0] link_tx_recoveries [NL], link_rx_recoveries [NL];
  logic        board_stream_rst [NB];
  logic        link_fail [NL];

  always #5 clk = ~clk;

  exafpga_pipeline #(
    .NUM_BOARDS(NB), .SSTS_PER_BOARD(NS), .KERNEL(K_JACOBI2D),
    .GRID_W(W), .GRID_H(H), .GRID_D(1),
    .PMA_INIT_CYCLES(8), .RESET_PB_CYCLES(4), .UP_TIMEOUT(300), .DOWN_FILTER(4),
    .HOLD_CYCLES(4)
  ) dut (.*);

  for (genvar l = 0; l < NL; l++) begin : g_link
    aurora_link_model #(.UP_DELAY(15 + 10 * l), .LATENCY(6), .RATE_DIV(2)) u_link (
      .clk, .fail(link_fail[l]),
      .tx_reset_pb(link_tx_reset_pb[l]), .rx_reset_pb(link_rx_reset_pb[l]),
      .tx_channel_up(link_tx_channel_up[l]), .rx_channel_up(link_rx_channel_up[l]),
      .tx_valid(link_tx_valid[l]), .tx_ready(link_tx_ready[l]), .tx_data(link_tx_data[l]),
      .rx_valid(link_rx_valid[l]), .rx_ready(link_rx_ready[l]), .rx_data(link_rx_data[l]));
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // host source with random gaps
  word_t src_q[$], exp_q[$];
  int    sent = 0, n_got = 0;
  always_ff @(posedge clk) begin
    int idx;
    if (rst) begin
      host_in_valid <= 1'b0;
      host_in_data  <= '0;
    end else begin
      idx = sent;
      if (host_in_valid && host_in_ready) begin
        idx = sent + 1;
        sent <= idx;
      end
      host_in_valid <= (idx < src_q.size()) && ($urandom % 5 != 0);
      host_in_data  <= (idx < src_q.size()) ? src_q[idx] : '0;
    end
  end

  // host sink with random back-pressure
  always_ff @(posedge clk) begin
    host_out_ready <= ($urandom % 4 != 0);
    if (host_out_valid && host_out_ready) begin
      checks++;
      if (n_got >= exp_q.size() || host_out_data !== exp_q[n_got]) begin
        failures++;
        if (failures < 8) $display("mismatch at word %0d: got %h", n_got, host_out_data);
      end
      n_got++;
    end
  end

  // mechanism counters
  int c_rst_hold = 0, c_in_gap = 0, c_out_stall = 0, c_link_stall = 0, c_flush = 0;
  always_ff @(posedge clk) begin
    if (!rst) begin
      if (board_stream_rst[0] || board_stream_rst[NB-1]) c_rst_hold <= c_rst_hold + 1;
      if (!host_in_valid && sent < src_q.size() && !board_stream_rst[0]) c_in_gap <= c_in_gap + 1;
      if (host_out_valid && !host_out_ready) c_out_stall <= c_out_stall + 1;
      for (int l = 0; l < NL; l++)
        if (link_tx_valid[l] && !link_tx_ready[l]) c_link_stall <= c_link_stall + 1;
      // first SST of board 0 closing a frame: input offered but refused
      if (host_in_valid && !host_in_ready && !board_stream_rst[0] &&
          dut.g_board[0].u_bb.u_queue.g_sst[0].g_k.u_sst.u_win.k >= N)
        c_flush <= c_flush + 1;
    end
  end

  task automatic send_frames(input int nf);
    word_t g[], r[];
    for (int f = 0; f < nf; f++) begin
      g = new[N];
      r = new[N];
      for (int i = 0; i < N; i++) begin
        g[i] = rand_f();
        r[i] = g[i];
      end
      for (int s = 0; s < NB * NS; s++) step(0, W, H, 1, r);
      foreach (r[i]) exp_q.push_back(r[i]);
      foreach (g[i]) src_q.push_back(g[i]);
    end
  endtask

  initial begin
    int t;
    foreach (link_fail[l]) link_fail[l] = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    send_frames(4);
    wait (n_got == exp_q.size());
    check(n_got == 4 * N, "four frames returned");
    check(host_in_valid == 1'b0 && sent == 4 * N, "all input consumed");

    // break the link between boards 1 and 2
    repeat (10) @(posedge clk);
    link_fail[1] <= 1'b1;
    repeat (30) @(posedge clk);
    check(board_stream_rst[1] && board_stream_rst[2], "boards on the broken link in reset");
    check(!board_stream_rst[0], "board 0 unaffected");
    check(link_tx_recoveries[1] >= 1 && link_rx_recoveries[1] >= 1, "failure seen at both ends");
    check(link_tx_recoveries[0] == 0 && link_rx_recoveries[0] == 0, "other link untouched");
    link_fail[1] <= 1'b0;
    t = 0;
    while ((board_stream_rst[1] || board_stream_rst[2]) && t < 3000) begin
      @(posedge clk); t++;
    end
    check(!board_stream_rst[1] && !board_stream_rst[2], "boards back after recovery");

    send_frames(2);
    wait (n_got == exp_q.size());
    check(n_got == 6 * N, "two more frames after recovery");

    check(c_rst_hold > 0,   $sformatf("stream reset held until link-up: %0d cycles", c_rst_hold));
    check(c_in_gap > 0,     $sformatf("host input gaps: %0d", c_in_gap));
    check(c_out_stall > 0,  $sformatf("host output back-pressure: %0d", c_out_stall));
    check(c_link_stall > 0, $sformatf("link back-pressure: %0d", c_link_stall));
    check(c_flush > 0,      $sformatf("end-of-frame flush refusals: %0d", c_flush));
    $display("mechanisms: reset-hold %0d, input gaps %0d, output stalls %0d, link stalls %0d, flush %0d, recoveries %0d/%0d",
             c_rst_hold, c_in_gap, c_out_stall, c_link_stall, c_flush,
             link_tx_recoveries[1], link_rx_recoveries[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
