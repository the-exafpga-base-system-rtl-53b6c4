// tb_basic_block: self-checking testbench for basic_block in the role of an
// intermediate board (Aurora link in and out).
//
// Two link models connect the board to the testbench.  Checks: the SST queue
// is held in reset (input not ready) until both links are up; frames crossing
// the board advance N_SST Jacobi-2D time-steps; a failure of the output link
// puts the board back into reset, is counted by the link controller and, once
// the link has recovered, frames are processed correctly again.
module tb_basic_block;
  import tb_ref_pkg::*;
  import exafpga_pkg::K_JACOBI2D;

  localparam int W = 8, H = 6, N = W * H, NSST = 2;

  logic        clk = 1'b0, rst = 1'b1;
  int          checks = 0, failures = 0;
  logic        up_fail = 1'b0, dn_fail = 1'b0;
  logic        up_cu, dn_cu, up_pma, up_rpb, dn_pma, dn_rpb, stream_rst;
  logic [15:0] up_rec, dn_rec;
  logic        up_cu_far, dn_cu_far;
  // testbench -> up link -> board -> dn link -> testbench
  logic        src_valid, src_ready;
  word_t       src_data;
  logic        s_valid, s_ready, m_valid, m_ready;
  word_t       s_data, m_data;
  logic        snk_valid, snk_ready = 1'b0;
  word_t       snk_data;

  always #5 clk = ~clk;

  aurora_link_model #(.UP_DELAY(10), .LATENCY(5), .RATE_DIV(1)) u_up (
    .clk, .fail(up_fail), .tx_reset_pb(1'b0), .rx_reset_pb(up_rpb),
    .tx_channel_up(up_cu_far), .rx_channel_up(up_cu),
    .tx_valid(src_valid), .tx_ready(src_ready), .tx_data(src_data),
    .rx_valid(s_valid), .rx_ready(s_ready), .rx_data(s_data));

  basic_block #(
    .HAS_UP_LINK(1'b1), .HAS_DN_LINK(1'b1), .N_SST(NSST), .KERNEL(K_JACOBI2D),
    .GRID_W(W), .GRID_H(H), .GRID_D(1),
    .PMA_INIT_CYCLES(8), .RESET_PB_CYCLES(4), .UP_TIMEOUT(200), .DOWN_FILTER(4),
    .HOLD_CYCLES(4)
  ) dut (
    .clk, .rst,
    .up_channel_up(up_cu), .up_pma_init(up_pma), .up_reset_pb(up_rpb), .up_recoveries(up_rec),
    .dn_channel_up(dn_cu), .dn_pma_init(dn_pma), .dn_reset_pb(dn_rpb), .dn_recoveries(dn_rec),
    .stream_rst,
    .s_valid, .s_ready, .s_data, .m_valid, .m_ready, .m_data);

  aurora_link_model #(.UP_DELAY(10), .LATENCY(5), .RATE_DIV(1)) u_dn (
    .clk, .fail(dn_fail), .tx_reset_pb(dn_rpb), .rx_reset_pb(1'b0),
    .tx_channel_up(dn_cu), .rx_channel_up(dn_cu_far),
    .tx_valid(m_valid), .tx_ready(m_ready), .tx_data(m_data),
    .rx_valid(snk_valid), .rx_ready(snk_ready), .rx_data(snk_data));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  word_t exp_q[$];
  int    n_got = 0;

  // sink: random back-pressure, compare against exp_q
  always_ff @(posedge clk) begin
    snk_ready <= ($urandom % 4 != 0);
    if (snk_valid && snk_ready) begin
      checks++;
      if (exp_q.size() == 0 || snk_data !== exp_q[0]) begin
        failures++;
        if (failures < 8) $display("mismatch %0d: got %h exp %h (left %0d)", n_got, snk_data, exp_q.size() ? exp_q[0] : 0, exp_q.size());
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      n_got++;
    end
  end

  // source: sends src_q[sent..] in order
  word_t src_q[$];
  int    sent = 0;
  always_ff @(posedge clk) begin
    int idx;
    idx = sent;
    if (src_valid && src_ready) begin
      idx = sent + 1;
      sent <= idx;
    end
    src_valid <= (idx < src_q.size());
    src_data  <= (idx < src_q.size()) ? src_q[idx] : '0;
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
      for (int s = 0; s < NSST; s++) step(0, W, H, 1, r);
      foreach (r[i]) exp_q.push_back(r[i]);
      foreach (g[i]) src_q.push_back(g[i]);
    end
    wait (sent == src_q.size());
  endtask

  initial begin
    int t;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // before the links are up: queue held in reset
    t = 0;
    while (stream_rst && t < 1000) begin
      @(posedge clk);
      t++;
      if (t == 5) check(!s_ready && !m_valid, "queue idle while links are down");
    end
    check(!stream_rst, "stream reset released after link-up");
    check(t > 8 + 4 + 10, $sformatf("reset released only after link-up (%0d cycles)", t));
    check(up_cu && dn_cu, "both links up");

    send_frames(2);
    wait (exp_q.size() == 0);
    check(n_got == 2 * N, "two frames received");

    // output link failure: board resets, controller recovers the link
    repeat (5) @(posedge clk);
    dn_fail <= 1'b1;
    repeat (20) @(posedge clk);
    check(stream_rst, "stream reset while output link is down");
    check(dn_rec == 16'd1 && up_rec == 16'd0, "failure counted on the output link only");
    dn_fail <= 1'b0;
    t = 0;
    while (stream_rst && t < 2000) begin @(posedge clk); t++; end
    check(!stream_rst, "board back after link recovery");

    send_frames(2);
    wait (exp_q.size() == 0);
    check(n_got == 4 * N, "two more frames received after recovery");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
