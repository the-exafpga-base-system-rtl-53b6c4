// tb_aurora_link_ctrl: self-checking testbench for aurora_link_ctrl.
//
// A small channel model raises CHANNEL_UP a fixed number of cycles after the
// controller releases RESET_PB, as long as the "cable" is connected.  The
// test checks the reset sequence and its cycle counts, that a short
// CHANNEL_UP glitch is filtered, that a real drop restarts the sequence and
// is counted, and that a link that never comes up is retried after the
// timeout and recovers once the cable is back.
module tb_aurora_link_ctrl;
  localparam int PMA = 10, RPB = 5, TMO = 60, FLT = 4, UPDLY = 7;

  logic        clk = 1'b0, rst = 1'b1;
  logic        channel_up, pma_init, reset_pb, link_up;
  logic [15:0] recoveries;
  int          checks = 0, failures = 0;
  logic        cable = 1'b1, glitch = 1'b0;
  int          since_rel = 0;

  always #5 clk = ~clk;

  aurora_link_ctrl #(.PMA_INIT_CYCLES(PMA), .RESET_PB_CYCLES(RPB),
                     .UP_TIMEOUT(TMO), .DOWN_FILTER(FLT)) dut (
    .clk, .rst, .channel_up, .pma_init, .reset_pb, .link_up, .recoveries);

  // channel model
  always_ff @(posedge clk) begin
    if (reset_pb) since_rel <= 0;
    else if (since_rel < 1000) since_rel <= since_rel + 1;
  end
  assign channel_up = cable && !glitch && !reset_pb && (since_rel >= UPDLY);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  int n_pma, n_rpb, n_wait;

  // measure one reset sequence starting in the cycle pma_init is high
  task automatic measure_sequence();
    n_pma = 0; n_rpb = 0; n_wait = 0;
    while (pma_init) begin
      check(reset_pb, "reset_pb high while pma_init high");
      n_pma++; @(posedge clk); #1;
    end
    while (reset_pb) begin n_rpb++; @(posedge clk); #1; end
    while (!link_up && n_wait < 5 * TMO) begin n_wait++; @(posedge clk); #1; end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    #0;
    measure_sequence();
    check(n_pma == PMA, $sformatf("pma_init held %0d cycles, expected %0d", n_pma, PMA));
    check(n_rpb == RPB, $sformatf("reset_pb held %0d more cycles, expected %0d", n_rpb, RPB));
    check(n_wait == UPDLY + 1, $sformatf("link_up after %0d cycles, expected %0d", n_wait, UPDLY + 1));
    check(recoveries == 0, "no recovery at power-up");

    // short glitch: filtered
    repeat (10) @(posedge clk);
    #1 glitch = 1'b1;
    repeat (FLT - 1) @(posedge clk);
    #1 glitch = 1'b0;
    repeat (5) @(posedge clk);
    #1;
    check(link_up && !pma_init && recoveries == 0, "short glitch must be filtered");

    // real drop: recovery
    glitch = 1'b1;
    repeat (FLT) @(posedge clk);
    #1 glitch = 1'b0;
    check(!link_up && pma_init, "drop of FLT cycles restarts the sequence");
    check(recoveries == 1, "recovery counted");
    measure_sequence();
    check(n_pma == PMA && n_rpb == RPB && link_up, "link back up after recovery");

    // cable pulled: timeouts until it is back
    #1 cable = 1'b0;
    repeat (FLT + 1) @(posedge clk);
    #1;
    check(recoveries == 2, "cable pull detected");
    repeat (3 * (PMA + RPB + TMO)) @(posedge clk);
    #1;
    check(recoveries >= 4, $sformatf("retries after timeout (%0d recoveries)", recoveries));
    check(!link_up, "no link without cable");
    cable = 1'b1;
    repeat (2 * (PMA + RPB + TMO)) @(posedge clk);
    #1;
    check(link_up, "link recovers when the cable is back");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
