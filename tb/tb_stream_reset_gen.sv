// tb_stream_reset_gen: self-checking testbench for stream_reset_gen.
//
// Two links: checks that the stream reset is held while either link is down
// and released exactly HOLD + 2 cycles after the last link comes up (two
// synchroniser stages plus the hold count), and re-asserted two cycles after
// a link drops.
module tb_stream_reset_gen;
  localparam int HOLD = 6;

  logic       clk = 1'b0, rst = 1'b1;
  logic [1:0] links_up = 2'b00;
  logic       stream_rst;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  stream_reset_gen #(.N_LINKS(2), .HOLD_CYCLES(HOLD)) dut (.clk, .rst, .links_up, .stream_rst);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask


  int n;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (20) begin
      @(posedge clk); #1;
      check(stream_rst, "reset while no link is up");
    end
    links_up = 2'b01;
    repeat (20) begin
      @(posedge clk); #1;
      check(stream_rst, "reset while one link is down");
    end
    links_up = 2'b11;
    n = 0;
    while (stream_rst && n < 100) begin @(posedge clk); #1; n++; end
    check(n == HOLD + 3, $sformatf("released after %0d cycles, expected %0d", n, HOLD + 3));
    repeat (10) begin
      @(posedge clk); #1;
      check(!stream_rst, "no reset while both links are up");
    end
    links_up = 2'b10;
    n = 0;
    while (!stream_rst && n < 100) begin @(posedge clk); #1; n++; end
    check(n == 3, $sformatf("re-asserted after %0d cycles, expected 3", n));
    links_up = 2'b11;
    n = 0;
    while (stream_rst && n < 100) begin @(posedge clk); #1; n++; end
    check(n == HOLD + 3, "released again after the hold time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
