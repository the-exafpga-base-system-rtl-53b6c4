// tb_sst_queue: self-checking testbench for sst_queue.
//
// One queue of each kernel type (two or three SSTs each, small grids) is fed
// random frames; every output word is compared with the reference model
// applied once per SST, and the full-rate frame period is checked.
module tb_sst_queue;
  import exafpga_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic done [5];
  int   chk  [5];
  int   fl   [5];
  int   checks, failures;

  always #5 clk = ~clk;

  sst_queue_harness #(.KERNEL(K_JACOBI2D), .W(9),  .H(7), .D(1), .C(9),  .NSST(3)) h0 (
    .clk, .rst, .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  sst_queue_harness #(.KERNEL(K_SEIDEL2D), .W(9),  .H(7), .D(1), .C(10), .NSST(2)) h1 (
    .clk, .rst, .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  sst_queue_harness #(.KERNEL(K_LIFE2D),   .W(10), .H(8), .D(1), .C(11), .NSST(3)) h2 (
    .clk, .rst, .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  sst_queue_harness #(.KERNEL(K_JACOBI3D), .W(6),  .H(5), .D(4), .C(30), .NSST(2)) h3 (
    .clk, .rst, .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  sst_queue_harness #(.KERNEL(K_HEAT3D),   .W(6),  .H(5), .D(4), .C(30), .NSST(2)) h4 (
    .clk, .rst, .done(done[4]), .checks(chk[4]), .failures(fl[4]));

  initial begin
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    repeat (3) @(posedge clk);
    checks = 0; failures = 0;
    for (int i = 0; i < 5; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    checks = 0; failures = 1;
    for (int i = 0; i < 5; i++) begin
      checks += chk[i];
      failures += fl[i];
    end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
