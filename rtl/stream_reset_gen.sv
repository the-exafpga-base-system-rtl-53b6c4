// stream_reset_gen: reset for the stream logic behind the Aurora cores.
//
// The Aurora core supplies the user clock of its AXI4-Stream interface but no
// reset for it.  This block makes one: `stream_rst` is high while `rst` is
// high or any of the N_LINKS links is not up, and stays high for HOLD_CYCLES
// more cycles after all links are up, so the SST queue starts from a clean
// state every time the links come (back) up.  The link status inputs pass a
// two-flop synchroniser first because they may come from another clock.
//
// Timing: stream_rst rises two cycles after a link goes down and falls
// HOLD_CYCLES + 2 cycles after the last link comes up.  That such a reset is
// generated is the design requirement; synchroniser and hold time are this
// design's choices.
module stream_reset_gen #(
  parameter int N_LINKS     = 1,
  parameter int HOLD_CYCLES = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [N_LINKS-1:0] links_up,
  output logic               stream_rst
);
  logic [N_LINKS-1:0] sync1, sync2;
  logic [31:0]        cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1      <= '0;
      sync2      <= '0;
      cnt        <= '0;
      stream_rst <= 1'b1;
    end else begin
      sync1 <= links_up;
      sync2 <= sync1;
      if (!(&sync2)) begin
        cnt        <= '0;
        stream_rst <= 1'b1;
      end else if (cnt != 32'(HOLD_CYCLES)) begin
        cnt        <= cnt + 1;
        stream_rst <= 1'b1;
      end else begin
        stream_rst <= 1'b0;
      end
    end
  end
endmodule
