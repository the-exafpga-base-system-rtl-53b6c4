// aurora_link_ctrl: initialisation and recovery controller for one Aurora
// 64B/66B serial link.
//
// The Aurora core offers a transceiver reset (PMA_INIT) and a core reset
// (RESET_PB) and reports CHANNEL_UP once lane alignment and channel bonding
// are done.  This FSM drives the power-on sequence: PMA_INIT and RESET_PB
// both asserted for PMA_INIT_CYCLES, PMA_INIT released first, RESET_PB
// released RESET_PB_CYCLES later, then it waits for CHANNEL_UP.  When the
// link is up it watches CHANNEL_UP: if it stays low for DOWN_FILTER cycles
// (a cable pulled, loss of lock) or the channel does not come up within
// UP_TIMEOUT cycles of releasing the resets, the whole sequence is run again
// and `recoveries` is incremented.  `link_up` is high only in the UP state.
//
// Timing: all inputs are sampled on `clk` (CHANNEL_UP is assumed to be
// synchronous to it); outputs are registered state decodes.  That the
// controller initialises the core and recovers a failed link is the design
// requirement; the states, reset order and all cycle counts are this
// design's choices following the usual Aurora reset sequence.
module aurora_link_ctrl #(
  parameter int PMA_INIT_CYCLES = 128,
  parameter int RESET_PB_CYCLES = 32,
  parameter int UP_TIMEOUT      = 4096,
  parameter int DOWN_FILTER     = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        channel_up,
  output logic        pma_init,
  output logic        reset_pb,
  output logic        link_up,
  output logic [15:0] recoveries
);
  typedef enum logic [1:0] {
    S_PMA_INIT,   // transceiver and core in reset
    S_RESET_PB,   // transceiver released, core still in reset
    S_WAIT_UP,    // both released, waiting for CHANNEL_UP
    S_UP          // link running
  } state_e;

  state_e      state;
  logic [31:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_PMA_INIT;
      cnt        <= '0;
      recoveries <= '0;
    end else begin
      unique case (state)
        S_PMA_INIT: begin
          if (cnt == 32'(PMA_INIT_CYCLES - 1)) begin
            state <= S_RESET_PB;
            cnt   <= '0;
          end else cnt <= cnt + 1;
        end
        S_RESET_PB: begin
          if (cnt == 32'(RESET_PB_CYCLES - 1)) begin
            state <= S_WAIT_UP;
            cnt   <= '0;
          end else cnt <= cnt + 1;
        end
        S_WAIT_UP: begin
          if (channel_up) begin
            state <= S_UP;
            cnt   <= '0;
          end else if (cnt == 32'(UP_TIMEOUT - 1)) begin
            state      <= S_PMA_INIT;
            cnt        <= '0;
            recoveries <= recoveries + 1;
          end else cnt <= cnt + 1;
        end
        S_UP: begin
          if (channel_up) begin
            cnt <= '0;
          end else if (cnt == 32'(DOWN_FILTER - 1)) begin
            state      <= S_PMA_INIT;
            cnt        <= '0;
            recoveries <= recoveries + 1;
          end else cnt <= cnt + 1;
        end
        default: state <= S_PMA_INIT;
      endcase
    end
  end

  assign pma_init = (state == S_PMA_INIT);
  assign reset_pb = (state == S_PMA_INIT) || (state == S_RESET_PB);
  assign link_up  = (state == S_UP);
endmodule
