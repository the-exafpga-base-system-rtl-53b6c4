// aurora_link_model: behavioural model of one board-to-board Aurora 64B/66B
// link (two cores and the cable) for simulation.
//
// Both ends' CHANNEL_UP rise UP_DELAY cycles after both ends have released
// RESET_PB, provided the cable is intact (`fail` low); `fail` drops the
// channel at once and empties the link.  While up, words offered on the TX
// stream are accepted at most one every RATE_DIV cycles and while fewer than
// DEPTH words are in flight, and appear on the RX stream LATENCY cycles later
// (the RX side honours rx_ready, as with native flow control).  Not
// synthesizable; stands in for the vendor cores in testbenches.
module aurora_link_model #(
  parameter int UP_DELAY = 20,
  parameter int LATENCY  = 12,
  parameter int RATE_DIV = 2,
  parameter int DEPTH    = 32
) (
  input  logic        clk,
  input  logic        fail,
  input  logic        tx_reset_pb,
  input  logic        rx_reset_pb,
  output logic        tx_channel_up,
  output logic        rx_channel_up,
  input  logic        tx_valid,
  output logic        tx_ready,
  input  logic [31:0] tx_data,
  output logic        rx_valid,
  input  logic        rx_ready,
  output logic [31:0] rx_data
);
  int          up_cnt = 0;
  int          rate_cnt = 0;
  longint      now = 0;
  logic [31:0] q_data [DEPTH];
  longint      q_time [DEPTH];
  int          wp = 0, rp = 0, cnt = 0;
  logic        up, push, pop;

  assign up            = (up_cnt >= UP_DELAY) && !fail;
  assign tx_channel_up = up;
  assign rx_channel_up = up;
  assign tx_ready      = up && (rate_cnt == 0) && (cnt < DEPTH);
  assign rx_valid      = up && (cnt > 0) && (q_time[rp] <= now);
  assign rx_data       = q_data[rp];
  assign push          = tx_valid && tx_ready;
  assign pop           = rx_valid && rx_ready;

  always @(posedge clk) begin
    now <= now + 1;
    if (fail || tx_reset_pb || rx_reset_pb) up_cnt <= 0;
    else if (up_cnt < UP_DELAY) up_cnt <= up_cnt + 1;
    if (!up) begin
      wp <= 0; rp <= 0; cnt <= 0;
      rate_cnt <= 0;
    end else begin
      if (push) begin
        q_data[wp] <= tx_data;
        q_time[wp] <= now + LATENCY;
        wp         <= (wp + 1) % DEPTH;
        rate_cnt   <= RATE_DIV - 1;
      end else if (rate_cnt != 0) begin
        rate_cnt <= rate_cnt - 1;
      end
      if (pop) rp <= (rp + 1) % DEPTH;
      cnt <= cnt + int'(push) - int'(pop);
    end
  end
endmodule
