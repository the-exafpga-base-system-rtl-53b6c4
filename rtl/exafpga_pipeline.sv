// exafpga_pipeline: the FPGA side of a cluster node, a chain of NUM_BOARDS
// boards that a grid stream crosses from end to end.
//
// The host sends a grid through the PCIe core of the first board; every board
// passes the stream through its own SST queue (N = SSTS_PER_BOARD time-steps)
// and hands it over an Aurora serial link to the next board; the last board
// returns the stream to the host through its PCIe core.  The whole chain is
// one pipeline of pipelines: once full it delivers one element per cycle and
// the frame has advanced NUM_BOARDS * SSTS_PER_BOARD time-steps.  Only the
// two end boards talk to the host; intermediate boards have two Aurora
// interfaces and no PCIe.
//
// The PCIe core and the Aurora cores are not part of this RTL.  The host
// streams are the host_in_* / host_out_* ports.  Link l joins board l (its
// output, "tx" side) to board l+1 (its input, "rx" side): the TX stream,
// both ends' reset outputs and recovery counters are outputs, both ends'
// CHANNEL_UP and the RX stream are inputs, to be connected to the Aurora
// cores (or to a link model in simulation).  The link arrays have
// NL = max(NUM_BOARDS-1, 1) entries; with one board they are unused.
//
// Timing: one clock for everything in this model (in the boards, the PCIe
// core's clock-domain crossing separates the host clock from the Aurora user
// clock).  The board roles, the chain and the per-board SST queues follow the
// design; the even split of SSTs over the boards is this design's choice.
module exafpga_pipeline
  import exafpga_pkg::*;
#(
  parameter int      NUM_BOARDS     = 2,
  parameter int      SSTS_PER_BOARD = 36,
  parameter kernel_e KERNEL         = K_JACOBI2D,
  parameter int      GRID_W         = 1000,
  parameter int      GRID_H         = 1000,
  parameter int      GRID_D         = 1,
  parameter int      PMA_INIT_CYCLES = 128,
  parameter int      RESET_PB_CYCLES = 32,
  parameter int      UP_TIMEOUT      = 4096,
  parameter int      DOWN_FILTER     = 8,
  parameter int      HOLD_CYCLES     = 16,
  localparam int     NL             = (NUM_BOARDS > 1) ? NUM_BOARDS - 1 : 1
) (
  input  logic        clk,
  input  logic        rst,
  // host -> first board (PCIe core stream)
  input  logic        host_in_valid,
  output logic        host_in_ready,
  input  word_t       host_in_data,
  // last board -> host (PCIe core stream)
  output logic        host_out_valid,
  input  logic        host_out_ready,
  output word_t       host_out_data,
  // board-to-board Aurora links
  output logic        link_tx_valid     [NL],
  input  logic        link_tx_ready     [NL],
  output word_t       link_tx_data      [NL],
  input  logic        link_rx_valid     [NL],
  output logic        link_rx_ready     [NL],
  input  word_t       link_rx_data      [NL],
  output logic        link_tx_pma_init  [NL],
  output logic        link_tx_reset_pb  [NL],
  input  logic        link_tx_channel_up[NL],
  output logic        link_rx_pma_init  [NL],
  output logic        link_rx_reset_pb  [NL],
  input  logic        link_rx_channel_up[NL],
  output logic [15:0] link_tx_recoveries[NL],
  output logic [15:0] link_rx_recoveries[NL],
  // per-board stream reset, for monitoring
  output logic        board_stream_rst  [NUM_BOARDS]
);
  if (NUM_BOARDS < 1) begin : g_bad
    $error("exafpga_pipeline: NUM_BOARDS must be at least 1");
  end

  for (genvar b = 0; b < NUM_BOARDS; b++) begin : g_board
    localparam bit FIRST = (b == 0);
    localparam bit LAST  = (b == NUM_BOARDS - 1);
    localparam int UPL   = FIRST ? 0 : b - 1;   // index of the input link
    localparam int DNL   = LAST  ? 0 : b;       // index of the output link

    logic        s_valid, s_ready, m_valid, m_ready;
    word_t       s_data, m_data;
    logic        up_pma_init, up_reset_pb, dn_pma_init, dn_reset_pb;
    logic [15:0] up_recoveries, dn_recoveries;

    basic_block #(
      .HAS_UP_LINK(!FIRST), .HAS_DN_LINK(!LAST), .N_SST(SSTS_PER_BOARD),
      .KERNEL(KERNEL), .GRID_W(GRID_W), .GRID_H(GRID_H), .GRID_D(GRID_D),
      .PMA_INIT_CYCLES(PMA_INIT_CYCLES), .RESET_PB_CYCLES(RESET_PB_CYCLES),
      .UP_TIMEOUT(UP_TIMEOUT), .DOWN_FILTER(DOWN_FILTER), .HOLD_CYCLES(HOLD_CYCLES)
    ) u_bb (
      .clk, .rst,
      .up_channel_up(FIRST ? 1'b0 : link_rx_channel_up[UPL]),
      .up_pma_init, .up_reset_pb, .up_recoveries,
      .dn_channel_up(LAST ? 1'b0 : link_tx_channel_up[DNL]),
      .dn_pma_init, .dn_reset_pb, .dn_recoveries,
      .stream_rst(board_stream_rst[b]),
      .s_valid, .s_ready, .s_data, .m_valid, .m_ready, .m_data);

    // input side
    if (FIRST) begin : g_in_host
      assign s_valid       = host_in_valid;
      assign s_data        = host_in_data;
      assign host_in_ready = s_ready;
    end else begin : g_in_link
      assign s_valid              = link_rx_valid[UPL];
      assign s_data               = link_rx_data[UPL];
      assign link_rx_ready[UPL]   = s_ready;
      assign link_rx_pma_init[UPL]   = up_pma_init;
      assign link_rx_reset_pb[UPL]   = up_reset_pb;
      assign link_rx_recoveries[UPL] = up_recoveries;
    end

    // output side
    if (LAST) begin : g_out_host
      assign host_out_valid = m_valid;
      assign host_out_data  = m_data;
      assign m_ready        = host_out_ready;
    end else begin : g_out_link
      assign link_tx_valid[DNL]      = m_valid;
      assign link_tx_data[DNL]       = m_data;
      assign m_ready                 = link_tx_ready[DNL];
      assign link_tx_pma_init[DNL]   = dn_pma_init;
      assign link_tx_reset_pb[DNL]   = dn_reset_pb;
      assign link_tx_recoveries[DNL] = dn_recoveries;
    end
  end

  // with a single board the link ports carry nothing
  if (NUM_BOARDS == 1) begin : g_no_links
    assign link_tx_valid[0]      = 1'b0;
    assign link_tx_data[0]       = '0;
    assign link_rx_ready[0]      = 1'b0;
    assign link_tx_pma_init[0]   = 1'b1;
    assign link_tx_reset_pb[0]   = 1'b1;
    assign link_rx_pma_init[0]   = 1'b1;
    assign link_rx_reset_pb[0]   = 1'b1;
    assign link_tx_recoveries[0] = '0;
    assign link_rx_recoveries[0] = '0;
  end
endmodule
