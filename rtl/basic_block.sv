// basic_block: the logic of one FPGA board of the streaming chain.
//
// A board holds a queue of SSTs between an input and an output stream port.
// Depending on its place in the chain, the input comes from the host through
// the PCIe core (first board) or from the Aurora link of the previous board
// (HAS_UP_LINK), and the output goes to the next board's Aurora link
// (HAS_DN_LINK) or back to the host through PCIe (last board).  Neither core
// is part of this RTL: their streams are the ports of this module.  For each
// Aurora interface the board has, an aurora_link_ctrl brings the link up and
// recovers it after failures; a stream_reset_gen keeps the SST queue in reset
// until all of the board's links are up (or, with no link at all, until the
// power-on reset ends), since the Aurora user-clock domain has no reset of
// its own.
//
// Interface: one clock for links and stream logic; valid/ready word streams.
// Timing: after `rst` falls the queue leaves reset once the links report
// CHANNEL_UP plus the reset generator's hold time; then one element per cycle.
// The partitioning follows the board roles of the design; holding the whole
// queue in reset while any link is down is this design's choice.
module basic_block
  import exafpga_pkg::*;
#(
  parameter bit      HAS_UP_LINK = 1'b0,
  parameter bit      HAS_DN_LINK = 1'b1,
  parameter int      N_SST       = 36,
  parameter kernel_e KERNEL      = K_JACOBI2D,
  parameter int      GRID_W      = 1000,
  parameter int      GRID_H      = 1000,
  parameter int      GRID_D      = 1,
  parameter int      PMA_INIT_CYCLES = 128,
  parameter int      RESET_PB_CYCLES = 32,
  parameter int      UP_TIMEOUT      = 4096,
  parameter int      DOWN_FILTER     = 8,
  parameter int      HOLD_CYCLES     = 16
) (
  input  logic        clk,
  input  logic        rst,
  // input Aurora link (used when HAS_UP_LINK)
  input  logic        up_channel_up,
  output logic        up_pma_init,
  output logic        up_reset_pb,
  output logic [15:0] up_recoveries,
  // output Aurora link (used when HAS_DN_LINK)
  input  logic        dn_channel_up,
  output logic        dn_pma_init,
  output logic        dn_reset_pb,
  output logic [15:0] dn_recoveries,
  output logic        stream_rst,
  // input stream (PCIe core or Aurora RX)
  input  logic        s_valid,
  output logic        s_ready,
  input  word_t       s_data,
  // output stream (Aurora TX or PCIe core)
  output logic        m_valid,
  input  logic        m_ready,
  output word_t       m_data
);
  logic up_ok, dn_ok;

  if (HAS_UP_LINK) begin : g_up
    aurora_link_ctrl #(
      .PMA_INIT_CYCLES(PMA_INIT_CYCLES), .RESET_PB_CYCLES(RESET_PB_CYCLES),
      .UP_TIMEOUT(UP_TIMEOUT), .DOWN_FILTER(DOWN_FILTER)
    ) u_ctrl (
      .clk, .rst, .channel_up(up_channel_up), .pma_init(up_pma_init),
      .reset_pb(up_reset_pb), .link_up(up_ok), .recoveries(up_recoveries));
  end else begin : g_no_up
    assign up_pma_init   = 1'b0;
    assign up_reset_pb   = 1'b0;
    assign up_ok         = 1'b1;
    assign up_recoveries = '0;
  end

  if (HAS_DN_LINK) begin : g_dn
    aurora_link_ctrl #(
      .PMA_INIT_CYCLES(PMA_INIT_CYCLES), .RESET_PB_CYCLES(RESET_PB_CYCLES),
      .UP_TIMEOUT(UP_TIMEOUT), .DOWN_FILTER(DOWN_FILTER)
    ) u_ctrl (
      .clk, .rst, .channel_up(dn_channel_up), .pma_init(dn_pma_init),
      .reset_pb(dn_reset_pb), .link_up(dn_ok), .recoveries(dn_recoveries));
  end else begin : g_no_dn
    assign dn_pma_init   = 1'b0;
    assign dn_reset_pb   = 1'b0;
    assign dn_ok         = 1'b1;
    assign dn_recoveries = '0;
  end

  stream_reset_gen #(.N_LINKS(2), .HOLD_CYCLES(HOLD_CYCLES)) u_rstgen (
    .clk, .rst, .links_up({up_ok, dn_ok}), .stream_rst);

  sst_queue #(
    .N_SST(N_SST), .KERNEL(KERNEL),
    .GRID_W(GRID_W), .GRID_H(GRID_H), .GRID_D(GRID_D)
  ) u_queue (
    .clk, .rst(stream_rst), .s_valid, .s_ready, .s_data,
    .m_valid, .m_ready, .m_data);

endmodule
