// stream_buf2: two-entry valid/ready buffer (AXI4-Stream style).
//
// Accepts a word whenever it holds fewer than two, so `s_ready` is a register
// output and the ready path is cut between neighbouring pipeline stages; a
// full-rate stream passes with one word in the buffer and one cycle of
// latency.  Used as the output stage of every SST so that a long queue of SSTs
// has no combinational ready chain.
module stream_buf2 #(
  parameter int DW = 32
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          s_valid,
  output logic          s_ready,
  input  logic [DW-1:0] s_data,
  output logic          m_valid,
  input  logic          m_ready,
  output logic [DW-1:0] m_data
);
  logic [DW-1:0] mem [2];
  logic          wp, rp;
  logic [1:0]    cnt;
  logic          push, pop;

  assign s_ready = (cnt != 2'd2);
  assign m_valid = (cnt != 2'd0);
  assign m_data  = mem[rp];
  assign push    = s_valid && s_ready;
  assign pop     = m_valid && m_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp  <= 1'b0;
      rp  <= 1'b0;
      cnt <= 2'd0;
    end else begin
      if (push) wp <= ~wp;
      if (pop)  rp <= ~rp;
      cnt <= cnt + {1'b0, push} - {1'b0, pop};
    end
  end

  always_ff @(posedge clk) if (push) mem[wp] <= s_data;

  // a word offered must stay offered until taken
  property p_hold;
    @(posedge clk) disable iff (rst) (m_valid && !m_ready) |=> (m_valid && $stable(m_data));
  endproperty
  assert property (p_hold);
endmodule
