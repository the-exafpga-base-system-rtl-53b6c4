// delay_line: fixed delay of a word stream, advanced by an enable.
//
// After every cycle with `en` high, `q` holds the value `d` had DELAY enables
// earlier (d is sampled in the enable cycle itself, so DELAY = 1 is a plain
// enabled register).  Delays up to 4 use a register chain; longer delays use a
// circular buffer of DELAY-1 words read before it is overwritten, followed by
// the output register, so that an FPGA tool can map it to block RAM.  The
// buffer contents are not reset: the stencil logic never uses words that
// entered before the current frame except as neighbours of border elements.
module delay_line #(
  parameter int DW    = 32,
  parameter int DELAY = 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [DW-1:0] d,
  output logic [DW-1:0] q
);
  localparam int L = DELAY - 1;

  if (DELAY < 1) begin : g_bad
    $error("delay_line: DELAY must be at least 1");
  end

  if (L == 0) begin : g_reg
    always_ff @(posedge clk) if (en) q <= d;
  end else if (L <= 3) begin : g_chain
    logic [DW-1:0] sr [L];
    always_ff @(posedge clk) begin
      if (en) begin
        sr[0] <= d;
        for (int i = 1; i < L; i++) sr[i] <= sr[i-1];
        q <= sr[L-1];
      end
    end
  end else begin : g_ram
    localparam int AW = $clog2(L);
    logic [DW-1:0] mem [L];
    logic [AW-1:0] ptr;
    always_ff @(posedge clk) begin
      if (rst) begin
        ptr <= '0;
      end else if (en) begin
        ptr <= (ptr == AW'(L - 1)) ? '0 : ptr + 1'b1;
      end
    end
    always_ff @(posedge clk) begin
      if (en) begin
        q        <= mem[ptr];
        mem[ptr] <= d;
      end
    end
  end
endmodule
