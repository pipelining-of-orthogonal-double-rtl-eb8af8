// delay_line: DEPTH cascaded z^-1 registers of width W.
//
// These are the storage elements of the lattice and of the polyphase
// combiner. DEPTH = 0 is a plain wire, so callers can size a delay from a
// parameter that may come out as zero. Every register is cleared by the
// active-low synchronous reset, which puts the filter in its zero state;
// the reset style is a choice of this implementation.
// Timing: dout(n) = din(n - DEPTH), one register stage per clock.
module delay_line #(
  parameter int W     = 18,
  parameter int DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [W-1:0] stage [DEPTH];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) stage[i] <= '0;
      end else begin
        stage[0] <= din;
        for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
      end
    end

    assign dout = stage[DEPTH-1];
  end

endmodule
