// reset_gen: power-on reset generator of the tag.
//
// The analog front end raises por_n once the rectified field gives full
// power. por_n clears the reset asynchronously; its release is synchronised
// to the base clock by two flip-flops and then held for HOLD_CYCLES more
// cycles, so that the whole controller leaves reset on one clock edge and
// only after the supply has settled. That the controller is reset "when full
// power is received" is the design's; the synchroniser and the hold length
// are this implementation's choice.
//
// Timing: rst_n goes low with por_n (asynchronously) and rises
// 2 + HOLD_CYCLES rising clk edges after por_n rises.
module reset_gen #(
  parameter int unsigned HOLD_CYCLES = 16
) (
  input  logic clk,
  input  logic por_n,   // power good from the analog front end, active high
  output logic rst_n    // controller reset, active low
);
  logic [1:0] sync;
  logic [$clog2(HOLD_CYCLES+1)-1:0] cnt;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      sync  <= 2'b00;
      cnt   <= '0;
      rst_n <= 1'b0;
    end else begin
      sync <= {sync[0], 1'b1};
      // the count stops at HOLD_CYCLES; rst_n is not read back, so the
      // released reset never feeds logic clocked by itself
      if (sync[1]) begin
        if (cnt == ($bits(cnt))'(HOLD_CYCLES)) rst_n <= 1'b1;
        else                                   cnt   <= cnt + 1'b1;
      end
    end
  end
endmodule
