// clk_gen: clock generator of the tag.
//
// The controller runs from the 13.56 MHz base clock recovered from the
// carrier. clk_gen divides it by DIV (4) into the sample clock used by the
// data detection, given as a one-cycle enable (ce_sample) rather than a
// second clock. The divided clock is also managed: while the reader
// modulates (carrier absent, carrier_i = 0) the tag receives no clock, so
// ce_rx, the enable of the detection counter, is held off; ce_sample keeps
// running so that edges of the field can still be seen. Dividing by 4 and the
// missing clock during modulation follow the design; expressing both as
// enables on one clock is this implementation's choice.
//
// Timing: ce_sample is high one clk cycle in DIV, starting DIV cycles after
// reset; ce_rx = ce_sample & carrier_i (combinational).
module clk_gen #(
  parameter int unsigned DIV = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic carrier_i,   // 1: carrier present (no reader modulation)
  output logic ce_sample,   // sample clock enable, clk / DIV
  output logic ce_rx        // sample clock enable, gated off during modulation
);
  logic [$clog2(DIV)-1:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div       <= '0;
      ce_sample <= 1'b0;
    end else begin
      ce_sample <= (div == ($bits(div))'(DIV - 1));
      div       <= (div == ($bits(div))'(DIV - 1)) ? '0 : div + 1'b1;
    end
  end

  assign ce_rx = ce_sample & carrier_i;
endmodule
