// Vertical blank separator for the RGB composite sync.
//
// The PRO-350 composite sync is a train of horizontal sync pulses (10.9 us)
// and long vertical blanking pulses (about 1272 us). Any pulse that stays high
// longer than the horizontal pulse is vertical blanking. The original circuit
// uses an RC delay feeding a comparator that trips after about 12 us; this
// design measures the same thing digitally: a saturating counter runs while
// csync is high and vblank is asserted once csync has been high on VBLANK_MIN
// consecutive clock edges (12 us at 35.8 MHz). vblank falls together with
// csync, as the RC network discharges at the end of the pulse. vblank is
// active high here (the comparator in the original circuit is inverting).
//
// Interface: csync must already be synchronised to clk.
module vblank_separator #(
  parameter int unsigned VBLANK_MIN = sph_pkg::VBLANK_MIN_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic csync,
  output logic vblank
);
  localparam int unsigned W = $clog2(VBLANK_MIN + 1);

  logic [W-1:0] width;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      width <= '0;
    end else if (!csync) begin
      width <= '0;
    end else if (width != W'(VBLANK_MIN)) begin
      width <= width + 1'b1;
    end
  end

  assign vblank = csync && (width == W'(VBLANK_MIN));
endmodule
