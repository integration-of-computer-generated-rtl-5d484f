// Behavioural model of the vertical sync the MC1378 overlay IC returns, for
// testbenches only. It counts rising edges of the horizontal sync it is given
// and makes interlaced RS-170 fields of 262 and 263 lines alternately
// (262.5 on average). vsync rises at the first sync edge of a field and falls
// HOLD_NS after the sync edge of line VB_LINES-1, i.e. in the middle of that
// line, so the next sync edge is line 1 of the picture.
module mc1378_model #(
  parameter int  VB_LINES = 20,
  parameter real HOLD_NS  = 30000.0
) (
  input  logic hsync,
  output logic vsync,
  output int   field_lines
);
  int line = 0;
  bit odd  = 0;

  initial begin
    vsync = 0;
    field_lines = 262;
  end

  always @(posedge hsync) begin
    if (line == field_lines - 1) begin
      line = 0;
      odd = !odd;
      field_lines = odd ? 263 : 262;
    end else begin
      line = line + 1;
    end
    if (line == 0) vsync = 1;
    if (line == VB_LINES - 1) vsync <= #(HOLD_NS) 1'b0;
  end
endmodule
