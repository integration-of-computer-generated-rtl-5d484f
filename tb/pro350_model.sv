// Behavioural model of the PRO-350 RGB video output, for testbenches only.
//
// Non-interlaced fields of LINES lines of LINE_PIX pixel periods, with its
// own pixel clock (PIX_NS), unrelated to the frame buffer's clock. A field
// starts with one long vertical sync pulse from line 0 to the middle of line
// VB_LINES-1; every later line starts with a HS_PIX-pixel horizontal sync, so
// line VB_LINES is the first line after vertical blank. The rest of line
// VB_LINES-1 is black (0.3 V): the sync slicer treats 0.0 V as sync. Sync is carried on green: -0.3 V
// at sync, 0.0 V blanking on all three colours during sync. Outside sync each
// colour is 0.7 V (on) or 0.3 V (off). The picture is a test pattern of
// 32-pixel stripes whose colour depends on the field, line and stripe:
//   colour = (field + line + pixel/32) mod 8, bits {red, green, blue}.
// field_idx counts vertical sync pulses from 0 (the model starts at line
// START_LINE of field 0), line_idx and pix_idx give the position.
module pro350_model #(
  parameter int  LINE_PIX   = 978,
  parameter int  HS_PIX     = 168,
  parameter int  LINES      = 262,
  parameter int  VB_LINES   = 20,
  parameter int  START_LINE = 100,
  parameter real PIX_NS     = 64.94
) (
  output real red_v,
  output real green_v,
  output real blue_v,
  output int  field_idx,
  output int  line_idx,
  output int  pix_idx
);
  logic pclk = 0;
  always #(PIX_NS / 2.0) pclk = ~pclk;

  initial begin
    field_idx = 0;
    line_idx  = START_LINE;
    pix_idx   = 0;
  end

  always @(posedge pclk) begin
    if (pix_idx == LINE_PIX - 1) begin
      pix_idx <= 0;
      if (line_idx == LINES - 1) begin
        line_idx  <= 0;
        field_idx <= field_idx + 1;
      end else begin
        line_idx <= line_idx + 1;
      end
    end else begin
      pix_idx <= pix_idx + 1;
    end
  end

  always_comb begin
    logic [2:0] c;
    c = 3'((field_idx + line_idx + pix_idx / 32) % 8);
    if (line_idx < VB_LINES - 1 || (line_idx == VB_LINES - 1 && pix_idx < LINE_PIX / 2)) begin
      red_v = 0.0; blue_v = 0.0; green_v = -0.3;
    end else if (line_idx == VB_LINES - 1) begin
      red_v = 0.3; blue_v = 0.3; green_v = 0.3;
    end else if (pix_idx < HS_PIX) begin
      red_v = 0.0; blue_v = 0.0; green_v = -0.3;
    end else begin
      red_v   = c[2] ? 0.7 : 0.3;
      green_v = c[1] ? 0.7 : 0.3;
      blue_v  = c[0] ? 0.7 : 0.3;
    end
  end
endmodule
