// xvga: timing generator for a 1024 x 768 VGA display at 60 Hz (65 MHz pixel
// clock): 1344 pixel clocks per line (1024 visible, 24 front porch, 136 sync,
// 160 back porch) and 806 lines per frame (768 visible, 3 front porch, 6 sync,
// 29 back porch).
//
// hcount and vcount give the current pixel; hsync and vsync are active low;
// blank is high outside the visible area. All outputs are registered and
// change together on the pixel clock. The timing numbers are the document's
// (from its published source); the synchronous reset is this design's.
module xvga #(
  parameter int H_ACTIVE = 1024,
  parameter int H_FP     = 24,
  parameter int H_SYNC   = 136,
  parameter int H_BP     = 160,
  parameter int V_ACTIVE = 768,
  parameter int V_FP     = 3,
  parameter int V_SYNC   = 6,
  parameter int V_BP     = 29
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [10:0] h_n;
  logic [9:0]  v_n;

  always_comb begin
    h_n = (hcount == 11'(H_TOTAL - 1)) ? '0 : hcount + 1'b1;
    v_n = vcount;
    if (hcount == 11'(H_TOTAL - 1))
      v_n = (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync  <= 1'b1;
      vsync  <= 1'b1;
      blank  <= 1'b0;
    end else begin
      hcount <= h_n;
      vcount <= v_n;
      hsync  <= !(h_n >= 11'(H_ACTIVE + H_FP) && h_n < 11'(H_ACTIVE + H_FP + H_SYNC));
      vsync  <= !(v_n >= 10'(V_ACTIVE + V_FP) && v_n < 10'(V_ACTIVE + V_FP + V_SYNC));
      blank  <= (h_n >= 11'(H_ACTIVE)) || (v_n >= 10'(V_ACTIVE));
    end
  end
endmodule
