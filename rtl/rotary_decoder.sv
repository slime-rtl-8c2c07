// rotary_decoder: turns the two quadrature lines (A, B) of an optical rotary
// encoder into a saturating up/down magnitude.
//
// How it works: A and B are each passed through two synchronising flip-flops
// and then a third "previous value" flip-flop. A step is seen whenever either
// line changed between the previous and current synchronised samples
// (edge = A^A_prev^B^B_prev). The direction is A_now ^ B_prev: 1 means A leads
// (clockwise, count up), 0 means B leads (counter-clockwise, count down). The
// counter saturates at 0 and 2^WIDTH-1. All of this follows the document,
// including the reset value, the mid-scale (2^WIDTH-1)/2.
//
// Interface: clk, synchronous active-high rst, asynchronous A and B inputs,
// magnitude out. The encoder's push switch is not used by the design and has
// no port here. Timing: a line change reaches the counter 3 clocks later.
module rotary_decoder #(
  parameter int WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             a,
  input  logic             b,
  output logic [WIDTH-1:0] magnitude
);
  localparam logic [WIDTH-1:0] MAXV = '1;
  localparam logic [WIDTH-1:0] MIDV = MAXV >> 1;

  logic [2:0] a_sh, b_sh;   // [0],[1] synchroniser, [2] previous sample
  logic       step, cw;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_sh <= '0;
      b_sh <= '0;
    end else begin
      a_sh <= {a_sh[1:0], a};
      b_sh <= {b_sh[1:0], b};
    end
  end

  always_comb begin
    step = a_sh[1] ^ a_sh[2] ^ b_sh[1] ^ b_sh[2];
    cw   = a_sh[1] ^ b_sh[2];
  end

  always_ff @(posedge clk) begin
    if (rst)
      magnitude <= MIDV;
    else if (step) begin
      if (cw && magnitude != MAXV)        magnitude <= magnitude + 1'b1;
      else if (!cw && magnitude != '0)    magnitude <= magnitude - 1'b1;
    end
  end
endmodule
