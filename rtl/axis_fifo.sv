// axis_fifo: small synchronous first-in first-out buffer with AXI-Stream
// handshakes on both sides; it gives the spectrum pipeline slack between the
// square-and-sum stage and the square-root unit.
//
// DEPTH words of WIDTH bits (tlast travels inside the word). s_ready is high
// while the FIFO is not full, m_valid while it is not empty; data shows on
// m_data as soon as it is stored (first-word fall-through). The document uses
// a vendor FIFO here; this plain circular-buffer version and its depth are
// this design's choices.
module axis_fifo #(
  parameter int WIDTH = 33,
  parameter int DEPTH = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             resetn,
  input  logic [WIDTH-1:0] s_data,
  input  logic             s_valid,
  output logic             s_ready,
  output logic [WIDTH-1:0] m_data,
  output logic             m_valid,
  input  logic             m_ready
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;    // one extra bit tells full from empty

  assign s_ready = (wp - rp) != (AW+1)'(DEPTH);
  assign m_valid = wp != rp;
  assign m_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (!resetn) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (s_valid && s_ready) begin
        mem[wp[AW-1:0]] <= s_data;
        wp <= wp + 1'b1;
      end
      if (m_valid && m_ready) rp <= rp + 1'b1;
    end
  end
endmodule
