// square_and_sum: power of each FFT bin. Takes {re[31:16], im[15:0]} words
// (signed 16-bit parts) on an AXI-Stream input and outputs re^2 + im^2 as an
// unsigned 32-bit word, tlast passed along.
//
// A single output register stage with proper back-pressure: the input is
// accepted whenever the output register is empty or being emptied, so no word
// is lost when the consumer stalls. Latency: one clock. The squaring and
// summing, the word layout and the active-low resets follow the document's
// stage; the back-pressure handling is this design's choice.
module square_and_sum (
  input  logic        clk,
  input  logic        resetn,
  input  logic [31:0] s_data,
  input  logic        s_valid,
  output logic        s_ready,
  input  logic        s_last,
  output logic [31:0] m_data,
  output logic        m_valid,
  input  logic        m_ready,
  output logic        m_last
);
  logic signed [15:0] re, im;

  assign re      = s_data[31:16];
  assign im      = s_data[15:0];
  assign s_ready = !m_valid || m_ready;

  always_ff @(posedge clk) begin
    if (!resetn) begin
      m_valid <= 1'b0;
      m_last  <= 1'b0;
      m_data  <= '0;
    end else if (s_ready) begin
      m_valid <= s_valid;
      if (s_valid) begin
        m_data <= 32'(re * re) + 32'(im * im);
        m_last <= s_last;
      end
    end
  end
endmodule
