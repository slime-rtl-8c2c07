// pitch_shifter: changes the pitch of one audio channel by reading a circular
// buffer faster than it is written.
//
// How it works: every incoming sample is written at the write pointer, which
// steps by one. A fractional read index, in unsigned fixed point with
// log2(DEPTH) integer and 29 fraction bits, steps by rate_in (3.29 format, e.g.
// 1.26 for a major third) per sample and wraps with the buffer; its integer
// part is the read address. Reading the stored waveform rate_in times faster
// raises its frequency by that factor; the read index laps the write pointer
// periodically, which is the audible splice of this simple method.
//
// Sequence after valid_in (one sample per valid_in; further valid_in pulses
// are ignored until the sequence ends):
//   cycle 1  write the sample, advance the write pointer
//   cycle 2  add rate_in to the read index
//   cycle 3  read at the integer part of the new index
//   cycle 4  data_out holds the read word, valid_out pulses
// This cycle plan, the 1024-entry buffer and the 3.29 rate format follow the
// document. The index starts at 0 after reset.
module pitch_shifter
  import slime_pkg::*;
#(
  parameter int DEPTH = 1024,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic    clk,
  input  logic    rst,
  input  rate_t   rate_in,
  input  logic    valid_in,
  input  sample_t sample_in,
  output sample_t sample_out,
  output logic    valid_out
);
  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_STEP, S_READ} state_e;

  state_e                  state;
  sample_t                 x;
  logic [AW-1:0]           wp;
  logic [AW+RATE_FRAC-1:0] idx;
  logic                    rd_issued;

  pitch_buffer #(.DEPTH(DEPTH)) u_buf (
    .clk,
    .wren(state == S_WRITE), .wraddr(wp), .data_in(x),
    .rden(state == S_READ), .rdaddr(idx[AW+RATE_FRAC-1 -: AW]),
    .data_out(sample_out));

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      x         <= '0;
      wp        <= '0;
      idx       <= '0;
      rd_issued <= 1'b0;
    end else begin
      rd_issued <= 1'b0;
      unique case (state)
        S_IDLE:  if (valid_in) begin x <= sample_in; state <= S_WRITE; end
        S_WRITE: begin wp <= wp + 1'b1; state <= S_STEP; end
        S_STEP:  begin idx <= idx + (AW+RATE_FRAC)'(rate_in); state <= S_READ; end
        S_READ:  begin rd_issued <= 1'b1; state <= S_IDLE; end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign valid_out = rd_issued;
endmodule
