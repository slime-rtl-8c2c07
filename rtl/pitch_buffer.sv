// pitch_buffer: circular sample store of a pitch shifter, a simple dual-port
// memory (one write port, one read port, same clock).
//
// A write with wren stores data_in at wraddr in one clock. A read is
// registered: with rden high the word at rdaddr appears on data_out after the
// next clock edge, and data_out holds otherwise. Depth defaults to the
// document's 1024 entries; contents are not cleared at reset.
module pitch_buffer
  import slime_pkg::*;
#(
  parameter int DEPTH = 1024,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wren,
  input  logic [AW-1:0] wraddr,
  input  sample_t       data_in,
  input  logic          rden,
  input  logic [AW-1:0] rdaddr,
  output sample_t       data_out
);
  sample_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wren) mem[wraddr] <= data_in;
    if (rden) data_out <= mem[rdaddr];
  end
endmodule
