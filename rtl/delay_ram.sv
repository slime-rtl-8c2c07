// delay_ram: single-port sample memory with a two-cycle read latency, the
// behaviour of the FPGA block RAM the delay pedal was built around.
//
// The address is registered, and so is the data read from it, so a word
// addressed in cycle t appears on dout in cycle t+2. A write (we high) stores
// din at the addressed word. Width and depth are parameters; the defaults,
// 24 x 65536, are the document's. The memory is not cleared at reset; like
// an FPGA block RAM it holds zeros at power-up (the initial block below), so
// the echoes are silent until the delay line has filled.
module delay_ram #(
  parameter int WIDTH = 24,
  parameter int DEPTH = 65536,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr,
  input  logic             we,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] rd_q;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    rd_q <= mem[addr];
    dout <= rd_q;
  end
endmodule
