// spectrum_ram: two-clock memory holding one magnitude per FFT bin. The audio
// clock side writes (we, waddr, wdata); the pixel clock side reads, with the
// word at raddr registered onto rdata one pixel clock later. Sizes default to
// 1024 bins of 16 bits. Contents are not cleared at reset.
module spectrum_ram #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 1024,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rclk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) if (we) mem[waddr] <= wdata;
  always_ff @(posedge rclk) rdata <= mem[raddr];
endmodule
