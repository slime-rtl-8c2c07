// axis_i2s2: I2S bus master for a stereo audio codec board (24-bit samples,
// 44.1 kHz), with an AXI-Stream style receive master and transmit slave.
//
// How it works: a free-running 9-bit counter divides the ~22.591 MHz audio
// clock. MCLK is the audio clock itself, SCLK is counter bit 2 (MCLK/8) and
// LRCK is counter bit 8 (MCLK/512 = 44.1 kHz; low = left, high = right). Each
// half frame has 32 SCLK periods; the 24 data bits, MSB first, occupy SCLK
// periods 1..24, i.e. they start one SCLK after the LRCK edge as I2S requires.
// Outgoing bits change when SCLK falls (counter[2:0] == 0); incoming bits pass
// a 3-flop synchroniser and are sampled at counter[2:0] == 3, just before SCLK
// rises.
//
// Receive side: at counter value EOF_COUNT (455, the end of the right word) the
// two captured words are offered as a 2-beat packet, left first, last asserted
// on the right word. A new frame is dropped while the previous packet is still
// pending. Transmit side: tready rises at EOF_COUNT and falls at the start of
// the next frame or once the 2-beat packet (left, then right with last) has
// been accepted; the pair is serialised during the following frame.
//
// The clocking, bit positions, EOF point and packet rules follow the
// document's description of its AXIS I2S2 controller; the 24-bit (rather than
// zero-padded 32-bit) stream words are this design's choice.
module axis_i2s2
  import slime_pkg::*;
#(
  parameter int unsigned EOF_COUNT = 455
) (
  input  logic    axis_clk,
  input  logic    axis_resetn,
  // transmit stream (slave)
  input  sample_t tx_axis_s_data,
  input  logic    tx_axis_s_valid,
  output logic    tx_axis_s_ready,
  input  logic    tx_axis_s_last,
  // receive stream (master)
  output sample_t rx_axis_m_data,
  output logic    rx_axis_m_valid,
  input  logic    rx_axis_m_ready,
  output logic    rx_axis_m_last,
  // codec pins
  output logic    tx_mclk,
  output logic    tx_lrck,
  output logic    tx_sclk,
  output logic    tx_sdout,
  output logic    rx_mclk,
  output logic    rx_lrck,
  output logic    rx_sclk,
  input  logic    rx_sdin
);
  logic [8:0] count;
  logic       bit_slot;   // counter is inside SCLK periods 1..24 of a half frame

  always_ff @(posedge axis_clk) begin
    if (!axis_resetn) count <= '0;
    else              count <= count + 1'b1;
  end

  assign bit_slot = (count[7:3] >= 5'd1) && (count[7:3] <= 5'd24);

  assign tx_mclk = axis_clk;
  assign rx_mclk = axis_clk;
  assign tx_sclk = count[2];
  assign rx_sclk = count[2];
  assign tx_lrck = count[8];
  assign rx_lrck = count[8];

  // ------------------------------------------------------------ transmit
  sample_t tx_l, tx_r, sh_l, sh_r;

  always_ff @(posedge axis_clk) begin
    if (!axis_resetn)
      tx_axis_s_ready <= 1'b0;
    else if (tx_axis_s_ready && tx_axis_s_valid && tx_axis_s_last)
      tx_axis_s_ready <= 1'b0;            // packet complete
    else if (count == '0)
      tx_axis_s_ready <= 1'b0;            // frame started: no tearing
    else if (count == 9'(EOF_COUNT))
      tx_axis_s_ready <= 1'b1;
  end

  always_ff @(posedge axis_clk) begin
    if (!axis_resetn) begin
      tx_l <= '0;
      tx_r <= '0;
    end else if (tx_axis_s_valid && tx_axis_s_ready) begin
      if (tx_axis_s_last) tx_r <= tx_axis_s_data;
      else                tx_l <= tx_axis_s_data;
    end
  end

  always_ff @(posedge axis_clk) begin
    if (!axis_resetn) begin
      sh_l <= '0;
      sh_r <= '0;
    end else if (count == 9'd7) begin
      sh_l <= tx_l;
      sh_r <= tx_r;
    end else if (count[2:0] == 3'd7 && bit_slot) begin
      if (count[8]) sh_r <= {sh_r[SAMPLE_W-2:0], 1'b0};
      else          sh_l <= {sh_l[SAMPLE_W-2:0], 1'b0};
    end
  end

  always_comb begin
    if (!bit_slot)     tx_sdout = 1'b0;
    else if (count[8]) tx_sdout = sh_r[SAMPLE_W-1];
    else               tx_sdout = sh_l[SAMPLE_W-1];
  end

  // ------------------------------------------------------------- receive
  logic [2:0] din_sync;
  sample_t    rsh_l, rsh_r, rx_l, rx_r;

  always_ff @(posedge axis_clk) begin
    if (!axis_resetn) din_sync <= '0;
    else              din_sync <= {din_sync[1:0], rx_sdin};
  end

  always_ff @(posedge axis_clk) begin
    if (!axis_resetn) begin
      rsh_l <= '0;
      rsh_r <= '0;
    end else if (count[2:0] == 3'd3 && bit_slot) begin
      if (count[8]) rsh_r <= {rsh_r[SAMPLE_W-2:0], din_sync[2]};
      else          rsh_l <= {rsh_l[SAMPLE_W-2:0], din_sync[2]};
    end
  end

  always_ff @(posedge axis_clk) begin
    if (!axis_resetn) begin
      rx_l            <= '0;
      rx_r            <= '0;
      rx_axis_m_valid <= 1'b0;
      rx_axis_m_last  <= 1'b0;
    end else if (count == 9'(EOF_COUNT) && !rx_axis_m_valid) begin
      rx_l            <= rsh_l;
      rx_r            <= rsh_r;
      rx_axis_m_valid <= 1'b1;
      rx_axis_m_last  <= 1'b0;
    end else if (rx_axis_m_valid && rx_axis_m_ready) begin
      if (rx_axis_m_last) rx_axis_m_valid <= 1'b0;
      rx_axis_m_last <= ~rx_axis_m_last;
    end
  end

  assign rx_axis_m_data = rx_axis_m_last ? rx_r : rx_l;

  // A pending receive beat must stay offered, unchanged, until accepted.
  a_rx_hold: assert property (@(posedge axis_clk) disable iff (!axis_resetn)
      rx_axis_m_valid && !rx_axis_m_ready |=> rx_axis_m_valid && $stable(rx_axis_m_data));
endmodule
