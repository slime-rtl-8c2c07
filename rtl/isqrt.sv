// isqrt: integer square root of an unsigned 32-bit stream word, giving the
// magnitude of an FFT bin from its power: m_data = floor(sqrt(s_data)).
//
// How it works: the classic digit-by-digit (restoring) method, two radicand
// bits and one result bit per clock, 16 clocks per word; tlast travels with
// the word. s_ready is high only while idle, and the result is held on m_data
// with m_valid until taken. The document computes this square root with a
// vendor CORDIC core; this shift-subtract unit is this design's choice.
module isqrt (
  input  logic        clk,
  input  logic        resetn,
  input  logic [31:0] s_data,
  input  logic        s_valid,
  output logic        s_ready,
  input  logic        s_last,
  output logic [15:0] m_data,
  output logic        m_valid,
  input  logic        m_ready,
  output logic        m_last
);
  typedef enum logic [1:0] {IDLE, BUSY, DONE} state_e;
  state_e      state;
  logic [31:0] rad;
  logic [17:0] rem;
  logic [15:0] root;
  logic [3:0]  n;
  logic [17:0] rem_sh, trial;

  assign s_ready = (state == IDLE);
  assign m_valid = (state == DONE);
  assign m_data  = root;
  assign rem_sh  = {rem[15:0], rad[31:30]};
  assign trial   = {root, 2'b01};

  always_ff @(posedge clk) begin
    if (!resetn) begin
      state  <= IDLE;
      rad    <= '0;
      rem    <= '0;
      root   <= '0;
      n      <= '0;
      m_last <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (s_valid) begin
          rad    <= s_data;
          rem    <= '0;
          root   <= '0;
          n      <= '0;
          m_last <= s_last;
          state  <= BUSY;
        end
        BUSY: begin
          rad <= rad << 2;
          if (rem_sh >= trial) begin
            rem  <= rem_sh - trial;
            root <= {root[14:0], 1'b1};
          end else begin
            rem  <= rem_sh;
            root <= {root[14:0], 1'b0};
          end
          n <= n + 1'b1;
          if (n == 4'd15) state <= DONE;
        end
        DONE: if (m_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
