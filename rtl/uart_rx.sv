// uart_rx: UART receiver for 8N1 frames (see uart_tx for the format).
// The serial input passes through a two-flop synchronizer. A falling edge
// on the idle-high line starts a frame; the start bit is checked again half
// a bit later, and from there the line is sampled every CLKS_PER_BIT cycles,
// in the middle of each data bit and of the stop bit. A frame with a high
// stop bit delivers its byte as a one-cycle pulse on valid with data held
// until the next frame; a frame whose stop bit is low is dropped. Sampling
// once per bit and dropping bad frames are choices of this design.
module uart_rx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       serial_in,
  output logic [7:0] data,
  output logic       valid
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  typedef enum logic [1:0] { S_IDLE, S_START, S_DATA, S_STOP } state_e;

  state_e        state;
  logic [1:0]    sync;
  logic          line;
  logic [CW-1:0] clk_cnt;
  logic [2:0]    bit_idx;
  logic [7:0]    shreg;

  assign line = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync    <= 2'b11;
      state   <= S_IDLE;
      clk_cnt <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      data    <= '0;
      valid   <= 1'b0;
    end else begin
      sync  <= {sync[0], serial_in};
      valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          clk_cnt <= '0;
          if (!line) state <= S_START;
        end
        S_START: begin
          if (clk_cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            clk_cnt <= '0;
            bit_idx <= '0;
            state   <= line ? S_IDLE : S_DATA;  // glitch: not a start bit
          end else clk_cnt <= clk_cnt + 1'b1;
        end
        S_DATA: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            shreg   <= {line, shreg[7:1]};
            bit_idx <= bit_idx + 3'd1;
            if (bit_idx == 3'd7) state <= S_STOP;
          end else clk_cnt <= clk_cnt + 1'b1;
        end
        S_STOP: begin
          if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
            clk_cnt <= '0;
            state   <= S_IDLE;
            if (line) begin
              data  <= shreg;
              valid <= 1'b1;
            end
          end else clk_cnt <= clk_cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
