// uart_tx: UART transmitter, 8 data bits, no parity, one stop bit (8N1).
// A frame is a low start bit, the eight data bits least significant first,
// and a high stop bit; the line idles high. Each bit lasts CLKS_PER_BIT
// clock cycles, so a frame takes 10*CLKS_PER_BIT cycles from acceptance.
// Handshake: a byte is accepted on a rising edge where valid and ready are
// both high; ready is low for the whole frame. CLKS_PER_BIT defaults to
// 434 (115200 baud from a 50 MHz clock); the bit rate and clock frequency
// are choices of this design.
module uart_tx #(
  parameter int unsigned CLKS_PER_BIT = 434
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       serial_out
);

  localparam int unsigned CW = $clog2(CLKS_PER_BIT);

  logic [9:0]    shreg;     // stop, data[7:0], start; bit 0 is on the line
  logic [3:0]    bits_left; // bits of the frame still to send, 0 when idle
  logic [CW-1:0] clk_cnt;

  assign ready      = (bits_left == 4'd0);
  assign serial_out = ready ? 1'b1 : shreg[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '1;
      bits_left <= 4'd0;
      clk_cnt   <= '0;
    end else if (ready) begin
      if (valid) begin
        shreg     <= {1'b1, data, 1'b0};
        bits_left <= 4'd10;
        clk_cnt   <= '0;
      end
    end else if (clk_cnt == CW'(CLKS_PER_BIT - 1)) begin
      clk_cnt   <= '0;
      shreg     <= {1'b1, shreg[9:1]};
      bits_left <= bits_left - 4'd1;
    end else begin
      clk_cnt <= clk_cnt + 1'b1;
    end
  end

endmodule
