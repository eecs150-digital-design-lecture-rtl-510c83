// uart_cpu_adapter: the memory-mapped serial line interface.
// It presents the UART to software as four 32-bit device registers, laid
// out like the SPIM terminal:
//   0xFFFF0000  receiver control     bit 0 Ready: a received character waits
//                                    in the receiver data register
//   0xFFFF0004  receiver data        bits 7:0 last character, rest 0;
//                                    reading it clears receiver Ready
//   0xFFFF0008  transmitter control  bit 0 Ready: the transmitter accepts a
//                                    new character
//   0xFFFF000C  transmitter data     a write of bits 7:0 sends the character
// Software polls a control register until Ready is 1, then reads or writes
// the matching data register. The interrupt-enable bit is not implemented.
// Timing: the bus request (sel, offset, re, we, wdata) comes from the
// processor's X stage and acts on the rising edge that starts M; rdata is
// registered on that edge, like the data memory. A new character that
// arrives before the previous one was read overwrites it, and a write to
// the transmitter data register while Ready is 0 is ignored: both are
// choices of this design.
module uart_cpu_adapter
  import mips150_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // processor side
  input  logic        sel,      // access falls in the serial register block
  input  logic [3:0]  offset,   // byte offset in the block
  input  logic        re,
  input  logic        we,       // write strobe of byte lane 0
  input  logic [7:0]  wdata,
  output logic [31:0] rdata,
  // UART side
  output logic [7:0]  tx_data,
  output logic        tx_valid,
  input  logic        tx_ready,
  input  logic [7:0]  rx_data,
  input  logic        rx_valid
);

  logic       rx_ready;
  logic [7:0] rx_hold;
  logic       rd_rx_data;

  assign rd_rx_data = sel && re && (offset == RX_DATA_OFS);
  assign tx_valid   = sel && we && (offset == TX_DATA_OFS) && tx_ready;
  assign tx_data    = wdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_ready <= 1'b0;
      rx_hold  <= '0;
      rdata    <= '0;
    end else begin
      if (rx_valid) begin
        rx_hold  <= rx_data;
        rx_ready <= 1'b1;
      end else if (rd_rx_data) begin
        rx_ready <= 1'b0;
      end
      unique case (offset)
        RX_CTRL_OFS: rdata <= {31'd0, rx_ready};
        RX_DATA_OFS: rdata <= {24'd0, rx_hold};
        TX_CTRL_OFS: rdata <= {31'd0, tx_ready};
        default:     rdata <= '0;
      endcase
    end
  end

endmodule
