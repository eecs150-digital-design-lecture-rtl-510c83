// mips150_top: the MIPS150 system - processor, memories and serial console.
// The 3-stage processor (mips150_cpu) fetches from its own instruction
// memory (mips150_imem) and reaches the data memory (mips150_dmem) and the
// devices over one data bus. Addresses 0xFFFF0000-0xFFFF000F select the
// serial line registers (uart_cpu_adapter, driving uart_tx and uart_rx);
// every other address in 0xFFFFxxxx goes out on the ext_io_* port for the
// remaining memory-mapped devices (Ethernet, video), which are not part of
// this RTL; all lower addresses go to the data memory, which aliases every
// DMEM_WORDS*4 bytes. The bus decision is made in X and registered, so the
// read data of the device selected one cycle earlier is returned in M.
// External devices must likewise sample their request on the rising edge
// and return ext_io_rdata in the next cycle.
// Programs are written into the instruction memory through imem_load_*
// (word address) while rst is held. Memory sizes, bit rate and the two
// external ports are choices of this design; the pipeline, the device
// register layout and the serial frame format follow the project outline.
module mips150_top
  import mips150_pkg::*;
#(
  parameter int unsigned IMEM_WORDS   = 4096,
  parameter int unsigned DMEM_WORDS   = 4096,
  parameter int unsigned CLKS_PER_BIT = 434,
  localparam int unsigned IAW = $clog2(IMEM_WORDS),
  localparam int unsigned DAW = $clog2(DMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst,
  // serial line (logic levels; the RS-232 transceiver is off chip)
  input  logic           serial_in,
  output logic           serial_out,
  // instruction memory loading
  input  logic           imem_load_we,
  input  logic [IAW-1:0] imem_load_addr,
  input  logic [31:0]    imem_load_data,
  // other memory-mapped devices at 0xFFFF0010-0xFFFFFFFF
  output logic [15:0]    ext_io_addr,
  output logic           ext_io_re,
  output logic [3:0]     ext_io_we,
  output logic [31:0]    ext_io_wdata,
  input  logic [31:0]    ext_io_rdata
);

  typedef enum logic [1:0] { SEL_DMEM, SEL_SERIAL, SEL_EXT } bus_sel_e;

  logic [31:0] imem_addr, imem_rdata;
  logic [31:0] bus_addr, bus_wdata, bus_rdata;
  logic [3:0]  bus_we;
  logic        bus_re;
  logic [31:0] dmem_rdata, serial_rdata;
  bus_sel_e    x_sel, m_sel;

  mips150_cpu u_cpu (
    .clk(clk), .rst(rst),
    .imem_addr(imem_addr), .imem_rdata(imem_rdata),
    .dmem_addr(bus_addr), .dmem_we(bus_we), .dmem_re(bus_re),
    .dmem_wdata(bus_wdata), .dmem_rdata(bus_rdata)
  );

  mips150_imem #(.DEPTH(IMEM_WORDS)) u_imem (
    .clk(clk), .rst(rst),
    .addr(imem_addr[IAW+1:2]), .rdata(imem_rdata),
    .load_we(imem_load_we), .load_addr(imem_load_addr), .load_data(imem_load_data)
  );

  // address decode in X
  always_comb begin
    if (bus_addr[31:16] != IO_PAGE)           x_sel = SEL_DMEM;
    else if (bus_addr[15:4] == SERIAL_BASE[15:4]) x_sel = SEL_SERIAL;
    else                                        x_sel = SEL_EXT;
  end

  always_ff @(posedge clk) begin
    if (rst) m_sel <= SEL_DMEM;
    else     m_sel <= x_sel;
  end

  mips150_dmem #(.DEPTH(DMEM_WORDS)) u_dmem (
    .clk(clk),
    .addr(bus_addr[DAW+1:2]),
    .we((x_sel == SEL_DMEM) ? bus_we : 4'b0000),
    .wdata(bus_wdata),
    .rdata(dmem_rdata)
  );

  // serial line interface
  logic [7:0] tx_data, rx_data;
  logic       tx_valid, tx_ready, rx_valid;

  uart_cpu_adapter u_adapter (
    .clk(clk), .rst(rst),
    .sel(x_sel == SEL_SERIAL), .offset(bus_addr[3:0]),
    .re(bus_re), .we(bus_we[0]), .wdata(bus_wdata[7:0]),
    .rdata(serial_rdata),
    .tx_data(tx_data), .tx_valid(tx_valid), .tx_ready(tx_ready),
    .rx_data(rx_data), .rx_valid(rx_valid)
  );

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_tx (
    .clk(clk), .rst(rst), .data(tx_data), .valid(tx_valid), .ready(tx_ready),
    .serial_out(serial_out)
  );

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_rx (
    .clk(clk), .rst(rst), .serial_in(serial_in), .data(rx_data), .valid(rx_valid)
  );

  // external devices
  assign ext_io_addr  = bus_addr[15:0];
  assign ext_io_re    = (x_sel == SEL_EXT) && bus_re;
  assign ext_io_we    = (x_sel == SEL_EXT) ? bus_we : 4'b0000;
  assign ext_io_wdata = bus_wdata;

  // read data in M
  always_comb begin
    unique case (m_sel)
      SEL_SERIAL: bus_rdata = serial_rdata;
      SEL_EXT:    bus_rdata = ext_io_rdata;
      default:    bus_rdata = dmem_rdata;
    endcase
  end

endmodule
