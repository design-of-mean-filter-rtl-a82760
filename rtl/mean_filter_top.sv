// mean_filter_top: 3x3 mean filter system for grey-scale images.
//
// An image of IMG_SIZE x IMG_SIZE 8-bit pixels arrives byte by byte through an
// AXI UART Lite core. The UART handler stores it in BRAM1 (input image). A
// pulse on init_process starts the scheduler, which hands every (row, col) to
// the mean filter; the filter reads the 3x3 neighbourhood from BRAM1 port A,
// averages it (sum >> 3) and writes the result to BRAM2 (output image) port A.
// When the last pixel is done the scheduler pulses finish_flag_process and the
// UART handler reads BRAM2 through port B and sends it back through the UART.
//
// The wiring follows the system block diagram: scheduler -> mean filter
// (init_single_op, row, column / finish_flag_single_op), mean filter ->
// BRAM1 port A (read) and BRAM2 port A (write), UART handler -> BRAM1 port B
// (write) and BRAM2 port B (read), UART handler <-> UART Lite over AXI. The UART
// Lite core itself is not part of this RTL: its AXI4-Lite slave port and its
// interrupt are ports of this module, to be connected to the core (or to a
// model in simulation).
//
// Interface: one clock, synchronous active-high reset. image_loaded is high
// while a whole image sits in BRAM1 and the output has not been sent yet;
// init_process should be pulsed then. Timing: 12 cycles per pixel in the
// filter pass; finish_flag_process is high 12 * IMG_SIZE^2 + 1 cycles after the
// cycle in which init_process is seen.
module mean_filter_top
  import mean_filter_pkg::*;
#(
  parameter int unsigned IMG_SIZE  = IMG_SIZE_DEF,
  parameter bit          THRESH_EN = 1'b0,
  parameter int          THETA     = 0,
  parameter int unsigned POLL_GAP  = 16
) (
  input  logic                  clk,
  input  logic                  reset,
  input  logic                  init_process,
  output logic                  finish_flag_process,
  output logic                  image_loaded,
  output logic                  bus_error,
  // AXI4-Lite master to the UART Lite core
  output logic [AXI_ADDR_W-1:0] m_axi_awaddr,
  output logic                  m_axi_awvalid,
  input  logic                  m_axi_awready,
  output logic [AXI_DATA_W-1:0] m_axi_wdata,
  output logic [3:0]            m_axi_wstrb,
  output logic                  m_axi_wvalid,
  input  logic                  m_axi_wready,
  input  logic [1:0]            m_axi_bresp,
  input  logic                  m_axi_bvalid,
  output logic                  m_axi_bready,
  output logic [AXI_ADDR_W-1:0] m_axi_araddr,
  output logic                  m_axi_arvalid,
  input  logic                  m_axi_arready,
  input  logic [AXI_DATA_W-1:0] m_axi_rdata,
  input  logic [1:0]            m_axi_rresp,
  input  logic                  m_axi_rvalid,
  output logic                  m_axi_rready,
  input  logic                  uart_interrupt
);

  localparam int unsigned ROW_W  = $clog2(IMG_SIZE);
  localparam int unsigned ADDR_W = $clog2(IMG_SIZE * IMG_SIZE);

  // scheduler <-> mean filter
  logic             init_single_op, finish_flag_single_op;
  logic [ROW_W-1:0] row, col;

  // mean filter <-> BRAMs (port A)
  logic              ena_ram1;
  logic [ADDR_W-1:0] addra_in;
  pixel_t            pixel_in;
  logic              wea_ram2;
  logic [ADDR_W-1:0] addr_out_img;
  pixel_t            pixel_out;
  pixel_t            aouta_unused, doutb_ram1_unused;

  // UART handler <-> BRAMs (port B)
  logic              enb_ram1, web_ram1, enb_ram2;
  logic [ADDR_W-1:0] addrb_ram1, addrb_ram2;
  pixel_t            dinb_ram1, doutb_ram2;

  scheduler #(
    .IMG_SIZE (IMG_SIZE)
  ) u_scheduler (
    .clk                   (clk),
    .reset                 (reset),
    .init_process          (init_process),
    .finish_flag_process   (finish_flag_process),
    .init_single_op        (init_single_op),
    .row                   (row),
    .col                   (col),
    .finish_flag_single_op (finish_flag_single_op)
  );

  mean_filter #(
    .IMG_SIZE  (IMG_SIZE),
    .THRESH_EN (THRESH_EN),
    .THETA     (THETA)
  ) u_mean_filter (
    .clk                   (clk),
    .reset_in              (reset),
    .init_single_op        (init_single_op),
    .row                   (row),
    .col                   (col),
    .finish_flag_single_op (finish_flag_single_op),
    .en_in                 (ena_ram1),
    .addr_in               (addra_in),
    .pixel_in              (pixel_in),
    .wea_out               (wea_ram2),
    .addr_out_img          (addr_out_img),
    .pixel_out             (pixel_out)
  );

  // BRAM1: input image. Port A read by the filter, port B written by the UART.
  bram_tdp #(
    .ADDR_W (ADDR_W),
    .DATA_W (PIX_W)
  ) u_bram1 (
    .clk   (clk),
    .ena   (ena_ram1),
    .wea   (1'b0),
    .addra (addra_in),
    .dina  ('0),
    .douta (pixel_in),
    .enb   (enb_ram1),
    .web   (web_ram1),
    .addrb (addrb_ram1),
    .dinb  (dinb_ram1),
    .doutb (doutb_ram1_unused)
  );

  // BRAM2: output image. Port A written by the filter, port B read by the UART.
  bram_tdp #(
    .ADDR_W (ADDR_W),
    .DATA_W (PIX_W)
  ) u_bram2 (
    .clk   (clk),
    .ena   (wea_ram2),
    .wea   (wea_ram2),
    .addra (addr_out_img),
    .dina  (pixel_out),
    .douta (aouta_unused),
    .enb   (enb_ram2),
    .web   (1'b0),
    .addrb (addrb_ram2),
    .dinb  ('0),
    .doutb (doutb_ram2)
  );

  uart_handler #(
    .IMG_SIZE (IMG_SIZE),
    .POLL_GAP (POLL_GAP)
  ) u_uart_handler (
    .clk                 (clk),
    .reset               (reset),
    .finish_flag_process (finish_flag_process),
    .image_loaded        (image_loaded),
    .bus_error           (bus_error),
    .enb_ram1            (enb_ram1),
    .web_ram1            (web_ram1),
    .addrb_ram1          (addrb_ram1),
    .dinb_ram1           (dinb_ram1),
    .enb_ram2            (enb_ram2),
    .addrb_ram2          (addrb_ram2),
    .doutb_ram2          (doutb_ram2),
    .m_axi_awaddr        (m_axi_awaddr),
    .m_axi_awvalid       (m_axi_awvalid),
    .m_axi_awready       (m_axi_awready),
    .m_axi_wdata         (m_axi_wdata),
    .m_axi_wstrb         (m_axi_wstrb),
    .m_axi_wvalid        (m_axi_wvalid),
    .m_axi_wready        (m_axi_wready),
    .m_axi_bresp         (m_axi_bresp),
    .m_axi_bvalid        (m_axi_bvalid),
    .m_axi_bready        (m_axi_bready),
    .m_axi_araddr        (m_axi_araddr),
    .m_axi_arvalid       (m_axi_arvalid),
    .m_axi_arready       (m_axi_arready),
    .m_axi_rdata         (m_axi_rdata),
    .m_axi_rresp         (m_axi_rresp),
    .m_axi_rvalid        (m_axi_rvalid),
    .m_axi_rready        (m_axi_rready),
    .interrupt_in        (uart_interrupt)
  );

endmodule
