// tb_uart_handler: self-checking test of the UART handler against a model of
// the UART Lite core.
//
// An 8 x 8 image (64 bytes) is pushed into the model's receiver with random
// gaps. The testbench records every write the handler makes to BRAM1 port B
// and checks address order and data, and that image_loaded rises after the
// last byte. It then fills a stand-in for BRAM2 (one cycle read latency),
// pulses finish_flag_process and checks that the 64 bytes leave the
// transmitter in address order. The slow transmitter (20 cycles per byte)
// fills the TX FIFO, so the handler's "TX full" wait is exercised; idle gaps on
// the receiver exercise the "RX empty" wait and the interrupt. Two images are
// run back to back.
module tb_uart_handler;
  import mean_filter_pkg::*;

  localparam int unsigned N    = 8;
  localparam int unsigned NPIX = N * N;
  localparam int unsigned AW   = $clog2(NPIX);

  logic clk = 1'b0, reset = 1'b1;
  logic finish_flag_process, image_loaded, bus_error;
  logic enb_ram1, web_ram1, enb_ram2;
  logic [AW-1:0] addrb_ram1, addrb_ram2;
  pixel_t dinb_ram1, doutb_ram2;
  logic [3:0]  awaddr, araddr, wstrb;
  logic [31:0] wdata, rdata;
  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready, irq;
  logic [1:0]  bresp, rresp;
  logic        rx_push, rx_full, tx_valid;
  logic [7:0]  rx_byte, tx_byte;

  pixel_t sent [NPIX];
  pixel_t ram1 [NPIX];
  pixel_t ram2 [NPIX];
  int     nwrites, ntx, checks = 0, failures = 0;

  uart_handler #(.IMG_SIZE(N)) dut (
    .clk(clk), .reset(reset), .finish_flag_process(finish_flag_process),
    .image_loaded(image_loaded), .bus_error(bus_error),
    .enb_ram1(enb_ram1), .web_ram1(web_ram1), .addrb_ram1(addrb_ram1), .dinb_ram1(dinb_ram1),
    .enb_ram2(enb_ram2), .addrb_ram2(addrb_ram2), .doutb_ram2(doutb_ram2),
    .m_axi_awaddr(awaddr), .m_axi_awvalid(awvalid), .m_axi_awready(awready),
    .m_axi_wdata(wdata), .m_axi_wstrb(wstrb), .m_axi_wvalid(wvalid), .m_axi_wready(wready),
    .m_axi_bresp(bresp), .m_axi_bvalid(bvalid), .m_axi_bready(bready),
    .m_axi_araddr(araddr), .m_axi_arvalid(arvalid), .m_axi_arready(arready),
    .m_axi_rdata(rdata), .m_axi_rresp(rresp), .m_axi_rvalid(rvalid), .m_axi_rready(rready),
    .interrupt_in(irq));

  axi_uart_lite_model #(.TX_BYTE_CYCLES(20)) uart (
    .clk(clk), .reset(reset),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .interrupt(irq), .rx_push(rx_push), .rx_byte(rx_byte), .rx_full(rx_full),
    .tx_valid(tx_valid), .tx_byte(tx_byte));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // BRAM stand-ins
  always @(posedge clk) begin
    if (enb_ram1 && web_ram1 && !reset) begin
      check("BRAM1 write order", int'(addrb_ram1), nwrites);
      ram1[addrb_ram1] <= dinb_ram1;
      nwrites <= nwrites + 1;
    end
    if (enb_ram2) doutb_ram2 <= ram2[addrb_ram2];
    if (tx_valid && !reset) begin
      if (ntx < NPIX) check($sformatf("TX byte %0d t=%0t ld=%0d", ntx, $time, nwrites), int'(tx_byte), int'(ram2[ntx]));
      ntx <= ntx + 1;
    end
  end

  initial begin
    rx_push = 0; rx_byte = '0; finish_flag_process = 0; nwrites = 0; ntx = 0;
    repeat (3) @(posedge clk);
    reset = 0;
    // the handler clears the UART FIFOs once after reset: start sending after that
    repeat (50) @(posedge clk);
    for (int img = 0; img < 2; img++) begin
      nwrites = 0; ntx = 0;
      for (int i = 0; i < NPIX; i++) sent[i] = pixel_t'($urandom);
      for (int i = 0; i < NPIX; i++) begin
        @(negedge clk);
        check("not loaded early", int'(image_loaded), 0);
        // random gaps, sometimes long enough for the handler to find RX empty
        repeat ($urandom % ((i % 16 == 0) ? 60 : 4)) @(negedge clk);
        while (rx_full) @(negedge clk);
        rx_push = 1; rx_byte = sent[i];
        @(negedge clk);
        rx_push = 0;
      end
      while (!image_loaded) @(negedge clk);
      check("bytes stored", nwrites, NPIX);
      for (int i = 0; i < NPIX; i++) check("BRAM1 data", int'(ram1[i]), int'(sent[i]));
      repeat (10) @(negedge clk);
      check("no send before finish", ntx, 0);
      for (int i = 0; i < NPIX; i++) ram2[i] = pixel_t'($urandom);
      finish_flag_process = 1;
      @(negedge clk);
      finish_flag_process = 0;
      while (ntx < NPIX) @(negedge clk);
      check("loaded cleared", int'(image_loaded), 0);
    end
    repeat (100) @(negedge clk);
    check("no extra TX bytes", ntx, NPIX);
    check("bus errors", int'(bus_error), 0);
    check("control writes", uart.ctrl_writes, 1);
    if (uart.stat_reads_rx_empty == 0) begin failures++; $display("RX-empty wait never seen"); end
    if (uart.stat_reads_tx_full == 0)  begin failures++; $display("TX-full wait never seen"); end
    if (uart.irq_pulses == 0)          begin failures++; $display("no interrupt"); end
    $display("rx_empty_polls=%0d tx_full_polls=%0d irqs=%0d", uart.stat_reads_rx_empty,
             uart.stat_reads_tx_full, uart.irq_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
