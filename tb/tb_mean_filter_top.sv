// tb_mean_filter_top: end-to-end test of the mean filter system.
//
// Two systems with 8 x 8 images run side by side, each with its own model of
// the UART Lite core: instance 0 in the default mode (output = clamped
// zero-padded 3x3 sum / 8) and instance 1 with the correction step on
// (THETA = 10). For each of two images the testbench sends the pixels through
// the UART model, waits for image_loaded, pulses init_process, measures the
// cycles to finish_flag_process (12 per pixel + 1), collects the bytes the
// system sends back and compares them with a reference filter computed here.
// It counts how often each mechanism happened and fails if one never did:
// border windows with zero padding, clamping at 255, correction applied and
// not applied, the handler waiting on an empty RX FIFO and on a full TX FIFO,
// and UART interrupts.
module tb_mean_filter_top;
  import mean_filter_pkg::*;

  localparam int unsigned N     = 8;
  localparam int unsigned NPIX  = N * N;
  localparam int          THETA = 10;
  localparam int          NI    = N;

  logic clk = 1'b0, reset = 1'b1;
  logic init_process;
  logic finish [2], loaded [2], berr [2];
  logic [3:0]  awaddr [2], araddr [2], wstrb [2];
  logic [31:0] wdata [2], rdata [2];
  logic        awvalid [2], awready [2], wvalid [2], wready [2], bvalid [2], bready [2];
  logic        arvalid [2], arready [2], rvalid [2], rready [2], irq [2];
  logic [1:0]  bresp [2], rresp [2];
  logic        rx_push, rx_full [2], tx_valid [2];
  logic [7:0]  rx_byte, tx_byte [2];

  pixel_t img [NPIX];
  pixel_t got [2][NPIX];
  int     ntx [2];
  int     checks = 0, failures = 0;
  int     n_border = 0, n_clamp = 0, n_replace = 0, n_keep = 0;

  for (genvar k = 0; k < 2; k++) begin : g_sys
    mean_filter_top #(.IMG_SIZE(N), .THRESH_EN(k == 1), .THETA(THETA)) dut (
      .clk(clk), .reset(reset), .init_process(init_process),
      .finish_flag_process(finish[k]), .image_loaded(loaded[k]), .bus_error(berr[k]),
      .m_axi_awaddr(awaddr[k]), .m_axi_awvalid(awvalid[k]), .m_axi_awready(awready[k]),
      .m_axi_wdata(wdata[k]), .m_axi_wstrb(wstrb[k]), .m_axi_wvalid(wvalid[k]),
      .m_axi_wready(wready[k]), .m_axi_bresp(bresp[k]), .m_axi_bvalid(bvalid[k]),
      .m_axi_bready(bready[k]), .m_axi_araddr(araddr[k]), .m_axi_arvalid(arvalid[k]),
      .m_axi_arready(arready[k]), .m_axi_rdata(rdata[k]), .m_axi_rresp(rresp[k]),
      .m_axi_rvalid(rvalid[k]), .m_axi_rready(rready[k]), .uart_interrupt(irq[k]));

    axi_uart_lite_model #(.TX_BYTE_CYCLES(20)) uart (
      .clk(clk), .reset(reset),
      .s_axi_awaddr(awaddr[k]), .s_axi_awvalid(awvalid[k]), .s_axi_awready(awready[k]),
      .s_axi_wdata(wdata[k]), .s_axi_wstrb(wstrb[k]), .s_axi_wvalid(wvalid[k]),
      .s_axi_wready(wready[k]), .s_axi_bresp(bresp[k]), .s_axi_bvalid(bvalid[k]),
      .s_axi_bready(bready[k]), .s_axi_araddr(araddr[k]), .s_axi_arvalid(arvalid[k]),
      .s_axi_arready(arready[k]), .s_axi_rdata(rdata[k]), .s_axi_rresp(rresp[k]),
      .s_axi_rvalid(rvalid[k]), .s_axi_rready(rready[k]), .interrupt(irq[k]),
      .rx_push(rx_push), .rx_byte(rx_byte), .rx_full(rx_full[k]),
      .tx_valid(tx_valid[k]), .tx_byte(tx_byte[k]));

    always_ff @(posedge clk) begin
      if (!reset && tx_valid[k]) begin
        if (ntx[k] < NPIX) got[k][ntx[k]] <= tx_byte[k];
        ntx[k] <= ntx[k] + 1;
      end
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got_v, input int exp);
    checks++;
    if (got_v != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got_v, exp);
    end
  endtask

  // reference filter: zero padding, sum / 8, clamp, optional correction
  function automatic int ref_pixel(input int r, input int c, input bit corr);
    int s = 0, m, ctr;
    for (int dc = -1; dc <= 1; dc++)
      for (int dr = -1; dr <= 1; dr++)
        if (r + dr >= 0 && r + dr < NI && c + dc >= 0 && c + dc < NI)
          s += int'(img[(c + dc) * NI + (r + dr)]);
    m   = (s / 8 > 255) ? 255 : s / 8;
    ctr = int'(img[c * NI + r]);
    if (!corr) return m;
    return (ctr - m > THETA) ? m : ctr;
  endfunction

  initial begin
    int lat, m;
    init_process = 0; rx_push = 0; rx_byte = '0;
    ntx[0] = 0; ntx[1] = 0;
    repeat (3) @(posedge clk);
    reset = 0;
    // the handler clears the UART FIFOs once after reset: start sending after that
    repeat (50) @(posedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < NPIX; i++) img[i] = pixel_t'($urandom);
      for (int c = 0; c < 3; c++) for (int r = 0; r < 3; r++) img[(c + 2 + pass) * NI + r + 3] = 8'hFF;
      // send the image, with pauses now and then
      for (int i = 0; i < NPIX; i++) begin
        @(negedge clk);
        repeat ((i % 16 == 0) ? 50 : 0) @(negedge clk);
        while (rx_full[0] || rx_full[1]) @(negedge clk);
        rx_push = 1; rx_byte = img[i];
        @(negedge clk);
        rx_push = 0;
      end
      while (!(loaded[0] && loaded[1])) @(negedge clk);
      ntx[0] = 0; ntx[1] = 0;
      // run the filter pass
      init_process = 1;
      @(negedge clk);
      init_process = 0;
      lat = 1;
      while (!finish[0]) begin @(negedge clk); lat++; end
      check("filter pass cycles", lat, 12 * NPIX + 1);
      check("both finish together", int'(finish[1]), 1);
      // collect the output image
      while (ntx[0] < NPIX || ntx[1] < NPIX) @(negedge clk);
      for (int c = 0; c < NI; c++)
        for (int r = 0; r < NI; r++) begin
          check($sformatf("mean pixel r%0d c%0d", r, c), int'(got[0][c * NI + r]), ref_pixel(r, c, 0));
          check($sformatf("corrected pixel r%0d c%0d", r, c), int'(got[1][c * NI + r]), ref_pixel(r, c, 1));
          m = ref_pixel(r, c, 0);
          if (r == 0 || c == 0 || r == NI - 1 || c == NI - 1) n_border++;
          if (m == 255) n_clamp++;
          if (int'(img[c * NI + r]) - m > THETA) n_replace++; else n_keep++;
        end
    end
    repeat (200) @(negedge clk);
    check("no extra bytes 0", ntx[0], NPIX);
    check("no extra bytes 1", ntx[1], NPIX);
    check("bus error 0", int'(berr[0]), 0);
    check("bus error 1", int'(berr[1]), 0);
    if (n_border == 0)  begin failures++; $display("no zero-padded border window"); end
    if (n_clamp == 0)   begin failures++; $display("clamp never happened"); end
    if (n_replace == 0) begin failures++; $display("correction never applied"); end
    if (n_keep == 0)    begin failures++; $display("correction never kept the centre"); end
    if (g_sys[0].uart.stat_reads_rx_empty == 0) begin failures++; $display("no RX-empty wait"); end
    if (g_sys[0].uart.stat_reads_tx_full == 0)  begin failures++; $display("no TX-full wait"); end
    if (g_sys[0].uart.irq_pulses == 0)          begin failures++; $display("no interrupt"); end
    $display("border=%0d clamp=%0d replace=%0d keep=%0d rx_empty_waits=%0d tx_full_waits=%0d irqs=%0d",
             n_border, n_clamp, n_replace, n_keep, g_sys[0].uart.stat_reads_rx_empty,
             g_sys[0].uart.stat_reads_tx_full, g_sys[0].uart.irq_pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
