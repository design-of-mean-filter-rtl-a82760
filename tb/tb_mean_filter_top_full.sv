// tb_mean_filter_top_full: one complete operation of the system at its default
// size, a 512 x 512 image, in the default mode (clamped sum / 8).
//
// The image is generated here (a smooth gradient with noise and a few
// saturated squares), sent through a model of the UART Lite core, filtered and
// received back; every one of the 262,144 output pixels is compared with a
// reference filter (zero-padded 3x3 sum / 8, clamped at 255). The filter pass
// must take 12 cycles per pixel plus one. Clamping and border windows are
// counted and must occur. For information the testbench also compares the
// output with a true rounded mean (sum / 9, zero padding) and prints how far
// the two grey-level histograms lie apart.
module tb_mean_filter_top_full;
  import mean_filter_pkg::*;

  localparam int NI   = IMG_SIZE_DEF;
  localparam int NPIX = NI * NI;

  logic clk = 1'b0, reset = 1'b1;
  logic init_process, finish, loaded, berr;
  logic [3:0]  awaddr, araddr, wstrb;
  logic [31:0] wdata, rdata;
  logic        awvalid, awready, wvalid, wready, bvalid, bready;
  logic        arvalid, arready, rvalid, rready, irq;
  logic [1:0]  bresp, rresp;
  logic        rx_push, rx_full, tx_valid;
  logic [7:0]  rx_byte, tx_byte;

  pixel_t img [NPIX];
  pixel_t got [NPIX];
  int     ntx = 0;
  int     checks = 0, failures = 0, mism = 0;
  int     n_clamp = 0, n_border = 0;

  mean_filter_top dut (
    .clk(clk), .reset(reset), .init_process(init_process),
    .finish_flag_process(finish), .image_loaded(loaded), .bus_error(berr),
    .m_axi_awaddr(awaddr), .m_axi_awvalid(awvalid), .m_axi_awready(awready),
    .m_axi_wdata(wdata), .m_axi_wstrb(wstrb), .m_axi_wvalid(wvalid), .m_axi_wready(wready),
    .m_axi_bresp(bresp), .m_axi_bvalid(bvalid), .m_axi_bready(bready),
    .m_axi_araddr(araddr), .m_axi_arvalid(arvalid), .m_axi_arready(arready),
    .m_axi_rdata(rdata), .m_axi_rresp(rresp), .m_axi_rvalid(rvalid), .m_axi_rready(rready),
    .uart_interrupt(irq));

  axi_uart_lite_model #(.TX_BYTE_CYCLES(4)) uart (
    .clk(clk), .reset(reset),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .interrupt(irq), .rx_push(rx_push), .rx_byte(rx_byte), .rx_full(rx_full),
    .tx_valid(tx_valid), .tx_byte(tx_byte));

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (!reset && tx_valid) begin
      if (ntx < NPIX) got[ntx] <= tx_byte;
      ntx <= ntx + 1;
    end
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist_hw [256], hist_true [256];

  function automatic int true_mean(input int r, input int c);
    int s = 0;
    for (int dc = -1; dc <= 1; dc++)
      for (int dr = -1; dr <= 1; dr++)
        if (r + dr >= 0 && r + dr < NI && c + dc >= 0 && c + dc < NI)
          s += int'(img[(c + dc) * NI + (r + dr)]);
    return (s + 4) / 9;
  endfunction

  function automatic int ref_pixel(input int r, input int c);
    int s = 0;
    for (int dc = -1; dc <= 1; dc++)
      for (int dr = -1; dr <= 1; dr++)
        if (r + dr >= 0 && r + dr < NI && c + dc >= 0 && c + dc < NI)
          s += int'(img[(c + dc) * NI + (r + dr)]);
    return (s / 8 > 255) ? 255 : s / 8;
  endfunction

  initial begin
    int lat, e;
    init_process = 0; rx_push = 0; rx_byte = '0;
    for (int v = 0; v < 256; v++) begin hist_hw[v] = 0; hist_true[v] = 0; end
    for (int c = 0; c < NI; c++)
      for (int r = 0; r < NI; r++) begin
        e = (r + c) / 4 + int'($urandom % 32);
        if ((r / 32) % 4 == 1 && (c / 32) % 4 == 2) e = 255;
        img[c * NI + r] = pixel_t'((e > 255) ? 255 : e);
      end
    repeat (3) @(posedge clk);
    reset = 0;
    // the handler clears the UART FIFOs once after reset: start sending after that
    repeat (50) @(posedge clk);
    for (int i = 0; i < NPIX; i++) begin
      @(negedge clk);
      while (rx_full) @(negedge clk);
      rx_push = 1; rx_byte = img[i];
      @(negedge clk);
      rx_push = 0;
    end
    while (!loaded) @(negedge clk);
    init_process = 1;
    @(negedge clk);
    init_process = 0;
    lat = 1;
    while (!finish) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 12 * NPIX + 1) begin
      failures++;
      $display("FAIL filter pass took %0d cycles, expected %0d", lat, 12 * NPIX + 1);
    end
    while (ntx < NPIX) @(negedge clk);
    for (int c = 0; c < NI; c++)
      for (int r = 0; r < NI; r++) begin
        e = ref_pixel(r, c);
        checks++;
        if (int'(got[c * NI + r]) != e) begin
          failures++;
          if (mism++ < 10) $display("FAIL pixel r%0d c%0d: got %0d expected %0d", r, c, got[c * NI + r], e);
        end
        if (e == 255) n_clamp++;
        hist_hw[got[c * NI + r]]++;
        hist_true[true_mean(r, c)]++;
        if (r == 0 || c == 0 || r == NI - 1 || c == NI - 1) n_border++;
      end
    checks++;
    if (berr) begin failures++; $display("FAIL bus error"); end
    if (n_clamp == 0 || n_border == 0) begin failures++; $display("FAIL clamp/border not exercised"); end
    begin
      automatic int l1 = 0;
      for (int v = 0; v < 256; v++) l1 += (hist_hw[v] > hist_true[v]) ? hist_hw[v] - hist_true[v] : hist_true[v] - hist_hw[v];
      $display("histogram distance to a true 3x3 mean: %0d of %0d pixels moved bins", l1 / 2, NPIX);
    end
    $display("pixels=%0d clamp=%0d border=%0d filter_cycles=%0d", NPIX, n_clamp, n_border, lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
