// axi_uart_lite_model: behavioural model of an AXI UART Lite core, for
// simulation only.
//
// AXI4-Lite slave with the four registers of the core: RX FIFO (0x0, read),
// TX FIFO (0x4, write), status (0x8) and control (0xC). Both FIFOs are 16 deep.
// The serial line is replaced by a byte stream: the testbench pushes received
// bytes with rx_push/rx_byte (only while rx_full is low), and the model takes
// one byte from the TX FIFO every TX_BYTE_CYCLES cycles and shows it on
// tx_valid/tx_byte, as a UART transmitter at that byte rate would. interrupt
// pulses for one cycle when the RX FIFO becomes non-empty or the TX FIFO
// becomes empty, if enabled in the control register. Ready signals are delayed
// by random amounts to exercise the master's handshakes, and assertions check
// that the master holds its valid signals and payloads until accepted.
module axi_uart_lite_model #(
  parameter int unsigned TX_BYTE_CYCLES = 20
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [3:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [3:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  output logic        interrupt,
  // byte-level line side
  input  logic        rx_push,
  input  logic [7:0]  rx_byte,
  output logic        rx_full,
  output logic        tx_valid,
  output logic [7:0]  tx_byte
);

  localparam int DEPTH = 16;

  logic [7:0] rxq[$];
  logic [7:0] txq[$];
  logic       intr_en;
  logic       aw_got, w_got;
  logic [3:0] aw_addr_q;
  logic [7:0] w_data_q;
  int         tx_timer;

  // statistics read by testbenches
  int stat_reads_rx_empty = 0;
  int stat_reads_tx_full  = 0;
  int irq_pulses          = 0;
  int overruns            = 0;
  int ctrl_writes         = 0;
  int tx_fifo_max         = 0;

  function automatic logic [31:0] status();
    logic [31:0] s;
    s    = '0;
    s[0] = (rxq.size() != 0);
    s[1] = (rxq.size() >= DEPTH);
    s[2] = (txq.size() == 0);
    s[3] = (txq.size() >= DEPTH);
    s[4] = intr_en;
    return s;
  endfunction

  always_ff @(posedge clk) begin
    logic rx_was_empty, tx_was_empty;
    if (reset) begin
      rxq.delete();
      txq.delete();
      intr_en       <= 1'b0;
      aw_got        <= 1'b0;
      w_got         <= 1'b0;
      s_axi_awready <= 1'b0;
      s_axi_wready  <= 1'b0;
      s_axi_arready <= 1'b0;
      s_axi_bvalid  <= 1'b0;
      s_axi_rvalid  <= 1'b0;
      s_axi_bresp   <= 2'b00;
      s_axi_rresp   <= 2'b00;
      s_axi_rdata   <= '0;
      interrupt     <= 1'b0;
      tx_valid      <= 1'b0;
      tx_byte       <= '0;
      tx_timer      <= TX_BYTE_CYCLES;
      rx_full       <= 1'b0;
    end else begin
      rx_was_empty = (rxq.size() == 0);
      tx_was_empty = (txq.size() == 0);
      interrupt <= 1'b0;
      tx_valid  <= 1'b0;

      // line side
      if (rx_push) begin
        if (rxq.size() < DEPTH) rxq.push_back(rx_byte);
        else overruns++;
      end
      if (tx_timer > 0) tx_timer <= tx_timer - 1;
      else if (txq.size() != 0) begin
        tx_byte  <= txq.pop_front();
        tx_valid <= 1'b1;
        tx_timer <= TX_BYTE_CYCLES;
      end

      // write channel: random ready, response once both halves are in
      s_axi_awready <= 1'b0;
      s_axi_wready  <= 1'b0;
      if (s_axi_awvalid && !aw_got && !s_axi_awready && ($urandom % 3 != 0)) s_axi_awready <= 1'b1;
      if (s_axi_wvalid  && !w_got  && !s_axi_wready  && ($urandom % 3 != 0)) s_axi_wready  <= 1'b1;
      if (s_axi_awvalid && s_axi_awready) begin aw_got <= 1'b1; aw_addr_q <= s_axi_awaddr; end
      if (s_axi_wvalid  && s_axi_wready)  begin w_got  <= 1'b1; w_data_q  <= s_axi_wdata[7:0]; end
      if (aw_got && w_got && !s_axi_bvalid) begin
        aw_got       <= 1'b0;
        w_got        <= 1'b0;
        s_axi_bvalid <= 1'b1;
        s_axi_bresp  <= 2'b00;
        case (aw_addr_q)
          4'h4: if (txq.size() < DEPTH) txq.push_back(w_data_q);
          4'hC: begin
            ctrl_writes++;
            if (w_data_q[0]) txq.delete();
            if (w_data_q[1]) rxq.delete();
            intr_en <= w_data_q[4];
          end
          default: s_axi_bresp <= 2'b10;  // SLVERR
        endcase
        if (txq.size() > tx_fifo_max) tx_fifo_max = txq.size();
      end
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;

      // read channel
      s_axi_arready <= 1'b0;
      if (s_axi_arvalid && !s_axi_arready && !s_axi_rvalid && ($urandom % 2 == 0)) s_axi_arready <= 1'b1;
      if (s_axi_arvalid && s_axi_arready) begin
        s_axi_rvalid <= 1'b1;
        s_axi_rresp  <= 2'b00;
        case (s_axi_araddr)
          4'h0: s_axi_rdata <= (rxq.size() != 0) ? {24'h0, rxq.pop_front()} : 32'h0;
          4'h8: begin
            s_axi_rdata <= status();
            if (rxq.size() == 0) stat_reads_rx_empty++;
            if (txq.size() >= DEPTH) stat_reads_tx_full++;
          end
          default: begin s_axi_rdata <= '0; s_axi_rresp <= 2'b10; end
        endcase
      end
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;

      // interrupt on RX data arriving or TX FIFO running empty
      if (intr_en && ((rx_was_empty && rxq.size() != 0) || (!tx_was_empty && txq.size() == 0))) begin
        interrupt <= 1'b1;
        irq_pulses++;
      end
      rx_full <= (rxq.size() >= DEPTH - 1);
    end
  end

  // AXI rules for the master: a valid stays high, with a stable payload,
  // until the handshake.
  a_aw_hold: assert property (@(posedge clk) disable iff (reset)
    s_axi_awvalid && !s_axi_awready |=> s_axi_awvalid && $stable(s_axi_awaddr));
  a_w_hold: assert property (@(posedge clk) disable iff (reset)
    s_axi_wvalid && !s_axi_wready |=> s_axi_wvalid && $stable(s_axi_wdata));
  a_ar_hold: assert property (@(posedge clk) disable iff (reset)
    s_axi_arvalid && !s_axi_arready |=> s_axi_arvalid && $stable(s_axi_araddr));

endmodule
