// uart_handler: moves images between the UART Lite core and the two BRAMs.
//
// The handler is an AXI4-Lite master on the register interface of an AXI UART
// Lite core (RX FIFO, TX FIFO, status and control registers; offsets in
// mean_filter_pkg). After reset it writes the control register once to clear
// both FIFOs and enable the core's interrupt. It then receives an image:
// it reads the status register, and when the RX-valid bit is set it reads one
// byte from the RX FIFO and writes it through port B of the input BRAM at the
// next address (0, 1, 2, ... in arrival order, i.e. the address order
// col * IMG_SIZE + row). When all IMG_SIZE*IMG_SIZE bytes are in, image_loaded
// goes high. On finish_flag_process it sends the filtered image: for each
// address it reads the byte from port B of the output BRAM, polls the status
// register until the TX FIFO is not full and writes the byte to the TX FIFO.
// After the last byte it clears image_loaded and waits for the next image.
//
// When a status read finds nothing to do (RX FIFO empty, TX FIFO full) the
// handler waits for the core's interrupt, or at most POLL_GAP cycles, before it
// reads the status register again.
//
// Receiving into BRAM1, sending from BRAM2 and the use of AXI to reach the
// four UART Lite registers follow the system description; the polling
// sequence, the interrupt use, the byte order and the handshake with the
// scheduler (start sending on finish_flag_process) are this design's choices.
//
// Bus: one transaction at a time; bready and rready are held high. Each byte
// received costs one status read, one RX read and one BRAM write.
// Reset is synchronous and active high.
module uart_handler
  import mean_filter_pkg::*;
#(
  parameter int unsigned IMG_SIZE = IMG_SIZE_DEF,
  parameter int unsigned ADDR_W   = $clog2(IMG_SIZE * IMG_SIZE),
  parameter int unsigned POLL_GAP = 16
) (
  input  logic                  clk,
  input  logic                  reset,
  // system handshake
  input  logic                  finish_flag_process,
  output logic                  image_loaded,
  output logic                  bus_error,    // sticky: a bus response other than OKAY
  // BRAM1 (input image) port B: write
  output logic                  enb_ram1,
  output logic                  web_ram1,
  output logic [ADDR_W-1:0]     addrb_ram1,
  output pixel_t                dinb_ram1,
  // BRAM2 (output image) port B: read
  output logic                  enb_ram2,
  output logic [ADDR_W-1:0]     addrb_ram2,
  input  pixel_t                doutb_ram2,
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
  input  logic                  interrupt_in
);

  localparam int unsigned NPIX = IMG_SIZE * IMG_SIZE;
  localparam logic [ADDR_W-1:0] LAST = ADDR_W'(NPIX - 1);
  localparam int unsigned GAP_W = $clog2(POLL_GAP + 1);

  typedef enum logic [3:0] {
    S_CFG,       // write control register
    S_RX_STAT,   // read status
    S_RX_WAIT,   // nothing received yet
    S_RX_READ,   // read RX FIFO
    S_RX_STORE,  // write the byte to BRAM1
    S_LOADED,    // image in BRAM1, wait for the filter to finish
    S_TX_FETCH,  // read BRAM2
    S_TX_LATCH,  // BRAM2 data valid
    S_TX_STAT,   // read status
    S_TX_WAIT,   // TX FIFO full
    S_TX_WRITE   // write TX FIFO
  } state_e;

  state_e              state;
  logic [ADDR_W-1:0]   cnt;
  pixel_t              byte_q;
  logic [GAP_W-1:0]    gap;
  logic                issued;    // bus transaction of this state started

  // Bus engine: one transaction in flight, started by bus_start.
  logic                  bus_start, bus_we, bus_done;
  logic [AXI_ADDR_W-1:0] bus_addr;
  logic [AXI_DATA_W-1:0] bus_wdata;

  always_comb begin
    bus_start = 1'b0;
    bus_we    = 1'b0;
    bus_addr  = UL_STAT;
    bus_wdata = '0;
    unique case (state)
      S_CFG: begin
        bus_start = !issued;
        bus_we    = 1'b1;
        bus_addr  = UL_CTRL;
        bus_wdata = AXI_DATA_W'((1 << CT_RST_TX) | (1 << CT_RST_RX) | (1 << CT_INTR_EN));
      end
      S_RX_STAT, S_TX_STAT: bus_start = !issued;
      S_RX_READ: begin
        bus_start = !issued;
        bus_addr  = UL_RX_FIFO;
      end
      S_TX_WRITE: begin
        bus_start = !issued;
        bus_we    = 1'b1;
        bus_addr  = UL_TX_FIFO;
        bus_wdata = AXI_DATA_W'(byte_q);
      end
      default: ;
    endcase
    bus_done = issued && (m_axi_rvalid || m_axi_bvalid);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      m_axi_awvalid <= 1'b0;
      m_axi_wvalid  <= 1'b0;
      m_axi_arvalid <= 1'b0;
      m_axi_awaddr  <= '0;
      m_axi_araddr  <= '0;
      m_axi_wdata   <= '0;
    end else begin
      if (m_axi_awvalid && m_axi_awready) m_axi_awvalid <= 1'b0;
      if (m_axi_wvalid  && m_axi_wready)  m_axi_wvalid  <= 1'b0;
      if (m_axi_arvalid && m_axi_arready) m_axi_arvalid <= 1'b0;
      if (bus_start) begin
        if (bus_we) begin
          m_axi_awvalid <= 1'b1;
          m_axi_wvalid  <= 1'b1;
          m_axi_awaddr  <= bus_addr;
          m_axi_wdata   <= bus_wdata;
        end else begin
          m_axi_arvalid <= 1'b1;
          m_axi_araddr  <= bus_addr;
        end
      end
    end
  end

  assign m_axi_wstrb  = 4'b0001;
  assign m_axi_bready = 1'b1;
  assign m_axi_rready = 1'b1;

  // Main sequence.
  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= S_CFG;
      cnt       <= '0;
      byte_q    <= '0;
      gap       <= '0;
      issued    <= 1'b0;
      bus_error <= 1'b0;
    end else begin
      if (bus_start) issued <= 1'b1;
      if (bus_done) begin
        issued <= 1'b0;
        if ((m_axi_rvalid && m_axi_rresp != 2'b00) ||
            (m_axi_bvalid && m_axi_bresp != 2'b00)) begin
          bus_error <= 1'b1;
        end
      end

      unique case (state)
        S_CFG: if (bus_done) state <= S_RX_STAT;
        S_RX_STAT: begin
          if (bus_done) begin
            if (m_axi_rdata[ST_RX_VALID]) begin
              state <= S_RX_READ;
            end else begin
              gap   <= GAP_W'(POLL_GAP);
              state <= S_RX_WAIT;
            end
          end
        end
        S_RX_WAIT: begin
          gap <= gap - 1'b1;
          if (interrupt_in || gap == '0) state <= S_RX_STAT;
        end
        S_RX_READ: begin
          if (bus_done) begin
            byte_q <= m_axi_rdata[PIX_W-1:0];
            state  <= S_RX_STORE;
          end
        end
        S_RX_STORE: begin
          if (cnt == LAST) begin
            cnt   <= '0;
            state <= S_LOADED;
          end else begin
            cnt   <= cnt + 1'b1;
            state <= S_RX_STAT;
          end
        end
        S_LOADED: if (finish_flag_process) state <= S_TX_FETCH;
        S_TX_FETCH: state <= S_TX_LATCH;
        S_TX_LATCH: begin
          byte_q <= doutb_ram2;
          state  <= S_TX_STAT;
        end
        S_TX_STAT: begin
          if (bus_done) begin
            if (m_axi_rdata[ST_TX_FULL]) begin
              gap   <= GAP_W'(POLL_GAP);
              state <= S_TX_WAIT;
            end else begin
              state <= S_TX_WRITE;
            end
          end
        end
        S_TX_WAIT: begin
          gap <= gap - 1'b1;
          if (interrupt_in || gap == '0) state <= S_TX_STAT;
        end
        S_TX_WRITE: begin
          if (bus_done) begin
            if (cnt == LAST) begin
              cnt   <= '0;
              state <= S_RX_STAT;
            end else begin
              cnt   <= cnt + 1'b1;
              state <= S_TX_FETCH;
            end
          end
        end
        default: state <= S_CFG;
      endcase
    end
  end

  assign image_loaded = (state == S_LOADED);
  assign enb_ram1     = (state == S_RX_STORE);
  assign web_ram1     = (state == S_RX_STORE);
  assign addrb_ram1   = cnt;
  assign dinb_ram1    = byte_q;
  assign enb_ram2     = (state == S_TX_FETCH);
  assign addrb_ram2   = cnt;

  // One transaction at a time: no response may arrive unasked.
  a_no_stray_resp: assert property (@(posedge clk) disable iff (reset)
    (m_axi_rvalid || m_axi_bvalid) |-> issued);

endmodule
