// mean_filter_pkg: constants and types shared by the 3x3 mean filter system.
//
// Holds the default image size (512 x 512 grey-scale pixels, 8 bits each), the
// shift used in place of the division by 9, and the register map of the AXI
// UART Lite core that the UART handler talks to. The register offsets and bit
// positions are those of the common AXI UART Lite core (RX FIFO at 0x0, TX FIFO
// at 0x4, status at 0x8, control at 0xC); the system only names "four
// registers", so the map is this design's choice of core.
package mean_filter_pkg;

  // Image geometry and pixel format.
  localparam int unsigned IMG_SIZE_DEF = 512;  // square image, pixels per side
  localparam int unsigned PIX_W        = 8;    // grey level 0..255
  localparam int unsigned DIV_SHIFT    = 3;    // window sum >> 3 = sum / 8
  localparam int unsigned WIN_PIXELS   = 9;    // 3 x 3 window
  localparam int unsigned CNT_W        = 4;    // pixel counter 0..9

  // AXI4-Lite bus to the UART Lite core.
  localparam int unsigned AXI_ADDR_W = 4;
  localparam int unsigned AXI_DATA_W = 32;

  typedef enum logic [AXI_ADDR_W-1:0] {
    UL_RX_FIFO = 4'h0,
    UL_TX_FIFO = 4'h4,
    UL_STAT    = 4'h8,
    UL_CTRL    = 4'hC
  } ul_reg_e;

  // Status register bits.
  localparam int unsigned ST_RX_VALID = 0;
  localparam int unsigned ST_RX_FULL  = 1;
  localparam int unsigned ST_TX_EMPTY = 2;
  localparam int unsigned ST_TX_FULL  = 3;
  localparam int unsigned ST_INTR_EN  = 4;

  // Control register bits.
  localparam int unsigned CT_RST_TX  = 0;
  localparam int unsigned CT_RST_RX  = 1;
  localparam int unsigned CT_INTR_EN = 4;

  typedef logic [PIX_W-1:0] pixel_t;

endpackage
