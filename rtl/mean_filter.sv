// mean_filter: computes one pixel of the 3x3 mean-filtered image.
//
// When init_single_op is seen in the idle state the block latches (row, col)
// and walks the nine window positions, one per cycle, with a 4-bit pixel
// counter. For each position it forms the input-image address
//     (col + col_offset) * IMG_SIZE + (row + row_offset),  offsets in -1..+1,
// reads the pixel from the input BRAM (one cycle of read latency) and adds it
// to a running sum. Division by nine is replaced by a right shift of three
// (division by eight), which keeps a divider out of the datapath; the result is
// clamped to 255, since nine pixels over eight can exceed the pixel range. The
// pixel is then written to the output BRAM at col * IMG_SIZE + row and
// finish_flag_single_op is raised for one cycle.
//
// Window positions that fall outside the image are not read and add zero
// (zero padding), so border pixels get an output too; this border rule is this
// design's choice.
//
// Optional correction step (THRESH_EN = 1): with I the centre pixel and M the
// mean, the output is M when I - M > THETA and I otherwise. It is off by
// default, where the output is always M.
//
// Timing: if init_single_op is high in cycle t, the nine reads are issued in
// cycles t+1..t+9, the write strobe wea_out and finish_flag_single_op are high
// in cycle t+11. init_single_op is ignored while an operation is running.
// Reset (reset_in) is synchronous and active high.
module mean_filter
  import mean_filter_pkg::*;
#(
  parameter int unsigned IMG_SIZE  = IMG_SIZE_DEF,
  parameter int unsigned ROW_W     = $clog2(IMG_SIZE),
  parameter int unsigned ADDR_W    = $clog2(IMG_SIZE * IMG_SIZE),
  parameter bit          THRESH_EN = 1'b0,
  parameter int          THETA     = 0
) (
  input  logic              clk,
  input  logic              reset_in,
  // from the scheduler
  input  logic              init_single_op,
  input  logic [ROW_W-1:0]  row,
  input  logic [ROW_W-1:0]  col,
  output logic              finish_flag_single_op,
  // input image BRAM, read port
  output logic              en_in,
  output logic [ADDR_W-1:0] addr_in,
  input  pixel_t            pixel_in,
  // output image BRAM, write port
  output logic              wea_out,
  output logic [ADDR_W-1:0] addr_out_img,
  output pixel_t            pixel_out
);

  localparam int unsigned SUM_W = PIX_W + CNT_W;  // 9 * 255 < 2**12

  typedef enum logic [1:0] {
    S_IDLE,
    S_READ,
    S_DRAIN,
    S_WRITE
  } state_e;

  state_e             state;
  logic [ROW_W-1:0]   row_q, col_q;
  logic [CNT_W-1:0]   pix_cnt;      // window position 0..8
  logic [1:0]         roff, coff;   // offset + 1, 0..2
  logic               rd_valid_q;   // a read was issued last cycle
  logic               rd_center_q;  // ... and it was the centre pixel
  logic [SUM_W-1:0]   sum;
  pixel_t             center;

  // Address of the current window position, with a range check.
  int                 r_pos, c_pos;
  logic               in_range;

  always_comb begin
    r_pos    = int'(row_q) + int'(roff) - 1;
    c_pos    = int'(col_q) + int'(coff) - 1;
    in_range = (r_pos >= 0) && (r_pos < int'(IMG_SIZE)) &&
               (c_pos >= 0) && (c_pos < int'(IMG_SIZE));
    en_in    = (state == S_READ) && in_range;
    addr_in  = ADDR_W'(c_pos * int'(IMG_SIZE) + r_pos);
  end

  always_ff @(posedge clk) begin
    if (reset_in) begin
      state       <= S_IDLE;
      row_q       <= '0;
      col_q       <= '0;
      pix_cnt     <= '0;
      roff        <= '0;
      coff        <= '0;
      rd_valid_q  <= 1'b0;
      rd_center_q <= 1'b0;
      sum         <= '0;
      center      <= '0;
    end else begin
      rd_valid_q  <= en_in;
      rd_center_q <= (state == S_READ) && (pix_cnt == CNT_W'(4));

      // Accumulate the pixel read in the previous cycle.
      if (rd_valid_q) begin
        sum <= sum + SUM_W'(pixel_in);
      end
      if (rd_center_q) begin
        center <= pixel_in;
      end

      unique case (state)
        S_IDLE: begin
          if (init_single_op) begin
            row_q   <= row;
            col_q   <= col;
            pix_cnt <= '0;
            roff    <= '0;
            coff    <= '0;
            sum     <= '0;
            state   <= S_READ;
          end
        end
        S_READ: begin
          // col_offset runs fastest; the loop ends when row_offset reaches +1.
          pix_cnt <= pix_cnt + 1'b1;
          if (coff == 2'd2) begin
            coff <= '0;
            roff <= roff + 1'b1;
          end else begin
            coff <= coff + 1'b1;
          end
          if (pix_cnt == CNT_W'(WIN_PIXELS - 1)) begin
            state <= S_DRAIN;
          end
        end
        S_DRAIN: state <= S_WRITE;
        S_WRITE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Mean by shift, clamped to the pixel range, then the optional correction.
  logic [SUM_W-1:0] shifted;
  pixel_t           mean;
  logic             replace;

  always_comb begin
    shifted = sum >> DIV_SHIFT;
    mean    = (shifted > SUM_W'(2 ** PIX_W - 1)) ? '1 : pixel_t'(shifted);
    replace = !THRESH_EN || ((int'(center) - int'(mean)) > THETA);
    pixel_out             = replace ? mean : center;
    wea_out               = (state == S_WRITE);
    finish_flag_single_op = (state == S_WRITE);
    addr_out_img          = ADDR_W'(int'(col_q) * int'(IMG_SIZE) + int'(row_q));
  end

  // The scheduler must not start a pixel while one is running.
  a_init_when_idle: assert property (@(posedge clk) disable iff (reset_in)
    init_single_op |-> state == S_IDLE);

endmodule
