// scheduler: runs the mean filter over every pixel of the image.
//
// A pulse (or level) on init_process while idle starts a pass. The scheduler
// then presents each (row, col) pair to the mean filter and raises
// init_single_op for one cycle, waits for finish_flag_single_op, and moves to
// the next pixel. row runs fastest, matching the input-image address
// col * IMG_SIZE + row, so consecutive pixels sit at consecutive addresses.
// After the last pixel (row = col = IMG_SIZE-1) finish_flag_process is high for
// one cycle and the scheduler returns to idle.
//
// The start input, the per-pixel handshake and the finish flag follow the
// system's block diagram; the sweep order, the one-cycle pulses and the
// synchronous active-high reset are this design's choices.
//
// Timing: init_single_op for the first pixel is high in the cycle after
// init_process is seen; each later one follows one cycle after the previous
// finish_flag_single_op. finish_flag_process is high in the cycle after the
// last finish_flag_single_op.
module scheduler
  import mean_filter_pkg::*;
#(
  parameter int unsigned IMG_SIZE = IMG_SIZE_DEF,
  parameter int unsigned ROW_W    = $clog2(IMG_SIZE)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             init_process,
  output logic             finish_flag_process,
  // to / from the mean filter
  output logic             init_single_op,
  output logic [ROW_W-1:0] row,
  output logic [ROW_W-1:0] col,
  input  logic             finish_flag_single_op
);

  typedef enum logic [1:0] {
    S_IDLE,
    S_START,
    S_WAIT,
    S_DONE
  } state_e;

  state_e state;

  localparam logic [ROW_W-1:0] LAST = ROW_W'(IMG_SIZE - 1);

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= S_IDLE;
      row   <= '0;
      col   <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (init_process) begin
            row   <= '0;
            col   <= '0;
            state <= S_START;
          end
        end
        S_START: state <= S_WAIT;
        S_WAIT: begin
          if (finish_flag_single_op) begin
            if (row == LAST) begin
              row <= '0;
              if (col == LAST) begin
                col   <= '0;
                state <= S_DONE;
              end else begin
                col   <= col + 1'b1;
                state <= S_START;
              end
            end else begin
              row   <= row + 1'b1;
              state <= S_START;
            end
          end
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign init_single_op      = (state == S_START);
  assign finish_flag_process = (state == S_DONE);

endmodule
