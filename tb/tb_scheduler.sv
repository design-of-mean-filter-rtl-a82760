// tb_scheduler: self-checking test of the scheduler.
//
// A stand-in for the mean filter answers each init_single_op with
// finish_flag_single_op after a random 1..6 cycles. For a 4 x 4 image the
// testbench checks the order of (row, col) pairs (row fastest), that no new
// pixel starts while one is outstanding, that the next init_single_op comes one
// cycle after each finish, that finish_flag_process comes once, one cycle after
// the last pixel, and that a second pass after a new init_process repeats it.
module tb_scheduler;
  localparam int unsigned N  = 4;
  localparam int unsigned RW = $clog2(N);

  logic          clk = 1'b0, reset = 1'b1;
  logic          init_process, finish_flag_process;
  logic          init_single_op, finish_flag_single_op;
  logic [RW-1:0] row, col;

  int checks = 0, failures = 0;
  int ops, outstanding, delay, done_count, since_finish;

  scheduler #(.IMG_SIZE(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (op %0d)", what, got, exp, ops);
    end
  endtask

  // filter stand-in and protocol checks
  always @(posedge clk) begin
    if (reset) begin
      finish_flag_single_op <= 1'b0;
      outstanding <= 0;
      delay <= 0;
      since_finish <= 0;
    end else begin
      finish_flag_single_op <= 1'b0;
      since_finish <= since_finish + 1;
      if (init_single_op) begin
        check("no overlap", outstanding, 0);
        check("row", int'(row), ops % N);
        check("col", int'(col), (ops / N) % N);
        if (ops % (N * N) != 0) check("restart gap", since_finish, 1);
        ops <= ops + 1;
        outstanding <= 1;
        delay <= 1 + int'($urandom % 6);
      end else if (outstanding == 1) begin
        if (delay == 1) begin
          finish_flag_single_op <= 1'b1;
          outstanding <= 0;
          since_finish <= 0;
        end
        delay <= delay - 1;
      end
      if (finish_flag_process) begin
        done_count <= done_count + 1;
        check("finish after last pixel", since_finish, 1);
        check("pixels done", ops % (N * N), 0);
        check("finish with nothing outstanding", outstanding, 0);
      end
    end
  end

  initial begin
    ops = 0; done_count = 0; init_process = 0;
    repeat (3) @(posedge clk);
    reset = 0;
    for (int pass = 1; pass <= 2; pass++) begin
      @(negedge clk);
      init_process = 1;
      @(negedge clk);
      init_process = 0;
      while (done_count < pass) @(negedge clk);
      check("ops after pass", ops, pass * N * N);
      repeat (5) @(negedge clk);
      check("idle after pass", ops, pass * N * N);
    end
    check("finish pulses", done_count, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
