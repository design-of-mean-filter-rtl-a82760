// tb_mean_filter: self-checking test of the single-pixel mean filter.
//
// An 8 x 8 image lives in a testbench memory with one cycle of read latency.
// Two filters share the image: one in the default mode (output = clamped
// sum/8) and one with the correction step on (THETA = 10). Every pixel of the
// image is requested once; for each the testbench checks the output value
// against its own zero-padded 3x3 sum, the write address col*8+row, the
// number of reads issued, that every read address is inside the window, and
// the latency of 11 cycles from init_single_op to finish_flag_single_op. A
// block of 255s forces the clamp; the random image makes both outcomes of the
// correction test happen, and both are counted.
module tb_mean_filter;
  import mean_filter_pkg::*;

  localparam int unsigned N     = 8;
  localparam int unsigned RW    = $clog2(N);
  localparam int unsigned AW    = $clog2(N * N);
  localparam int          THETA = 10;
  localparam int          NI    = N;

  logic          clk = 1'b0, reset = 1'b1;
  logic          init;
  logic [RW-1:0] row, col;
  logic          fin0, fin1, en0, en1, we0, we1;
  logic [AW-1:0] ain0, ain1, aout0, aout1;
  pixel_t        pin0, pin1, pout0, pout1;

  pixel_t img [N*N];
  int     checks = 0, failures = 0;
  int     reads0, reads1, bad_addr;
  int     n_clamp = 0, n_replace = 0, n_keep = 0, n_border = 0;

  mean_filter #(.IMG_SIZE(N)) dut0 (
    .clk(clk), .reset_in(reset), .init_single_op(init), .row(row), .col(col),
    .finish_flag_single_op(fin0), .en_in(en0), .addr_in(ain0), .pixel_in(pin0),
    .wea_out(we0), .addr_out_img(aout0), .pixel_out(pout0));

  mean_filter #(.IMG_SIZE(N), .THRESH_EN(1'b1), .THETA(THETA)) dut1 (
    .clk(clk), .reset_in(reset), .init_single_op(init), .row(row), .col(col),
    .finish_flag_single_op(fin1), .en_in(en1), .addr_in(ain1), .pixel_in(pin1),
    .wea_out(we1), .addr_out_img(aout1), .pixel_out(pout1));

  always #5 clk = ~clk;

  // image memory, one cycle latency, plus read bookkeeping
  int cur_r, cur_c;
  always @(posedge clk) begin
    if (en0) begin
      pin0 <= img[ain0];
      reads0++;
      if ((int'(ain0) / NI - cur_c) > 1 || (cur_c - int'(ain0) / NI) > 1 ||
          (int'(ain0) % NI - cur_r) > 1 || (cur_r - int'(ain0) % NI) > 1) bad_addr++;
    end
    if (en1) begin
      pin1 <= img[ain1];
      reads1++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expected(input int r, input int c, output pixel_t m,
                                   output pixel_t corr, output int nreads);
    int s = 0;
    int q;
    nreads = 0;
    for (int dc = -1; dc <= 1; dc++)
      for (int dr = -1; dr <= 1; dr++)
        if (r + dr >= 0 && r + dr < N && c + dc >= 0 && c + dc < N) begin
          s += int'(img[(c + dc) * N + (r + dr)]);
          nreads++;
        end
    q = s / 8;
    m = (q > 255) ? 8'd255 : pixel_t'(q);
    corr = ((int'(img[c * N + r]) - int'(m)) > THETA) ? m : img[c * N + r];
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    pixel_t m, corr;
    int     nr, lat;
    for (int i = 0; i < N * N; i++) img[i] = pixel_t'($urandom);
    for (int c = 5; c < 8; c++) for (int r = 5; r < 8; r++) img[c * N + r] = 8'hFF;
    init = 0; row = '0; col = '0; reads0 = 0; reads1 = 0; bad_addr = 0;
    repeat (3) @(posedge clk);
    reset = 0;
    for (int c = 0; c < N; c++) begin
      for (int r = 0; r < N; r++) begin
        @(negedge clk);
        row = RW'(r); col = RW'(c); init = 1; cur_r = r; cur_c = c;
        reads0 = 0; reads1 = 0;
        @(negedge clk);
        init = 0;
        lat = 1;
        while (!fin0) begin @(negedge clk); lat++; end
        expected(r, c, m, corr, nr);
        check("latency", lat, 11);
        check("finish together", int'(fin1), 1);
        check("write strobe", int'(we0 && we1), 1);
        check("out addr", int'(aout0), c * N + r);
        check("mean", int'(pout0), int'(m));
        check("corrected", int'(pout1), int'(corr));
        check("reads", reads0, nr);
        check("reads corr", reads1, nr);
        if (nr < 9) n_border++;
        if (int'(m) == 255) n_clamp++;
        if ((int'(img[c * N + r]) - int'(m)) > THETA) n_replace++; else n_keep++;
        @(negedge clk);
        check("single write", int'(we0 || fin0), 0);
      end
    end
    check("read address in window", bad_addr, 0);
    // each mechanism must have happened
    if (n_clamp == 0)   begin failures++; $display("clamp never seen"); end
    if (n_replace == 0) begin failures++; $display("correction never applied"); end
    if (n_keep == 0)    begin failures++; $display("correction never kept centre"); end
    if (n_border == 0)  begin failures++; $display("no border window"); end
    $display("border=%0d clamp=%0d replace=%0d keep=%0d", n_border, n_clamp, n_replace, n_keep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
