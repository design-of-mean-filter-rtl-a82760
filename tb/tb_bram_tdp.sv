// tb_bram_tdp: self-checking test of the true dual-port RAM.
//
// Drives random reads and writes on both ports for 4000 cycles (64-word RAM)
// and compares each read with a reference array kept in the testbench: one
// cycle of read latency, read-first on a same-cycle write, port B wins when
// both ports write one word. Read outputs must hold while the port is disabled.
module tb_bram_tdp;
  localparam int unsigned AW = 6;
  localparam int unsigned DW = 8;

  logic          clk = 1'b0;
  logic          ena, wea, enb, web;
  logic [AW-1:0] addra, addrb;
  logic [DW-1:0] dina, dinb, douta, doutb;

  logic [DW-1:0] ref_mem [2**AW];
  logic [DW-1:0] exp_a, exp_b;
  logic          chk_a, chk_b;
  int            checks = 0, failures = 0, cycles = 0;

  bram_tdp #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ena = 0; wea = 0; enb = 0; web = 0; addra = '0; addrb = '0; dina = '0; dinb = '0;
    chk_a = 0; chk_b = 0;
    // fill the memory through both ports
    for (int i = 0; i < 2**AW; i += 2) begin
      @(negedge clk);
      ena = 1; wea = 1; addra = AW'(i);   dina = DW'($urandom);
      enb = 1; web = 1; addrb = AW'(i+1); dinb = DW'($urandom);
      ref_mem[i] = dina; ref_mem[i+1] = dinb;
    end
    @(negedge clk);
    ena = 0; enb = 0; wea = 0; web = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // check the previous cycle's reads
      if (chk_a) begin
        checks++;
        if (douta !== exp_a) begin failures++; $display("A mismatch %h/%h", douta, exp_a); end
      end
      if (chk_b) begin
        checks++;
        if (doutb !== exp_b) begin failures++; $display("B mismatch %h/%h", doutb, exp_b); end
      end
      ena = ($urandom % 4) != 0; enb = ($urandom % 4) != 0;
      wea = 1'($urandom % 2);    web = 1'($urandom % 2);
      addra = AW'($urandom % 8); addrb = AW'($urandom % 8);  // frequent collisions
      dina = DW'($urandom);      dinb = DW'($urandom);
      // expected read data: old contents (read-first); disabled port holds
      if (ena) exp_a = ref_mem[addra];
      if (enb) exp_b = ref_mem[addrb];
      chk_a = chk_a | ena; chk_b = chk_b | enb;
      if (ena && wea) ref_mem[addra] = dina;
      if (enb && web) ref_mem[addrb] = dinb;
    end
    @(negedge clk);
    // final sweep: every word must hold its last write
    ena = 1; wea = 0; enb = 0; web = 0;
    for (int i = 0; i < 2**AW; i++) begin
      addra = AW'(i);
      @(negedge clk);
      checks++;
      if (douta !== ref_mem[i]) begin failures++; $display("sweep %0d %h/%h", i, douta, ref_mem[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
