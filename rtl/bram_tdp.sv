// bram_tdp: true dual-port block RAM, one clock.
//
// Two independent ports (A and B), each with an enable, a write enable, an
// address, write data and read data, as drawn for BRAM1 and BRAM2 of the
// system. The system stores the input image in one instance and the filtered
// image in another. Reads are synchronous with one cycle of latency and
// read-first: a read of a word that is written in the same cycle returns the
// old contents. If both ports write the same word in the same cycle, port B
// wins. The memory is written as an array so that synthesis maps it to block
// RAM; the original system used a vendor memory generator, and both ports here
// share one clock (the two clock pins of the original are tied to the same
// system clock), which is this design's simplification.
module bram_tdp #(
  parameter int unsigned ADDR_W = 18,   // 512 x 512 words
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  // port A
  input  logic              ena,
  input  logic              wea,
  input  logic [ADDR_W-1:0] addra,
  input  logic [DATA_W-1:0] dina,
  output logic [DATA_W-1:0] douta,
  // port B
  input  logic              enb,
  input  logic              web,
  input  logic [ADDR_W-1:0] addrb,
  input  logic [DATA_W-1:0] dinb,
  output logic [DATA_W-1:0] doutb
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ena) begin
      douta <= mem[addra];
    end
    if (enb) begin
      doutb <= mem[addrb];
    end
    if (ena && wea) begin
      mem[addra] <= dina;
    end
    if (enb && web) begin
      mem[addrb] <= dinb;
    end
  end

endmodule
