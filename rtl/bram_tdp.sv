// bram_tdp: true dual-port block RAM, 64 KB as 16384 words of 32 bits.
//
// Both ports are synchronous and identical: with `en` high a port reads the word at `addr`,
// whose old contents appear on its dout in the next clock (read first), and writes the bytes of
// `din` selected by `we`. If both ports write the same byte in one clock, port B's value is kept.
// The memory is not initialised. Size follows the system's 64 KB boot memory; the word width and
// the collision rule are this design's choices.
module bram_tdp
  import axil_pkg::*;
#(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  bram_port_t       a,
  output logic [WIDTH-1:0] a_dout,
  input  bram_port_t       b,
  output logic [WIDTH-1:0] b_dout
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a.en) begin
      a_dout <= mem[a.addr[AW-1:0]];
      for (int i = 0; i < WIDTH/8; i++)
        if (a.we[i]) mem[a.addr[AW-1:0]][8*i +: 8] <= a.din[8*i +: 8];
    end
    if (b.en) begin
      b_dout <= mem[b.addr[AW-1:0]];
      for (int i = 0; i < WIDTH/8; i++)
        if (b.we[i]) mem[b.addr[AW-1:0]][8*i +: 8] <= b.din[8*i +: 8];
    end
  end

endmodule
