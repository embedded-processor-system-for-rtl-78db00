// axi_gpio: two-channel general-purpose I/O on AXI4-Lite.
//
// In the PWM system, channel 1 acquires the period values (array A0) and channel 2 the high-time
// values (array A1) that the processor copies into the timers' load registers. Each channel has
// a data register and a tristate register; a TRI bit of 1 makes that pin an input (reset value:
// all inputs), 0 drives the data register bit onto the pin. Reading a data register returns the
// pin, through a two-flop synchroniser, for input bits and the data register for output bits.
// Offsets: DATA 0x0, TRI 0x4, DATA2 0x8, TRI2 0xC. The two channels and their use are the
// system's; the register layout is the common one of this GPIO core and the synchroniser is this
// design's choice. Read data comes back two clocks after ARVALID, pins are sampled through two
// flops, so a pin change shows in a read issued three clocks later.
module axi_gpio
  import axil_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  axil_req_t        s_axi_req,
  output axil_rsp_t        s_axi_rsp,
  input  logic [WIDTH-1:0] gpio_io_i,
  output logic [WIDTH-1:0] gpio_io_o,
  output logic [WIDTH-1:0] gpio_io_t,
  input  logic [WIDTH-1:0] gpio2_io_i,
  output logic [WIDTH-1:0] gpio2_io_o,
  output logic [WIDTH-1:0] gpio2_io_t
);

  logic        wr_en, rd_en;
  logic [3:0]  wr_addr, rd_addr;
  logic [31:0] wr_data, rd_data;
  logic [3:0]  wr_strb;

  axil_reg_port #(.ADDR_W(4)) u_axi (
    .clk, .rst_n, .s_axi_req, .s_axi_rsp,
    .wr_en, .wr_addr, .wr_data, .wr_strb, .rd_en, .rd_addr, .rd_data
  );

  logic [WIDTH-1:0] sync1_q, sync2_q, in1, in2;
  logic [31:0]      wmask;
  logic [WIDTH-1:0] m;

  always_comb begin
    for (int b = 0; b < 4; b++) wmask[8*b +: 8] = {8{wr_strb[b]}};
    m = WIDTH'(wmask);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1_q <= '0; sync2_q <= '0; in1 <= '0; in2 <= '0;
    end else begin
      sync1_q <= gpio_io_i;  in1 <= sync1_q;
      sync2_q <= gpio2_io_i; in2 <= sync2_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gpio_io_o  <= '0;
      gpio_io_t  <= '1;
      gpio2_io_o <= '0;
      gpio2_io_t <= '1;
    end else if (wr_en) begin
      case (wr_addr[3:2])
        2'd0: gpio_io_o  <= (gpio_io_o  & ~m) | (WIDTH'(wr_data) & m);
        2'd1: gpio_io_t  <= (gpio_io_t  & ~m) | (WIDTH'(wr_data) & m);
        2'd2: gpio2_io_o <= (gpio2_io_o & ~m) | (WIDTH'(wr_data) & m);
        2'd3: gpio2_io_t <= (gpio2_io_t & ~m) | (WIDTH'(wr_data) & m);
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_data <= '0;
    end else if (rd_en) begin
      case (rd_addr[3:2])
        2'd0: rd_data <= 32'((in1 & gpio_io_t) | (gpio_io_o & ~gpio_io_t));
        2'd1: rd_data <= 32'(gpio_io_t);
        2'd2: rd_data <= 32'((in2 & gpio2_io_t) | (gpio2_io_o & ~gpio2_io_t));
        2'd3: rd_data <= 32'(gpio2_io_t);
        default: rd_data <= '0;
      endcase
    end
  end

endmodule
