// axil_pkg: types and constants shared by the bus side of the PWM processor system.
//
// The processor reaches every peripheral over a 32-bit AXI4-Lite bus (single beat, no IDs).
// Each direction of one bus link is bundled in a packed struct: axil_req_t carries what the
// master drives (AW, W, AR channels and the B/R ready signals), axil_rsp_t what the slave drives.
// bram_port_t is one port of the block RAM (enable, byte write enables, word address, data).
// The address map is the one of the system: six slaves, each in a 64 KB window.
package axil_pkg;

  localparam int unsigned AXIL_AW = 32;
  localparam int unsigned AXIL_DW = 32;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axil_resp_e;

  typedef struct packed {
    logic                 awvalid;
    logic [AXIL_AW-1:0]   awaddr;
    logic                 wvalid;
    logic [AXIL_DW-1:0]   wdata;
    logic [AXIL_DW/8-1:0] wstrb;
    logic                 bready;
    logic                 arvalid;
    logic [AXIL_AW-1:0]   araddr;
    logic                 rready;
  } axil_req_t;

  typedef struct packed {
    logic               awready;
    logic               wready;
    logic               bvalid;
    axil_resp_e         bresp;
    logic               arready;
    logic               rvalid;
    logic [AXIL_DW-1:0] rdata;
    axil_resp_e         rresp;
  } axil_rsp_t;

  // Block RAM port: 64 KB of 32-bit words needs a 14-bit word address.
  localparam int unsigned BRAM_AW = 14;

  typedef struct packed {
    logic               en;
    logic [3:0]         we;
    logic [BRAM_AW-1:0] addr;
    logic [31:0]        din;
  } bram_port_t;

  // Address map: slave index, base address, 64 KB window each.
  localparam int unsigned SYS_N_SLAVES = 6;
  localparam int unsigned SLV_BRAM   = 0;
  localparam int unsigned SLV_TIMER0 = 1;  // timers 0..3 are slaves 1..4
  localparam int unsigned SLV_GPIO   = 5;

  localparam logic [AXIL_AW-1:0] WINDOW_MASK = 32'hFFFF_0000;

  localparam logic [SYS_N_SLAVES-1:0][AXIL_AW-1:0] SLAVE_BASE = {
    32'h4121_0000,  // 5: axi_gpio_1
    32'h4283_0000,  // 4: axi_timer_3
    32'h4282_0000,  // 3: axi_timer_2
    32'h4281_0000,  // 2: axi_timer_1
    32'h4280_0000,  // 1: axi_timer_0
    32'h4000_0000   // 0: axi_bram_ctrl_0
  };

endpackage
