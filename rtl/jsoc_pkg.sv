// jsoc_pkg: types and constants shared by the Java SoC.
// AHB (AMBA 2) and APB (AMBA 2, no PREADY/PSLVERR) signal bundles are packed structs so
// that master, slave and interconnect ports stay compact. The address map follows the
// SoC's AHB slave table: the top nibble of HADDR selects the region. The FPU microcode
// numbers are those of the extended Java core microcode set.
//
// From the SoC description: the address map and microcode numbers. Bundle layouts are this design's own.
package jsoc_pkg;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  // Master-to-slave AHB signals (address phase plus write data).
  typedef struct packed {
    logic [31:0] haddr;
    htrans_e     htrans;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [2:0]  hburst;
    logic [3:0]  hprot;
    logic [31:0] hwdata;
  } ahb_m2s_t;

  // Slave-to-master AHB response.
  typedef struct packed {
    logic [31:0] hrdata;
    logic        hready;
    hresp_e      hresp;
  } ahb_s2m_t;

  localparam ahb_m2s_t AHB_M2S_IDLE = '{haddr: 32'h0, htrans: HTRANS_IDLE, hwrite: 1'b0,
                                        hsize: 3'd2, hburst: 3'd0, hprot: 4'b0011, hwdata: 32'h0};
  localparam ahb_s2m_t AHB_S2M_OKAY = '{hrdata: 32'h0, hready: 1'b1, hresp: HRESP_OKAY};

  // APB signals shared by all APB slaves (PSEL is a separate one-hot vector).
  typedef struct packed {
    logic [31:0] paddr;
    logic        penable;
    logic        pwrite;
    logic [31:0] pwdata;
  } apb_m2s_t;

  // AHB address regions (HADDR[31:28]).
  localparam logic [3:0] REGION_APB     = 4'h8;
  localparam logic [3:0] REGION_LCD     = 4'h9;
  localparam logic [3:0] REGION_VGA     = 4'hA;
  localparam logic [3:0] REGION_USB     = 4'hB;
  localparam logic [3:0] REGION_I2S     = 4'hC;
  localparam logic [3:0] REGION_ETH     = 4'hD;
  localparam logic [3:0] REGION_DMA     = 4'hE;
  localparam logic [3:0] REGION_DEFAULT = 4'hF;

  // APB slave slots (PADDR[27:24] inside the APB region).
  localparam int APB_UART = 0;
  localparam int APB_TIMER = 1;
  localparam int APB_IRQ = 2;
  localparam int APB_GPIO = 3;
  localparam int APB_I2C = 4;
  localparam int APB_PS2 = 5;
  localparam int APB_SPI = 6;
  localparam int APB_CLKMGR = 7;
  localparam int APB_NSLV = 8;

  // FPU microcodes added to the Java core.
  localparam logic [7:0] UC_STFADD = 8'h0E;
  localparam logic [7:0] UC_STFSUB = 8'h06;
  localparam logic [7:0] UC_STFMUL = 8'h07;
  localparam logic [7:0] UC_STFDIV = 8'h1A;
  localparam logic [7:0] UC_LDFPU  = 8'hE6;

  typedef enum logic [1:0] {
    FPU_ADD = 2'd0,
    FPU_SUB = 2'd1,
    FPU_MUL = 2'd2,
    FPU_DIV = 2'd3
  } fpu_op_e;

endpackage
