// AHB to APB subsystem: bridge, APB clock enable, slave decoder and SRAM.
//
// This is the complete synchronous AHB to APB path as one AHB slave.  An AHB
// master (through its interconnect) drives the AHB slave port; the bridge
// turns each transfer into an APB transfer at the APB rate set by the
// PCLKEN generator (PCLK = HCLK / PCLK_DIV, phase aligned).  The slave
// decoder splits the APB bus into NUM_SLAVES windows of 2**SLAVE_AW bytes:
// window 0 holds the on-board APB SRAM, the other windows are brought out as
// APB ports (one PSEL line and one set of return signals each) for further
// peripherals such as a UART, SPI, I2C controller or timer.  Addresses above
// the last window receive an AHB ERROR response.
//
// Timing with the defaults (buffered read and write, PCLK = HCLK/2, SRAM
// window): a read or a write holds HREADYOUT low for about ten HCLK cycles,
// passing through the bridge states IDLE -> WAIT -> TRNF -> TRNF2 -> ENDOK.
//
// Peripherals on the external windows must sample on HCLK edges where
// PCLKEN is high (or on PCLK) and drive PRDATA/PREADY/PSLVERR back.  The
// composition follows the published validation set-up (bridge plus an APB
// SRAM with registered I/O); the decoder's address map and the external
// ports are this design's choices.
module ahb2apb_system
  import ahb_apb_pkg::*;
#(
  parameter int unsigned ADDRWIDTH      = 32,
  parameter bit          REGISTER_RDATA = 1'b1,
  parameter bit          REGISTER_WDATA = 1'b1,
  parameter int unsigned PCLK_DIV       = 2,
  parameter int unsigned NUM_SLAVES     = 2,   // >= 2: SRAM plus external slots
  parameter int unsigned SLAVE_AW       = 12,
  parameter int unsigned SRAM_AW        = 10
) (
  input  logic                   HCLK,
  input  logic                   HRESETn,

  // AHB slave port
  input  logic                   HSEL,
  input  logic [ADDRWIDTH-1:0]   HADDR,
  input  logic [1:0]             HTRANS,
  input  logic [2:0]             HSIZE,
  input  logic [2:0]             HBURST,
  input  logic [3:0]             HPROT,
  input  logic                   HMASTLOCK,
  input  logic                   HWRITE,
  input  logic                   HREADY,
  input  logic [31:0]            HWDATA,
  output logic                   HREADYOUT,
  output logic                   HRESP,
  output logic [31:0]            HRDATA,

  // APB clock
  output logic                   PCLK,
  output logic                   PCLKEN,

  // APB port for the external slave windows 1 .. NUM_SLAVES-1
  output logic [ADDRWIDTH-1:0]   PADDR,
  output logic                   PENABLE,
  output logic                   PWRITE,
  output logic [31:0]            PWDATA,
  output logic [NUM_SLAVES-2:0]  PSEL_EXT,
  input  logic [31:0]            PRDATA_EXT  [NUM_SLAVES-1],
  input  logic [NUM_SLAVES-2:0]  PREADY_EXT,
  input  logic [NUM_SLAVES-2:0]  PSLVERR_EXT
);

  logic                  psel;
  logic [31:0]           prdata;
  logic                  pready;
  logic                  pslverr;
  logic [NUM_SLAVES-1:0] pselx;
  logic [31:0]           prdatax [NUM_SLAVES];
  logic [NUM_SLAVES-1:0] preadyx;
  logic [NUM_SLAVES-1:0] pslverrx;

  pclken_gen #(.PCLK_DIV(PCLK_DIV)) u_pclken (
    .HCLK    (HCLK),
    .HRESETn (HRESETn),
    .PCLKEN  (PCLKEN),
    .PCLK    (PCLK)
  );

  ahb2apb_bridge #(
    .ADDRWIDTH      (ADDRWIDTH),
    .REGISTER_RDATA (REGISTER_RDATA),
    .REGISTER_WDATA (REGISTER_WDATA)
  ) u_bridge (
    .HCLK      (HCLK),
    .HRESETn   (HRESETn),
    .PCLKEN    (PCLKEN),
    .HSEL      (HSEL),
    .HADDR     (HADDR),
    .HTRANS    (HTRANS),
    .HSIZE     (HSIZE),
    .HBURST    (HBURST),
    .HPROT     (HPROT),
    .HMASTLOCK (HMASTLOCK),
    .HWRITE    (HWRITE),
    .HREADY    (HREADY),
    .HWDATA    (HWDATA),
    .HREADYOUT (HREADYOUT),
    .HRESP     (HRESP),
    .HRDATA    (HRDATA),
    .PADDR     (PADDR),
    .PSEL      (psel),
    .PENABLE   (PENABLE),
    .PWRITE    (PWRITE),
    .PWDATA    (PWDATA),
    .PRDATA    (prdata),
    .PREADY    (pready),
    .PSLVERR   (pslverr)
  );

  apb_slave_mux #(
    .ADDRWIDTH  (ADDRWIDTH),
    .NUM_SLAVES (NUM_SLAVES),
    .SLAVE_AW   (SLAVE_AW)
  ) u_mux (
    .PSEL     (psel),
    .PADDR    (PADDR),
    .PRDATA   (prdata),
    .PREADY   (pready),
    .PSLVERR  (pslverr),
    .PSELx    (pselx),
    .PRDATAx  (prdatax),
    .PREADYx  (preadyx),
    .PSLVERRx (pslverrx)
  );

  apb_sram #(
    .ADDRWIDTH (ADDRWIDTH),
    .MEM_AW    (SRAM_AW)
  ) u_sram (
    .HCLK    (HCLK),
    .PRESETn (HRESETn),
    .PCLKEN  (PCLKEN),
    .PSEL    (pselx[0]),
    .PENABLE (PENABLE),
    .PWRITE  (PWRITE),
    .PADDR   (PADDR),
    .PWDATA  (PWDATA),
    .PRDATA  (prdatax[0]),
    .PREADY  (preadyx[0]),
    .PSLVERR (pslverrx[0])
  );

  assign PSEL_EXT = pselx[NUM_SLAVES-1:1];
  assign preadyx[NUM_SLAVES-1:1]  = PREADY_EXT;
  assign pslverrx[NUM_SLAVES-1:1] = PSLVERR_EXT;
  always_comb
    for (int i = 1; i < NUM_SLAVES; i++) prdatax[i] = PRDATA_EXT[i-1];

  initial assert (NUM_SLAVES >= 2 && SRAM_AW + 2 <= SLAVE_AW)
    else $error("ahb2apb_system: bad parameters");

endmodule
