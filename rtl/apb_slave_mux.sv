// APB slave select decoder and read-back multiplexer.
//
// The bridge drives a single PSEL; this block turns it into one select line
// per APB slave (PSEL1 .. PSELn) and steers the selected slave's PRDATA,
// PREADY and PSLVERR back to the bridge.  Each slave owns a window of
// 2**SLAVE_AW bytes: slave i answers addresses
// i*2**SLAVE_AW .. (i+1)*2**SLAVE_AW-1.  An access to an address above the
// last window selects no slave and is answered at once by this block with
// PREADY=1 and PSLVERR=1, so the AHB master receives an ERROR response
// instead of hanging.  The block is purely combinational.
//
// One select line per slave follows the published bridge interface; the
// number of slaves, the window size and the error answer for unmapped
// addresses are this design's choices.
module apb_slave_mux #(
  parameter int unsigned ADDRWIDTH  = 32,
  parameter int unsigned NUM_SLAVES = 2,   // number of PSELx lines
  parameter int unsigned SLAVE_AW   = 12   // log2 of each slave's window in bytes
) (
  input  logic                  PSEL,
  input  logic [ADDRWIDTH-1:0]  PADDR,
  output logic [31:0]           PRDATA,
  output logic                  PREADY,
  output logic                  PSLVERR,

  output logic [NUM_SLAVES-1:0] PSELx,
  input  logic [31:0]           PRDATAx  [NUM_SLAVES],
  input  logic [NUM_SLAVES-1:0] PREADYx,
  input  logic [NUM_SLAVES-1:0] PSLVERRx
);

  localparam int unsigned IW = ADDRWIDTH - SLAVE_AW;

  logic [IW-1:0] idx;
  logic          hit;

  assign idx = PADDR[ADDRWIDTH-1:SLAVE_AW];
  assign hit = (idx < IW'(NUM_SLAVES));

  always_comb begin
    PSELx   = '0;
    PRDATA  = '0;
    PREADY  = 1'b1;
    PSLVERR = 1'b1;
    for (int i = 0; i < NUM_SLAVES; i++) begin
      if (hit && idx == IW'(i)) begin
        PSELx[i] = PSEL;
        PRDATA   = PRDATAx[i];
        PREADY   = PREADYx[i];
        PSLVERR  = PSLVERRx[i];
      end
    end
  end

  initial assert (SLAVE_AW < ADDRWIDTH && NUM_SLAVES >= 1)
    else $error("apb_slave_mux: bad parameters");

endmodule
