// Synchronous AHB to APB bridge.
//
// The bridge is an AHB slave on one side and the only APB master on the
// other.  Both sides run on HCLK; the APB clock is represented by the clock
// enable PCLKEN, which is high in the HCLK cycle that ends on a rising PCLK
// edge.  Every APB signal the bridge drives therefore changes only on a PCLK
// edge, and APB inputs (PREADY, PSLVERR, PRDATA) are sampled only when PCLKEN
// is high.
//
// An AHB transfer is accepted when HSEL, HTRANS[1] (NONSEQ or SEQ) and HREADY
// are all high.  Its address and direction are registered, HREADYOUT is
// dropped, and a seven-state controller walks the transfer through the APB
// phases:
//   ST_IDLE      waiting.  On a transfer: to ST_APB_TRNF if PCLKEN is high
//                and the transfer is a read or an unbuffered write, else to
//                ST_APB_WAIT.
//   ST_APB_WAIT  wait for the next APB clock; a buffered write captures
//                HWDATA into the read/write data register here.
//   ST_APB_TRNF  APB setup phase (PSEL=1, PENABLE=0) for one APB clock.
//   ST_APB_TRNF2 APB access phase (PSEL=1, PENABLE=1) until PREADY is seen
//                on an APB clock.  PSLVERR then sends the controller to the
//                error states; otherwise to ST_APB_ENDOK when read data is
//                buffered, or straight on to the next transfer when it is not.
//   ST_APB_ENDOK one HCLK cycle with HREADYOUT=1 and the buffered read data
//                on HRDATA; may accept the next transfer like ST_IDLE.
//   ST_APB_ERR1  HREADYOUT=0, HRESP=ERROR (first error cycle).
//   ST_APB_ERR2  HREADYOUT=1, HRESP=ERROR (second error cycle); may accept
//                the next transfer like ST_IDLE.
//
// Buffering (the four operating modes):
//   REGISTER_RDATA=1  PRDATA is stored in the read/write register and driven
//                     on HRDATA from there (buffered read).  =0: HRDATA is
//                     PRDATA and HREADYOUT rises in the access phase itself.
//   REGISTER_WDATA=1  HWDATA is stored in the read/write register one HCLK
//                     before the APB transfer and PWDATA comes from there
//                     (buffered write).  =0: PWDATA is HWDATA, which the AHB
//                     master holds stable while HREADYOUT is low.
//
// Timing (buffered read, PCLK = HCLK/2, slave with PREADY in its second access
// cycle): IDLE -> WAIT -> TRNF -> TRNF2 ... -> ENDOK, HREADYOUT low from the
// end of the address phase until ENDOK.
//
// The state names, the IDLE/WAIT/TRNF/TRNF2/ENDOK transitions, the two
// buffering options and the shared read/write data register follow the
// published design.  The error-state behaviour (standard two-cycle AHB ERROR
// response), the reset values, the 32-bit data width and the default address
// width are this design's choices.  HSIZE, HBURST, HPROT and HMASTLOCK are
// part of the standard AHB slave interface but an APB3 transfer has no field
// to carry them, so they are accepted and not used.
module ahb2apb_bridge
  import ahb_apb_pkg::*;
#(
  parameter int unsigned ADDRWIDTH      = 32,  // HADDR / PADDR width
  parameter bit          REGISTER_RDATA = 1'b1, // buffered read
  parameter bit          REGISTER_WDATA = 1'b1  // buffered write
) (
  input  logic                 HCLK,
  input  logic                 HRESETn,
  input  logic                 PCLKEN,     // APB clock enable (HCLK domain)

  // AHB slave interface
  input  logic                 HSEL,
  input  logic [ADDRWIDTH-1:0] HADDR,
  input  logic [1:0]           HTRANS,
  input  logic [2:0]           HSIZE,
  input  logic [2:0]           HBURST,
  input  logic [3:0]           HPROT,
  input  logic                 HMASTLOCK,
  input  logic                 HWRITE,
  input  logic                 HREADY,
  input  logic [31:0]          HWDATA,
  output logic                 HREADYOUT,
  output logic                 HRESP,
  output logic [31:0]          HRDATA,

  // APB master interface
  output logic [ADDRWIDTH-1:0] PADDR,
  output logic                 PSEL,
  output logic                 PENABLE,
  output logic                 PWRITE,
  output logic [31:0]          PWDATA,
  input  logic [31:0]          PRDATA,
  input  logic                 PREADY,
  input  logic                 PSLVERR
);

  bridge_state_e        state_reg, next_state;
  logic [ADDRWIDTH-1:0] addr_reg;
  logic                 wr_reg;
  logic [31:0]          rwdata_reg;

  logic apb_select;     // a new AHB transfer is addressed to the bridge
  logic apb_done;       // APB access phase completes on this APB clock
  bridge_state_e start_state;  // where a new transfer goes from an accepting state

  assign apb_select = HSEL & HTRANS[1] & HREADY;
  assign apb_done   = (state_reg == ST_APB_TRNF2) & PCLKEN & PREADY;

  always_comb begin
    if (!apb_select)
      start_state = ST_IDLE;
    else if (PCLKEN && !(REGISTER_WDATA && HWRITE))
      start_state = ST_APB_TRNF;
    else
      start_state = ST_APB_WAIT;
  end

  always_comb begin
    next_state = state_reg;
    unique case (state_reg)
      ST_IDLE:      next_state = start_state;
      ST_APB_WAIT:  if (PCLKEN) next_state = ST_APB_TRNF;
      ST_APB_TRNF:  if (PCLKEN) next_state = ST_APB_TRNF2;
      ST_APB_TRNF2: begin
        if (apb_done) begin
          if (PSLVERR)             next_state = ST_APB_ERR1;
          else if (REGISTER_RDATA) next_state = ST_APB_ENDOK;
          else                     next_state = start_state;
        end
      end
      ST_APB_ENDOK: next_state = start_state;
      ST_APB_ERR1:  next_state = ST_APB_ERR2;
      ST_APB_ERR2:  next_state = start_state;
      default:      next_state = ST_IDLE;
    endcase
  end

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) state_reg <= ST_IDLE;
    else          state_reg <= next_state;
  end

  // Address phase capture
  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      addr_reg <= '0;
      wr_reg   <= 1'b0;
    end else if (apb_select) begin
      addr_reg <= HADDR;
      wr_reg   <= HWRITE;
    end
  end

  // Shared read/write data register
  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn)
      rwdata_reg <= '0;
    else if (REGISTER_WDATA && state_reg == ST_APB_WAIT && wr_reg)
      rwdata_reg <= HWDATA;
    else if (REGISTER_RDATA && apb_done && !wr_reg)
      rwdata_reg <= PRDATA;
  end

  // APB outputs
  assign PSEL    = (state_reg == ST_APB_TRNF) | (state_reg == ST_APB_TRNF2);
  assign PENABLE = (state_reg == ST_APB_TRNF2);
  assign PADDR   = addr_reg;
  assign PWRITE  = wr_reg;
  assign PWDATA  = REGISTER_WDATA ? rwdata_reg : HWDATA;

  // AHB outputs
  always_comb begin
    unique case (state_reg)
      ST_IDLE, ST_APB_ENDOK, ST_APB_ERR2: HREADYOUT = 1'b1;
      ST_APB_TRNF2: HREADYOUT = !REGISTER_RDATA && apb_done && !PSLVERR;
      default:      HREADYOUT = 1'b0;
    endcase
  end
  assign HRESP  = (state_reg == ST_APB_ERR1 || state_reg == ST_APB_ERR2) ? HRESP_ERROR
                                                                          : HRESP_OKAY;
  assign HRDATA = REGISTER_RDATA ? rwdata_reg : PRDATA;

  // ---------------------------------------------------------------------
  // Protocol rules
  // ---------------------------------------------------------------------
  // A new transfer can only be presented while the bridge is ready.
  a_select_when_ready: assert property (@(posedge HCLK) disable iff (!HRESETn)
    apb_select |-> HREADYOUT);
  // PENABLE only inside a selected transfer.
  a_enable_needs_sel: assert property (@(posedge HCLK) disable iff (!HRESETn)
    PENABLE |-> PSEL);
  // APB control only moves on an APB clock.
  a_apb_on_pclk: assert property (@(posedge HCLK) disable iff (!HRESETn)
    !PCLKEN |=> $stable(PSEL) && $stable(PENABLE));
  // The setup phase lasts exactly one APB clock.
  a_setup_one_pclk: assert property (@(posedge HCLK) disable iff (!HRESETn)
    (PSEL && !PENABLE && PCLKEN) |=> (PSEL && PENABLE));
  // Address, direction and write data hold during a waited access phase.
  a_access_hold: assert property (@(posedge HCLK) disable iff (!HRESETn)
    (PSEL && PENABLE && !(PCLKEN && PREADY)) |=>
      (PSEL && PENABLE && $stable(PADDR) && $stable(PWRITE) && $stable(PWDATA)));

endmodule
