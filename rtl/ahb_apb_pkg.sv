// Shared types and constants for the synchronous AHB to APB bridge system.
//
// Holds the AHB transfer-type and response encodings (AMBA AHB) and the
// bridge state encoding.  The seven bridge states and their names follow the
// bridge's published state list; the 3-bit numeric codes 0..4 for IDLE, WAIT,
// TRNF, TRNF2 and ENDOK match the state numbers seen in its validation
// waveforms, and the codes for the two error states are this design's choice.
package ahb_apb_pkg;

  // AHB HTRANS encoding
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  // AHB HRESP encoding (single-bit response)
  localparam logic HRESP_OKAY  = 1'b0;
  localparam logic HRESP_ERROR = 1'b1;

  // Bridge controller states
  typedef enum logic [2:0] {
    ST_IDLE      = 3'd0,  // waiting for an AHB transfer
    ST_APB_WAIT  = 3'd1,  // transfer accepted, waiting for the next APB clock
    ST_APB_TRNF  = 3'd2,  // APB setup phase (PSEL=1, PENABLE=0)
    ST_APB_TRNF2 = 3'd3,  // APB access phase (PSEL=1, PENABLE=1) until PREADY
    ST_APB_ENDOK = 3'd4,  // OKAY completion cycle with buffered read data
    ST_APB_ERR1  = 3'd5,  // first cycle of the two-cycle AHB ERROR response
    ST_APB_ERR2  = 3'd6   // second cycle of the two-cycle AHB ERROR response
  } bridge_state_e;

endpackage
