// APB3 slave SRAM with registered memory input and output.
//
// A word-organised single-port memory of 2**MEM_AW 32-bit words sits behind
// an APB slave interface.  The APB byte address is made word aligned by
// dropping its two low bits (sram_addr = PADDR[MEM_AW+1:2]).  The memory is
// fully synchronous: it samples address, write enable and write data on an
// APB clock edge and presents read data (sram_dout) only after that edge.
// The slave then registers sram_dout into PRDATA and raises PREADY on the
// following APB clock.  An access phase therefore lasts three APB clocks:
//
//   edge 1 of the access phase: memory read or write (sram_we pulses for
//                               writes, sram_dout is loaded for reads)
//   edge 2:                     PRDATA <= sram_dout, PREADY <= 1
//   edge 3:                     bridge samples PREADY; PREADY <= 0
//
// so PREADY comes two APB clocks later than from a zero-wait-state slave.
// The logic is clocked by HCLK and advances only when PCLKEN is high, which
// makes it equivalent to running on PCLK.  PSLVERR is always low.
//
// The registered input and output, the two-clock-late PREADY and the
// dropping of the two low address bits follow the published validation
// peripheral; the memory depth and the reset values are this design's
// choices.
module apb_sram #(
  parameter int unsigned ADDRWIDTH = 32,
  parameter int unsigned MEM_AW    = 10   // log2 of the number of words
) (
  input  logic                 HCLK,
  input  logic                 PRESETn,
  input  logic                 PCLKEN,
  input  logic                 PSEL,
  input  logic                 PENABLE,
  input  logic                 PWRITE,
  input  logic [ADDRWIDTH-1:0] PADDR,
  input  logic [31:0]          PWDATA,
  output logic [31:0]          PRDATA,
  output logic                 PREADY,
  output logic                 PSLVERR
);

  typedef enum logic [1:0] {
    PH_MEM  = 2'd0,   // first access-phase clock: memory operation
    PH_LOAD = 2'd1,   // load PRDATA, raise PREADY
    PH_DONE = 2'd2    // PREADY high, transfer completes
  } phase_e;

  logic [31:0]       mem [2**MEM_AW];
  phase_e            phase;
  logic              access;
  logic              sram_cs;
  logic              sram_we;
  logic [MEM_AW-1:0] sram_addr;
  logic [31:0]       sram_din;
  logic [31:0]       sram_dout;

  assign access    = PSEL & PENABLE;
  assign sram_cs   = access & (phase == PH_MEM);
  assign sram_we   = sram_cs & PWRITE;
  assign sram_addr = PADDR[MEM_AW+1:2];
  assign sram_din  = PWDATA;

  // Synchronous memory with registered output
  always_ff @(posedge HCLK) begin
    if (PCLKEN && sram_cs) begin
      if (sram_we) mem[sram_addr] <= sram_din;
      else         sram_dout      <= mem[sram_addr];
    end
  end

  // APB handshake
  always_ff @(posedge HCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      phase  <= PH_MEM;
      PREADY <= 1'b0;
      PRDATA <= '0;
    end else if (PCLKEN && access) begin
      unique case (phase)
        PH_MEM:  phase <= PH_LOAD;
        PH_LOAD: begin
          phase  <= PH_DONE;
          PRDATA <= sram_dout;
          PREADY <= 1'b1;
        end
        default: begin
          phase  <= PH_MEM;
          PREADY <= 1'b0;
        end
      endcase
    end
  end

  assign PSLVERR = 1'b0;

  initial assert (MEM_AW + 2 <= ADDRWIDTH) else $error("apb_sram: MEM_AW too large");

endmodule
