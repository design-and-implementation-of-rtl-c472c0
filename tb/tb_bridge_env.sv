// Test environment for one configuration of the AHB to APB bridge.
//
// Contains the bridge, a random pipelined AHB master, a random PCLKEN
// pattern and an APB slave model with random wait states (0..3 APB clocks)
// and an error region (address bit 11 set answers PSLVERR).  A reference
// memory is updated from the AHB side; every AHB response (HRESP, read data)
// is checked against it, and every APB transfer is checked against the queue
// of accepted AHB transfers (address, direction, write data).  Counts of the
// bridge mechanisms exercised (wait state, buffered read end cycle, error
// response, back-to-back acceptance, APB wait states) are checked at the
// end.  Raises done when all NXFER transfers have completed.
module tb_bridge_env #(
  parameter bit          RR    = 1'b1,
  parameter bit          RW    = 1'b1,
  parameter int unsigned NXFER = 400
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import ahb_apb_pkg::*;

  typedef struct packed {
    logic [31:0] addr;
    logic        write;
    logic [31:0] wdata;
  } xfer_t;

  // DUT signals
  logic        pclken;
  logic        HSEL, HWRITE, HREADYOUT, HRESP;
  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [1:0]  HTRANS;
  logic [31:0] PADDR, PWDATA, PRDATA;
  logic        PSEL, PENABLE, PWRITE, PREADY, PSLVERR;

  ahb2apb_bridge #(.ADDRWIDTH(32), .REGISTER_RDATA(RR), .REGISTER_WDATA(RW)) dut (
    .HCLK(clk), .HRESETn(rst_n), .PCLKEN(pclken),
    .HSEL(HSEL), .HADDR(HADDR), .HTRANS(HTRANS), .HSIZE(3'b010), .HBURST(3'b000),
    .HPROT(4'b0011), .HMASTLOCK(1'b0), .HWRITE(HWRITE), .HREADY(HREADYOUT),
    .HWDATA(HWDATA), .HREADYOUT(HREADYOUT), .HRESP(HRESP), .HRDATA(HRDATA),
    .PADDR(PADDR), .PSEL(PSEL), .PENABLE(PENABLE), .PWRITE(PWRITE), .PWDATA(PWDATA),
    .PRDATA(PRDATA), .PREADY(PREADY), .PSLVERR(PSLVERR)
  );

  function automatic logic [31:0] init_word(int i);
    return 32'h1357_9bdf ^ (i * 32'h0101_0101);
  endfunction

  // ---------------- APB clock enable ----------------
  always_ff @(posedge clk) pclken <= ($urandom_range(0, 3) != 0);

  // ---------------- APB slave model ----------------
  logic [31:0] smem    [256];
  logic [31:0] ref_mem [256];
  int          wait_left;
  logic [31:0] junk;
  xfer_t       expq [$];
  int          apb_count, ahb_count, apb_waits;

  initial for (int i = 0; i < 256; i++) begin
    smem[i]    = init_word(i);
    ref_mem[i] = init_word(i);
  end

  assign PREADY  = PSEL & PENABLE & (wait_left == 0);
  assign PSLVERR = PREADY & PADDR[11];
  assign PRDATA  = (PREADY && !PWRITE) ? smem[PADDR[9:2]] : junk;

  always @(posedge clk) begin
    junk <= $urandom;
    if (!rst_n) begin
      wait_left <= 0;
    end else if (pclken) begin
      if (PSEL && !PENABLE) wait_left <= $urandom_range(0, 3);
      else if (PSEL && PENABLE && wait_left != 0) begin
        wait_left <= wait_left - 1;
        apb_waits++;
      end
      if (PREADY) begin
        xfer_t e;
        apb_count++;
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL RR=%0b RW=%0b: APB transfer with no AHB transfer", RR, RW);
        end else begin
          e = expq.pop_front();
          if (PADDR !== e.addr || PWRITE !== e.write || (e.write && PWDATA !== e.wdata)) begin
            failures++;
            $display("FAIL RR=%0b RW=%0b: APB addr %h w %b d %h, expected %h %b %h",
                     RR, RW, PADDR, PWRITE, PWDATA, e.addr, e.write, e.wdata);
          end
        end
        if (PWRITE && !PADDR[11]) smem[PADDR[9:2]] <= PWDATA;
      end
    end
  end

  // ---------------- AHB master ----------------
  logic        ap_valid, dp_valid;
  xfer_t       ap, dp;
  int          issued;
  int          n_wait, n_endok, n_err, n_b2b;

  always @(posedge clk) begin
    if (!rst_n) begin
      HSEL <= 1'b0; HTRANS <= HTRANS_IDLE; HADDR <= '0; HWRITE <= 1'b0; HWDATA <= '0;
      ap_valid <= 1'b0; dp_valid <= 1'b0; issued <= 0;
    end else begin
      // coverage of bridge mechanisms
      if (dut.state_reg == ST_APB_WAIT && dut.next_state != ST_APB_WAIT) n_wait++;
      if (dut.state_reg == ST_APB_ENDOK) n_endok++;
      if (dut.state_reg == ST_APB_ERR1) n_err++;
      if (dut.apb_select && dut.state_reg != ST_IDLE) n_b2b++;

      if (!HREADYOUT) begin
        if (HRESP && !(dp_valid && dp.addr[11])) begin
          failures++;
          $display("FAIL RR=%0b RW=%0b: ERROR response to a good transfer", RR, RW);
        end
      end else begin
        if (dp_valid) begin
          logic exp_err;
          exp_err = dp.addr[11];
          ahb_count++;
          checks++;
          if (HRESP !== exp_err) begin
            failures++;
            $display("FAIL RR=%0b RW=%0b: addr %h HRESP %b expected %b", RR, RW, dp.addr, HRESP, exp_err);
          end
          if (!exp_err) begin
            if (dp.write) ref_mem[dp.addr[9:2]] = dp.wdata;
            else begin
              checks++;
              if (HRDATA !== ref_mem[dp.addr[9:2]]) begin
                failures++;
                $display("FAIL RR=%0b RW=%0b: read %h got %h expected %h", RR, RW,
                         dp.addr, HRDATA, ref_mem[dp.addr[9:2]]);
              end
            end
          end
        end
        // address phase completes
        dp_valid <= ap_valid;
        dp       <= ap;
        HWDATA   <= (ap_valid && ap.write) ? ap.wdata : $urandom;
        if (ap_valid) expq.push_back(ap);
        // next address phase
        if (issued < NXFER && $urandom_range(0, 2) != 0) begin
          xfer_t n;
          n.addr  = {20'd0, ($urandom_range(0, 7) == 0), 1'b0, 8'($urandom), 2'b00};
          n.write = $urandom_range(0, 1) == 1;
          n.wdata = $urandom;
          ap       <= n;
          ap_valid <= 1'b1;
          HSEL     <= 1'b1;
          HTRANS   <= ($urandom_range(0, 1) == 1) ? HTRANS_SEQ : HTRANS_NONSEQ;
          HADDR    <= n.addr;
          HWRITE   <= n.write;
          issued   <= issued + 1;
        end else begin
          // idle cycle: HSEL random, HTRANS IDLE or BUSY, junk address
          ap_valid <= 1'b0;
          HSEL     <= $urandom_range(0, 1) == 1;
          HTRANS   <= ($urandom_range(0, 1) == 1) ? HTRANS_BUSY : HTRANS_IDLE;
          HADDR    <= $urandom;
          HWRITE   <= $urandom_range(0, 1) == 1;
        end
      end
    end
  end

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    apb_count = 0; ahb_count = 0; apb_waits = 0;
    n_wait = 0; n_endok = 0; n_err = 0; n_b2b = 0;
    @(posedge rst_n);
    wait (issued == NXFER && !ap_valid && !dp_valid);
    repeat (4) @(posedge clk);
    checks += 6;
    if (apb_count != ahb_count || ahb_count != NXFER) begin
      failures++;
      $display("FAIL RR=%0b RW=%0b: %0d AHB, %0d APB transfers, %0d issued", RR, RW,
               ahb_count, apb_count, NXFER);
    end
    if (n_wait == 0)                 begin failures++; $display("FAIL: WAIT never used"); end
    if ((n_endok == 0) == RR)        begin failures++; $display("FAIL RR=%0b: ENDOK count %0d", RR, n_endok); end
    if (n_err == 0)                  begin failures++; $display("FAIL: no error response"); end
    if (n_b2b == 0)                  begin failures++; $display("FAIL: no back-to-back transfer"); end
    if (apb_waits == 0)              begin failures++; $display("FAIL: no APB wait state"); end
    $display("env RR=%0b RW=%0b: %0d transfers, WAIT %0d, ENDOK %0d, ERR %0d, back-to-back %0d, APB waits %0d",
             RR, RW, ahb_count, n_wait, n_endok, n_err, n_b2b, apb_waits);
    done = 1'b1;
  end

endmodule
