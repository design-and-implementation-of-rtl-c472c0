// Test environment for the AHB to APB subsystem in one buffering mode.
//
// Phase 1 replays the transfers of the reference waveforms: five writes of
// known words to byte addresses 0x4..0x14, three writes to 0xffc, 0xfc0 and
// 0xfc4, then reads of all eight back.  Phase 2 is random pipelined AHB
// traffic over the SRAM window, the external window (served by an APB
// register-file model with random wait states and an error region) and the
// unmapped space above it (ERROR response).
//
// Checked: every HRESP and every read word against a reference model; the
// number of HCLK cycles HREADYOUT stays low for every SRAM transfer, which
// follows from the bridge states and the SRAM's three-APB-clock access phase
// with PCLK = HCLK/2:
//   8 cycles for a transfer that starts its APB setup phase on the accepting
//   edge (read or direct write with PCLKEN high there), plus 1 when it waits
//   one cycle in WAIT (PCLKEN low on the accepting edge), plus 2 for a
//   buffered write accepted with PCLKEN high (two cycles in WAIT), minus 1
//   without read buffering (no ENDOK cycle);
// the SRAM word address equals the byte address without its two low bits on
// every SRAM write; PCLK pulses once per two HCLK cycles.  Each mechanism
// (WAIT state, ENDOK cycle when read data is buffered, PREADY stall, error
// response, back-to-back transfer, external window) must occur at least once.
// The subsystem is instantiated with no parameter list in the default mode.
module tb_system_env #(
  parameter bit RR = 1'b1,   // REGISTER_RDATA of the subsystem
  parameter bit RW = 1'b1    // REGISTER_WDATA of the subsystem
) (
  input  logic HCLK,
  input  logic HRESETn,
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

  logic        HSEL, HWRITE, HREADYOUT, HRESP, PCLK, PCLKEN;
  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [1:0]  HTRANS;
  logic [31:0] PADDR, PWDATA;
  logic        PENABLE, PWRITE;
  logic [0:0]  PSEL_EXT, PREADY_EXT, PSLVERR_EXT;
  logic [31:0] PRDATA_EXT [1];

  if (RR && RW) begin : g_default
    ahb2apb_system dut (
      .HCLK, .HRESETn, .HSEL, .HADDR, .HTRANS, .HSIZE(3'b010), .HBURST(3'b000),
      .HPROT(4'b0011), .HMASTLOCK(1'b0), .HWRITE, .HREADY(HREADYOUT), .HWDATA,
      .HREADYOUT, .HRESP, .HRDATA, .PCLK, .PCLKEN, .PADDR, .PENABLE, .PWRITE, .PWDATA,
      .PSEL_EXT, .PRDATA_EXT, .PREADY_EXT, .PSLVERR_EXT
    );
  end else begin : g_mode
    ahb2apb_system #(.REGISTER_RDATA(RR), .REGISTER_WDATA(RW)) dut (
      .HCLK, .HRESETn, .HSEL, .HADDR, .HTRANS, .HSIZE(3'b010), .HBURST(3'b000),
    .HPROT(4'b0011), .HMASTLOCK(1'b0), .HWRITE, .HREADY(HREADYOUT), .HWDATA,
    .HREADYOUT, .HRESP, .HRDATA, .PCLK, .PCLKEN, .PADDR, .PENABLE, .PWRITE, .PWDATA,
    .PSEL_EXT, .PRDATA_EXT, .PREADY_EXT, .PSLVERR_EXT
    );
  end

  // hierarchical views of the bridge and SRAM, whichever branch exists
  bridge_state_e st, st_next;
  logic          sel_new, bridge_pready, sram_we;
  logic [9:0]    sram_addr;
  logic [31:0]   sram_din;
  if (RR && RW) begin : g_view_d
    assign st            = g_default.dut.u_bridge.state_reg;
    assign st_next       = g_default.dut.u_bridge.next_state;
    assign sel_new       = g_default.dut.u_bridge.apb_select;
    assign bridge_pready = g_default.dut.u_bridge.PREADY;
    assign sram_we       = g_default.dut.u_sram.sram_we;
    assign sram_addr     = g_default.dut.u_sram.sram_addr;
    assign sram_din      = g_default.dut.u_sram.sram_din;
  end else begin : g_view_m
    assign st            = g_mode.dut.u_bridge.state_reg;
    assign st_next       = g_mode.dut.u_bridge.next_state;
    assign sel_new       = g_mode.dut.u_bridge.apb_select;
    assign bridge_pready = g_mode.dut.u_bridge.PREADY;
    assign sram_we       = g_mode.dut.u_sram.sram_we;
    assign sram_addr     = g_mode.dut.u_sram.sram_addr;
    assign sram_din      = g_mode.dut.u_sram.sram_din;
  end

  // ---------------- external APB slave: 64-word register file ----------------
  logic [31:0] ext_mem [64];
  int          ext_wait;
  int          n_ext;
  assign PREADY_EXT[0]  = PSEL_EXT[0] & PENABLE & (ext_wait == 0);
  assign PSLVERR_EXT[0] = PREADY_EXT[0] & PADDR[8];
  assign PRDATA_EXT[0]  = ext_mem[PADDR[7:2]];

  always @(posedge HCLK) begin
    if (!HRESETn) ext_wait <= 0;
    else if (PCLKEN) begin
      if (PSEL_EXT[0] && !PENABLE) ext_wait <= $urandom_range(0, 2);
      else if (PSEL_EXT[0] && PENABLE && ext_wait != 0) ext_wait <= ext_wait - 1;
      if (PREADY_EXT[0]) begin
        n_ext++;
        if (PWRITE && !PADDR[8]) ext_mem[PADDR[7:2]] <= PWDATA;
      end
    end
  end

  // ---------------- reference model ----------------
  logic [31:0] ref_sram [1024];
  logic        ref_sram_ok [1024];   // word written since reset
  logic [31:0] ref_ext  [64];

  function automatic logic exp_error(logic [31:0] a);
    return (a >= 32'h2000) || (a >= 32'h1000 && a[8]);
  endfunction

  // ---------------- stimulus ----------------
  localparam int NRAND = 400;   // random transfers after the directed ones
  xfer_t todo [$];

  // ---------------- AHB master ----------------
  logic  ap_valid, dp_valid;
  xfer_t ap, dp;
  logic  dp_pclken;   // PCLKEN on the edge that accepted the data-phase transfer
  int    wait_cycles;
  int    completed;
  logic  gap_ok;
  int    n_wait, n_endok, n_err, n_b2b, n_stall, n_pclk, n_sram_wr, n_lat;
  int    n_hclk;

  always @(posedge PCLK) n_pclk++;
  always @(posedge HCLK) if (HRESETn) n_hclk++;

  always @(posedge HCLK) begin
    if (!HRESETn) begin
      HSEL <= 1'b0; HTRANS <= HTRANS_IDLE; HADDR <= '0; HWRITE <= 1'b0; HWDATA <= '0;
      ap_valid <= 1'b0; dp_valid <= 1'b0; wait_cycles <= 0;
    end else begin
      // mechanism counters
      if (st == ST_APB_WAIT && st_next == ST_APB_TRNF) n_wait++;
      if (st == ST_APB_ENDOK) n_endok++;
      if (st == ST_APB_ERR1) n_err++;
      if (sel_new && st != ST_IDLE) n_b2b++;
      if (st == ST_APB_TRNF2 && PCLKEN && !bridge_pready) n_stall++;
      if (sram_we && PCLKEN) begin
        n_sram_wr++;
        checks++;
        if (sram_addr !== PADDR[11:2] || sram_din !== PWDATA) begin
          failures++;
          $display("FAIL: SRAM write addr %h data %h for PADDR %h PWDATA %h",
                   sram_addr, sram_din, PADDR, PWDATA);
        end
      end

      if (!HREADYOUT) begin
        wait_cycles <= wait_cycles + 1;
        if (HRESP && !(dp_valid && exp_error(dp.addr))) begin
          failures++;
          $display("FAIL: ERROR response to a good transfer");
        end
      end else begin
        if (dp_valid) begin
          logic e;
          e = exp_error(dp.addr);
          completed++;
          checks++;
          if (HRESP !== e) begin
            failures++;
            $display("FAIL: %h HRESP %b expected %b", dp.addr, HRESP, e);
          end
          if (!e && dp.addr < 32'h1000) begin
            int exp_lat;
            exp_lat = 8 - (RR ? 0 : 1) + (!dp_pclken ? 1 : (dp.write && RW) ? 2 : 0);
            checks++;
            n_lat++;
            if (wait_cycles != exp_lat) begin
              failures++;
              $display("FAIL: %s %h took %0d wait cycles, expected %0d",
                       dp.write ? "write" : "read", dp.addr, wait_cycles, exp_lat);
            end
          end
          if (!e) begin
            if (dp.addr < 32'h1000) begin
              if (dp.write) begin
                ref_sram[dp.addr[11:2]]    = dp.wdata;
                ref_sram_ok[dp.addr[11:2]] = 1'b1;
              end else if (ref_sram_ok[dp.addr[11:2]]) begin
                checks++;
                if (HRDATA !== ref_sram[dp.addr[11:2]]) begin
                  failures++;
                  $display("FAIL: SRAM read %h got %h expected %h", dp.addr, HRDATA,
                           ref_sram[dp.addr[11:2]]);
                end
              end
            end else begin
              if (dp.write) ref_ext[dp.addr[7:2]] = dp.wdata;
              else begin
                checks++;
                if (HRDATA !== ref_ext[dp.addr[7:2]]) begin
                  failures++;
                  $display("FAIL: ext read %h got %h expected %h", dp.addr, HRDATA,
                           ref_ext[dp.addr[7:2]]);
                end
              end
            end
          end
        end
        // address phase completes
        dp_valid    <= ap_valid;
        dp          <= ap;
        dp_pclken   <= PCLKEN;
        wait_cycles <= 0;
        HWDATA      <= (ap_valid && ap.write) ? ap.wdata : $urandom;
        // next address phase
        // the directed transfers go back to back, the random ones with gaps
        gap_ok = (todo.size() > 0) && (todo.size() > NRAND || $urandom_range(0, 2) != 0);
        if (gap_ok) begin
          xfer_t n;
          n = todo.pop_front();
          ap       <= n;
          ap_valid <= 1'b1;
          HSEL     <= 1'b1;
          HTRANS   <= HTRANS_NONSEQ;
          HADDR    <= n.addr;
          HWRITE   <= n.write;
        end else begin
          ap_valid <= 1'b0;
          HSEL     <= $urandom_range(0, 1) == 1;
          HTRANS   <= ($urandom_range(0, 1) == 1) ? HTRANS_BUSY : HTRANS_IDLE;
          HADDR    <= $urandom;
          HWRITE   <= $urandom_range(0, 1) == 1;
        end
      end
    end
  end

  task automatic add(input logic wr, input logic [31:0] a, input logic [31:0] d);
    xfer_t x;
    x.addr = a; x.write = wr; x.wdata = d;
    todo.push_back(x);
  endtask

  initial begin
    logic [31:0] fig_addr [8];
    logic [31:0] fig_data [8];
    fig_addr = '{32'h004, 32'h008, 32'h00c, 32'h010, 32'h014, 32'hffc, 32'hfc0, 32'hfc4};
    fig_data = '{32'h979f587d, 32'hd7c42906, 32'h7f734d5d, 32'h39e0b94e, 32'hfe8f3181,
                 32'hcdbf3a9b, 32'h0498fb09, 32'h6bf823d7};
    checks = 0; failures = 0; done = 1'b0;
    n_wait = 0; n_endok = 0; n_err = 0; n_b2b = 0; n_stall = 0; n_pclk = 0; n_hclk = 0;
    n_sram_wr = 0; n_lat = 0; n_ext = 0; completed = 0;
    for (int i = 0; i < 1024; i++) ref_sram_ok[i] = 1'b0;
    for (int i = 0; i < 64; i++) begin
      ext_mem[i] = 32'hA5A5_0000 + i;
      ref_ext[i] = 32'hA5A5_0000 + i;
    end
    // phase 1: the reference waveform transfers
    for (int i = 0; i < 8; i++) add(1'b1, fig_addr[i], fig_data[i]);
    for (int i = 0; i < 8; i++) add(1'b0, fig_addr[i], 32'h0);
    // phase 2: random traffic
    for (int k = 0; k < NRAND; k++) begin
      logic [31:0] a;
      case ($urandom_range(0, 7))
        0:       a = 32'h1000 | {23'd0, 1'($urandom), 6'($urandom), 2'b00};  // external window
        1:       a = 32'h2000 + ($urandom_range(0, 1023) << 2);             // unmapped
        default: a = {20'd0, 10'($urandom), 2'($urandom)};                   // SRAM
      endcase
      add($urandom_range(0, 1) == 1, a, $urandom);
    end

    @(posedge HRESETn);
    wait (todo.size() == 0 && !ap_valid && !dp_valid);
    repeat (4) @(posedge HCLK);

    checks += 8;
    if (completed != 16 + NRAND) begin failures++; $display("FAIL: %0d transfers completed", completed); end
    if (n_wait == 0)    begin failures++; $display("FAIL: WAIT state never used"); end
    if ((n_endok == 0) == RR) begin failures++; $display("FAIL: ENDOK count %0d with RR=%0b", n_endok, RR); end
    if (n_err == 0)     begin failures++; $display("FAIL: no error response"); end
    if (n_b2b == 0)     begin failures++; $display("FAIL: no back-to-back transfer"); end
    if (n_stall == 0)   begin failures++; $display("FAIL: no PREADY stall"); end
    if (n_ext == 0)     begin failures++; $display("FAIL: external window never used"); end
    if (n_pclk < n_hclk / 2 - 2 || n_pclk > n_hclk / 2 + 2) begin
      failures++; $display("FAIL: %0d PCLK pulses in %0d HCLK cycles", n_pclk, n_hclk);
    end
    $display("RR=%0b RW=%0b: transfers %0d, SRAM latency checks %0d, SRAM writes %0d, WAIT %0d, ENDOK %0d, errors %0d, back-to-back %0d, PREADY stalls %0d, external %0d, PCLK pulses %0d",
             RR, RW, completed, n_lat, n_sram_wr, n_wait, n_endok, n_err, n_b2b, n_stall, n_ext, n_pclk);
    done = 1'b1;
  end
endmodule
