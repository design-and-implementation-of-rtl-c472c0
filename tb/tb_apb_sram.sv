// Self-checking testbench for the APB SRAM slave.
// An APB master task (PCLK = HCLK/2 via PCLKEN) writes random words to random
// addresses, with random low address bits, and reads them back.  Checks: read
// data against a reference array indexed by the word address (low two bits
// dropped), PSLVERR low, and the access phase lasting exactly three APB clocks
// (PREADY two clocks after a zero-wait slave).
module tb_apb_sram;
  logic        hclk = 1'b0;
  logic        rst_n = 1'b0;
  logic        pclken;
  logic        psel, penable, pwrite, pready, pslverr;
  logic [31:0] paddr, pwdata, prdata;
  int          checks = 0, failures = 0;
  logic [31:0] ref_mem [1024];
  logic        written [1024];

  always #5 hclk = ~hclk;

  apb_sram dut (.HCLK(hclk), .PRESETn(rst_n), .PCLKEN(pclken), .PSEL(psel), .PENABLE(penable),
                .PWRITE(pwrite), .PADDR(paddr), .PWDATA(pwdata), .PRDATA(prdata),
                .PREADY(pready), .PSLVERR(pslverr));

  // PCLK = HCLK / 2
  always_ff @(posedge hclk or negedge rst_n)
    if (!rst_n) pclken <= 1'b0;
    else        pclken <= ~pclken;

  // wait for the next HCLK edge on which PCLKEN is high (an APB clock edge)
  task automatic pclk_edge();
    do @(posedge hclk); while (!pclken);
  endtask

  task automatic apb_xfer(input logic wr, input logic [31:0] a, input logic [31:0] d,
                          output logic [31:0] q, output int access_clks);
    psel <= 1'b1; penable <= 1'b0; pwrite <= wr; paddr <= a; pwdata <= d;
    pclk_edge();
    penable <= 1'b1;
    access_clks = 0;
    do begin
      pclk_edge();
      access_clks++;
    end while (!pready && access_clks < 20);
    q = prdata;
    checks++;
    if (pslverr !== 1'b0) begin failures++; $display("FAIL: PSLVERR"); end
    psel <= 1'b0; penable <= 1'b0;
    pclk_edge();
  endtask

  initial begin
    logic [31:0] q, a, d;
    int n;
    int idx;
    psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0;
    for (int i = 0; i < 1024; i++) written[i] = 1'b0;
    repeat (3) @(posedge hclk);
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      idx = $urandom_range(0, 1023);
      a   = {20'd0, 10'(idx), 2'($urandom)};
      if ($urandom_range(0, 1) == 1 || !written[idx]) begin
        d = $urandom;
        apb_xfer(1'b1, a, d, q, n);
        ref_mem[idx] = d;
        written[idx] = 1'b1;
      end else begin
        apb_xfer(1'b0, a, 32'h0, q, n);
        checks++;
        if (q !== ref_mem[idx]) begin
          failures++;
          $display("FAIL: read %h got %h expected %h", a, q, ref_mem[idx]);
        end
      end
      checks++;
      if (n != 3) begin failures++; $display("FAIL: access phase of %0d APB clocks", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge hclk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
