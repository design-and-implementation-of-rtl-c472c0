// Self-checking testbench for the APB clock enable generator.
// Runs the default divide-by-2 instance and a divide-by-3 and divide-by-1
// instance.  Mid-cycle (at the falling HCLK edge) PCLKEN must follow the
// period-DIV pattern of a reference counter; PCLK must be low while HCLK is
// low, and just after a rising HCLK edge PCLK must equal the PCLKEN value of
// the cycle that edge ended.
module tb_pclken_gen;
  logic hclk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 hclk = ~hclk;

  logic [2:0] en, pclk;
  pclken_gen                 u_d2 (.HCLK(hclk), .HRESETn(rst_n), .PCLKEN(en[0]), .PCLK(pclk[0]));
  pclken_gen #(.PCLK_DIV(3)) u_d3 (.HCLK(hclk), .HRESETn(rst_n), .PCLKEN(en[1]), .PCLK(pclk[1]));
  pclken_gen #(.PCLK_DIV(1)) u_d1 (.HCLK(hclk), .HRESETn(rst_n), .PCLKEN(en[2]), .PCLK(pclk[2]));

  localparam int DIVS [3] = '{2, 3, 1};
  int   cyc;
  logic [2:0] en_mid;
  int   pclk_rises [3];

  for (genvar g = 0; g < 3; g++) begin : g_cnt
    always @(posedge pclk[g]) pclk_rises[g]++;
  end

  initial begin
    pclk_rises = '{0, 0, 0};
    repeat (2) @(posedge hclk);
    #2 rst_n = 1'b1;
    cyc = 0;
    repeat (60) begin
      @(negedge hclk);
      if (cyc == 0) pclk_rises = '{0, 0, 0};
      en_mid = en;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (en[i] !== ((cyc % DIVS[i]) == DIVS[i] - 1)) begin
          failures++;
          $display("FAIL div %0d cycle %0d: PCLKEN %b", DIVS[i], cyc, en[i]);
        end
      end
      #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (pclk[i] !== 1'b0) begin failures++; $display("FAIL div %0d: PCLK high while HCLK low", DIVS[i]); end
      end
      @(posedge hclk);
      #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (pclk[i] !== en_mid[i]) begin failures++; $display("FAIL div %0d: PCLK %b after edge, PCLKEN was %b", DIVS[i], pclk[i], en_mid[i]); end
      end
      cyc++;
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (pclk_rises[i] != 60 / DIVS[i]) begin
        failures++;
        $display("FAIL div %0d: %0d PCLK edges in 60 HCLK cycles", DIVS[i], pclk_rises[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge hclk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
