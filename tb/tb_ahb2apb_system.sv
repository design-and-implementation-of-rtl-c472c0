// End-to-end testbench for the AHB to APB subsystem with every parameter at
// its default (buffered read and write, PCLK = HCLK/2, SRAM in window 0, one
// external APB window, 4 KiB windows).  The stimulus and checks live in
// tb_system_env: the reference-waveform transfers, then 400 random transfers,
// with data, response, exact SRAM wait-cycle counts and mechanism coverage
// checked.
module tb_ahb2apb_system;
  logic HCLK = 1'b0;
  logic HRESETn = 1'b0;
  logic done;
  int   checks, failures;

  always #5 HCLK = ~HCLK;

  tb_system_env env (.HCLK, .HRESETn, .done, .checks, .failures);

  initial begin
    repeat (3) @(posedge HCLK);
    HRESETn = 1'b1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge HCLK);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
