// End-to-end testbench for the AHB to APB subsystem in the three
// non-default buffering modes (direct read / buffered write, buffered read /
// direct write, direct read / direct write), each in its own tb_system_env
// with the reference-waveform transfers, random traffic and the per-mode
// SRAM wait-cycle counts checked.  The default mode runs in
// tb_ahb2apb_system.
module tb_ahb2apb_system_modes;
  logic HCLK = 1'b0;
  logic HRESETn = 1'b0;
  logic [2:0] done;
  int   checks_m [3];
  int   fails_m  [3];

  always #5 HCLK = ~HCLK;

  tb_system_env #(.RR(1'b0), .RW(1'b1)) env_db (.HCLK, .HRESETn, .done(done[0]), .checks(checks_m[0]), .failures(fails_m[0]));
  tb_system_env #(.RR(1'b1), .RW(1'b0)) env_bd (.HCLK, .HRESETn, .done(done[1]), .checks(checks_m[1]), .failures(fails_m[1]));
  tb_system_env #(.RR(1'b0), .RW(1'b0)) env_dd (.HCLK, .HRESETn, .done(done[2]), .checks(checks_m[2]), .failures(fails_m[2]));

  task automatic report(input int extra_fail);
    int checks, failures;
    checks = 0; failures = extra_fail;
    for (int i = 0; i < 3; i++) begin
      checks   += checks_m[i];
      failures += fails_m[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge HCLK);
    HRESETn = 1'b1;
    wait (&done);
    report(0);
  end

  initial begin
    repeat (100000) @(posedge HCLK);
    $display("FAIL: watchdog expired");
    report(1);
  end
endmodule
