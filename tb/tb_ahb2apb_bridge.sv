// Self-checking testbench for the AHB to APB bridge in all four buffering
// modes (direct/buffered read x direct/buffered write).  Each mode runs in
// its own environment (random AHB traffic, random PCLKEN, APB slave model
// with wait states and errors); the results are summed.
module tb_ahb2apb_bridge;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [3:0] done;
  int checks_m [4];
  int fails_m  [4];
  int checks, failures;

  always #5 clk = ~clk;

  tb_bridge_env #(.RR(1'b1), .RW(1'b1)) env_bb (.clk, .rst_n, .done(done[0]), .checks(checks_m[0]), .failures(fails_m[0]));
  tb_bridge_env #(.RR(1'b1), .RW(1'b0)) env_bd (.clk, .rst_n, .done(done[1]), .checks(checks_m[1]), .failures(fails_m[1]));
  tb_bridge_env #(.RR(1'b0), .RW(1'b1)) env_db (.clk, .rst_n, .done(done[2]), .checks(checks_m[2]), .failures(fails_m[2]));
  tb_bridge_env #(.RR(1'b0), .RW(1'b0)) env_dd (.clk, .rst_n, .done(done[3]), .checks(checks_m[3]), .failures(fails_m[3]));

  task automatic finish_run(input int extra_fail);
    checks = 0; failures = extra_fail;
    for (int i = 0; i < 4; i++) begin
      checks += checks_m[i];
      failures += fails_m[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&done);
    finish_run(0);
  end

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    finish_run(1);
  end
endmodule
