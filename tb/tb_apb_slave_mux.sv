// Self-checking testbench for the APB slave select decoder.
// Random PSEL/PADDR and random slave return signals are applied to the
// default two-slave decoder and to a three-slave one; select lines and the
// returned PRDATA/PREADY/PSLVERR are compared with an address-map model
// (window i = addresses i*4 KiB .. (i+1)*4 KiB-1, anything above = error).
module tb_apb_slave_mux;
  int checks = 0, failures = 0;

  logic        psel;
  logic [31:0] paddr;
  logic [31:0] rd   [3];
  logic [2:0]  rdy, err;

  logic [1:0]  sel2;  logic [31:0] prdata2; logic pready2, pslverr2;
  logic [2:0]  sel3;  logic [31:0] prdata3; logic pready3, pslverr3;
  logic [31:0] rd2 [2];

  assign rd2[0] = rd[0];
  assign rd2[1] = rd[1];

  apb_slave_mux u_m2 (.PSEL(psel), .PADDR(paddr), .PRDATA(prdata2), .PREADY(pready2),
    .PSLVERR(pslverr2), .PSELx(sel2), .PRDATAx(rd2), .PREADYx(rdy[1:0]), .PSLVERRx(err[1:0]));
  apb_slave_mux #(.NUM_SLAVES(3)) u_m3 (.PSEL(psel), .PADDR(paddr), .PRDATA(prdata3), .PREADY(pready3),
    .PSLVERR(pslverr3), .PSELx(sel3), .PRDATAx(rd), .PREADYx(rdy), .PSLVERRx(err));

  task automatic check_one(input int n, input logic [2:0] sel, input logic [31:0] prdata,
                           input logic pready, input logic pslverr);
    int unsigned idx;
    logic [2:0] esel;
    logic [31:0] erd;
    logic erdy, eerr;
    idx  = paddr >> 12;
    esel = '0;
    if (idx < n) begin
      esel[idx] = psel;
      erd = rd[idx]; erdy = rdy[idx]; eerr = err[idx];
    end else begin
      erd = '0; erdy = 1'b1; eerr = 1'b1;
    end
    checks++;
    if (sel !== esel || prdata !== erd || pready !== erdy || pslverr !== eerr) begin
      failures++;
      $display("FAIL n=%0d addr %h: sel %b/%b rd %h/%h rdy %b/%b err %b/%b", n, paddr,
               sel, esel, prdata, erd, pready, erdy, pslverr, eerr);
    end
  endtask

  initial begin
    for (int k = 0; k < 2000; k++) begin
      psel  = $urandom_range(0, 3) != 0;
      case ($urandom_range(0, 3))
        0: paddr = $urandom;                           // anywhere
        default: paddr = $urandom_range(0, 4 * 4096 - 1);  // around the windows
      endcase
      for (int i = 0; i < 3; i++) rd[i] = $urandom;
      rdy = 3'($urandom);
      err = 3'($urandom);
      #1;
      check_one(2, {1'b0, sel2}, prdata2, pready2, pslverr2);
      check_one(3, sel3, prdata3, pready3, pslverr3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
