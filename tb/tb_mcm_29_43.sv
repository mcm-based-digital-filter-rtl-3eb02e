// tb_mcm_29_43: checks the {29, 43} shift-add multiplier block against
// ordinary multiplication, for the extreme 16-bit values and for random
// samples. A watchdog ends the run if it stalls.
module tb_mcm_29_43;
  localparam int XW = 16;
  logic signed [XW-1:0] x;
  logic signed [XW+4:0] p29;
  logic signed [XW+5:0] p43;
  int checks = 0, failures = 0;

  mcm_29_43 #(.XW(XW)) dut (.x(x), .p29(p29), .p43(p43));

  task automatic check(input logic signed [XW-1:0] v);
    longint e29, e43;
    x = v;
    #1;
    e29 = 29 * longint'(v);
    e43 = 43 * longint'(v);
    checks += 2;
    if (longint'(p29) != e29) begin
      failures++;
      $display("FAIL x=%0d p29=%0d expected %0d", v, p29, e29);
    end
    if (longint'(p43) != e43) begin
      failures++;
      $display("FAIL x=%0d p43=%0d expected %0d", v, p43, e43);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(1); check(-1); check(16'sh7fff); check(-16'sh8000);
    check(12345); check(-9876);
    for (int i = 0; i < 2000; i++) check(XW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
