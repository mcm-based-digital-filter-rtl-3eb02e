// tb_mcm_hcub_23_81: checks the {23, 81} shift-add multiplier block against
// ordinary multiplication, for the extreme 16-bit values and for random
// samples. A watchdog ends the run if it stalls.
module tb_mcm_hcub_23_81;
  localparam int XW = 16;
  logic signed [XW-1:0] x;
  logic signed [XW+4:0] p23;
  logic signed [XW+6:0] p81;
  int checks = 0, failures = 0;

  mcm_hcub_23_81 #(.XW(XW)) dut (.x(x), .p23(p23), .p81(p81));

  task automatic check(input logic signed [XW-1:0] v);
    longint e23, e81;
    x = v;
    #1;
    e23 = 23 * longint'(v);
    e81 = 81 * longint'(v);
    checks += 2;
    if (longint'(p23) != e23) begin
      failures++;
      $display("FAIL x=%0d p23=%0d expected %0d", v, p23, e23);
    end
    if (longint'(p81) != e81) begin
      failures++;
      $display("FAIL x=%0d p81=%0d expected %0d", v, p81, e81);
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
