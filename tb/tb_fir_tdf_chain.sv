// tb_fir_tdf_chain: drives the transposed delay/adder line with products of
// random 16-bit samples and a fixed coefficient set {3, -5, 7, 2} (the line
// does not care which constants produced its inputs), and compares y with a
// direct-form sum over a sample history kept in the testbench. Clocks with
// en low must leave the state unchanged; reset must clear it.
module tb_fir_tdf_chain;
  localparam int NTAPS = 4;
  localparam int PW    = 24;
  localparam int C [NTAPS] = '{3, -5, 7, 2};

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [PW-1:0] prod [NTAPS];
  logic signed [PW-1:0] y;
  int checks = 0, failures = 0, idle_clocks = 0;
  longint hist [NTAPS];  // hist[k] = x[n-k]

  fir_tdf_chain #(.NTAPS(NTAPS), .PW(PW)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .prod(prod), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic signed [15:0] x);
    longint e = 0;
    for (int k = NTAPS-1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = x;
    for (int k = 0; k < NTAPS; k++) prod[k] = PW'(C[k] * longint'(x));
    #1;
    for (int k = 0; k < NTAPS; k++) e += C[k] * hist[k];
    checks++;
    if (longint'(y) != e) begin
      failures++;
      $display("FAIL x=%0d y=%0d expected %0d", x, y, e);
    end
  endtask

  initial begin
    for (int k = 0; k < NTAPS; k++) begin hist[k] = 0; prod[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // impulse: y must trace the coefficients
    @(negedge clk); en = 1'b1; apply(1);
    for (int n = 1; n < NTAPS + 2; n++) begin @(negedge clk); apply(0); end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        en = 1'b0; idle_clocks++;
        for (int k = 0; k < NTAPS; k++) prod[k] = '0;
      end else begin
        en = 1'b1;
        apply(16'($urandom));
      end
    end
    // reset clears the line
    @(negedge clk); en = 1'b0; rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    for (int k = 0; k < NTAPS; k++) hist[k] = 0;
    en = 1'b1; apply(100);
    if (idle_clocks == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
