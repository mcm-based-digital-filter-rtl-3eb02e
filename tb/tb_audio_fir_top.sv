// tb_audio_fir_top: end-to-end test of the audio FIR filter at its default
// sizes. It feeds an impulse (the response must be 23, 81, 81, 23), a
// full-scale positive and a full-scale negative step (largest outputs,
// 208 * 32767 and 208 * -32768, which must not wrap), and random samples with
// random idle clocks between them, and compares every output with a
// direct-form model y[n] = sum h[k] x[n-k] kept in the testbench. It checks
// that each output appears exactly two clocks after its sample, that no
// output appears on idle clocks, and that a reset in mid-stream clears the
// filter state. The {29, 43} multiplier example beside the filter is checked
// against ordinary multiplication. Each mechanism (idle clocks between
// samples, back-to-back samples, full-scale outputs, mid-stream reset) is
// counted; one that never happened counts as a failure.
module tb_audio_fir_top;
  localparam int H [4] = '{23, 81, 81, 23};

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [15:0] x_in = '0, ex_x = '0;
  logic               out_valid;
  logic signed [23:0] y_out;
  logic signed [20:0] ex_p29;
  logic signed [21:0] ex_p43;

  int checks = 0, failures = 0;
  int n_idle = 0, n_b2b = 0, n_fullscale = 0, n_reset = 0, n_out = 0;
  longint hist [4];
  longint exp_q [$];
  int     due_q [$];
  int     cyc = 0;

  audio_fir_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .out_valid(out_valid), .y_out(y_out),
    .ex_x(ex_x), .ex_p29(ex_p29), .ex_p43(ex_p43));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor: every out_valid must match the oldest expected value,
  // and arrive exactly two clocks after its sample was taken.
  always @(posedge clk) begin : monitor
    longint e;
    int     due;
    if (rst_n && out_valid) begin
      checks++;
      n_out++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0d", y_out);
      end else begin
        e   = exp_q.pop_front();
        due = due_q.pop_front();
        if (longint'(y_out) != e) begin
          failures++;
          $display("FAIL y_out=%0d expected %0d", y_out, e);
        end
        if (cyc != due) begin
          failures++;
          $display("FAIL output at clock %0d, expected at %0d", cyc, due);
        end
        if (e == 208 * 32767 || e == -208 * 32768) n_fullscale++;
      end
    end
  end

  // Present one sample on the next clock edge.
  task automatic send(input logic signed [15:0] x);
    longint e = 0;
    @(negedge clk);
    in_valid = 1'b1;
    x_in     = x;
    for (int k = 3; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = longint'(x);
    for (int k = 0; k < 4; k++) e += H[k] * hist[k];
    exp_q.push_back(e);
    due_q.push_back(cyc + 2);
  endtask

  task automatic idle(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1'b0;
      x_in     = 16'($urandom);  // ignored while in_valid is low
    end
    if (n > 0) n_idle++;
  endtask

  task automatic drain();
    idle(4);
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_q.size());
      exp_q.delete(); due_q.delete();
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // impulse
    send(1); for (int i = 0; i < 5; i++) send(0);
    n_b2b++;
    drain();
    // full-scale steps, positive then negative
    for (int i = 0; i < 5; i++) send(16'sh7fff);
    for (int i = 0; i < 5; i++) send(-16'sh8000);
    drain();
    // random samples, random gaps (audio rate below the clock rate)
    for (int i = 0; i < 2000; i++) begin
      send(16'($urandom));
      if ($urandom_range(0, 2) == 0) idle($urandom_range(1, 6));
      else n_b2b++;
    end
    drain();
    // reset in mid-stream: state must clear
    send(1000); send(-2000);
    @(negedge clk); in_valid = 1'b0; rst_n = 1'b0;
    exp_q.delete(); due_q.delete();
    @(negedge clk); rst_n = 1'b1;
    n_reset++;
    for (int k = 0; k < 4; k++) hist[k] = 0;
    send(7); send(0); send(0); send(0);
    drain();

    // {29, 43} MCM example
    for (int i = 0; i < 500; i++) begin
      automatic logic signed [15:0] v = (i == 0) ? 16'sh7fff : (i == 1) ? -16'sh8000 : 16'($urandom);
      ex_x = v;
      #1;
      checks += 2;
      if (longint'(ex_p29) != 29 * longint'(v)) begin
        failures++; $display("FAIL ex_p29(%0d)=%0d", v, ex_p29);
      end
      if (longint'(ex_p43) != 43 * longint'(v)) begin
        failures++; $display("FAIL ex_p43(%0d)=%0d", v, ex_p43);
      end
    end

    $display("mechanisms: outputs=%0d idle_gaps=%0d back_to_back=%0d full_scale=%0d resets=%0d",
             n_out, n_idle, n_b2b, n_fullscale, n_reset);
    if (n_idle == 0 || n_b2b == 0 || n_fullscale == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
