// audio_fir_top: 4-tap multiplier-less FIR filter for 16-bit audio.
//
// The filter computes y[n] = 23 x[n] + 81 x[n-1] + 81 x[n-2] + 23 x[n-3], a
// symmetric (linear-phase) low-pass. It is built in transposed form: each
// sample is registered once, multiplied by the two distinct coefficients in
// a shared shift-add block (mcm_hcub_23_81, 3 adders in total, no
// multiplier), and the products feed a register/adder line
// (fir_tdf_chain) whose taps use 23x, 81x, 81x and 23x. The sum is
// registered at the output.
//
// Beside the filter, with its own ports, sits mcm_29_43: the {29, 43}
// shift-add MCM example, combinational from ex_x to ex_p29/ex_p43.
//
// Interface and timing: one sample is taken on each clock with in_valid
// high (audio rates leave many idle clocks between samples; idle clocks
// hold the filter state). The matching output appears on y_out two clocks
// later with out_valid high for one clock; y_out holds its value between
// samples. y_out is the full-precision 24-bit result, so it cannot
// overflow. rst_n is active-low and synchronous.
//
// The 16-bit input, the transposed MCM structure and the HCUB-derived
// constant set {23, 81} follow the source design. The tap order
// {23, 81, 81, 23}, the valid handshake, the reset and the register
// placement are this design's choices.
module audio_fir_top
  import fir_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] x_in,
  output logic                 out_valid,
  output logic signed [YW-1:0] y_out,
  // {29,43} MCM example
  input  logic signed [XW-1:0] ex_x,
  output logic signed [XW+4:0] ex_p29,
  output logic signed [XW+5:0] ex_p43
);
  logic signed [XW-1:0] x_reg;
  logic                 x_vld;
  logic signed [XW+4:0] p23;
  logic signed [XW+6:0] p81;
  logic signed [YW-1:0] prod [NTAPS];
  logic signed [YW-1:0] y_sum;

  // Input register
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_reg <= '0;
      x_vld <= 1'b0;
    end else begin
      x_vld <= in_valid;
      if (in_valid) x_reg <= x_in;
    end
  end

  // Shared multiplier block: 23x and 81x
  mcm_hcub_23_81 #(.XW(XW)) u_mcm (
    .x   (x_reg),
    .p23 (p23),
    .p81 (p81)
  );

  // Tap k uses coefficient h[k] = {23, 81, 81, 23}[k]
  always_comb begin
    prod[0] = YW'(p23);
    prod[1] = YW'(p81);
    prod[2] = YW'(p81);
    prod[3] = YW'(p23);
  end

  fir_tdf_chain #(.NTAPS(NTAPS), .PW(YW)) u_chain (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (x_vld),
    .prod  (prod),
    .y     (y_sum)
  );

  // Output register
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= x_vld;
      if (x_vld) y_out <= y_sum;
    end
  end

  // Every output belongs to the sample taken two clocks earlier.
  a_latency: assert property (@(posedge clk) disable iff (!rst_n)
                              out_valid |-> $past(in_valid, 2));

  mcm_29_43 #(.XW(XW)) u_ex (
    .x   (ex_x),
    .p29 (ex_p29),
    .p43 (ex_p43)
  );
endmodule
