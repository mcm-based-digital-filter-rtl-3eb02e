// fir_tdf_chain: delay/adder line of a transposed-form FIR filter.
//
// In the transposed form the input sample is multiplied once by every
// coefficient (in a shared MCM block) and the products enter a chain of
// registers and adders. With z[k] the register after tap k+1:
//     y        = prod[0] + z[0]
//     z[k]    <= prod[k+1] + z[k+1]        (z[NTAPS-1] taken as 0)
// so y[n] = sum_k c_k * x[n-k]. Every adder sits between two registers,
// which keeps the critical path to one adder whatever the filter length.
//
// Interface: prod[k] is c_k * x[n] for the current sample; en advances the
// line by one sample (one clock with en high per audio sample); y is the
// combinational filter output for the current sample. rst_n is an
// active-low synchronous reset that clears the delay registers. The
// transposed structure follows the source design; the sample enable, reset
// and PW-bit partial sums are this design's choice.
module fir_tdf_chain #(
  parameter int unsigned NTAPS = 4,
  parameter int unsigned PW    = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [PW-1:0] prod [NTAPS],
  output logic signed [PW-1:0] y
);
  logic signed [PW-1:0] z [NTAPS-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS-1; k++) z[k] <= '0;
    end else if (en) begin
      for (int k = 0; k < NTAPS-2; k++) z[k] <= prod[k+1] + z[k+1];
      z[NTAPS-2] <= prod[NTAPS-1];
    end
  end

  assign y = prod[0] + z[0];
endmodule
