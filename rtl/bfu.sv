// bfu: radix-2 decimation-in-time butterfly on complex fixed-point numbers.
//
//   A' = A + B*tw,   B' = A - B*tw
// with T = B*tw expanded as T_r = B_r*tw_r - B_i*tw_i, T_i = B_r*tw_i + B_i*tw_r.
// Each product of two W-bit signed numbers is 2W bits wide; with FRAC fraction
// bits in every operand the product has 2*FRAC, so T is taken as bits
// [W+FRAC-1:FRAC] of the full-width sum (bits [25:10] for Q5.10, [30:15] for
// Q15), i.e. truncated toward minus infinity. The four sums and differences wrap
// at W bits; there is no saturation. Purely combinational: the outputs follow the
// inputs in the same cycle, so one butterfly is done per clock in the FFT.
//
// The equations, the Q5.10 format and the [25:10] slice follow the design
// description. The sum of the two products is formed at 2W+1 bits before the
// slice, so the only loss is the dropped low bits and overflow of the result.
module bfu
#(
  parameter int unsigned W  = 16,
  parameter int unsigned FR = 10
) (
  input  logic signed [W-1:0] tw_r,
  input  logic signed [W-1:0] tw_i,
  input  logic signed [W-1:0] a_r,
  input  logic signed [W-1:0] a_i,
  input  logic signed [W-1:0] b_r,
  input  logic signed [W-1:0] b_i,
  output logic signed [W-1:0] ao_r,
  output logic signed [W-1:0] ao_i,
  output logic signed [W-1:0] bo_r,
  output logic signed [W-1:0] bo_i
);

  logic signed [2*W:0] t_r_full, t_i_full;
  logic signed [W-1:0] t_r, t_i;

  always_comb begin
    t_r_full = (2*W+1)'(b_r * tw_r) - (2*W+1)'(b_i * tw_i);
    t_i_full = (2*W+1)'(b_r * tw_i) + (2*W+1)'(b_i * tw_r);
    t_r      = t_r_full[W+FR-1:FR];
    t_i      = t_i_full[W+FR-1:FR];
    ao_r     = a_r + t_r;
    ao_i     = a_i + t_i;
    bo_r     = a_r - t_r;
    bo_i     = a_i - t_i;
  end

endmodule
