// agu: address generation unit and sequencer of the in-place radix-2 FFT.
//
// Two counters walk the transform: the level l = 0..LOGN-1 and, inside a level,
// the pair p = 0..N/2-1; one butterfly is issued per clock, so a whole FFT takes
// N/2 * LOGN cycles (80 for N = 32). For each (l, p) the unit produces
//   adr_a  = p + 2^l * floor(p / 2^l)        adr_b = adr_a + 2^l
//   adr_tw = (p mod 2^l) * 2^(LOGN-1-l)      (index n of w^n = exp(-j*2*pi*n/N))
// With the input stored in bit-reversed order these give a decimation-in-time
// FFT whose output is in natural order. The data ping-pong between two RAMs:
// rd_select = l[0] picks the RAM read at level l (0: RAM1, 1: RAM2) and the
// other RAM is written (we1 = running & rd_select, we2 = running & ~rd_select).
//
// Interface and timing: while load is high (or rst_n low) both counters are held
// at 0 and fft_done is low. The first clock edge with load low completes the
// first butterfly. The level counter stops at LOGN; fft_done is high from the
// edge that writes the last butterfly until load is raised again, both write
// enables are then low, and rd_select points at the RAM holding the result
// (RAM2, since LOGN = 5 is odd).
//
// The counters, the adr_a/adr_b equations, the RAM alternation and the write
// enables follow the design description. Its twiddle equation,
// 2^(L-l) * floor(p / 2^(L-l)), pairs with a different (bit-rotated) address
// order and gives wrong twiddles for levels 1..3 with the adr_a/adr_b above, so
// the twiddle index here is the one that matches adr_a/adr_b. The reset is this
// implementation's own.
module agu
  import fft_pkg::*;
#(
  parameter int unsigned LN = LOGN,
  localparam int unsigned PW = LN - 1,           // pair counter / twiddle index bits
  localparam int unsigned LW = $clog2(LN + 1)     // level counter bits
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  output logic [LN-1:0] adr_a,
  output logic [LN-1:0] adr_b,
  output logic [PW-1:0] adr_tw,
  output logic          rd_select,
  output logic          we1,
  output logic          we2,
  output logic          fft_done,
  output logic [LW-1:0] level,
  output logic [PW-1:0] pair
);

  localparam logic [LW-1:0] LAST_LEVEL = LW'(LN);

  logic running;

  assign fft_done  = (level == LAST_LEVEL);
  assign running   = !load && !fft_done;
  assign rd_select = level[0];
  assign we1       = running &&  rd_select;
  assign we2       = running && !rd_select;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level <= '0;
      pair  <= '0;
    end else if (load) begin
      level <= '0;
      pair  <= '0;
    end else if (running) begin
      pair <= pair + 1'b1;
      if (pair == '1) level <= level + 1'b1;
    end
  end

  // Address arithmetic. span = 2^l; low = p mod 2^l; high = floor(p / 2^l).
  logic [LN-1:0] span, low_mask, p_ext;
  always_comb begin
    p_ext    = LN'(pair);
    span     = LN'(1) << level;
    low_mask = span - 1'b1;
    adr_a    = ((p_ext & ~low_mask) << 1) | (p_ext & low_mask);
    adr_b    = adr_a + span;
    adr_tw   = PW'((p_ext & low_mask) << (LN - 1 - int'(level)));
  end

  // A level never exceeds LN and the addresses of a pair are distinct.
  a_level_range: assert property (@(posedge clk) disable iff (!rst_n) level <= LAST_LEVEL);
  a_pair_ordered: assert property (@(posedge clk) disable iff (!rst_n)
                                   running |-> (adr_b > adr_a));

endmodule
