// lfsr8 -- 8-bit pseudorandom generator of the flash data randomizer.
//
// An 8-bit maximal-length Fibonacci LFSR (period 255). The register shifts
// one place towards the MSB per enabled clock and feeds bit 0 with the XOR of
// bits 7, 5, 4 and 3 (polynomial x^8 + x^6 + x^5 + x^4 + 1, see
// flash_rand_pkg). Its state is the random value RV[7:0].
//
// Interface (ports as in the scheme's block diagram: Seed, Enable, Clock,
// RST, RV):
//   clk    clock
//   rst    synchronous, active high: loads seed into the register
//   en     advances the register by one step (ignored while rst is high)
//   seed   start value, taken from the seed location decoder; never 0
//   rv     current register state
// Timing: rv shows the loaded seed in the cycle after rst, and the next
// value in the cycle after each cycle with en high. That RST loads the seed
// (rather than clearing the register) is this design's reading of the
// diagram, since the register must start from the address-dependent seed.
module lfsr8
  import flash_rand_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  rv_t  seed,
  output rv_t  rv
);

  rv_t state;

  always_ff @(posedge clk) begin
    if (rst)     state <= seed;
    else if (en) state <= lfsr_next(state);
  end

  assign rv = state;

  // The all-zero state is the lock-up state of an XOR LFSR.
  a_seed_nonzero: assert property (@(posedge clk) rst |-> seed != '0);

endmodule
