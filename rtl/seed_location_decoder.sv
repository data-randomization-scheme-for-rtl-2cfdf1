// seed_location_decoder -- address-based seed location decoder.
//
// Picks where in the 255-long LFSR sequence a page's randomization starts:
// location = (column address + page address) mod 255, so a step of one
// column or of one page moves one place along the sequence. Consecutive
// pages therefore see the same RV stream shifted by one byte, which gives
// the diagonal RV arrangement that breaks up equal data both along a page
// (row) and across pages (column). Example: column 248, page 4 gives
// location 252 and seed 9Fh.
//
// The seed is the LFSR state at that location, read from a 255 x 8 table
// that is computed at elaboration by stepping the LFSR from FFh (see
// flash_rand_pkg). The published scheme gives the decoder's function; the modulo by
// byte folding and the lookup table are this design's own implementation.
//
// Interface: purely combinational.
//   col_addr   column (byte) address within the page, COL_W bits
//   page_addr  page address, PAGE_W bits
//   location   (col_addr + page_addr) mod 255
//   seed       LFSR state at location
module seed_location_decoder
  import flash_rand_pkg::*;
#(
  parameter int unsigned COL_W  = 14,   // up to 16 KB page incl. spare
  parameter int unsigned PAGE_W = 8     // up to 256 pages per block
) (
  input  logic [COL_W-1:0]  col_addr,
  input  logic [PAGE_W-1:0] page_addr,
  output loc_t              location,
  output rv_t               seed
);

  localparam seed_rom_t SEED_ROM = build_seed_rom();

  initial begin
    assert (COL_W <= 30 && PAGE_W <= 30)
      else $error("address widths above 30 bits are not supported");
  end

  logic [31:0] addr_sum;

  always_comb begin
    addr_sum = 32'(col_addr) + 32'(page_addr);
    location = mod255(addr_sum);
    seed     = SEED_ROM[location];
  end

endmodule
