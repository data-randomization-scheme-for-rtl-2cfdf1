// flash_rand_pkg -- shared constants and functions of the flash data randomizer.
//
// The randomizer draws its random values (RVs) from an 8-bit maximal-length
// Fibonacci LFSR. Each step shifts the register one place towards the MSB and
// feeds bit 0 with the XOR of the tapped bits. The 8-bit width and the
// period of 255 follow the scheme; the characteristic polynomial
// x^8 + x^6 + x^5 + x^4 + 1 (tap mask 8'hB8 on state bits 7,5,4,3) and the
// start value 8'hFF are chosen so that the sequence matches the published
// example values: FFh, FEh, FCh, F8h at locations 0..3 and 9Fh, 3Fh, 7Fh at
// locations 252..254.
//
// A location in the sequence is (column address + page address) mod 255.
// Because 256 = 1 (mod 255), the residue is computed by adding the bytes of
// the sum with end-around carry, which costs only small adders.
package flash_rand_pkg;

  localparam int unsigned RV_W     = 8;          // LFSR and data byte width
  localparam int unsigned PERIOD   = 255;        // 2^8 - 1 states
  localparam logic [RV_W-1:0] TAP_MASK = 8'hB8;  // x^8 + x^6 + x^5 + x^4 + 1
  localparam logic [RV_W-1:0] RV_INIT  = 8'hFF;  // RV at location 0

  typedef logic [RV_W-1:0] rv_t;
  typedef logic [7:0]      loc_t;                // location 0..254
  typedef rv_t [PERIOD-1:0] seed_rom_t;

  // One LFSR step.
  function automatic rv_t lfsr_next(rv_t s);
    return {s[RV_W-2:0], ^(s & TAP_MASK)};
  endfunction

  // LFSR state at every location of the sequence; indexed by location.
  function automatic seed_rom_t build_seed_rom();
    seed_rom_t rom;
    rv_t       s;
    s = RV_INIT;
    for (int i = 0; i < int'(PERIOD); i++) begin
      rom[i] = s;
      s      = lfsr_next(s);
    end
    return rom;
  endfunction

  // x mod 255 for a 32-bit value by folding bytes with end-around carry.
  function automatic loc_t mod255(logic [31:0] x);
    logic [9:0] acc;
    logic [8:0] f;
    acc = 10'(x[7:0]) + 10'(x[15:8]) + 10'(x[23:16]) + 10'(x[31:24]); // <= 1020
    f   = 9'(acc[7:0]) + 9'(acc[9:8]);                                 // <= 258
    f   = 9'(f[7:0]) + 9'(f[8]);                                       // <= 255
    return (f[7:0] == 8'hFF) ? 8'h00 : f[7:0];
  endfunction

endpackage
