// data_randomizer -- on-chip data randomizer for MLC NAND flash pages.
//
// Stored data patterns such as all-PV3 or PV1/PV3 stripes wear the tunnel
// oxide and maximise cell-to-cell interference. This block XORs every data
// byte with a pseudorandom value (RV) so that, whatever the user pattern,
// the four MLC states end up nearly equally often and neighbouring cells, in
// both the word-line and the bit-line direction, hold uncorrelated values.
//
// Structure (as in the scheme's block diagram):
//   seed_location_decoder  (col_addr + page_addr) mod 255 -> seed
//   lfsr8                  loads the seed, steps once per data byte -> RV
//   data_scrambler         dout = din ^ RV
// Because the LFSR has period 255 and the seed location advances by one for
// each column and each page, the RV of byte (column c, page p) is always the
// LFSR state at location (c + p) mod 255, whether the byte is reached by
// streaming from an earlier column or by loading its address directly.
// Randomizing and de-randomizing are the same operation.
//
// Interface:
//   clk        clock
//   load       starts a transfer: the seed for (col_addr, page_addr) is
//              loaded; the first data byte may follow in the next cycle.
//              A new load at any time restarts at a new column (random
//              data input / output).
//   col_addr   start column of the transfer, COL_W bits
//   page_addr  page address, PAGE_W bits
//   din_valid  din carries a byte; the RV advances after it
//   din        data byte in
//   dout_valid copy of din_valid (same cycle)
//   dout       din ^ RV (same cycle: no added latency, one byte per clock)
//   location   sequence location of the loaded address (combinational)
//   rv         the RV applied to the current byte
// Timing: load must not be high in the same cycle as din_valid. Gaps in
// din_valid hold the RV. The state is undefined until the first load.
// The handshake (load, din_valid) and the zero-latency XOR datapath are
// this design's choices; the published scheme gives the three blocks and the
// address-to-location rule.
module data_randomizer
  import flash_rand_pkg::*;
#(
  parameter int unsigned COL_W  = 14,
  parameter int unsigned PAGE_W = 8
) (
  input  logic              clk,
  input  logic              load,
  input  logic [COL_W-1:0]  col_addr,
  input  logic [PAGE_W-1:0] page_addr,
  input  logic              din_valid,
  input  rv_t               din,
  output logic              dout_valid,
  output rv_t               dout,
  output loc_t              location,
  output rv_t               rv
);

  rv_t seed;

  seed_location_decoder #(
    .COL_W (COL_W),
    .PAGE_W(PAGE_W)
  ) u_decoder (
    .col_addr (col_addr),
    .page_addr(page_addr),
    .location (location),
    .seed     (seed)
  );

  lfsr8 u_lfsr (
    .clk (clk),
    .rst (load),
    .en  (din_valid),
    .seed(seed),
    .rv  (rv)
  );

  data_scrambler u_scrambler (
    .din (din),
    .rv  (rv),
    .dout(dout)
  );

  assign dout_valid = din_valid;

  a_no_load_with_data: assert property (@(posedge clk) !(load && din_valid))
    else $error("load and din_valid in the same cycle");

endmodule
