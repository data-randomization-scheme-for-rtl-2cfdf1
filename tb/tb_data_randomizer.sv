// tb_data_randomizer -- end-to-end testbench of the flash data randomizer,
// run with the top's default parameters (14-bit column, 8-bit page address).
//
// A transfer loads a (column, page) start address and streams bytes; every
// output byte is compared in the same cycle with din ^ RV, where the
// reference RV of column c on page p is the LFSR state at (c + p) % 255,
// taken from an LFSR model stepped in the testbench. The test covers:
//   - full-rate streaming of a whole 16 KB page, one byte per clock, with no
//     added latency (cycle count checked);
//   - gaps in din_valid, during which the RV must hold;
//   - wrap of the sequence location from 254 to 0 inside a transfer;
//   - a load in the middle of a transfer (random column access);
//   - read-back: scrambled data fed through again with the same address
//     comes out as the original data;
//   - the diagonal arrangement: RV(page p+1, column c) = RV(page p, column c+1),
//     including the worked example column 248, page 4 -> RV 9Fh.
// Each of these is counted, and one that never happened is a failure.
module tb_data_randomizer;
  import flash_rand_pkg::*;

  localparam int unsigned COL_W  = 14;
  localparam int unsigned PAGE_W = 8;
  localparam int unsigned NCOL   = 2**COL_W;

  logic              clk = 1'b0;
  logic              load = 1'b0;
  logic [COL_W-1:0]  col_addr = '0;
  logic [PAGE_W-1:0] page_addr = '0;
  logic              din_valid = 1'b0;
  rv_t               din = '0;
  logic              dout_valid;
  rv_t               dout;
  loc_t              location;
  rv_t               rv;

  int checks = 0, failures = 0;
  int n_load = 0, n_stall = 0, n_wrap = 0, n_jump = 0, n_readback = 0;
  int n_fullrate = 0, n_diagonal = 0;

  data_randomizer dut (
    .clk(clk), .load(load), .col_addr(col_addr), .page_addr(page_addr),
    .din_valid(din_valid), .din(din), .dout_valid(dout_valid), .dout(dout),
    .location(location), .rv(rv));

  always #5 clk = ~clk;

  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] seq_tbl [255];

  function automatic logic [7:0] ref_rv(int c, int p);
    return seq_tbl[(c + p) % 255];
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // Start a transfer: one load cycle.
  task automatic do_load(int c, int p);
    load = 1'b1; din_valid = 1'b0;
    col_addr = COL_W'(c); page_addr = PAGE_W'(p);
    #1;
    checks++;
    if (location !== 8'((c + p) % 255)) fail($sformatf("location for col %0d page %0d", c, p));
    @(posedge clk); #1;
    load = 1'b0;
    n_load++;
  endtask

  // Stream n bytes from column c of page p (already loaded). gap_pct is
  // the chance of an idle cycle before each byte. data[] is sent and the
  // outputs are stored in out[].
  task automatic stream(int c, int p, int n, int gap_pct,
                        ref logic [7:0] data [], ref logic [7:0] out []);
    out = new[n];
    for (int k = 0; k < n; k++) begin
      while (int'($urandom_range(0, 99)) < gap_pct) begin
        logic [7:0] held;
        din_valid = 1'b0;
        din = 8'($urandom);
        held = rv;
        @(posedge clk); #1;
        checks++;
        if (rv !== held) fail("RV changed during a gap");
        n_stall++;
      end
      din_valid = 1'b1;
      din = data[k];
      #1;
      checks++;
      if (!dout_valid || dout !== (data[k] ^ ref_rv(c + k, p)))
        fail($sformatf("col %0d page %0d: dout %02h expected %02h", c + k, p, dout,
                       data[k] ^ ref_rv(c + k, p)));
      out[k] = dout;
      if (k > 0 && (c + k) % 255 == 0) n_wrap++;
      @(posedge clk); #1;
    end
    din_valid = 1'b0;
  endtask

  initial begin
    logic [7:0] s;
    logic [7:0] data [], out [], back [];
    logic [7:0] rv_page [4][];
    int t0;

    s = 8'hFF;
    for (int i = 0; i < 255; i++) begin
      seq_tbl[i] = s;
      s = {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
    end
    @(posedge clk); #1;

    // 1. Whole pages at full rate: all-zero data exposes the RV stream.
    data = new[NCOL];
    foreach (data[i]) data[i] = 8'h00;
    for (int p = 0; p < 4; p++) begin
      do_load(0, p);
      t0 = int'(cycle);
      stream(0, p, NCOL, 0, data, out);
      checks++;
      if (int'(cycle) - t0 != int'(NCOL)) fail($sformatf("page took %0d cycles", int'(cycle) - t0));
      else n_fullrate++;
      rv_page[p] = out;
    end
    // diagonal: page p+1 column c carries page p column c+1's RV
    for (int p = 0; p < 3; p++)
      for (int c = 0; c < int'(NCOL) - 1; c++) begin
        checks++;
        if (rv_page[p+1][c] !== rv_page[p][c+1]) fail($sformatf("diagonal p%0d c%0d", p, c));
        else if (c % 1024 == 0) n_diagonal++;
      end

    // worked example: column 248 of page 4
    do_load(248, 4);
    checks++;
    if (rv !== 8'h9F) fail($sformatf("example RV %02h", rv)); else n_diagonal++;

    // 2. Random transfers with gaps, then read-back of the same bytes.
    for (int t = 0; t < 40; t++) begin
      int c, p, n;
      c = int'($urandom_range(0, NCOL - 600));
      p = int'($urandom_range(0, 2**PAGE_W - 1));
      n = int'($urandom_range(1, 520));
      data = new[n];
      foreach (data[i]) data[i] = 8'($urandom);
      do_load(c, p);
      stream(c, p, n, 25, data, out);
      do_load(c, p);
      stream(c, p, n, 10, out, back);
      for (int i = 0; i < n; i++) begin
        checks++;
        if (back[i] !== data[i]) fail($sformatf("read-back col %0d", c + i));
      end
      n_readback++;
    end

    // 3. Column jumps in the middle of a transfer.
    for (int t = 0; t < 20; t++) begin
      int c1, c2, p;
      c1 = int'($urandom_range(0, NCOL - 100));
      c2 = int'($urandom_range(0, NCOL - 100));
      p  = int'($urandom_range(0, 2**PAGE_W - 1));
      data = new[30];
      foreach (data[i]) data[i] = 8'($urandom);
      do_load(c1, p);
      stream(c1, p, 17, 10, data, out);
      do_load(c2, p);
      stream(c2, p, 30, 10, data, out);
      n_jump++;
    end

    // 4. Last columns of the page, address at its maximum.
    data = new[16];
    foreach (data[i]) data[i] = 8'($urandom);
    do_load(NCOL - 16, 2**PAGE_W - 1);
    stream(NCOL - 16, 2**PAGE_W - 1, 16, 0, data, out);

    $display("mechanisms: load=%0d stall=%0d wrap=%0d jump=%0d readback=%0d fullrate=%0d diagonal=%0d",
             n_load, n_stall, n_wrap, n_jump, n_readback, n_fullrate, n_diagonal);
    checks++; if (n_load     == 0) fail("no load");
    checks++; if (n_stall    == 0) fail("no stall");
    checks++; if (n_wrap     == 0) fail("no wrap");
    checks++; if (n_jump     == 0) fail("no column jump");
    checks++; if (n_readback == 0) fail("no read-back");
    checks++; if (n_fullrate == 0) fail("no full-rate page");
    checks++; if (n_diagonal == 0) fail("no diagonal check");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
