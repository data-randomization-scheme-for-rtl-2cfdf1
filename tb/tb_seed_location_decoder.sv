// tb_seed_location_decoder -- self-checking testbench of the seed location
// decoder.
//
// Checks the worked example (column 248, page 4 -> location 252, seed 9Fh),
// the published locations 0..3 and 253..254, and then compares location and
// seed with a reference for every page 0..255 at columns swept over the full
// 14-bit range. The reference computes (column + page) % 255 with the `%`
// operator and finds the seed by stepping an LFSR model that many times.
module tb_seed_location_decoder;
  import flash_rand_pkg::*;

  localparam int unsigned COL_W  = 14;
  localparam int unsigned PAGE_W = 8;

  logic [COL_W-1:0]  col_addr;
  logic [PAGE_W-1:0] page_addr;
  loc_t              location;
  rv_t               seed;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  seed_location_decoder #(.COL_W(COL_W), .PAGE_W(PAGE_W)) dut (
    .col_addr(col_addr), .page_addr(page_addr), .location(location), .seed(seed));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] seq_tbl [255];

  function automatic logic [7:0] ref_step(logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  task automatic apply_and_check(int c, int p);
    int loc;
    col_addr  = COL_W'(c);
    page_addr = PAGE_W'(p);
    #1;
    loc = (c + p) % 255;
    checks++;
    if (location !== 8'(loc) || seed !== seq_tbl[loc]) begin
      failures++;
      $display("FAIL col %0d page %0d: loc %0d seed %02h, expected %0d %02h",
               c, p, location, seed, loc, seq_tbl[loc]);
    end
  endtask

  initial begin
    logic [7:0] s;
    s = 8'hFF;
    for (int i = 0; i < 255; i++) begin
      seq_tbl[i] = s;
      s = ref_step(s);
    end

    // worked example and published values
    col_addr = 14'd248; page_addr = 8'd4; #1;
    checks++;
    if (location !== 8'd252 || seed !== 8'h9F) begin
      failures++;
      $display("FAIL example: loc %0d seed %02h", location, seed);
    end
    col_addr = 14'd0; page_addr = 8'd0; #1;
    checks++; if (seed !== 8'hFF) begin failures++; $display("FAIL loc 0"); end
    col_addr = 14'd2; page_addr = 8'd1; #1;
    checks++; if (seed !== 8'hF8) begin failures++; $display("FAIL loc 3"); end
    col_addr = 14'd253; page_addr = 8'd0; #1;
    checks++; if (seed !== 8'h3F) begin failures++; $display("FAIL loc 253"); end
    col_addr = 14'd0; page_addr = 8'd254; #1;
    checks++; if (seed !== 8'h7F) begin failures++; $display("FAIL loc 254"); end
    col_addr = 14'd255; page_addr = 8'd0; #1;
    checks++; if (seed !== 8'hFF || location !== 8'd0) begin failures++; $display("FAIL wrap 255"); end

    // extremes
    apply_and_check(2**COL_W - 1, 2**PAGE_W - 1);
    apply_and_check(2**COL_W - 1, 0);
    apply_and_check(0, 2**PAGE_W - 1);

    // sweep: every page with a spread of columns, then random points
    for (int p = 0; p < 2**PAGE_W; p++)
      for (int c = 0; c < 2**COL_W; c += 37)
        apply_and_check(c, p);
    for (int i = 0; i < 5000; i++)
      apply_and_check(int'($urandom_range(0, 2**COL_W - 1)), int'($urandom_range(0, 2**PAGE_W - 1)));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
