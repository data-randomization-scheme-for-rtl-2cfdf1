// tb_lfsr8 -- self-checking testbench of the 8-bit LFSR.
//
// Loads FFh and steps through a whole period, comparing every RV with a
// reference written from the polynomial x^8+x^6+x^5+x^4+1 bit by bit, and
// with the example values FFh, FEh, FCh, F8h (locations 0..3) and 9Fh, 3Fh,
// 7Fh (locations 252..254). Checks that all 255 nonzero states occur once and
// that the sequence repeats after 255 steps, that en low holds the state,
// that a load takes priority over en, and that each step takes one clock.
module tb_lfsr8;
  import flash_rand_pkg::*;

  logic clk = 1'b0;
  logic rst, en;
  rv_t  seed, rv;
  int   checks = 0, failures = 0;

  lfsr8 dut (.clk(clk), .rst(rst), .en(en), .seed(seed), .rv(rv));

  always #5 clk = ~clk;

  function automatic logic [7:0] ref_step(logic [7:0] s);
    logic fb;
    fb = s[7] ^ s[5] ^ s[4] ^ s[3];
    return {s[6:0], fb};
  endfunction

  task automatic check(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] model;
  bit         seen [256];
  int         first_step_cycle;

  initial begin
    rst = 1'b1; en = 1'b0; seed = 8'hFF;
    @(posedge clk); #1;
    rst = 1'b0;
    model = 8'hFF;
    check("loaded seed", rv, 8'hFF);
    en = 1'b1;
    for (int loc = 0; loc < 255; loc++) begin
      check($sformatf("rv at location %0d", loc), rv, model);
      checks++;
      if (seen[rv]) begin failures++; $display("FAIL state %02h repeats", rv); end
      seen[rv] = 1'b1;
      case (loc)
        0:   check("fig loc 0",   rv, 8'hFF);
        1:   check("fig loc 1",   rv, 8'hFE);
        2:   check("fig loc 2",   rv, 8'hFC);
        3:   check("fig loc 3",   rv, 8'hF8);
        252: check("fig loc 252", rv, 8'h9F);
        253: check("fig loc 253", rv, 8'h3F);
        254: check("fig loc 254", rv, 8'h7F);
        default: ;
      endcase
      @(posedge clk); #1;
      model = ref_step(model);
    end
    check("period 255 wraps to FFh", rv, 8'hFF);
    checks++;
    if (seen[0]) begin failures++; $display("FAIL zero state reached"); end

    // enable low holds the value
    en = 1'b0;
    repeat (7) begin
      @(posedge clk); #1;
      check("hold while en low", rv, 8'hFF);
    end

    // one step per clock
    en = 1'b1;
    @(posedge clk); #1;
    check("one step per clock", rv, 8'hFE);
    en = 1'b0;

    // load has priority over en, any nonzero seed
    for (int i = 0; i < 50; i++) begin
      seed = 8'($urandom_range(1, 255));
      rst = 1'b1; en = 1'b1;
      @(posedge clk); #1;
      check("load over enable", rv, seed);
      rst = 1'b0;
      model = seed;
      repeat (3) begin
        @(posedge clk); #1;
        model = ref_step(model);
        check("step after load", rv, model);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
