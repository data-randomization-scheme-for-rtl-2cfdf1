// tb_uniformity_table1 -- MLC state uniformity of fixed test patterns after
// randomization.
//
// A 2-bit MLC word line holds an LSB page and an MSB page; here the LSB page
// is page 0 and the MSB page is page 1, and the cell at column c, bit b
// stores (MSB bit, LSB bit) of that column's bytes. The states are taken as
// Erase = 11, PV1 = 10, PV2 = 00, PV3 = 01 (Gray order of threshold voltage).
// For each of the patterns all-00h, all-FFh, all-AAh and all-55h both pages
// are written over one LFSR period (255 columns) through the randomizer,
// the cells are counted per state and the percentages (to 0.1 %), the
// variance and standard deviation of the four percentages and the score
// of uniformity 100 * (43.3 - sd) / 43.3 are compared with the expected
// values:
//   pattern  Erase PV1  PV2  PV3   variance  sd     score
//   00h      25.1  25.1 24.7 25.1  0.028     0.169  99.6
//   FFh      24.7  25.1 25.1 25.1  0.028     0.169  99.6
//   AAh      24.9  25.1 24.9 25.1  0.009     0.098  99.8
//   55h      24.9  25.1 24.9 25.1  0.009     0.098  99.8
// (variance and sd truncated to three decimals). Without randomization each
// of these patterns puts every cell in one or two states.
module tb_uniformity_table1;
  import flash_rand_pkg::*;

  localparam int unsigned COL_W  = 14;
  localparam int unsigned PAGE_W = 8;

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

  data_randomizer dut (
    .clk(clk), .load(load), .col_addr(col_addr), .page_addr(page_addr),
    .din_valid(din_valid), .din(din), .dout_valid(dout_valid), .dout(dout),
    .location(location), .rv(rv));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [7:0] pattern;
    real pct [4];      // Erase, PV1, PV2, PV3
    real variance;
    real sd;
    real score;
  } row_t;

  row_t rows [4];

  task automatic write_page(int p, logic [7:0] pattern, output logic [7:0] page [255]);
    load = 1'b1; col_addr = '0; page_addr = PAGE_W'(p);
    @(posedge clk); #1;
    load = 1'b0;
    for (int c = 0; c < 255; c++) begin
      din_valid = 1'b1; din = pattern;
      #1;
      page[c] = dout;
      @(posedge clk); #1;
    end
    din_valid = 1'b0;
  endtask

  function automatic real trunc3(real x);
    return real'($floor(x * 1000.0 + 1.0e-9)) / 1000.0;
  endfunction

  function automatic real round1(real x);
    return real'($floor(x * 10.0 + 0.5)) / 10.0;
  endfunction

  task automatic close(string what, real got, real exp, real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  initial begin
    rows[0] = '{8'h00, '{25.1, 25.1, 24.7, 25.1}, 0.028, 0.169, 99.6};
    rows[1] = '{8'hFF, '{24.7, 25.1, 25.1, 25.1}, 0.028, 0.169, 99.6};
    rows[2] = '{8'hAA, '{24.9, 25.1, 24.9, 25.1}, 0.009, 0.098, 99.8};
    rows[3] = '{8'h55, '{24.9, 25.1, 24.9, 25.1}, 0.009, 0.098, 99.8};
    @(posedge clk); #1;

    foreach (rows[r]) begin
      logic [7:0] lsb [255], msb [255];
      int  cnt [4];
      real pct [4], mean, variance, sd, score;
      write_page(0, rows[r].pattern, lsb);
      write_page(1, rows[r].pattern, msb);
      cnt = '{0, 0, 0, 0};
      for (int c = 0; c < 255; c++)
        for (int b = 0; b < 8; b++)
          case ({msb[c][b], lsb[c][b]})
            2'b11: cnt[0]++;   // Erase
            2'b10: cnt[1]++;   // PV1
            2'b00: cnt[2]++;   // PV2
            2'b01: cnt[3]++;   // PV3
          endcase
      mean = 0.0;
      for (int i = 0; i < 4; i++) begin
        pct[i] = 100.0 * real'(cnt[i]) / real'(255 * 8);
        mean += pct[i] / 4.0;
      end
      variance = 0.0;
      for (int i = 0; i < 4; i++) variance += (pct[i] - mean) * (pct[i] - mean) / 4.0;
      sd    = $sqrt(variance);
      score = 100.0 * (43.3 - sd) / 43.3;
      $display("pattern %02h: Erase %5.1f PV1 %5.1f PV2 %5.1f PV3 %5.1f var %.4f sd %.4f score %.2f",
               rows[r].pattern, pct[0], pct[1], pct[2], pct[3], variance, sd, score);
      for (int i = 0; i < 4; i++)
        close($sformatf("pattern %02h state %0d", rows[r].pattern, i), round1(pct[i]), rows[r].pct[i], 0.01);
      close($sformatf("pattern %02h variance", rows[r].pattern), trunc3(variance), rows[r].variance, 0.0005);
      close($sformatf("pattern %02h sd", rows[r].pattern), trunc3(sd), rows[r].sd, 0.0005);
      close($sformatf("pattern %02h score", rows[r].pattern), round1(score), rows[r].score, 0.01);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
