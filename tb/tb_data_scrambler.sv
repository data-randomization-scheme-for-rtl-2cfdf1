// tb_data_scrambler -- self-checking testbench of the data scrambler.
//
// Drives every pair of data byte and RV (65,536 pairs) and checks each output
// bit against the bit-level rule "output bit differs from data bit exactly
// where the RV bit is 1", and that applying the scrambler twice with the
// same RV restores the data.
module tb_data_scrambler;
  import flash_rand_pkg::*;

  rv_t din, rv, dout, din2, dout2;
  int  checks = 0, failures = 0;
  logic clk = 1'b0;

  data_scrambler dut  (.din(din),  .rv(rv), .dout(dout));
  data_scrambler dut2 (.din(din2), .rv(rv), .dout(dout2));

  assign din2 = dout;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 256; d++) begin
      for (int r = 0; r < 256; r++) begin
        logic ok;
        din = 8'(d); rv = 8'(r);
        #1;
        ok = 1'b1;
        for (int b = 0; b < 8; b++)
          if ((dout[b] != din[b]) != rv[b]) ok = 1'b0;
        checks++;
        if (!ok) begin
          failures++;
          if (failures < 10) $display("FAIL din %02h rv %02h dout %02h", din, rv, dout);
        end
        checks++;
        if (dout2 !== din) begin
          failures++;
          if (failures < 10) $display("FAIL round trip din %02h rv %02h", din, rv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
