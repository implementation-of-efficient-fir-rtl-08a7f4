// Test of the bit-cycle sequencer: after reset the index counts 0..L-1 and
// wraps, `first` is high exactly in cycle 0 and `last` exactly in cycle L-1,
// so a sample period is L clock cycles. Checked for 40 periods.
module tb_da_bit_timing;
  localparam int L = 8;
  logic clk = 0, rst_n = 0;
  logic [2:0] bit_idx;
  logic first, last;
  int checks = 0, failures = 0;

  da_bit_timing #(.L(L)) dut (.clk, .rst_n, .bit_idx, .first, .last);
  always #5 clk = ~clk;

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lasts = 0;
    @(negedge clk);
    checks++; if (bit_idx != 0 || !first || last) failures++;
    rst_n = 1;
    for (int c = 0; c < 40 * L; c++) begin
      checks++;
      if (bit_idx != 3'(c % L) || first != (c % L == 0) || last != (c % L == L - 1)) begin
        failures++;
        if (failures < 5) $display("FAIL cycle %0d idx=%0d first=%b last=%b", c, bit_idx, first, last);
      end
      if (last) lasts++;
      @(negedge clk);
    end
    checks++; if (lasts != 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
