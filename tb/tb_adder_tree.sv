// Test of the binary adder tree: four signed 10-bit words plus two carry-ins
// (the carry-word tree of the 16-tap filter), and a single word with one
// carry-in, against plain integer sums for random and extreme inputs.
module tb_adder_tree;
  localparam int WI = 10, WO = 12;
  logic signed [WI-1:0] in4 [4];
  logic signed [WO-1:0] sum4;
  logic signed [WI-1:0] in1 [1];
  logic signed [WI-1:0] sum1;
  int checks = 0, failures = 0;

  adder_tree #(.NUM(4), .WI(WI), .WO(WO), .CIN(2)) dut4 (.in(in4), .sum(sum4));
  adder_tree #(.NUM(1), .WI(WI), .WO(WI), .CIN(1)) dut1 (.in(in1), .sum(sum1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int r = 0; r < 500; r++) begin
      e = 2;
      for (int i = 0; i < 4; i++) begin
        in4[i] = (r == 0) ? -512 : (r == 1) ? 511 : WI'($urandom);
        e += int'(in4[i]);
      end
      in1[0] = WI'($urandom);
      #1;
      checks++;
      if (sum4 != WO'(e)) begin
        failures++;
        if (failures < 5) $display("FAIL sum4=%0d exp=%0d", sum4, e);
      end
      checks++;
      if (sum1 != WI'(int'(in1[0]) + 1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
