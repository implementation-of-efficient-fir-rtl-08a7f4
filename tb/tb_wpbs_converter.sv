// Test of the word-parallel bit-serial converter (P = 4, L = 8): random
// weight words are loaded at the end of each period and, during the next
// period, cycle l must present bit l of every word on A.
module tb_wpbs_converter;
  localparam int P = 4, L = 8;
  logic clk = 0, rst_n = 0, load = 0;
  logic [L-1:0] w_in [P];
  logic [P-1:0] A;
  int checks = 0, failures = 0;

  wpbs_converter #(.P(P), .L(L)) dut (.clk, .rst_n, .load, .w_in, .A);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] cur [P];
    foreach (w_in[k]) w_in[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      for (int k = 0; k < P; k++) cur[k] = L'($urandom);
      w_in = cur;
      load = 1;
      @(negedge clk);
      load = 0;
      foreach (w_in[k]) w_in[k] = L'($urandom);   // ignored until next load
      for (int l = 0; l < L; l++) begin
        for (int k = 0; k < P; k++) begin
          checks++;
          if (A[k] != cur[k][l]) failures++;
        end
        if (l < L - 1) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
