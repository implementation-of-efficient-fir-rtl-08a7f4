// Test of the DA table (P = 4, L = 8): random samples, including the extreme
// values, are loaded one per load pulse, with idle cycles in between that
// must not change anything. After every load each of the 16 entries must equal
// sum_j k_j * x(n-j) over the last four samples, entry 0 must be zero, and the
// taps must be x(n)..x(n-3).
module tb_da_table;
  import da_lms_ref_pkg::*;
  localparam int P = 4, L = 8, W = L + 2;
  logic clk = 0, rst_n = 0, load = 0;
  logic signed [L-1:0] x_in = '0;
  logic signed [W-1:0] c [2**P];
  logic signed [L-1:0] tap [P];
  int checks = 0, failures = 0;

  da_table #(.P(P), .L(L)) dut (.clk, .rst_n, .load, .x_in, .c, .tap);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint h [P] = '{0, 0, 0, 0};
    longint exp_c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      case (n % 10)
        3: x_in = -128;
        4: x_in = 127;
        default: x_in = L'($urandom_range(255));
      endcase
      load = 1;
      @(negedge clk);
      load = 0;
      for (int j = P - 1; j > 0; j--) h[j] = h[j-1];
      h[0] = longint'(x_in);
      x_in = L'($urandom_range(255));  // must be ignored while idle
      repeat (n % 3) @(negedge clk);
      for (int k = 0; k < 2**P; k++) begin
        exp_c = 0;
        for (int j = 0; j < P; j++) if ((k >> j) & 1) exp_c += h[j];
        checks++;
        if (c[k] != W'(exp_c)) begin
          failures++;
          if (failures < 5) $display("FAIL n=%0d c[%0d]=%0d exp=%0d", n, k, c[k], exp_c);
        end
      end
      for (int j = 0; j < P; j++) begin
        checks++;
        if (tap[j] != L'(h[j])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
