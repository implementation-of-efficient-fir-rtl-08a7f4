// Test of the DA-table multiplexer: for random table contents every select
// value must return the addressed word.
module tb_da_lut_mux;
  localparam int P = 4, W = 10;
  logic signed [W-1:0] c [2**P];
  logic [P-1:0] sel;
  logic signed [W-1:0] y;
  int checks = 0, failures = 0;

  da_lut_mux #(.P(P), .W(W)) dut (.c, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] ref_c [2**P];
    for (int r = 0; r < 50; r++) begin
      for (int k = 0; k < 2**P; k++) begin
        ref_c[k] = W'($urandom);
        c[k] = ref_c[k];
      end
      for (int s = 0; s < 2**P; s++) begin
        sel = P'(s);
        #1;
        checks++;
        if (y != ref_c[s]) begin
          failures++;
          if (failures < 5) $display("FAIL sel=%0d y=%0d exp=%0d", s, y, ref_c[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
