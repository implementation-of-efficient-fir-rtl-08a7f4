// Binary adder tree.
//
// Adds NUM words of WI bits (sign-extended) into one WO-bit word, pairwise in
// clog2(NUM) levels. CIN extra unit carry-ins are added at the first level:
// the design feeds the carry-word tree NUM/2 of them, which, because carry
// words weigh twice as much as sum words, supplies the +1 two's-complement
// correction of every inner-product block. NUM must be a power of two.
// Combinational.
module adder_tree #(
  parameter int unsigned NUM = 4,
  parameter int unsigned WI  = da_lms_pkg::DEF_L + 2,
  parameter int unsigned WO  = WI + $clog2(NUM),
  parameter int unsigned CIN = 0
) (
  input  logic signed [WI-1:0] in [NUM],
  output logic signed [WO-1:0] sum
);
  localparam int unsigned LV = $clog2(NUM);

  // node[lv][i]: i-th partial sum of level lv (level 0 = inputs)
  logic signed [WO-1:0] node [LV+1][NUM];

  always_comb begin
    for (int lv = 0; lv <= LV; lv++)
      for (int i = 0; i < NUM; i++) node[lv][i] = '0;
    for (int i = 0; i < NUM; i++) node[0][i] = WO'(in[i]);
    for (int lv = 0; lv < LV; lv++)
      for (int i = 0; i < (NUM >> (lv + 1)); i++) begin
        node[lv+1][i] = node[lv][2*i] + node[lv][2*i+1];
        // carry-ins enter the first-level adders, one per adder
        if (lv == 0 && i < int'(CIN)) node[lv+1][i] = node[lv+1][i] + WO'(1);
      end
    sum = node[LV][0];
    if (LV == 0) sum = node[0][0] + WO'(CIN);
  end
endmodule
