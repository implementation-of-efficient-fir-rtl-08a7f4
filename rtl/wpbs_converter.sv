// Word-parallel bit-serial converter.
//
// Turns P weight words into the bit slices that address the DA table: in bit
// cycle l the output A holds bit l of every weight, A[k] = w_k[l], LSB first,
// so that the MSB (sign) slice arrives in the last bit cycle together with the
// accumulator's sign control. One L-bit shift register per weight: it is
// loaded in parallel with the new weights at the byte-clock edge (`load`,
// the end of the last bit cycle) and shifts right by one every other bit
// clock.
module wpbs_converter #(
  parameter int unsigned P = da_lms_pkg::DEF_P,
  parameter int unsigned L = da_lms_pkg::DEF_L
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [L-1:0]       w_in [P],
  output logic [P-1:0]       A
);
  logic [L-1:0] sr [P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < P; k++) sr[k] <= '0;
    end else begin
      for (int k = 0; k < P; k++) sr[k] <= load ? w_in[k] : (sr[k] >> 1);
    end
  end

  always_comb
    for (int k = 0; k < P; k++) A[k] = sr[k][0];
endmodule
