// Bit-cycle sequencer of the DA filter.
//
// A sample period ("byte clock" period) is L cycles of the bit clock. This
// counter runs on the bit clock and marks the first bit cycle (the carry-save
// accumulator starts from zero) and the last bit cycle. The last bit cycle is
// the one in which the MSB slice of the weights is applied, so `last` is also
// the sign control of the accumulator, and the rising clock edge that ends it
// is the byte-clock edge: every sample-rate register in the design is enabled
// by `last`. Using one clock with a sample-rate enable, instead of a second
// physical byte clock, is this design's choice.
//
// Timing: after reset bit_idx = 0; it counts 0..L-1 and wraps. bit_idx is
// brought out for observation; the filter itself uses only first and last.
module da_bit_timing #(
  parameter int unsigned L = da_lms_pkg::DEF_L
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic [$clog2(L)-1:0] bit_idx,
  output logic                 first,   // bit cycle 0 (LSB slice)
  output logic                 last     // bit cycle L-1 (MSB slice, sign control, byte strobe)
);
  localparam logic [$clog2(L)-1:0] LAST_IDX = $clog2(L)'(L - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                bit_idx <= '0;
    else if (bit_idx == LAST_IDX) bit_idx <= '0;
    else                       bit_idx <= bit_idx + 1'b1;
  end

  assign first = (bit_idx == '0);
  assign last  = (bit_idx == LAST_IDX);
endmodule
