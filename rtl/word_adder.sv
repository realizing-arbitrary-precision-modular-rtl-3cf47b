// The d-bit carry-propagate adder that converts the carry-save result to
// binary, one D-bit word per cycle, least significant word first.
//
// sum_o = a_i + b_i + cin (combinational), where cin is cin_first_i in the
// first conversion cycle (first_i) and otherwise the carry-out stored at the
// previous enabled cycle. The stored carry is updated on each clock edge with
// en_i high. cin_first_i lets the carry left by the 2-bit adder at the end of
// an ordinary multiplication enter the conversion of the upper half.
// The word-serial conversion follows the published architecture; the carry
// flip-flop between words is this design's own way of chaining the words.
module word_adder #(
  parameter int unsigned D = 32
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         en_i,
  input  logic         first_i,
  input  logic         cin_first_i,
  input  logic [D-1:0] a_i,
  input  logic [D-1:0] b_i,
  output logic [D-1:0] sum_o,
  output logic         cout_o
);

  logic carry_q, cin;

  always_comb begin
    cin = first_i ? cin_first_i : carry_q;
    {cout_o, sum_o} = {1'b0, a_i} + {1'b0, b_i} + (D+1)'(cin);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)   carry_q <= 1'b0;
    else if (en_i) carry_q <= cout_o;
  end

endmodule
