// The 2-bit adder that produces the low half of an ordinary product.
//
// In every cycle of an ordinary multiplication the two least significant bits
// of RS and RC leave the running sum (the feedback shifts by two). This unit
// adds them together with its stored carry; sum_o is the next pair of product
// bits, and on a clock edge with en_i high the new carry is stored. clr_i
// clears the carry at the start of an operation. carry_o is the stored carry,
// which after the last pair must be added into the upper half. The adder
// follows the published architecture; the carry flip-flop is this design's
// own. In this datapath the RC input is always zero in ordinary mode, so the
// carry never becomes 1 there; the unit is kept general.
module pair_adder (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  logic       clr_i,
  input  logic       en_i,
  input  logic [1:0] s_i,
  input  logic [1:0] c_i,
  output logic [1:0] sum_o,
  output logic       carry_o
);

  logic cout;

  always_comb {cout, sum_o} = {1'b0, s_i} + {1'b0, c_i} + {2'b0, carry_o};

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)     carry_o <= 1'b0;
    else if (clr_i)  carry_o <= 1'b0;
    else if (en_i)   carry_o <= cout;
  end

endmodule
