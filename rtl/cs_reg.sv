// One (n+d)-bit register of the RS/RC pair that holds the running sum in
// carry-save form.
//
// During the partial-product phase it is loaded in parallel from the lower
// carry-save adder (load_i). During the conversion phase it shifts right by
// one word of D bits per cycle (shift_i): its lowest word goes to the d-bit
// adder and word_i enters at the top. For RS, word_i is the adder's sum, so
// after W/D shifts RS holds the binary result; for RC, word_i is zero.
// clr_i clears it at the start of an operation. The parallel load, the
// D-bit shift and the adder output returning into RS follow the published
// architecture; the clear and the priority clr_i, load_i, shift_i are this
// design's own. All updates on the rising clock edge; rst_ni is asynchronous.
module cs_reg #(
  parameter int unsigned W = 1056,
  parameter int unsigned D = 32
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         clr_i,
  input  logic         load_i,
  input  logic [W-1:0] d_i,
  input  logic         shift_i,
  input  logic [D-1:0] word_i,
  output logic [W-1:0] q_o
);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)      q_o <= '0;
    else if (clr_i)   q_o <= '0;
    else if (load_i)  q_o <= d_i;
    else if (shift_i) q_o <= {word_i, q_o[W-1:D]};
  end

endmodule
