// Partial-product generators and mode multiplexer.
//
// pp1_o feeds the upper carry-save adder and is always A AND b_i (an array of
// AND gates). pp2_o feeds the lower carry-save adder and is chosen by the
// mode: q AND M in Montgomery mode (q is the reduction bit, so either 0 or M
// is added), or 2A AND b_(i+1) in ordinary mode, where the factor 2 is a
// hard-wired one-bit left shift of A. Both outputs are zero-extended to the
// datapath width W = N + D. The AND-array generators and the mode
// multiplexer follow the published architecture. Combinational.
module pp_gen
  import mm_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned D = 32,
  localparam int unsigned W = N + D
) (
  input  mode_e        mode_i,
  input  logic [N:0]   a_i,     // operand A, up to N+1 bits
  input  logic [N-1:0] m_i,     // modulus M
  input  logic         b0_i,    // multiplier bit b_i
  input  logic         b1_i,    // multiplier bit b_(i+1)
  input  logic         q_i,     // Montgomery reduction bit
  output logic [W-1:0] pp1_o,
  output logic [W-1:0] pp2_o
);

  logic [W-1:0] a_ext, a2_ext, m_ext;

  always_comb begin
    a_ext  = W'(a_i);
    a2_ext = a_ext << 1;
    m_ext  = W'(m_i);
    pp1_o  = a_ext & {W{b0_i}};
    if (mode_i == MODE_MUL) pp2_o = a2_ext & {W{b1_i}};
    else                    pp2_o = m_ext & {W{q_i}};
  end

endmodule
