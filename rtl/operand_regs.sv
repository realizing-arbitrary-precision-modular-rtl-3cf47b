// Operand registers of the multiplier: A, B and M.
//
// A (N+1 bits) is loaded and then held. B (N+1 bits) is loaded and then,
// on every partial-product cycle (shift_i), shifted right by one bit in
// Montgomery mode or two bits in ordinary mode, zeros entering at the top;
// b0_o and b1_o are its two lowest bits, b_i and b_(i+1). M (N bits) holds
// the modulus in Montgomery mode. An ordinary multiplication needs no
// modulus, so the M register is then reused to collect the low half of the
// product: on each cycle with lo_en_i the pair lo_pair_i enters at its top
// and the contents move right by two, so after N/2 pairs the low half sits
// in order in m_o. N+1-bit A and B allow Montgomery inputs up to 2M-1.
// Reusing the M register for the low half follows the published
// architecture; the scanning of B through a shift register and the load
// priority over shifts are this design's own. All updates on the rising edge.
module operand_regs
  import mm_pkg::*;
#(
  parameter int unsigned N = 1024
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         load_a_i,
  input  logic         load_b_i,
  input  logic         load_m_i,
  input  logic [N:0]   a_i,
  input  logic [N:0]   b_i,
  input  logic [N-1:0] m_i,
  input  mode_e        mode_i,
  input  logic         shift_i,
  input  logic         lo_en_i,
  input  logic [1:0]   lo_pair_i,
  output logic [N:0]   a_o,
  output logic [N-1:0] m_o,
  output logic         b0_o,
  output logic         b1_o
);

  logic [N:0] b_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      a_o <= '0;
      b_q <= '0;
      m_o <= '0;
    end else begin
      if (load_a_i) a_o <= a_i;
      if (load_b_i)     b_q <= b_i;
      else if (shift_i) b_q <= (mode_i == MODE_MUL) ? (b_q >> 2) : (b_q >> 1);
      if (load_m_i)     m_o <= m_i;
      else if (lo_en_i) m_o <= {lo_pair_i, m_o[N-1:2]};
    end
  end

  assign b0_o = b_q[0];
  assign b1_o = b_q[1];

endmodule
