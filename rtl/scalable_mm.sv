// Scalable bit-serial multiplier: a fixed-precision (N-bit) radix-2
// Montgomery multiplier whose datapath can also perform an ordinary N x N ->
// 2N-bit multiplication at two partial products per cycle.
//
// The ordinary multiplication is the building block that lets a host run
// Montgomery multiplications on operands longer than N bits with a
// word-level algorithm such as CIOS, using N-bit words (ten ordinary
// multiplications for a 2N-bit Montgomery product).
//
// Interface: while busy_o is low the host loads A, B (N+1 bits) and M (N
// bits, odd) with load_a_i / load_b_i / load_m_i, selects mode_i and pulses
// start_i. done_o pulses when the result is ready:
//  - Montgomery (mode_i = MODE_MONT): mont_o = A*B*2^-(N+D) mod M, in [0, 2M)
//    for inputs A, B < 2M, after N+D+(N+D)/D cycles. No final subtraction is
//    needed and the result can be fed straight back as an operand.
//  - Ordinary (mode_i = MODE_MUL): prod_o = A*B for A, B < 2^N, after
//    N/2+1+(N+D)/D cycles. The low half is collected in the M register, so M
//    must be reloaded before the next Montgomery multiplication.
// Outputs stay valid until the next start. Loads and start_i must not be
// issued while busy_o is high (checked by assertions). The datapath and
// the two modes follow the published architecture; the interface, reset
// and control are this design's own.
module scalable_mm
  import mm_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned D = 32,
  localparam int unsigned W = N + D
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic           load_a_i,
  input  logic           load_b_i,
  input  logic           load_m_i,
  input  logic [N:0]     a_i,
  input  logic [N:0]     b_i,
  input  logic [N-1:0]   m_i,
  input  mode_e          mode_i,
  input  logic           start_i,
  output logic           busy_o,
  output logic           done_o,
  output logic [W-1:0]   rs_o,
  output logic [N:0]     mont_o,
  output logic [2*N-1:0] prod_o
);

  mode_e        mode;
  ctrl_t        ctrl;
  logic [N-1:0] m_q;

  mm_ctrl #(.N(N), .D(D)) u_ctrl (
    .clk_i, .rst_ni, .start_i, .mode_i, .mode_o(mode), .ctrl_o(ctrl),
    .busy_o, .done_o
  );

  mm_datapath #(.N(N), .D(D)) u_dp (
    .clk_i, .rst_ni, .load_a_i, .load_b_i, .load_m_i, .a_i, .b_i, .m_i,
    .mode_i(mode), .ctrl_i(ctrl), .rs_o, .m_o(m_q)
  );

  assign mont_o = rs_o[N+1:1];
  assign prod_o = {rs_o[N-1:0], m_q};

  a_no_start_busy: assert property (@(posedge clk_i) disable iff (!rst_ni)
    busy_o |-> !start_i);
  a_no_load_busy: assert property (@(posedge clk_i) disable iff (!rst_ni)
    busy_o |-> !(load_a_i || load_b_i || load_m_i));

endmodule
