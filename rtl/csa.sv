// Carry-save adder (3:2 compressor) of W bits.
//
// Adds three W-bit vectors without carry propagation: every bit position is
// a full adder, the sum bits form s_o and the carry bits, moved one position
// up, form c_o. Hence s_o + c_o == x_i + y_i + z_i modulo 2^W, and c_o[0] is
// always 0. The datapath uses two of these in series, both N+D bits wide,
// as in the published architecture; the full-adder formulation is the
// standard one. Purely combinational.
module csa #(
  parameter int unsigned W = 1056
) (
  input  logic [W-1:0] x_i,
  input  logic [W-1:0] y_i,
  input  logic [W-1:0] z_i,
  output logic [W-1:0] s_o,
  output logic [W-1:0] c_o
);

  logic [W-2:0] maj;

  always_comb begin
    s_o = x_i ^ y_i ^ z_i;
    maj = (x_i[W-2:0] & y_i[W-2:0]) | (x_i[W-2:0] & z_i[W-2:0])
        | (y_i[W-2:0] & z_i[W-2:0]);
    c_o = {maj, 1'b0};
  end

endmodule
