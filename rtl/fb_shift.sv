// Feedback shifter between the RS/RC registers and the upper carry-save adder.
//
// The running sum is fed back with a right shift that aligns it with the next
// partial product: by one bit in Montgomery mode (the division by 2 of the
// radix-2 algorithm) and by two bits in ordinary-multiplication mode (two
// partial products were added per cycle). Zeros enter at the top. The bits
// shifted out are not lost: in Montgomery mode they are zero by construction,
// in ordinary mode the 2-bit adder picks them up. The shifter, its place
// after the registers and its two shift amounts follow the published
// architecture. Combinational.
module fb_shift
  import mm_pkg::*;
#(
  parameter int unsigned W = 1056
) (
  input  mode_e        mode_i,
  input  logic [W-1:0] s_i,
  input  logic [W-1:0] c_i,
  output logic [W-1:0] s_o,
  output logic [W-1:0] c_o
);

  always_comb begin
    if (mode_i == MODE_MUL) begin
      s_o = s_i >> 2;
      c_o = c_i >> 2;
    end else begin
      s_o = s_i >> 1;
      c_o = c_i >> 1;
    end
  end

endmodule
