// Testbench for pp_gen: for random A, M and all combinations of b_i, b_(i+1),
// q and mode, compares the two partial products with A*b_i and with q*M
// (Montgomery) or 2*A*b_(i+1) (ordinary), computed by multiplication.
module tb_pp_gen;
  import mm_pkg::*;
  localparam int unsigned N = 1024, D = 32, W = N + D;
  mode_e mode;
  logic [N:0] a;
  logic [N-1:0] m;
  logic b0, b1, q;
  logic [W-1:0] pp1, pp2, w1, w2;
  int checks = 0, failures = 0;

  pp_gen #(.N(N), .D(D)) dut (.mode_i(mode), .a_i(a), .m_i(m), .b0_i(b0), .b1_i(b1),
                              .q_i(q), .pp1_o(pp1), .pp2_o(pp2));

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v = '0;
    for (int i = 0; i < (W + 31) / 32; i++) v = (v << 32) | W'($urandom);
    return v;
  endfunction

  initial begin
    for (int i = 0; i < 40; i++) begin
      a = (N+1)'(rnd());
      if (i == 0) a = '1;
      m = N'(rnd()) | N'(1);
      for (int k = 0; k < 16; k++) begin
        {b0, b1, q} = k[2:0];
        mode = k[3] ? MODE_MUL : MODE_MONT;
        #1;
        w1 = W'(a) * W'(b0);
        w2 = (mode == MODE_MUL) ? W'(a) * W'(2) * W'(b1) : W'(m) * W'(q);
        checks++;
        if (pp1 !== w1 || pp2 !== w2) begin
          failures++;
          $display("FAIL pp_gen k=%0d", k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
