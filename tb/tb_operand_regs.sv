// Testbench for operand_regs at the default size: checks loading of A, B and
// M; that B presents bits (b_i, b_(i+1)) for i = 0, 1, 2, ... in Montgomery
// mode and i = 0, 2, 4, ... in ordinary mode; that a load wins over a shift;
// and that N/2 pairs pushed into the M register end up as the low half in
// order.
module tb_operand_regs;
  import mm_pkg::*;
  localparam int unsigned N = 1024;
  logic clk = 0, rst_n = 0, la, lb, lm, shift, lo_en;
  logic [N:0] a, b, a_q, bref;
  logic [N-1:0] m, m_q, lo_ref;
  logic [1:0] pair;
  logic b0, b1;
  mode_e mode;
  int checks = 0, failures = 0;

  operand_regs #(.N(N)) dut (.clk_i(clk), .rst_ni(rst_n), .load_a_i(la), .load_b_i(lb),
    .load_m_i(lm), .a_i(a), .b_i(b), .m_i(m), .mode_i(mode), .shift_i(shift),
    .lo_en_i(lo_en), .lo_pair_i(pair), .a_o(a_q), .m_o(m_q), .b0_o(b0), .b1_o(b1));

  always #5 clk = ~clk;

  function automatic logic [N:0] rnd();
    logic [N:0] v = '0;
    for (int i = 0; i < (N + 32) / 32; i++) v = (v << 32) | (N+1)'($urandom);
    return v;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    {la, lb, lm, shift, lo_en} = '0; pair = '0; mode = MODE_MONT;
    a = '0; b = '0; m = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      mode = t[0] ? MODE_MUL : MODE_MONT;
      @(negedge clk);
      a = rnd(); b = rnd(); m = N'(rnd()); la = 1; lb = 1; lm = 1;
      @(negedge clk);
      {la, lb, lm} = '0;
      chk(a_q == a && m_q == m, "load");
      bref = b;
      shift = 1;
      for (int i = 0; i < N / 2 + 4; i++) begin
        int unsigned k;
        k = t[0] ? 2 * i : i;
        chk(b0 == (k <= N ? bref[k] : 1'b0) && b1 == (k + 1 <= N ? bref[k+1] : 1'b0),
            $sformatf("b bits i=%0d mode=%0d", i, mode));
        @(negedge clk);
      end
      // A load in the same cycle as a shift wins.
      b = rnd(); lb = 1;
      @(negedge clk);
      lb = 0; shift = 0;
      chk(b0 == b[0] && b1 == b[1], "load over shift");
    end
    // Low-half collection in the M register.
    for (int t = 0; t < 4; t++) begin
      @(negedge clk);
      m = N'(rnd()); lm = 1;
      @(negedge clk);
      lm = 0; lo_en = 1;
      for (int i = 0; i < N / 2; i++) begin
        pair = 2'($urandom);
        lo_ref[2*i +: 2] = pair;
        @(negedge clk);
      end
      lo_en = 0;
      chk(m_q == lo_ref, "low half collected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
