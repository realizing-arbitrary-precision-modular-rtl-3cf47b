// Testbench for mm_datapath at N = 64, D = 8, with the control strobes driven
// directly by the testbench (clear, N+D or N/2+1 partial-product cycles,
// (N+D)/D conversion cycles). Montgomery results are checked by congruence,
// Z * 2^(N+D) == A * B (mod M), and range, Z < 2M; ordinary products against
// A * B. Operands for Montgomery mode are drawn below 2M.
module tb_mm_datapath;
  import mm_pkg::*;
  localparam int unsigned N = 64, D = 8, W = N + D, BIG = 4 * W;
  logic clk = 0, rst_n = 0, la, lb, lm;
  logic [N:0] a, b;
  logic [N-1:0] m, m_q;
  logic [W-1:0] rs;
  mode_e mode;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  mm_datapath #(.N(N), .D(D)) dut (.clk_i(clk), .rst_ni(rst_n), .load_a_i(la), .load_b_i(lb),
    .load_m_i(lm), .a_i(a), .b_i(b), .m_i(m), .mode_i(mode), .ctrl_i(ctrl), .rs_o(rs), .m_o(m_q));

  always #5 clk = ~clk;

  function automatic logic [BIG-1:0] rnd();
    logic [BIG-1:0] v = '0;
    for (int i = 0; i < BIG / 32; i++) v = (v << 32) | BIG'($urandom);
    return v;
  endfunction

  task automatic operate(input mode_e md);
    @(negedge clk);
    la = 1; lb = 1; lm = 1; mode = md;
    @(negedge clk);
    la = 0; lb = 0; lm = 0;
    ctrl = '0; ctrl.clr = 1;
    @(negedge clk);
    ctrl = '0;
    for (int i = 0; i < (md == MODE_MUL ? N / 2 + 1 : W); i++) begin
      ctrl.iter = 1; ctrl.lo_en = (md == MODE_MUL) && (i != 0);
      @(negedge clk);
    end
    ctrl = '0;
    for (int i = 0; i < W / D; i++) begin
      ctrl.conv = 1; ctrl.conv_first = (i == 0); ctrl.conv_last = (i == W / D - 1);
      @(negedge clk);
    end
    ctrl = '0;
  endtask

  initial begin
    logic [BIG-1:0] mm, aa, bb, zz;
    la = 0; lb = 0; lm = 0; ctrl = '0; mode = MODE_MONT; a = '0; b = '0; m = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      // Montgomery multiplication.
      mm = rnd() % (BIG'(1) << N);
      mm = mm | BIG'(1) | (BIG'(1) << (N - 1));
      aa = rnd() % (2 * mm);
      bb = rnd() % (2 * mm);
      a = (N+1)'(aa); b = (N+1)'(bb); m = N'(mm);
      operate(MODE_MONT);
      zz = BIG'(rs >> 1);
      checks++;
      if (((zz << W) % mm) != ((aa * bb) % mm) || zz >= 2 * mm || rs[0] != 1'b0) begin
        failures++; $display("FAIL mont t=%0d", t);
      end
      // Ordinary multiplication.
      aa = rnd() % (BIG'(1) << N);
      bb = rnd() % (BIG'(1) << N);
      if (t == 0) begin aa = (BIG'(1) << N) - 1; bb = aa; end
      a = (N+1)'(aa); b = (N+1)'(bb);
      operate(MODE_MUL);
      checks++;
      if ({rs[N-1:0], m_q} != (2*N)'(aa * bb) || rs[W-1:N] != '0) begin
        failures++; $display("FAIL mul t=%0d got %h want %h", t, {rs[N-1:0], m_q}, aa * bb);
      end
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
