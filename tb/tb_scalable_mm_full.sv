// Full-size testbench for scalable_mm with every parameter at its default
// (N = 1024, D = 32). Runs two Montgomery multiplications (the second one
// chained on the first result) and two ordinary 1024 x 1024 -> 2048-bit
// multiplications, checks each result against an independent reference and
// the latencies: 1024 + 32 + 33 = 1089 cycles for a Montgomery
// multiplication and 512 + 1 + 33 = 546 cycles for an ordinary one.
module tb_scalable_mm_full;
  import mm_pkg::*;
  localparam int unsigned N = 1024, D = 32, W = N + D, BIG = 2 * W + 64;
  logic clk = 0, rst_n = 0, la, lb, lm, start, busy, done;
  logic [N:0] a, b, mont;
  logic [N-1:0] m;
  logic [W-1:0] rs;
  logic [2*N-1:0] prod;
  mode_e mode;
  int checks = 0, failures = 0;

  scalable_mm dut (.clk_i(clk), .rst_ni(rst_n), .load_a_i(la), .load_b_i(lb),
    .load_m_i(lm), .a_i(a), .b_i(b), .m_i(m), .mode_i(mode), .start_i(start),
    .busy_o(busy), .done_o(done), .rs_o(rs), .mont_o(mont), .prod_o(prod));

  always #5 clk = ~clk;

  function automatic logic [BIG-1:0] rnd();
    logic [BIG-1:0] v = '0;
    for (int i = 0; i < BIG / 32; i++) v = (v << 32) | BIG'($urandom);
    return v;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic op(input mode_e md, input logic [BIG-1:0] aa, input logic [BIG-1:0] bb,
                    input logic [BIG-1:0] mm);
    int lat;
    @(negedge clk);
    a = (N+1)'(aa); b = (N+1)'(bb); m = N'(mm); la = 1; lb = 1; lm = 1;
    @(negedge clk);
    la = 0; lb = 0; lm = 0; start = 1; mode = md;
    @(posedge clk);
    @(negedge clk);
    start = 0;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    chk(lat == (md == MODE_MUL ? N / 2 + 1 + W / D : N + D + W / D),
        $sformatf("latency %0d mode %0d", lat, md));
    $display("mode %0d finished in %0d cycles", md, lat);
  endtask

  initial begin
    logic [BIG-1:0] mm, aa, bb, zz;
    la = 0; lb = 0; lm = 0; start = 0; mode = MODE_MONT; a = '0; b = '0; m = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    mm = (rnd() % (BIG'(1) << N)) | BIG'(1) | (BIG'(1) << (N - 1));
    aa = rnd() % (2 * mm);
    bb = rnd() % (2 * mm);
    for (int c = 0; c < 2; c++) begin
      op(MODE_MONT, aa, bb, mm);
      zz = BIG'(mont);
      chk(((zz << W) % mm) == ((aa * bb) % mm) && zz < 2 * mm, $sformatf("mont %0d", c));
      aa = zz;
    end
    for (int c = 0; c < 2; c++) begin
      aa = rnd() % (BIG'(1) << N);
      bb = (c == 0) ? rnd() % (BIG'(1) << N) : (BIG'(1) << N) - 1;
      op(MODE_MUL, aa, bb, '0);
      chk(prod == (2*N)'(aa * bb) && rs[W-1:N] == '0, $sformatf("mul %0d", c));
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
