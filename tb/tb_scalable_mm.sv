// End-to-end testbench for scalable_mm at N = 64, D = 8 (W = 72).
//
// Runs a random mix of Montgomery and ordinary multiplications through the
// host interface, including chained Montgomery products (a result in
// [M, 2M) fed back as an operand). Checks every result against an
// independent reference (congruence and range for Montgomery, exact product
// for ordinary) and every latency (N+D+(N+D)/D = 81 and N/2+1+(N+D)/D = 42
// cycles). It also counts how often each mechanism of the datapath was
// exercised and fails if one never was: reduction steps (q = 1), mode
// switches, carries between conversion words, incompletely reduced results
// and operands >= M. The carry stored by the 2-bit adder is only reported:
// with this arrangement the two LSBs of RC are always zero in ordinary mode
// (a carry-save adder's carry LSB is 0 and 2A*b_(i+1) is even), so that
// carry cannot occur, and the test checks that it does not.
module tb_scalable_mm;
  import mm_pkg::*;
  localparam int unsigned N = 64, D = 8, W = N + D, BIG = 4 * W;
  localparam int unsigned LAT_MONT = N + D + W / D, LAT_MUL = N / 2 + 1 + W / D;
  logic clk = 0, rst_n = 0, la, lb, lm, start, busy, done;
  logic [N:0] a, b, mont;
  logic [N-1:0] m;
  logic [W-1:0] rs;
  logic [2*N-1:0] prod;
  mode_e mode;
  int checks = 0, failures = 0;
  int n_mont = 0, n_mul = 0, n_switch = 0, n_reduce = 0, n_lo_carry = 0;
  int n_word_carry = 0, n_incomplete = 0, n_big_operand = 0;
  mode_e last_mode = MODE_MONT;

  scalable_mm #(.N(N), .D(D)) dut (.clk_i(clk), .rst_ni(rst_n), .load_a_i(la), .load_b_i(lb),
    .load_m_i(lm), .a_i(a), .b_i(b), .m_i(m), .mode_i(mode), .start_i(start),
    .busy_o(busy), .done_o(done), .rs_o(rs), .mont_o(mont), .prod_o(prod));

  always #5 clk = ~clk;

  // Mechanism counters, sampled from the design's internal strobes.
  always @(posedge clk) if (rst_n) begin
    if (dut.ctrl.iter && dut.mode == MODE_MONT && dut.u_dp.q) n_reduce++;
    if (dut.ctrl.conv_first && dut.mode == MODE_MUL && dut.u_dp.lo_carry) n_lo_carry++;
    if (dut.ctrl.conv && !dut.ctrl.conv_last && dut.u_dp.conv_cout) n_word_carry++;
  end

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
                    input logic [BIG-1:0] mm, input bit load_m);
    int lat;
    @(negedge clk);
    a = (N+1)'(aa); b = (N+1)'(bb); m = N'(mm);
    la = 1; lb = 1; lm = load_m;
    @(negedge clk);
    la = 0; lb = 0; lm = 0; start = 1; mode = md;
    @(posedge clk);
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin
      chk(busy, "busy during operation");
      @(negedge clk);
      lat++;
    end
    lat--;
    chk(lat == (md == MODE_MUL ? LAT_MUL : LAT_MONT), $sformatf("latency %0d mode %0d", lat, md));
    if (md != last_mode) n_switch++;
    last_mode = md;
  endtask

  initial begin
    logic [BIG-1:0] mm, aa, bb, zz;
    la = 0; lb = 0; lm = 0; start = 0; mode = MODE_MONT; a = '0; b = '0; m = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    zz = '0;
    for (int t = 0; t < 300; t++) begin
      if ($urandom % 2 == 0) begin
        mm = rnd() % (BIG'(1) << N);
        mm = mm | BIG'(1) | (BIG'(1) << (N - 1));
        if (t % 5 == 0) mm = (BIG'(1) << N) - 1 - 2 * BIG'($urandom % 16);
        // Chain: reuse the last Montgomery result for the same modulus.
        aa = rnd() % (2 * mm);
        bb = rnd() % (2 * mm);
        op(MODE_MONT, aa, bb, mm, 1);
        for (int c = 0; c < 3; c++) begin
          zz = BIG'(mont);
          n_mont++;
          chk(((zz << W) % mm) == ((aa * bb) % mm) && zz < 2 * mm,
              $sformatf("mont t=%0d c=%0d", t, c));
          if (zz >= mm) n_incomplete++;
          if (c == 2) break;
          aa = zz;
          bb = (c == 0) ? zz : rnd() % (2 * mm);
          if (aa >= mm || bb >= mm) n_big_operand++;
          op(MODE_MONT, aa, bb, mm, 0);
        end
      end else begin
        aa = rnd() % (BIG'(1) << N);
        bb = rnd() % (BIG'(1) << N);
        if (t % 7 == 0) begin aa = (BIG'(1) << N) - 1; bb = (BIG'(1) << N) - 1 - BIG'(t); end
        op(MODE_MUL, aa, bb, '0, 0);
        n_mul++;
        chk(prod == (2*N)'(aa * bb) && rs[W-1:N] == '0, $sformatf("mul t=%0d", t));
      end
    end
    $display("mechanisms: mont=%0d mul=%0d mode_switch=%0d reduce=%0d lo_carry=%0d word_carry=%0d incomplete=%0d big_operand=%0d",
             n_mont, n_mul, n_switch, n_reduce, n_lo_carry, n_word_carry, n_incomplete, n_big_operand);
    chk(n_mont > 0, "Montgomery mode used");
    chk(n_mul > 0, "ordinary mode used");
    chk(n_switch > 0, "mode switch");
    chk(n_reduce > 0, "reduction step q=1");
    chk(n_lo_carry == 0, "2-bit adder carry never needed");
    chk(n_word_carry > 0, "carry between conversion words");
    chk(n_incomplete > 0, "incompletely reduced result");
    chk(n_big_operand > 0, "operand >= M");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
