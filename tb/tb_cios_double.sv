// Double-size Montgomery multiplication on the default (N = 1024) multiplier.
//
// A behavioural host runs the Coarsely Integrated Operand Scanning (CIOS)
// method with N-bit words on 2N-bit (2048-bit) operands: k = 2 words, so
// 2k^2 + k = 10 word multiplications, each one an ordinary N x N -> 2N
// multiplication on the multiplier. The word additions, the Montgomery
// constant n0' = -M^-1 mod 2^N and the final conditional subtraction are done
// by the host, as a processor next to the multiplier would. The result
// R = A * B * 2^(-2N) mod M is checked by congruence and range, and the test
// checks that exactly ten multiplications were used and that the multiplier
// was busy for 10 * (N/2 + 1 + (N+D)/D) cycles, i.e. close to 5N.
module tb_cios_double;
  import mm_pkg::*;
  localparam int unsigned N = 1024, D = 32, W = N + D, BIG = 4 * N;
  typedef logic [N-1:0] word_t;
  logic clk = 0, rst_n = 0, la, lb, lm, start, busy, done;
  logic [N:0] a, b, mont;
  logic [N-1:0] m;
  logic [W-1:0] rs;
  logic [2*N-1:0] prod;
  mode_e mode;
  int checks = 0, failures = 0, n_mul = 0, busy_cycles = 0;

  scalable_mm dut (.clk_i(clk), .rst_ni(rst_n), .load_a_i(la), .load_b_i(lb),
    .load_m_i(lm), .a_i(a), .b_i(b), .m_i(m), .mode_i(mode), .start_i(start),
    .busy_o(busy), .done_o(done), .rs_o(rs), .mont_o(mont), .prod_o(prod));

  always #5 clk = ~clk;
  always @(posedge clk) if (busy) busy_cycles++;

  function automatic logic [BIG-1:0] rnd();
    logic [BIG-1:0] v = '0;
    for (int i = 0; i < BIG / 32; i++) v = (v << 32) | BIG'($urandom);
    return v;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // One ordinary N x N -> 2N multiplication on the multiplier.
  task automatic hw_mul(input word_t x, input word_t y, output logic [2*N-1:0] p);
    @(negedge clk);
    a = {1'b0, x}; b = {1'b0, y}; la = 1; lb = 1;
    @(negedge clk);
    la = 0; lb = 0; start = 1; mode = MODE_MUL;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    p = prod;
    n_mul++;
    chk(p == (2*N)'({{N{1'b0}}, x} * {{N{1'b0}}, y}), "word product");
  endtask

  initial begin
    logic [BIG-1:0] mm, aa, bb, res, inv;
    word_t aw[2], bw[2], nw[2], t[3], n0p, mq;
    logic [N:0] t3;
    logic [2*N-1:0] p;
    logic [2*N+1:0] s;
    int cyc0;
    la = 0; lb = 0; lm = 0; start = 0; mode = MODE_MUL; a = '0; b = '0; m = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      mm = (rnd() % (BIG'(1) << (2 * N))) | BIG'(1) | (BIG'(1) << (2 * N - 1));
      aa = rnd() % mm;
      bb = rnd() % mm;
      aw[0] = word_t'(aa); aw[1] = word_t'(aa >> N);
      bw[0] = word_t'(bb); bw[1] = word_t'(bb >> N);
      nw[0] = word_t'(mm); nw[1] = word_t'(mm >> N);
      // n0' = -M^-1 mod 2^N by Newton iteration (each step doubles the
      // number of correct low bits; an odd x is its own inverse mod 8).
      inv = BIG'(nw[0]);
      for (int i = 0; i < 10; i++)
        inv = (inv * ((BIG'(2) - BIG'(nw[0]) * inv) % (BIG'(1) << N))) % (BIG'(1) << N);
      n0p = word_t'((BIG'(1) << N) - inv);
      chk(word_t'(n0p * nw[0]) == '1, "n0' is -M^-1 mod 2^N");
      n_mul = 0;
      cyc0 = busy_cycles;
      t[0] = '0; t[1] = '0; t[2] = '0; t3 = '0;
      for (int i = 0; i < 2; i++) begin
        // t = t + a * b_i
        s = '0;
        for (int j = 0; j < 2; j++) begin
          hw_mul(aw[j], bw[i], p);
          s = (2*N+2)'(t[j]) + (2*N+2)'(p) + (s >> N);
          t[j] = word_t'(s);
        end
        s = (2*N+2)'(t[2]) + (s >> N);
        t[2] = word_t'(s);
        t3 = (N+1)'(s >> N);
        // m = t0 * n0' mod 2^N
        hw_mul(t[0], n0p, p);
        mq = word_t'(p);
        // t = (t + m * M) / 2^N
        hw_mul(mq, nw[0], p);
        s = (2*N+2)'(t[0]) + (2*N+2)'(p);
        chk(word_t'(s) == '0, "lowest word cancels");
        hw_mul(mq, nw[1], p);
        s = (2*N+2)'(t[1]) + (2*N+2)'(p) + (s >> N);
        t[0] = word_t'(s);
        s = (2*N+2)'(t[2]) + (s >> N);
        t[1] = word_t'(s);
        t[2] = word_t'((2*N+2)'(t3) + (s >> N));
      end
      res = (BIG'(t[2]) << (2 * N)) | (BIG'(t[1]) << N) | BIG'(t[0]);
      if (res >= mm) res = res - mm;
      chk(n_mul == 10, $sformatf("%0d word multiplications", n_mul));
      chk(busy_cycles - cyc0 == 10 * (N / 2 + 1 + W / D),
          $sformatf("multiplier busy %0d cycles", busy_cycles - cyc0));
      $display("2N-bit Montgomery multiplication: %0d multiplications, %0d busy cycles (5N = %0d)",
               n_mul, busy_cycles - cyc0, 5 * N);
      chk(((res << (2 * N)) % mm) == ((aa * bb) % mm) && res < mm, "double-size result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
