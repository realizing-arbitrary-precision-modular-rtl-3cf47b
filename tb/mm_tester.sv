// Test driver for one scalable_mm configuration (used by tb_scalable_mm_sizes).
//
// Instantiates scalable_mm with the given N and D, runs OPS Montgomery and
// OPS ordinary multiplications with random operands (Montgomery operands
// below 2M, results chained), checks results against wide-integer references
// and latencies against N+D+(N+D)/D and N/2+1+(N+D)/D, and reports its check
// and failure counts on `finished`.
module mm_tester
  import mm_pkg::*;
#(
  parameter int unsigned N   = 64,
  parameter int unsigned D   = 8,
  parameter int unsigned OPS = 20
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int unsigned W = N + D, BIG = 2 * W + 64;
  logic la, lb, lm, start, busy, done;
  logic [N:0] a, b, mont;
  logic [N-1:0] m;
  logic [W-1:0] rs;
  logic [2*N-1:0] prod;
  mode_e mode;

  scalable_mm #(.N(N), .D(D)) dut (.clk_i(clk), .rst_ni(rst_n), .load_a_i(la), .load_b_i(lb),
    .load_m_i(lm), .a_i(a), .b_i(b), .m_i(m), .mode_i(mode), .start_i(start),
    .busy_o(busy), .done_o(done), .rs_o(rs), .mont_o(mont), .prod_o(prod));

  function automatic logic [BIG-1:0] rnd();
    logic [BIG-1:0] v = '0;
    for (int i = 0; i < (BIG + 31) / 32; i++) v = (v << 32) | BIG'($urandom);
    return v;
  endfunction

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL N=%0d D=%0d %s", N, D, what); end
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
    chk(lat == (md == MODE_MUL ? N / 2 + 1 + W / D : N + D + W / D), $sformatf("latency %0d", lat));
  endtask

  initial begin
    logic [BIG-1:0] mm, aa, bb, zz;
    checks = 0; failures = 0; finished = 0;
    la = 0; lb = 0; lm = 0; start = 0; mode = MODE_MONT; a = '0; b = '0; m = '0;
    wait (rst_n);
    mm = (rnd() % (BIG'(1) << N)) | BIG'(1) | (BIG'(1) << (N - 1));
    aa = rnd() % (2 * mm);
    for (int t = 0; t < OPS; t++) begin
      bb = rnd() % (2 * mm);
      op(MODE_MONT, aa, bb, mm);
      zz = BIG'(mont);
      chk(((zz << W) % mm) == ((aa * bb) % mm) && zz < 2 * mm, "Montgomery result");
      aa = zz;
    end
    for (int t = 0; t < OPS; t++) begin
      zz = rnd() % (BIG'(1) << N);
      bb = rnd() % (BIG'(1) << N);
      op(MODE_MUL, zz, bb, '0);
      chk(prod == (2*N)'(zz * bb), "ordinary product");
    end
    finished = 1;
  end
endmodule
