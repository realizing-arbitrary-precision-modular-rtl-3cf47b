// Testbench for csa: random and corner vectors at the default width. Checks
// that the sum output is the bitwise XOR of the inputs, that the carry LSB is
// zero, and that sum + carry equals x + y + z modulo 2^W.
module tb_csa;
  localparam int unsigned W = 1056;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa #(.W(W)) dut (.x_i(x), .y_i(y), .z_i(z), .s_o(s), .c_o(c));

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v = '0;
    for (int i = 0; i < (W + 31) / 32; i++) v = (v << 32) | W'($urandom);
    return v;
  endfunction

  task automatic check();
    logic [W+1:0] want, got;
    #1;
    want = (W+2)'(x) + (W+2)'(y) + (W+2)'(z);
    got  = (W+2)'(s) + (W+2)'(c);
    checks++;
    if (got[W-1:0] !== want[W-1:0] || s !== (x ^ y ^ z) || c[0] !== 1'b0) begin
      failures++;
      $display("FAIL csa x=%h y=%h z=%h", x[31:0], y[31:0], z[31:0]);
    end
  endtask

  initial begin
    x = '1; y = '1; z = '1; check();
    x = '0; y = '0; z = '0; check();
    x = '1; y = W'(1); z = '0; check();
    for (int i = 0; i < 300; i++) begin
      x = rnd(); y = rnd(); z = rnd(); check();
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
