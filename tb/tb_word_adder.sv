// Testbench for word_adder: adds two random K-word numbers word-serially,
// least significant word first, with a chosen initial carry, and compares the
// collected sum words and final carry with the full-width sum X + Y + cin.
module tb_word_adder;
  localparam int unsigned D = 32, K = 8;
  logic clk = 0, rst_n = 0, en, first, cin0;
  logic [D-1:0] a, b, sum;
  logic cout;
  logic [K*D-1:0] x, y, got;
  logic [K*D:0] want;
  int checks = 0, failures = 0, carries = 0;

  word_adder #(.D(D)) dut (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .first_i(first),
                           .cin_first_i(cin0), .a_i(a), .b_i(b), .sum_o(sum), .cout_o(cout));

  always #5 clk = ~clk;

  initial begin
    en = 0; first = 0; cin0 = 0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < K; k++) begin
        x[k*D +: D] = $urandom;
        y[k*D +: D] = (t % 4 == 0) ? ~x[k*D +: D] : D'($urandom);
      end
      cin0 = t[0];
      want = (K*D+1)'(x) + (K*D+1)'(y) + (K*D+1)'(cin0);
      for (int k = 0; k < K; k++) begin
        @(negedge clk);
        en = 1; first = (k == 0); a = x[k*D +: D]; b = y[k*D +: D];
        #1;
        got[k*D +: D] = sum;
        if (k < K - 1 && cout) carries++;
        if (k == K - 1) begin
          checks++;
          if (cout !== want[K*D]) begin failures++; $display("FAIL carry-out t=%0d", t); end
        end
      end
      @(negedge clk); en = 0; first = 0;
      checks++;
      if (got !== want[K*D-1:0]) begin failures++; $display("FAIL sum t=%0d", t); end
    end
    checks++;
    if (carries == 0) begin failures++; $display("FAIL no carry between words seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
