// Testbench for pair_adder: feeds K random (sum, carry) bit pairs, each of
// weight 4^k, collects the output pairs, and checks that the collected bits
// plus the final stored carry times 4^K equal the sum of all pairs. Also
// checks that clear resets the carry.
module tb_pair_adder;
  localparam int unsigned K = 16;
  logic clk = 0, rst_n = 0, clr, en;
  logic [1:0] s, c, sum;
  logic carry;
  logic [2*K-1:0] got;
  longint unsigned want;
  int checks = 0, failures = 0;

  pair_adder dut (.clk_i(clk), .rst_ni(rst_n), .clr_i(clr), .en_i(en), .s_i(s), .c_i(c),
                  .sum_o(sum), .carry_o(carry));

  always #5 clk = ~clk;

  initial begin
    clr = 0; en = 0; s = 0; c = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      @(negedge clk); clr = 1; en = 0;
      @(negedge clk); clr = 0;
      checks++;
      if (carry !== 1'b0) begin failures++; $display("FAIL clear"); end
      want = 0;
      for (int k = 0; k < K; k++) begin
        s = 2'($urandom); c = 2'($urandom);
        if (t % 3 == 0) begin s = 2'b11; c = 2'b11; end
        en = 1;
        want += longint'(s + c) << (2 * k);
        #1 got[2*k +: 2] = sum;
        @(negedge clk);
      end
      en = 0;
      checks++;
      if (longint'(got) + (longint'(carry) << (2 * K)) != want) begin
        failures++; $display("FAIL t=%0d got=%h carry=%b want=%h", t, got, carry, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
