// Testbench for cs_reg: random sequences of clear, parallel load and D-bit
// shift against a reference model; also shifts a loaded value out word by
// word and checks that every word reaches the bottom in order.
module tb_cs_reg;
  localparam int unsigned W = 1056, D = 32;
  logic clk = 0, rst_n = 0, clr, load, shift;
  logic [W-1:0] din, q, ref_q, v;
  logic [D-1:0] word;
  int checks = 0, failures = 0;

  cs_reg #(.W(W), .D(D)) dut (.clk_i(clk), .rst_ni(rst_n), .clr_i(clr), .load_i(load),
                             .d_i(din), .shift_i(shift), .word_i(word), .q_o(q));

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r = '0;
    for (int i = 0; i < (W + 31) / 32; i++) r = (r << 32) | W'($urandom);
    return r;
  endfunction

  initial begin
    {clr, load, shift} = '0; din = '0; word = '0; ref_q = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      {clr, load, shift} = 3'($urandom);
      if ($urandom % 4 != 0) clr = 0;
      din = rnd(); word = D'($urandom);
      if (clr)        ref_q = '0;
      else if (load)  ref_q = din;
      else if (shift) ref_q = (ref_q >> D) | (W'(word) << (W - D));
      @(posedge clk); #1;
      checks++;
      if (q !== ref_q) begin failures++; $display("FAIL cs_reg step %0d", i); end
    end
    // Word-serial read-out: word k of the loaded value appears at the bottom
    // after k shifts.
    @(negedge clk); v = rnd(); {clr, load, shift} = 3'b010; din = v;
    @(negedge clk); {clr, load, shift} = 3'b001; word = '0;
    for (int k = 0; k < W / D; k++) begin
      checks++;
      if (q[D-1:0] !== v[k*D +: D]) begin failures++; $display("FAIL word %0d", k); end
      @(negedge clk);
    end
    checks++;
    if (q !== '0) begin failures++; $display("FAIL not empty after shift-out"); end
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
