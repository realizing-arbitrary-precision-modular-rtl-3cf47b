// Testbench for fb_shift: in Montgomery mode both vectors must come out
// halved, in ordinary mode divided by four (integer division), for random
// vectors at the default width.
module tb_fb_shift;
  import mm_pkg::*;
  localparam int unsigned W = 1056;
  mode_e mode;
  logic [W-1:0] si, ci, so, co;
  int checks = 0, failures = 0;

  fb_shift #(.W(W)) dut (.mode_i(mode), .s_i(si), .c_i(ci), .s_o(so), .c_o(co));

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v = '0;
    for (int i = 0; i < (W + 31) / 32; i++) v = (v << 32) | W'($urandom);
    return v;
  endfunction

  initial begin
    for (int i = 0; i < 200; i++) begin
      si = rnd(); ci = rnd();
      mode = (i % 2 == 0) ? MODE_MONT : MODE_MUL;
      #1;
      checks++;
      if (mode == MODE_MONT ? (so !== si / 2 || co !== ci / 2)
                            : (so !== si / 4 || co !== ci / 4)) begin
        failures++;
        $display("FAIL fb_shift mode=%0d", mode);
      end
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
