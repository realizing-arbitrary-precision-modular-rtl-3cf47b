// Testbench for mm_ctrl at the default size (N = 1024, D = 32): for each
// mode it starts one operation and counts the cycles with each control strobe
// and the latency until done. Expected: Montgomery 1056 partial-product
// cycles, 33 conversion cycles, done after 1089 cycles; ordinary 513
// partial-product cycles of which 512 deliver low product bits, 33 conversion
// cycles, done after 546 cycles. A start during an operation must be ignored.
module tb_mm_ctrl;
  import mm_pkg::*;
  localparam int unsigned N = 1024, D = 32;
  logic clk = 0, rst_n = 0, start, busy, done;
  mode_e mode_in, mode;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  int n_clr, n_iter, n_lo, n_conv, n_first, n_last, lat;

  mm_ctrl #(.N(N), .D(D)) dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .mode_i(mode_in),
                              .mode_o(mode), .ctrl_o(ctrl), .busy_o(busy), .done_o(done));

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input mode_e md, input int e_iter, input int e_lo, input int e_lat);
    {n_clr, n_iter, n_lo, n_conv, n_first, n_last} = '0;
    @(negedge clk);
    start = 1; mode_in = md;
    #1 chk(ctrl.clr == 1'b1, "clr with start");
    @(posedge clk);
    @(negedge clk);
    start = 0; mode_in = (md == MODE_MUL) ? MODE_MONT : MODE_MUL;  // must not matter
    lat = 1;
    while (!done) begin
      n_iter += ctrl.iter; n_lo += ctrl.lo_en; n_conv += ctrl.conv;
      n_first += ctrl.conv_first; n_last += ctrl.conv_last; n_clr += ctrl.clr;
      chk(busy && mode == md, "busy and mode held");
      if (lat == 100) start = 1;   // ignored while busy
      if (lat == 101) start = 0;
      @(negedge clk);
      if (!done) lat++;
    end
    chk(n_iter == e_iter, $sformatf("iter cycles %0d", n_iter));
    chk(n_lo == e_lo, $sformatf("lo_en cycles %0d", n_lo));
    chk(n_conv == (N + D) / D && n_first == 1 && n_last == 1, "conv cycles");
    chk(n_clr == 0, "no clr while busy");
    chk(lat == e_lat, $sformatf("latency %0d, expected %0d", lat, e_lat));
    @(negedge clk);
    chk(!done && !busy, "done is a pulse, back to idle");
  endtask

  initial begin
    start = 0; mode_in = MODE_MONT;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(MODE_MONT, N + D, 0, N + D + (N + D) / D);
    run(MODE_MUL, N / 2 + 1, N / 2, N / 2 + 1 + (N + D) / D);
    run(MODE_MONT, N + D, 0, N + D + (N + D) / D);
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
