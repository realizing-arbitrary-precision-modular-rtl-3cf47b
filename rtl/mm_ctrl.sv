// Controller of the scalable bit-serial multiplier.
//
// A three-state machine (IDLE, RUN, CONV) with one cycle counter.
//  - IDLE: on start_i the mode is latched, the carry-save registers and the
//    2-bit adder carry are cleared (ctrl_o.clr) and RUN begins.
//  - RUN: one partial-product cycle per clock (ctrl_o.iter). Montgomery mode
//    runs N+D cycles, which yields A*B*2^-(N+D) mod M in [0, 2M) without a
//    final subtraction. Ordinary mode runs N/2 + 1 cycles: N/2 cycles add two
//    partial products each, and one more cycle (with B already exhausted, so
//    nothing is added) moves the last pair of low bits through the 2-bit
//    adder. From the second RUN cycle on, ordinary mode also sets lo_en.
//  - CONV: (N+D)/D cycles of word-serial carry-save to binary conversion
//    (ctrl_o.conv, ctrl_o.conv_first on the first one), then done_o pulses
//    for one cycle and the machine returns to IDLE.
// Counted from the clock edge that samples start_i, done_o rises after
// N+D+(N+D)/D edges (Montgomery) or N/2+1+(N+D)/D edges (ordinary).
// start_i is ignored while busy_o is high. The cycle counts follow the
// published architecture, except the one extra partial-product cycle in
// ordinary mode; the state machine itself is this design's own.
module mm_ctrl
  import mm_pkg::*;
#(
  parameter int unsigned N = 1024,
  parameter int unsigned D = 32
) (
  input  logic  clk_i,
  input  logic  rst_ni,
  input  logic  start_i,
  input  mode_e mode_i,
  output mode_e mode_o,
  output ctrl_t ctrl_o,
  output logic  busy_o,
  output logic  done_o
);

  localparam int unsigned W         = N + D;
  localparam int unsigned ITER_MONT = W;
  localparam int unsigned ITER_MUL  = N / 2 + 1;
  localparam int unsigned NCONV     = W / D;
  localparam int unsigned CW        = $clog2(W + 1);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_CONV} state_e;

  state_e         state_q;
  logic [CW-1:0]  cnt_q;
  logic [CW-1:0]  last_iter;

  assign last_iter = (mode_o == MODE_MUL) ? CW'(ITER_MUL - 1) : CW'(ITER_MONT - 1);

  always_comb begin
    ctrl_o            = '0;
    ctrl_o.clr        = (state_q == S_IDLE) && start_i;
    ctrl_o.iter       = (state_q == S_RUN);
    ctrl_o.lo_en      = (state_q == S_RUN) && (mode_o == MODE_MUL) && (cnt_q != '0);
    ctrl_o.conv       = (state_q == S_CONV);
    ctrl_o.conv_first = (state_q == S_CONV) && (cnt_q == '0);
    ctrl_o.conv_last  = (state_q == S_CONV) && (cnt_q == CW'(NCONV - 1));
    busy_o            = (state_q != S_IDLE);
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
      mode_o  <= MODE_MONT;
      done_o  <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start_i) begin
          state_q <= S_RUN;
          mode_o  <= mode_i;
          cnt_q   <= '0;
        end
        S_RUN: begin
          if (cnt_q == last_iter) begin
            state_q <= S_CONV;
            cnt_q   <= '0;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        S_CONV: begin
          if (cnt_q == CW'(NCONV - 1)) begin
            state_q <= S_IDLE;
            cnt_q   <= '0;
            done_o  <= 1'b1;
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  initial begin
    assert (N % D == 0) else $error("N must be a multiple of D");
    assert (N % 2 == 0) else $error("N must be even");
    assert (D >= 4) else $error("D must be at least 4 for the running sum to fit");
  end

endmodule
