// td_unit: Threshold Definer, the accumulation stage of the adaptive threshold.
//
// Each accepted beat carries one pixel position of four frames (t, t-k, t+1,
// t+1-k) and the running sums read back from the two lookup tables. The unit
// forms the absolute differences Dt = |G(t)-G(t-k)| and Dt_1 = |G(t+1)-G(t+1-k)|
// and returns
//     sum_dt  = sum_dt_old  + Dt   + Dt_1
//     sum_dt2 = sum_dt2_old + Dt^2 + Dt_1^2
// so one pass over a frame adds two frames' worth of differences to both tables.
//
// Pipeline (register stages as in the five-cycle data path of the design):
//   cycle 1: input registers (pixels and old sums)
//   cycle 2: Dt, Dt_1, sumDt_old delayed           (subtractors before it)
//   cycle 3: Dt^2, Dt_1^2, Dt+sumDt_old, Dt_1       (multipliers, first adder)
//   cycle 4: Dt+Dt_1+sumDt_old, Dt^2+Dt_1^2, sumDt2_old delayed
//   cycle 5: sum_dt, sum_dt2 output registers
// in_valid sampled at a clock edge produces out_valid exactly LATENCY=5 edges
// later; a new beat may enter on every cycle (no stall, no back-pressure).
// The stage split follows the design's pipeline diagram; the widths and the
// valid signal are this implementation's choice.
module td_unit #(
  parameter int unsigned PIX_W  = 16,              // pixel width
  parameter int unsigned N_ACC  = 30,              // frames accumulated
  parameter int unsigned SUM_W  = PIX_W + $clog2(N_ACC + 1),
  parameter int unsigned SQ_W   = 2 * PIX_W + $clog2(N_ACC + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [PIX_W-1:0]  frame_t,
  input  logic [PIX_W-1:0]  frame_tk,
  input  logic [PIX_W-1:0]  frame_t1,
  input  logic [PIX_W-1:0]  frame_t1k,
  input  logic [SUM_W-1:0]  sum_dt_old,
  input  logic [SQ_W-1:0]   sum_dt2_old,
  output logic              out_valid,
  output logic [SUM_W-1:0]  sum_dt,
  output logic [SQ_W-1:0]   sum_dt2
);
  localparam int unsigned LATENCY = 5;

  // cycle 1: input registers
  logic [PIX_W-1:0] c1_t, c1_tk, c1_t1, c1_t1k;
  logic [SUM_W-1:0] c1_s1;
  logic [SQ_W-1:0]  c1_s2;
  // cycle 2
  logic [PIX_W-1:0] dt, dt_1;
  logic [SUM_W-1:0] pip1_sm_dt;
  logic [SQ_W-1:0]  pip1_sm_dt2;
  // cycle 3
  logic [2*PIX_W-1:0] dt2, dt_12;
  logic [SUM_W-1:0]   pip2_sm_dt;
  logic [PIX_W-1:0]   pip_dt_1;
  logic [SQ_W-1:0]    pip2_sm_dt2;
  // cycle 4
  logic [SUM_W-1:0]   pip3_sm_dt;
  logic [SQ_W-1:0]    dt2_sum;
  logic [SQ_W-1:0]    pip3_sm_dt2;

  logic [LATENCY-1:0] vld;

  function automatic logic [PIX_W-1:0] absdiff(input logic [PIX_W-1:0] a, input logic [PIX_W-1:0] b);
    return (a >= b) ? a - b : b - a;
  endfunction

  always_ff @(posedge clk) begin
    // cycle 1
    c1_t   <= frame_t;
    c1_tk  <= frame_tk;
    c1_t1  <= frame_t1;
    c1_t1k <= frame_t1k;
    c1_s1  <= sum_dt_old;
    c1_s2  <= sum_dt2_old;
    // cycle 2: subtractors
    dt          <= absdiff(c1_t, c1_tk);
    dt_1        <= absdiff(c1_t1, c1_t1k);
    pip1_sm_dt  <= c1_s1;
    pip1_sm_dt2 <= c1_s2;
    // cycle 3: multipliers and first adder
    dt2         <= (2*PIX_W)'(dt) * (2*PIX_W)'(dt);
    dt_12       <= (2*PIX_W)'(dt_1) * (2*PIX_W)'(dt_1);
    pip2_sm_dt  <= pip1_sm_dt + SUM_W'(dt);
    pip_dt_1    <= dt_1;
    pip2_sm_dt2 <= pip1_sm_dt2;
    // cycle 4
    pip3_sm_dt  <= pip2_sm_dt + SUM_W'(pip_dt_1);
    dt2_sum     <= SQ_W'(dt2) + SQ_W'(dt_12);
    pip3_sm_dt2 <= pip2_sm_dt2;
    // cycle 5: outputs
    sum_dt      <= pip3_sm_dt;
    sum_dt2     <= pip3_sm_dt2 + dt2_sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

endmodule
