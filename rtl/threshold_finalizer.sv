// threshold_finalizer: turns the accumulated lookup-table sums of one pixel
// into the adaptive threshold interval [mu-sigma, mu+sigma].
//
// With S1 = sum of D and S2 = sum of D^2 over N frames,
//     mu      = S1 / N
//     sigma^2 = (S2 - S1^2/N) / (N-1) = (N*S2 - S1^2) / (N*(N-1))
// computed in integers (floor division, floor square root):
//     thr_hi = mu + sigma
//     thr_lo = max(mu - sigma, 0)
// A negative lower bound is clamped to 0: differences are never negative, so
// the test D < lo is false either way.
//
// The document gives the formulas (mean, sample standard deviation, interval)
// but not the hardware; this is a plain four-stage pipeline accepting one pixel
// per cycle: (1) register inputs, (2) mu and N*S2-S1^2, (3) division by
// N*(N-1), (4) integer square root by a bitwise restoring method, output
// register. out_valid follows in_valid by LATENCY=4 edges.
module threshold_finalizer #(
  parameter int unsigned PIX_W = 16,
  parameter int unsigned N_ACC = 30,
  parameter int unsigned SUM_W = PIX_W + $clog2(N_ACC + 1),
  parameter int unsigned SQ_W  = 2 * PIX_W + $clog2(N_ACC + 1),
  parameter int unsigned THR_W = PIX_W + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [SUM_W-1:0] sum_dt,
  input  logic [SQ_W-1:0]  sum_dt2,
  output logic             out_valid,
  output logic [THR_W-1:0] thr_hi,
  output logic [THR_W-1:0] thr_lo
);
  localparam int unsigned LATENCY = 4;
  localparam int unsigned NUM_W   = 2 * SUM_W + 8;   // room for N*S2 and S1^2
  localparam int unsigned VAR_W   = 2 * PIX_W;       // sigma^2 <= max(D)^2
  localparam int unsigned SIG_W   = PIX_W;
  localparam int unsigned N_N1    = N_ACC * (N_ACC - 1);

  logic [SUM_W-1:0] s1_q;
  logic [SQ_W-1:0]  s2_q;
  logic [PIX_W-1:0] mu2;       // mean never exceeds the largest difference
  logic [NUM_W-1:0] num2;
  logic [PIX_W-1:0] mu3;
  logic [VAR_W-1:0] var3;
  logic [NUM_W-1:0] prod_n, prod_s;
  logic [NUM_W-1:0] quot;
  logic [SIG_W-1:0] sigma;
  logic [THR_W:0]   hi_full;
  logic [THR_W-1:0] lo_full;
  logic [LATENCY-1:0] vld;

  // integer square root, one result bit per step from the top
  function automatic logic [SIG_W-1:0] isqrt(input logic [VAR_W-1:0] v);
    logic [SIG_W-1:0] r;
    logic [SIG_W-1:0] trial;
    r = '0;
    for (int i = SIG_W - 1; i >= 0; i--) begin
      trial = r | (SIG_W'(1) << i);
      if ((VAR_W)'(trial) * (VAR_W)'(trial) <= v) r = trial;
    end
    return r;
  endfunction

  always_comb begin
    prod_n = NUM_W'(N_ACC) * NUM_W'(s2_q);
    prod_s = NUM_W'(s1_q) * NUM_W'(s1_q);
    quot   = num2 / NUM_W'(N_N1);
    sigma  = isqrt(var3);
    hi_full = (THR_W+1)'(mu3) + (THR_W+1)'(sigma);
    lo_full = (mu3 >= sigma) ? THR_W'(mu3 - sigma) : '0;
  end

  always_ff @(posedge clk) begin
    s1_q <= sum_dt;
    s2_q <= sum_dt2;
    mu2  <= PIX_W'(s1_q / SUM_W'(N_ACC));
    // N*S2 >= S1^2 always holds (Cauchy-Schwarz); guard against bad input
    num2 <= (prod_n >= prod_s) ? prod_n - prod_s : '0;
    mu3  <= mu2;
    var3 <= (quot > NUM_W'({VAR_W{1'b1}})) ? {VAR_W{1'b1}} : VAR_W'(quot);
    thr_hi <= (hi_full > (THR_W+1)'({THR_W{1'b1}})) ? {THR_W{1'b1}} : THR_W'(hi_full);
    thr_lo <= lo_full;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

endmodule
