// bib_unit: Binary Image Builder, one pass of the moving-pixel test.
//
// Each accepted beat carries one pixel position of the current frame t and of
// two earlier frames t-s and t-(s+1), the two threshold bounds of that pixel
// (hi = mu+sigma, lo = mu-sigma) and the binary-image bit left by the previous
// pass. With D1 = |G(t)-G(t-s)| and D2 = |G(t)-G(t-s-1)| a difference lies
// outside the interval when D > hi or D < lo, and
//     bin_out = bin_in | out(D1) | out(D2)
// i.e. the pixel is moving (1) as soon as any difference seen so far leaves
// [lo, hi]; running ceil(k/2) passes with bin_in=0 on the first realises the
// OR over s = 1..k of the binary-image rule.
//
// Pipeline (register stages as in the design's four-stage diagram):
//   cycle 1: input registers, subtractors
//   cycle 2: D1, D2 registered; comparators
//   cycle 3: comparison results registered; one OR per difference
//   cycle 4: OR results registered; final merge with bin_in
//   cycle 5: bin_out register
// out_valid follows in_valid by LATENCY=5 edges; one beat per cycle.
module bib_unit #(
  parameter int unsigned PIX_W = 16,           // pixel width
  parameter int unsigned THR_W = PIX_W + 1     // width of the threshold bounds
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [PIX_W-1:0]  frame_t,
  input  logic [PIX_W-1:0]  frame_ts,
  input  logic [PIX_W-1:0]  frame_ts1,
  input  logic [THR_W-1:0]  thr_hi,
  input  logic [THR_W-1:0]  thr_lo,
  input  logic              bin_in,
  output logic              out_valid,
  output logic              bin_out
);
  localparam int unsigned LATENCY = 5;

  // cycle 1
  logic [PIX_W-1:0] c1_t, c1_ts, c1_ts1;
  logic [THR_W-1:0] c1_hi, c1_lo;
  logic             c1_b;
  // cycle 2
  logic [PIX_W-1:0] d1, d2;
  logic [THR_W-1:0] c2_hi, c2_lo;
  logic             c2_b;
  // cycle 3
  logic gt1, lt1, gt2, lt2, c3_b;
  // cycle 4
  logic out1, out2, c4_b;

  logic [LATENCY-1:0] vld;

  always_ff @(posedge clk) begin
    c1_t   <= frame_t;
    c1_ts  <= frame_ts;
    c1_ts1 <= frame_ts1;
    c1_hi  <= thr_hi;
    c1_lo  <= thr_lo;
    c1_b   <= bin_in;

    d1    <= (c1_t >= c1_ts)  ? c1_t - c1_ts  : c1_ts  - c1_t;
    d2    <= (c1_t >= c1_ts1) ? c1_t - c1_ts1 : c1_ts1 - c1_t;
    c2_hi <= c1_hi;
    c2_lo <= c1_lo;
    c2_b  <= c1_b;

    gt1  <= THR_W'(d1) > c2_hi;
    lt1  <= THR_W'(d1) < c2_lo;
    gt2  <= THR_W'(d2) > c2_hi;
    lt2  <= THR_W'(d2) < c2_lo;
    c3_b <= c2_b;

    out1 <= gt1 | lt1;
    out2 <= gt2 | lt2;
    c4_b <= c3_b;

    bin_out <= out1 | out2 | c4_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  assign out_valid = vld[LATENCY-1];

endmodule
