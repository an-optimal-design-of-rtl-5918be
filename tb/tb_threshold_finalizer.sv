// tb_threshold_finalizer: self-checking test of the sums-to-interval stage.
// Each beat is built from N_ACC random per-frame differences (some sets
// constant, some spread over the full range); the expected bounds come from
// the mean and sample standard deviation computed here in floating point and
// taken down to integers (square root checked by r*r <= v < (r+1)^2). The
// result must appear four cycles after the beat.
module tb_threshold_finalizer;
  localparam int unsigned PIX_W = 16;
  localparam int unsigned N_ACC = 30;
  localparam int unsigned SUM_W = PIX_W + $clog2(N_ACC + 1);
  localparam int unsigned SQ_W  = 2 * PIX_W + $clog2(N_ACC + 1);
  localparam int unsigned THR_W = PIX_W + 1;
  localparam int unsigned LAT   = 4;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [SUM_W-1:0] s1 = '0;
  logic [SQ_W-1:0]  s2 = '0;
  logic out_valid;
  logic [THR_W-1:0] hi, lo;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  threshold_finalizer #(.PIX_W(PIX_W), .N_ACC(N_ACC)) dut (
    .clk, .rst_n, .in_valid, .sum_dt(s1), .sum_dt2(s2), .out_valid, .thr_hi(hi), .thr_lo(lo)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct packed { longint hi, lo; longint unsigned due; } exp_t;
  exp_t q[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        automatic exp_t e = q.pop_front();
        if (longint'(hi) != e.hi || longint'(lo) != e.lo || cyc != e.due) begin
          failures++;
          $display("FAIL cyc %0d due %0d: got [%0d,%0d] exp [%0d,%0d]", cyc, e.due, lo, hi, e.lo, e.hi);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      automatic longint unsigned a = 0, b = 0;
      automatic int unsigned kind = $urandom_range(0, 3);
      automatic longint unsigned base = $urandom_range(0, 65535);
      for (int f = 0; f < int'(N_ACC); f++) begin
        automatic longint unsigned d;
        case (kind)
          0: d = base;                                            // constant
          1: d = $urandom_range(0, 65535);                        // full range
          2: d = $urandom_range(0, 1) ? 65535 : 0;                // extremes
          default: d = (base + $urandom_range(0, 50)) % 65536;    // narrow spread
        endcase
        a += d;
        b += d * d;
      end
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      s1 = SUM_W'(a);
      s2 = SQ_W'(b);
      if (in_valid) begin
        automatic exp_t e;
        automatic longint mu = longint'(a / N_ACC);
        automatic real    vr = (real'(N_ACC) * real'(b) - real'(a) * real'(a)) / real'(N_ACC * (N_ACC - 1));
        automatic longint v  = longint'($floor(vr + 1.0e-6));
        automatic longint r  = longint'($floor($sqrt(real'(v))));
        while (r * r > v) r--;
        while ((r + 1) * (r + 1) <= v) r++;
        e.hi  = mu + r;
        e.lo  = (mu > r) ? mu - r : 0;
        e.due = cyc + LAT;
        q.push_back(e);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
