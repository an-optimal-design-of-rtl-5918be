// tb_td_unit: self-checking test of the Threshold Definer pipeline.
// Drives random pixels and old sums (including the extreme values 0 and
// all-ones) with random gaps, predicts each result from the accumulation rule
// and checks the value and that it appears exactly five cycles after the beat.
module tb_td_unit;
  localparam int unsigned PIX_W = 16;
  localparam int unsigned N_ACC = 30;
  localparam int unsigned SUM_W = PIX_W + $clog2(N_ACC + 1);
  localparam int unsigned SQ_W  = 2 * PIX_W + $clog2(N_ACC + 1);
  localparam int unsigned LAT   = 5;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [PIX_W-1:0] ft = '0, ftk = '0, ft1 = '0, ft1k = '0;
  logic [SUM_W-1:0] s1o = '0;
  logic [SQ_W-1:0]  s2o = '0;
  logic out_valid;
  logic [SUM_W-1:0] s1;
  logic [SQ_W-1:0]  s2;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;

  td_unit #(.PIX_W(PIX_W), .N_ACC(N_ACC)) dut (
    .clk, .rst_n, .in_valid, .frame_t(ft), .frame_tk(ftk), .frame_t1(ft1), .frame_t1k(ft1k),
    .sum_dt_old(s1o), .sum_dt2_old(s2o), .out_valid, .sum_dt(s1), .sum_dt2(s2)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct packed { longint unsigned s1, s2, due; } exp_t;
  exp_t q[$];

  function automatic longint unsigned ad(longint unsigned a, longint unsigned b);
    return a > b ? a - b : b - a;
  endfunction

  function automatic logic [PIX_W-1:0] rpix();
    int unsigned r = $urandom_range(0, 9);
    if (r == 0) return '0;
    if (r == 1) return '1;
    return PIX_W'($urandom);
  endfunction

  // check outputs
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cyc);
      end else begin
        automatic exp_t e = q.pop_front();
        if (s1 !== SUM_W'(e.s1) || s2 !== SQ_W'(e.s2) || cyc != e.due) begin
          failures++;
          $display("FAIL cyc %0d (due %0d): got %0d/%0d exp %0d/%0d", cyc, e.due, s1, s2, e.s1, e.s2);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      ft = rpix(); ftk = rpix(); ft1 = rpix(); ft1k = rpix();
      // old sums stay in the range reachable after 28 frames
      s1o = SUM_W'(longint'($urandom) % (28 * 65536));
      s2o = SQ_W'({$urandom, $urandom} % (64'd28 * 64'd4294836225));
      if (in_valid) begin
        automatic exp_t e;
        automatic longint unsigned a = ad(ft, ftk);
        automatic longint unsigned b = ad(ft1, ft1k);
        e.s1  = s1o + a + b;
        e.s2  = s2o + a * a + b * b;
        e.due = cyc + LAT;  // cyc is the count of the edge about to sample
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
