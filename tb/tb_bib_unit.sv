// tb_bib_unit: self-checking test of the Binary Image Builder pipeline.
// Random pixels, thresholds and previous binary bits (with values placed on
// and next to the interval bounds) are driven with random gaps; each output is
// compared with the rule "moving if the previous bit is set or either
// difference lies outside [lo, hi]" and must appear five cycles after its beat.
module tb_bib_unit;
  localparam int unsigned PIX_W = 16;
  localparam int unsigned THR_W = PIX_W + 1;
  localparam int unsigned LAT   = 5;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [PIX_W-1:0] ft = '0, fs = '0, fs1 = '0;
  logic [THR_W-1:0] hi = '0, lo = '0;
  logic bin_in = 0;
  logic out_valid, bin_out;

  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  int n_ones = 0, n_zeros = 0;

  bib_unit #(.PIX_W(PIX_W), .THR_W(THR_W)) dut (
    .clk, .rst_n, .in_valid, .frame_t(ft), .frame_ts(fs), .frame_ts1(fs1),
    .thr_hi(hi), .thr_lo(lo), .bin_in, .out_valid, .bin_out
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct packed { logic b; longint unsigned due; } exp_t;
  exp_t q[$];

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cyc);
      end else begin
        automatic exp_t e = q.pop_front();
        if (bin_out !== e.b || cyc != e.due) begin
          failures++;
          $display("FAIL cyc %0d (due %0d): got %0b exp %0b", cyc, e.due, bin_out, e.b);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      // small differences around a small interval so both outcomes occur
      ft  = PIX_W'(1000 + $urandom_range(0, 60));
      fs  = PIX_W'(1000 + $urandom_range(0, 60));
      fs1 = PIX_W'(1000 + $urandom_range(0, 60));
      lo  = THR_W'($urandom_range(0, 20));
      hi  = lo + THR_W'($urandom_range(0, 40));
      if ($urandom_range(0, 7) == 0) begin   // a difference exactly on a bound
        fs = ft - PIX_W'(hi);
        if ($urandom_range(0, 1) == 0) fs1 = ft + PIX_W'(lo);
      end
      bin_in = ($urandom_range(0, 4) == 0);
      if (in_valid) begin
        automatic exp_t e;
        automatic longint d1 = ft > fs  ? ft - fs  : fs  - ft;
        automatic longint d2 = ft > fs1 ? ft - fs1 : fs1 - ft;
        e.b   = bin_in || d1 > hi || d1 < lo || d2 > hi || d2 < lo;
        e.due = cyc + LAT;
        if (e.b) n_ones++; else n_zeros++;
        q.push_back(e);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end
    if (n_ones < 100 || n_zeros < 100) begin
      failures++;
      $display("FAIL stimulus too one-sided: %0d moving, %0d still", n_ones, n_zeros);
    end
    $display("moving=%0d still=%0d", n_ones, n_zeros);
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
