// tb_tracking_full: end-to-end test of the tracking core at its default size
// (640x480 frames of 16-bit pixels, threshold over 30 differences, 256-word
// bursts, 512-word FIFOs), checking one tracked frame and the tracking rate.
//
// A synthetic camera supplies frames of a textured, slightly noisy background;
// from the first tracked frame on, a bright two-column bar moves across it.
// The core learns the threshold from N_ACC frame differences, then builds
// the binary image of TRACK_FRAMES frames. The testbench computes, from the
// same frame formula, the expected interval [mu-sigma, mu+sigma] of every pixel
// (checked in the frame memory after the finalising pass) and the expected
// binary image of every tracked frame (checked bit by bit at bin_pixel).
// It counts every mechanism of the design and reports how often each happened:
// camera ingest passes and camera back-pressure, the first TD pass that starts
// the sums from zero, later TD passes, the finalising pass, first/middle/last
// BIB passes, unit stalls on an empty read FIFO, stalls on a full write FIFO,
// memory wait states, full and shortened bursts of both directions.
// Memory clock 125 MHz, unit clock 20 MHz.
module tb_tracking_full;
  import tracking_pkg::*;

  // the core's defaults, repeated here for the reference model
  localparam int unsigned PIX_W        = 16;
  localparam int unsigned FRAME_W      = 640;
  localparam int unsigned FRAME_H      = 480;
  localparam int unsigned N_ACC        = 30;
  localparam int unsigned K_TD         = 2;
  localparam int unsigned S_MAX        = 5;
  localparam int unsigned BURST        = 256;
  localparam int unsigned FIFO_DEPTH   = 512;
  localparam int unsigned TRACK_FRAMES = 1;
  localparam int unsigned STALL_PCT    = 0;
  localparam int unsigned WATCHDOG     = 30000000; // unit clock cycles
  localparam bit          REQUIRE_ALL  = 0;        // full-size bursts are never short
  localparam bit          CHECK_RATE   = 1;        // BIB passes within the memory-bandwidth bound + 2%

  localparam int unsigned FRAME_PIX = FRAME_W * FRAME_H;
  localparam int unsigned SQ_W      = 2 * PIX_W + $clog2(N_ACC + 1);
  localparam int unsigned WORD_W    = SQ_W;
  localparam int unsigned ADDR_W    = $clog2(NUM_REGIONS * FRAME_PIX);
  localparam int unsigned FIRST_TRACKED = K_TD + N_ACC;

  logic mem_clk = 0, unit_clk = 0, mem_rst_n = 0, unit_rst_n = 0;
  logic start = 0;
  logic thr_ready, frame_done;
  logic cam_valid = 0, cam_ready;
  logic [PIX_W-1:0] cam_pixel = '0;
  logic bin_valid, bin_pixel;
  logic mem_valid, mem_ready, mem_we, mem_rvalid;
  logic [ADDR_W-1:0] mem_addr;
  logic [WORD_W-1:0] mem_wdata, mem_rdata;

  always #4  mem_clk  = ~mem_clk;
  always #25 unit_clk = ~unit_clk;

  tracking_top dut (.*);

  frame_mem_model #(
    .WORD_W(WORD_W), .ADDR_W(ADDR_W), .WORDS(NUM_REGIONS * FRAME_PIX), .STALL_PCT(STALL_PCT)
  ) u_mem (
    .clk(mem_clk), .mem_valid, .mem_ready, .mem_we, .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata
  );

  int checks = 0, failures = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // ------------------------------------------------------------ scene
  function automatic int unsigned hash(input int unsigned f, input int unsigned p);
    int unsigned h = f * 32'h9E3779B1 ^ (p + 1) * 32'h85EBCA6B;
    h ^= h >> 13;
    h *= 32'hC2B2AE35;
    h ^= h >> 16;
    return h;
  endfunction

  function automatic int unsigned pix(input int unsigned f, input int unsigned p);
    int unsigned x = p % FRAME_W, y = p / FRAME_W;
    // odd pixels carry sensor noise, even pixels are perfectly still
    int unsigned v = 2000 + (p * 37) % 300 + ((p % 2) ? hash(f, p) % 40 : 0);
    if (f >= FIRST_TRACKED && y < FRAME_H - 1 &&
        (x == (2 * f) % FRAME_W || x == (2 * f + 1) % FRAME_W))
      v += 3000;
    return v;
  endfunction

  function automatic int unsigned absd(input int unsigned a, input int unsigned b);
    return a > b ? a - b : b - a;
  endfunction

  // expected interval of every pixel
  longint exp_hi[FRAME_PIX], exp_lo[FRAME_PIX];
  initial begin
    for (int p = 0; p < int'(FRAME_PIX); p++) begin
      automatic real s1 = 0.0, s2 = 0.0, mu, sd;
      automatic longint imu, isd, v;
      for (int t = K_TD; t < int'(K_TD + N_ACC); t++) begin
        automatic real d = real'(absd(pix(t, p), pix(t - K_TD, p)));
        s1 += d;
        s2 += d * d;
      end
      imu = longint'($floor(s1 / N_ACC));
      v   = longint'($floor((N_ACC * s2 - s1 * s1) / (N_ACC * (N_ACC - 1)) + 1.0e-9));
      isd = longint'($floor($sqrt(real'(v))));
      while (isd * isd > v) isd--;
      while ((isd + 1) * (isd + 1) <= v) isd++;
      exp_hi[p] = imu + isd;
      exp_lo[p] = imu > isd ? imu - isd : 0;
    end
  end

  function automatic bit exp_bin(input int unsigned t, input int unsigned p);
    bit b = 0;
    for (int s = 1; s <= int'(S_MAX); s++) begin
      automatic longint d = absd(pix(t, p), pix(t - s, p));
      if (d > exp_hi[p] || d < exp_lo[p]) b = 1;
    end
    return b;
  endfunction

  // ------------------------------------------------------------ camera
  int unsigned cam_f = 0, cam_p = 0;
  int unsigned cam_backpressure = 0;
  always @(posedge unit_clk) if (unit_rst_n) begin
    if (cam_valid && cam_ready) begin
      if (cam_p == FRAME_PIX - 1) begin cam_p <= 0; cam_f <= cam_f + 1; end
      else cam_p <= cam_p + 1;
    end
    if (cam_valid && !cam_ready && dut.cfg.mode == MODE_INGEST && dut.active) cam_backpressure++;
  end
  always @(negedge unit_clk) begin
    cam_valid = unit_rst_n && ($urandom_range(0, 9) != 0);
    cam_pixel = PIX_W'(pix(cam_f, cam_p));
  end

  // ------------------------------------------------------------ mechanisms
  int unsigned n_ingest = 0, n_td_first = 0, n_td = 0, n_fin = 0;
  int unsigned n_bib_first = 0, n_bib_mid = 0, n_bib_last = 0;
  int unsigned n_in_stall = 0, n_room_stall = 0;
  int unsigned n_rd_full_burst = 0, n_rd_short_burst = 0, n_wr_full_burst = 0, n_wr_short_burst = 0;
  longint unsigned ucyc = 0, pass_t0 = 0, bib_cycles = 0, td_cycles = 0;

  always @(posedge unit_clk) if (unit_rst_n) begin
    ucyc <= ucyc + 1;
    if (dut.pass_start_u) begin
      pass_t0 <= ucyc;
      unique case (dut.cfg.mode)
        MODE_INGEST: n_ingest++;
        MODE_TD:     if (!dut.cfg.rd_en[4]) n_td_first++; else n_td++;
        MODE_FIN:    n_fin++;
        MODE_BIB:    if (!dut.cfg.rd_en[3]) n_bib_first++;
                     else if (dut.cfg.last) n_bib_last++;
                     else n_bib_mid++;
        default: ;
      endcase
    end
    if (dut.pass_done_u && dut.cfg.mode == MODE_BIB) bib_cycles += ucyc - pass_t0;
    if (dut.pass_done_u && dut.cfg.mode == MODE_TD)  td_cycles  += ucyc - pass_t0;
    if (dut.active && dut.fed != FRAME_PIX && dut.cfg.mode != MODE_INGEST && !dut.inputs_ok) n_in_stall++;
    if (dut.active && dut.fed != FRAME_PIX && !dut.room_ok) n_room_stall++;
  end

  always @(posedge mem_clk) if (mem_rst_n) begin
    if (int'(dut.u_mover.state) == 1 && dut.u_mover.any_elig && !dut.u_mover.all_done) begin
      automatic bit wr = dut.u_mover.pick >= NUM_RD;
      automatic bit full = dut.u_mover.len[dut.u_mover.pick] == BURST;
      if (wr && full) n_wr_full_burst++;
      if (wr && !full) n_wr_short_burst++;
      if (!wr && full) n_rd_full_burst++;
      if (!wr && !full) n_rd_short_burst++;
    end
  end

  // ------------------------------------------------------------ outputs
  int unsigned tracked = 0, bin_cnt = 0, moving = 0;
  bit thr_checked = 0;

  always @(posedge unit_clk) if (unit_rst_n) begin
    if (bin_valid) begin
      automatic bit e = exp_bin(FIRST_TRACKED + tracked, bin_cnt);
      checks++;
      if (bin_pixel !== e)
        fail($sformatf("frame %0d pixel %0d: bin %0b expected %0b", FIRST_TRACKED + tracked, bin_cnt, bin_pixel, e));
      if (bin_pixel) moving++;
      bin_cnt <= bin_cnt + 1;
    end
    if (frame_done) begin
      checks++;
      if (bin_cnt + int'(bin_valid) != FRAME_PIX)
        fail($sformatf("frame %0d: %0d binary pixels instead of %0d", tracked, bin_cnt, FRAME_PIX));
      bin_cnt <= 0;
      tracked <= tracked + 1;
    end
    // the interval in memory, once, when tracking starts
    if (thr_ready && !thr_checked) begin
      thr_checked <= 1;
      for (int p = 0; p < int'(FRAME_PIX); p++) begin
        automatic longint hi = longint'(u_mem.mem[REG_LUT1 * FRAME_PIX + p]);
        automatic longint lo = longint'(u_mem.mem[REG_LUT2 * FRAME_PIX + p]);
        checks++;
        if (hi != exp_hi[p] || lo != exp_lo[p])
          fail($sformatf("pixel %0d interval [%0d,%0d] expected [%0d,%0d]", p, lo, hi, exp_lo[p], exp_hi[p]));
      end
    end
  end

  task automatic need(input string what, input longint unsigned n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0 && REQUIRE_ALL) fail($sformatf("mechanism never happened: %s", what));
  endtask

  task automatic finish_report();
    $display("mechanisms:");
    need("camera ingest passes", n_ingest);
    need("camera back-pressure cycles", cam_backpressure);
    need("TD first pass (sums from 0)", n_td_first);
    need("TD accumulate passes", n_td);
    need("finalise passes", n_fin);
    need("BIB first passes", n_bib_first);
    need("BIB middle passes", n_bib_mid);
    need("BIB last passes", n_bib_last);
    need("unit stalls, read FIFO empty", n_in_stall);
    need("unit stalls, write FIFO full", n_room_stall);
    need("memory wait states", u_mem.stalls);
    need("full read bursts", n_rd_full_burst);
    need("short read bursts", n_rd_short_burst);
    need("full write bursts", n_wr_full_burst);
    need("short write bursts", n_wr_short_burst);
    need("moving pixels", moving);
    checks++;
    if (n_td_first + n_td != N_ACC / 2) fail($sformatf("%0d TD passes, expected %0d", n_td_first + n_td, N_ACC / 2));
    checks++;
    if (!thr_checked) fail("threshold never became ready");
    $display("unit cycles per tracked frame in BIB passes: %0d (%0d pixels)", bib_cycles / TRACK_FRAMES, FRAME_PIX);
    $display("unit cycles of the TD passes: %0d", td_cycles);
    // Memory words per pixel: first BIB pass 5 reads + 1 write, later passes
    // 6 reads + 1 write; at 125/20 MHz the memory moves 6.25 words per unit
    // cycle, so the later passes are bound by memory bandwidth (7/6.25).
    if (CHECK_RATE) begin
      automatic real bound = real'(FRAME_PIX) * (1.0 + 2.0 * 7.0 / 6.25) * 1.02;
      checks++;
      if (real'(bib_cycles) > real'(TRACK_FRAMES) * bound)
        fail($sformatf("BIB passes took %0d cycles for %0d frames (bound %0.0f)", bib_cycles, TRACK_FRAMES, bound));
      $display("tracking rate at 20 MHz: %0.2f frames/s", 20.0e6 * TRACK_FRAMES / real'(bib_cycles));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (4) @(posedge unit_clk);
    mem_rst_n = 1; unit_rst_n = 1;
    repeat (2) @(posedge unit_clk);
    @(negedge unit_clk) start = 1;
    @(negedge unit_clk) start = 0;
    wait (tracked == TRACK_FRAMES);
    repeat (5) @(posedge unit_clk);
    finish_report();
  end

  initial begin
    repeat (WATCHDOG) @(posedge unit_clk);
    fail($sformatf("watchdog: %0d of %0d frames tracked", tracked, TRACK_FRAMES));
    finish_report();
  end
endmodule
