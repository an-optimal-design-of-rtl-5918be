// tb_track_ctrl: self-checking test of the pass sequencer.
// A reference list of passes is built here from frame numbers (frame f in
// slot f mod 6): ingest passes, the TD passes over t, t-k, t+1, t+1-k, the
// finalising pass, then for each tracked frame an ingest and the BIB passes
// comparing it with frames t-1 .. t-S_MAX. pass_done answers each pass_start
// after a random delay; every configuration the controller presents is
// compared with the list, and thr_ready / frame_done are checked.
module tb_track_ctrl;
  import tracking_pkg::*;
  localparam int unsigned N_ACC = 8;
  localparam int unsigned K_TD  = 3;
  localparam int unsigned S_MAX = 5;
  localparam int unsigned TRACK = 4;

  logic clk = 0, rst_n = 0, start = 0, pass_done = 0;
  logic pass_start, thr_ready, frame_done;
  pass_cfg_t cfg;

  track_ctrl #(.N_ACC(N_ACC), .K_TD(K_TD), .S_MAX(S_MAX)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  pass_cfg_t exp_q[$];
  bit        exp_thr[$];

  function automatic logic [3:0] sl(input int f);
    return 4'(f % 6);
  endfunction

  task automatic add_ingest(input int f, input bit thr);
    pass_cfg_t c = '0;
    c.mode = MODE_INGEST; c.wr_en = 2'b01; c.wr_region[0] = sl(f);
    exp_q.push_back(c); exp_thr.push_back(thr);
  endtask

  initial begin
    int ingested = 0;
    for (int p = 0; p < int'(N_ACC / 2); p++) begin
      automatic int t = K_TD + 2 * p;
      automatic pass_cfg_t c = '0;
      while (ingested <= t + 1) begin add_ingest(ingested, 0); ingested++; end
      c.mode = MODE_TD;
      c.rd_en = (p == 0) ? 6'b001111 : 6'b111111;
      c.rd_region[0] = sl(t); c.rd_region[1] = sl(t - K_TD);
      c.rd_region[2] = sl(t + 1); c.rd_region[3] = sl(t + 1 - K_TD);
      c.rd_region[4] = 4'd6; c.rd_region[5] = 4'd7;
      c.wr_en = 2'b11; c.wr_region[0] = 4'd6; c.wr_region[1] = 4'd7;
      exp_q.push_back(c); exp_thr.push_back(0);
    end
    begin
      automatic pass_cfg_t c = '0;
      c.mode = MODE_FIN; c.rd_en = 6'b110000; c.rd_region[4] = 4'd6; c.rd_region[5] = 4'd7;
      c.wr_en = 2'b11; c.wr_region[0] = 4'd6; c.wr_region[1] = 4'd7;
      exp_q.push_back(c); exp_thr.push_back(0);
    end
    for (int n = 0; n < int'(TRACK); n++) begin
      automatic int t = ingested;
      add_ingest(t, 1); ingested++;
      for (int s = 1; s <= int'(S_MAX); s += 2) begin
        automatic pass_cfg_t c = '0;
        c.mode = MODE_BIB;
        c.rd_en = (s == 1) ? 6'b110111 : 6'b111111;
        c.rd_region[0] = sl(t); c.rd_region[1] = sl(t - s);
        c.rd_region[2] = sl(t - ((s + 1 > int'(S_MAX)) ? int'(S_MAX) : s + 1));
        c.rd_region[3] = 4'd8; c.rd_region[4] = 4'd6; c.rd_region[5] = 4'd7;
        c.wr_en = 2'b01; c.wr_region[0] = 4'd8;
        c.last = (s + 2 > int'(S_MAX));
        exp_q.push_back(c); exp_thr.push_back(1);
      end
    end
  end

  int passes = 0, frames = 0;
  always @(posedge clk) if (rst_n && frame_done) frames++;

  initial begin
    automatic int total;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    checks++;
    if (pass_start) fail("pass started before start");
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    total = exp_q.size();
    for (int n = 0; n < total; n++) begin
      automatic pass_cfg_t e = exp_q.pop_front();
      automatic bit et = exp_thr.pop_front();
      @(posedge clk iff pass_start);
      #1;
      checks++;
      if (cfg !== e) fail($sformatf("pass %0d: cfg %h expected %h", n, cfg, e));
      checks++;
      if (thr_ready !== et) fail($sformatf("pass %0d: thr_ready %0b", n, thr_ready));
      repeat ($urandom_range(1, 30)) begin
        @(negedge clk);
        checks++;
        if (pass_start) fail("second pass_start before pass_done");
      end
      @(negedge clk) pass_done = 1;
      @(negedge clk) pass_done = 0;
      passes++;
    end
    repeat (3) @(posedge clk);
    checks++;
    if (frames != int'(TRACK)) fail($sformatf("frame_done pulsed %0d times", frames));
    $display("passes checked %0d", passes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
