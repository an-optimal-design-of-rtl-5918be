// tb_burst_mover: self-checking test of the memory-side burst scheduler.
// The read and write FIFOs are modelled here as queues whose fill levels feed
// the mover; the unit side drains read FIFOs and fills write FIFOs at random.
// Memory is frame_mem_model with random wait states. Two passes run: one
// with all six read streams and both write streams (a frame that is not a
// multiple of the burst length, so the last burst of each stream is short)
// and one with two reads and one write. Checks: each read FIFO receives
// exactly its region's words in order, each written word lands at its region
// and offset, no burst overruns a FIFO or exceeds BURST, and done pulses once,
// only after every stream has finished.
module tb_burst_mover;
  import tracking_pkg::*;
  localparam int unsigned WORD_W    = 24;
  localparam int unsigned FRAME_PIX = 44;
  localparam int unsigned BURST     = 8;
  localparam int unsigned DEPTH     = 16;
  localparam int unsigned ADDR_W    = $clog2(NUM_REGIONS * FRAME_PIX);
  localparam int unsigned CW        = $clog2(DEPTH) + 1;

  logic clk = 0, rst_n = 0, start = 0, done;
  logic [NUM_RD-1:0] rd_en = '0;
  logic [NUM_RD-1:0][3:0] rd_region = '0;
  logic [NUM_WR-1:0] wr_en = '0;
  logic [NUM_WR-1:0][3:0] wr_region = '0;
  logic [NUM_RD-1:0][CW-1:0] rf_count;
  logic [NUM_RD-1:0] rf_push;
  logic [WORD_W-1:0] rf_data;
  logic [NUM_WR-1:0][CW-1:0] wf_count;
  logic [NUM_WR-1:0][WORD_W-1:0] wf_data;
  logic [NUM_WR-1:0] wf_pop;
  logic mem_valid, mem_ready, mem_we, mem_rvalid;
  logic [ADDR_W-1:0] mem_addr;
  logic [WORD_W-1:0] mem_wdata, mem_rdata;

  always #4 clk = ~clk;

  burst_mover #(.WORD_W(WORD_W), .FRAME_PIX(FRAME_PIX), .BURST(BURST), .DEPTH(DEPTH), .ADDR_W(ADDR_W)) dut (.*);
  frame_mem_model #(.WORD_W(WORD_W), .ADDR_W(ADDR_W), .WORDS(NUM_REGIONS * FRAME_PIX), .STALL_PCT(20)) u_mem (
    .clk, .mem_valid, .mem_ready, .mem_we, .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata);

  int checks = 0, failures = 0;
  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  function automatic logic [WORD_W-1:0] word_of(input int r, input int o);
    return WORD_W'(r * 4096 + o * 7 + 1);
  endfunction

  // FIFO models
  logic [WORD_W-1:0] rq[NUM_RD][$];
  logic [WORD_W-1:0] wq[NUM_WR][$];
  int rd_got[NUM_RD], wr_fed[NUM_WR];
  int burst_len = 0, done_cnt = 0, max_rd_level = 0;
  bit busy = 0;

  always_comb begin
    for (int i = 0; i < int'(NUM_RD); i++) rf_count[i] = CW'(rq[i].size());
    for (int j = 0; j < int'(NUM_WR); j++) begin
      wf_count[j] = CW'(wq[j].size());
      wf_data[j]  = wq[j].size() ? wq[j][0] : '0;
    end
  end

  always @(posedge clk) begin
    // memory side
    for (int i = 0; i < int'(NUM_RD); i++) if (rf_push[i]) begin
      if (rq[i].size() >= DEPTH) fail($sformatf("read FIFO %0d overrun", i));
      rq[i].push_back(rf_data);
    end
    for (int j = 0; j < int'(NUM_WR); j++) if (wf_pop[j]) begin
      if (wq[j].size() == 0) fail($sformatf("write FIFO %0d popped empty", j));
      else void'(wq[j].pop_front());
    end
    if (mem_valid && mem_ready) begin
      burst_len++;
      if (burst_len > int'(BURST)) fail("burst longer than BURST");
    end
    if (!mem_valid) burst_len = 0;
    if (rst_n && done) begin
      done_cnt++;
      checks++;
      for (int i = 0; i < int'(NUM_RD); i++)
        if (rd_en[i] && rd_got[i] + rq[i].size() != FRAME_PIX) fail($sformatf("done early: read %0d", i));
      for (int j = 0; j < int'(NUM_WR); j++)
        if (wr_en[j] && (wr_fed[j] != FRAME_PIX || wq[j].size() != 0)) fail($sformatf("done early: write %0d", j));
    end
  end

  // unit side: random drain / fill
  always @(negedge clk) if (busy) begin
    for (int i = 0; i < int'(NUM_RD); i++)
      if (rq[i].size() && $urandom_range(0, 3) == 0) begin
        automatic logic [WORD_W-1:0] w = rq[i].pop_front();
        checks++;
        if (w !== word_of(rd_region[i], rd_got[i]))
          fail($sformatf("read %0d word %0d: %h expected %h", i, rd_got[i], w, word_of(rd_region[i], rd_got[i])));
        rd_got[i]++;
      end
    for (int j = 0; j < int'(NUM_WR); j++)
      if (wr_en[j] && wr_fed[j] < int'(FRAME_PIX) && wq[j].size() < DEPTH && $urandom_range(0, 2) == 0) begin
        wq[j].push_back(WORD_W'(32'hA00000 + j * 65536 + wr_fed[j]));
        wr_fed[j]++;
      end
  end

  task automatic run_pass(input logic [NUM_RD-1:0] re, input logic [NUM_WR-1:0] we,
                          input logic [NUM_RD-1:0][3:0] rr, input logic [NUM_WR-1:0][3:0] wr);
    int d0 = done_cnt;
    @(negedge clk);
    rd_en = re; wr_en = we; rd_region = rr; wr_region = wr;
    for (int i = 0; i < int'(NUM_RD); i++) rd_got[i] = 0;
    for (int j = 0; j < int'(NUM_WR); j++) wr_fed[j] = 0;
    busy = 1;
    start = 1;
    @(negedge clk) start = 0;
    wait (done_cnt != d0);
    @(negedge clk);
    busy = 0;
    // drain what is left in the read FIFOs
    for (int i = 0; i < int'(NUM_RD); i++)
      while (rq[i].size()) begin
        automatic logic [WORD_W-1:0] w = rq[i].pop_front();
        checks++;
        if (w !== word_of(rr[i], rd_got[i])) fail($sformatf("read %0d tail word mismatch", i));
        rd_got[i]++;
      end
    for (int i = 0; i < int'(NUM_RD); i++) begin
      checks++;
      if (rd_got[i] != (re[i] ? FRAME_PIX : 0)) fail($sformatf("read %0d delivered %0d words", i, rd_got[i]));
    end
    for (int j = 0; j < int'(NUM_WR); j++) if (we[j])
      for (int o = 0; o < int'(FRAME_PIX); o++) begin
        checks++;
        if (u_mem.mem[wr[j] * FRAME_PIX + o] !== WORD_W'(32'hA00000 + j * 65536 + o))
          fail($sformatf("write %0d offset %0d wrong in memory", j, o));
      end
  endtask

  initial begin
    for (int r = 0; r < int'(NUM_REGIONS); r++)
      for (int o = 0; o < int'(FRAME_PIX); o++) u_mem.mem[r * FRAME_PIX + o] = word_of(r, o);
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_pass(6'b111111, 2'b11, {4'd5, 4'd4, 4'd3, 4'd2, 4'd1, 4'd0}, {4'd7, 4'd6});
    run_pass(6'b010001, 2'b01, {4'd0, 4'd8, 4'd0, 4'd0, 4'd0, 4'd3}, {4'd0, 4'd2});
    checks++;
    if (done_cnt != 2) fail($sformatf("done pulsed %0d times", done_cnt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
