// tb_async_fifo: self-checking test of the dual-clock FIFO.
// Write clock 125 MHz (8 ns), read clock 20 MHz (50 ns), as in the design.
// Phase 1 fills the FIFO with no reads: exactly DEPTH words must be accepted
// before wr_full rises. Phase 2 drains it completely. Phase 3 streams random
// traffic in both directions (the read side also alternating between faster
// and slower bursts). Every word read is compared with a reference queue.
module tb_async_fifo;
  localparam int unsigned WIDTH = 16;
  localparam int unsigned DEPTH = 512;
  localparam int unsigned CW    = $clog2(DEPTH) + 1;

  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic wr_full, rd_empty;
  logic [CW-1:0] wr_count, rd_count;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] ref_q[$];
  int accepted = 0;

  async_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_en, .wr_data, .wr_full, .wr_count,
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_en, .rd_data, .rd_empty, .rd_count
  );

  always #4  wclk = ~wclk;
  always #25 rclk = ~rclk;

  // reference model: record accepted writes, check popped words
  always @(posedge wclk) if (wrst_n && wr_en && !wr_full) begin
    ref_q.push_back(wr_data);
    accepted++;
  end
  always @(posedge rclk) if (rrst_n && rd_en && !rd_empty) begin
    checks++;
    if (ref_q.size() == 0) begin
      failures++;
      $display("FAIL read from a FIFO that should be empty");
    end else begin
      automatic logic [WIDTH-1:0] e = ref_q.pop_front();
      if (rd_data !== e) begin
        failures++;
        $display("FAIL data %h expected %h", rd_data, e);
      end
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  int n_written = 0;
  initial begin
    repeat (3) @(posedge rclk);
    wrst_n = 1; rrst_n = 1;
    check(rd_empty && !wr_full && wr_count == 0, "reset state");
    // phase 1: fill
    while (!wr_full) begin
      @(negedge wclk);
      wr_en = 1; wr_data = WIDTH'($urandom);
      @(posedge wclk);
      if (!wr_full) n_written++;
      #1 wr_en = 0;
      if (n_written > DEPTH + 2) break;
    end
    @(negedge wclk) wr_en = 0;
    check(accepted == int'(DEPTH), $sformatf("accepted %0d words before full", accepted));
    check(wr_count == CW'(DEPTH), "wr_count at full");
    // a write while full is ignored
    @(negedge wclk) begin wr_en = 1; wr_data = 16'hDEAD; end
    @(negedge wclk) wr_en = 0;
    check(accepted == int'(DEPTH), "write while full ignored");
    repeat (4) @(posedge rclk);
    check(rd_count == CW'(DEPTH), "rd_count at full");
    // phase 2: drain
    while (!rd_empty) begin
      @(negedge rclk) rd_en = 1;
      @(posedge rclk);
    end
    @(negedge rclk) rd_en = 0;
    check(ref_q.size() == 0, "drained completely");
    repeat (4) @(posedge wclk);
    check(wr_count == 0, "wr_count back to zero");
    // phase 3: random streaming
    fork
      begin
        for (int n = 0; n < 6000; n++) begin
          @(negedge wclk);
          wr_en = ($urandom_range(0, 7) < ((n / 1000) % 2 ? 7 : 1));
          wr_data = WIDTH'($urandom);
        end
        @(negedge wclk) wr_en = 0;
      end
      begin
        for (int n = 0; n < 1600; n++) begin
          @(negedge rclk);
          rd_en = ($urandom_range(0, 3) != 0);
        end
        while (!rd_empty) begin
          @(negedge rclk) rd_en = 1;
          @(posedge rclk);
        end
        @(negedge rclk) rd_en = 0;
      end
    join
    repeat (4) @(posedge rclk);
    while (!rd_empty) begin
      @(negedge rclk) rd_en = 1;
      @(posedge rclk);
    end
    @(negedge rclk) rd_en = 0;
    check(ref_q.size() == 0, $sformatf("all words delivered (%0d left)", ref_q.size()));
    $display("words written %0d", accepted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge rclk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
