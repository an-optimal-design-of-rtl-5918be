// burst_mover: memory-side scheduler that moves whole bursts between the
// single-port frame memory and the FIFOs (the data-moving part of the memory
// controller).
//
// For one pass over a frame, each enabled read stream i (0..5) copies the
// FRAME_PIX words of memory region rd_region[i] into read FIFO i, and each
// enabled write stream j (0..1) copies FRAME_PIX words from write FIFO j into
// region wr_region[j]. A word's address is region*FRAME_PIX + offset.
// Streams are served round-robin, one burst of up to BURST words at a time:
// a read stream is eligible when its FIFO has room for the whole burst, a write
// stream when its FIFO holds the whole burst (or the rest of the frame).
// Read commands are issued back to back; the stream of every read still in
// flight is kept in a small tag queue (up to MAX_OUT reads), so the next burst
// can start while earlier data is still returning, and a read stream's fill
// level counts its words in flight. When every stream has moved its frame and
// no read is outstanding, done pulses for one cycle.
//
// Memory port: a command (mem_valid, mem_we, mem_addr, mem_wdata) is taken on a
// cycle with mem_ready high; read data returns in command order on mem_rvalid,
// any number of cycles later. The burst length and the round-robin order follow
// the design (256-word bursts into FIFOs of two bursts); the command protocol
// of an actual SDRAM (activate, precharge, refresh) is not modelled here and
// belongs to a device-specific memory interface placed behind this port.
module burst_mover
  import tracking_pkg::*;
#(
  parameter int unsigned WORD_W    = 16,
  parameter int unsigned FRAME_PIX = 640 * 480,
  parameter int unsigned BURST     = 256,
  parameter int unsigned DEPTH     = 512,
  parameter int unsigned ADDR_W    = $clog2(NUM_REGIONS * FRAME_PIX),
  parameter int unsigned MAX_OUT   = 8            // reads in flight (power of two)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // pass control
  input  logic                              start,
  input  logic [NUM_RD-1:0]                 rd_en,
  input  logic [NUM_RD-1:0][3:0]            rd_region,
  input  logic [NUM_WR-1:0]                 wr_en,
  input  logic [NUM_WR-1:0][3:0]            wr_region,
  output logic                              done,
  // read FIFOs, write side
  input  logic [NUM_RD-1:0][$clog2(DEPTH):0] rf_count,
  output logic [NUM_RD-1:0]                 rf_push,
  output logic [WORD_W-1:0]                 rf_data,
  // write FIFOs, read side
  input  logic [NUM_WR-1:0][$clog2(DEPTH):0] wf_count,
  input  logic [NUM_WR-1:0][WORD_W-1:0]     wf_data,
  output logic [NUM_WR-1:0]                 wf_pop,
  // memory port
  output logic                              mem_valid,
  input  logic                              mem_ready,
  output logic                              mem_we,
  output logic [ADDR_W-1:0]                 mem_addr,
  output logic [WORD_W-1:0]                 mem_wdata,
  input  logic                              mem_rvalid,
  input  logic [WORD_W-1:0]                 mem_rdata
);
  localparam int unsigned NS  = NUM_RD + NUM_WR;   // streams, writes after reads
  localparam int unsigned PW  = $clog2(FRAME_PIX + 1);
  localparam int unsigned BW  = $clog2(BURST + 1);
  localparam int unsigned SW  = $clog2(NS);
  localparam int unsigned CW  = $clog2(DEPTH) + 1;

  typedef enum logic [1:0] {ST_IDLE, ST_SCHED, ST_BURST} state_e;
  state_e state;

  logic [NS-1:0][PW-1:0]   remain;   // words still to move per stream
  logic [NS-1:0][PW-1:0]   offset;   // next word offset per stream
  logic [NS-1:0][3:0]      region;
  logic [SW-1:0]           rr;       // round-robin start
  logic [SW-1:0]           cur;      // stream of the burst in progress
  logic [BW-1:0]           blen;     // its length
  logic [BW-1:0]           issued;   // commands accepted
  // tag queue: stream of every read in flight, oldest at tq_rd
  localparam int unsigned TW = $clog2(MAX_OUT);
  logic [SW-1:0]           tq [MAX_OUT];
  logic [TW:0]             tq_wr, tq_rd;
  logic [TW:0]             outstanding;
  logic [NUM_RD-1:0][CW-1:0] inflight;  // reads in flight per read stream
  logic                    rd_issue, rd_ret;
  logic [SW-1:0]           ret_s;

  // choose the next eligible stream
  logic [NS-1:0]           elig;
  logic                    any_elig;
  logic [SW-1:0]           pick;
  logic [NS-1:0][BW-1:0]   len;
  logic                    all_done;
  logic [NS-1:0][CW-1:0]   level;    // fill of a read FIFO, room of a write FIFO
  logic [CW-1:0]           best;

  always_comb begin
    all_done = 1'b1;
    for (int s = 0; s < int'(NS); s++) begin
      len[s] = (remain[s] > PW'(BURST)) ? BW'(BURST) : BW'(remain[s]);
      if (remain[s] != '0) all_done = 1'b0;
      if (s < int'(NUM_RD))
        elig[s] = (remain[s] != '0) && (CW'(DEPTH) - rf_count[s] - inflight[s] >= CW'(len[s]));
      else
        elig[s] = (remain[s] != '0) && (wf_count[s-NUM_RD] >= CW'(len[s]));
    end
    // most urgent first: the read FIFO closest to empty or the write FIFO
    // closest to full; ties go to the stream after the last one served
    any_elig  = 1'b0;
    pick      = '0;
    best      = '1;
    for (int k = 0; k < int'(NS); k++) begin
      if (((int'(rr) + k) % int'(NS)) < int'(NUM_RD))
        level[k] = rf_count[(int'(rr) + k) % int'(NS)] + inflight[(int'(rr) + k) % int'(NS)];
      else
        level[k] = CW'(DEPTH) - wf_count[(int'(rr) + k) % int'(NS) - int'(NUM_RD)];
      if (elig[(int'(rr) + k) % int'(NS)] && (!any_elig || level[k] < best)) begin
        any_elig = 1'b1;
        best     = level[k];
        pick     = SW'((int'(rr) + k) % int'(NS));
      end
    end
  end

  localparam int unsigned WSW = (NUM_WR > 1) ? $clog2(NUM_WR) : 1;
  logic           is_wr;
  logic [WSW-1:0] wsel;     // write FIFO of the current burst
  assign is_wr = cur >= SW'(NUM_RD);
  assign wsel  = WSW'(cur - SW'(NUM_RD));

  assign outstanding = tq_wr - tq_rd;
  assign rd_issue    = mem_valid && mem_ready && !is_wr;
  assign rd_ret      = mem_rvalid;
  assign ret_s       = tq[tq_rd[TW-1:0]];

  always_comb begin
    mem_valid = (state == ST_BURST) && (issued != blen) &&
                (is_wr || outstanding != (TW+1)'(MAX_OUT));
    mem_we    = is_wr;
    mem_addr  = ADDR_W'(region[cur]) * ADDR_W'(FRAME_PIX) + ADDR_W'(offset[cur]);
    mem_wdata = is_wr ? wf_data[wsel] : '0;
    wf_pop    = '0;
    if (mem_valid && mem_ready && is_wr) wf_pop[wsel] = 1'b1;
    rf_push   = '0;
    if (rd_ret) rf_push[ret_s] = 1'b1;
    rf_data   = mem_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      remain   <= '0;
      offset   <= '0;
      region   <= '0;
      rr       <= '0;
      cur      <= '0;
      blen     <= '0;
      issued   <= '0;
      done     <= 1'b0;
      tq_wr    <= '0;
      tq_rd    <= '0;
      inflight <= '0;
    end else begin
      done <= 1'b0;
      if (rd_issue) begin
        tq[tq_wr[TW-1:0]] <= cur;
        tq_wr <= tq_wr + 1'b1;
      end
      if (rd_ret) tq_rd <= tq_rd + 1'b1;
      for (int i = 0; i < int'(NUM_RD); i++)
        inflight[i] <= inflight[i] + CW'(rd_issue && cur == SW'(i)) - CW'(rd_ret && ret_s == SW'(i));
      unique case (state)
        ST_IDLE: if (start) begin
          for (int s = 0; s < int'(NS); s++) begin
            offset[s] <= '0;
            if (s < int'(NUM_RD)) begin
              remain[s] <= rd_en[s] ? PW'(FRAME_PIX) : '0;
              region[s] <= rd_region[s];
            end else begin
              remain[s] <= wr_en[s-NUM_RD] ? PW'(FRAME_PIX) : '0;
              region[s] <= wr_region[s-NUM_RD];
            end
          end
          state <= ST_SCHED;
        end
        ST_SCHED: begin
          if (all_done && outstanding == '0) begin
            done  <= 1'b1;
            state <= ST_IDLE;
          end else if (any_elig) begin
            cur      <= pick;
            blen     <= len[pick];
            issued   <= '0;
            rr       <= (pick == SW'(NS - 1)) ? '0 : pick + 1'b1;
            state    <= ST_BURST;
          end
        end
        ST_BURST: begin
          if (mem_valid && mem_ready) begin
            issued      <= issued + 1'b1;
            offset[cur] <= offset[cur] + 1'b1;
            remain[cur] <= remain[cur] - 1'b1;
            if (issued == blen - 1'b1) state <= ST_SCHED;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // read data only ever answers a read in flight
  assert property (@(posedge clk) disable iff (!rst_n) !(mem_rvalid && outstanding == '0))
    else $error("burst_mover: read data with no read outstanding");

endmodule
