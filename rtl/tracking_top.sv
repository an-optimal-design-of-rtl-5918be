// tracking_top: moving-object tracking core (Adaptive Hybrid Difference).
//
// Camera frames are stored in an external single-port frame memory; the
// threshold is learnt once from N_ACC frame differences and every following
// camera frame is turned into a binary image of moving pixels.
//
// Structure:
//   memory domain (mem_clk, 125 MHz in the design)
//     burst_mover  - moves 256-word bursts between the memory port and FIFOs
//   six read FIFOs  (async_fifo, memory -> unit), two write FIFOs (unit -> memory)
//   unit domain (unit_clk, 20 MHz in the design)
//     track_ctrl          - chooses and sequences the passes
//     td_unit             - threshold definer, two differences per pixel
//     threshold_finalizer - sums -> [mu-sigma, mu+sigma]
//     bib_unit            - binary image builder, two differences per pixel
// Only one unit works in a pass. In the unit domain a beat is taken when every
// read FIFO the pass uses holds a word, the write FIFOs have room for what is
// still in the pipeline, and the frame is not yet complete; the FIFOs' word
// of each stream then feeds the active unit and its result goes to the write
// FIFOs. The memory side learns of a new pass, and the controller of its end,
// through cdc_pulse; the configuration is held stable in between.
//
// Memory word: WORD_W bits; frames use the low PIX_W bits, the lookup tables
// the full word, the binary image bit 0. Memory map: region r (0..8) at word
// r*FRAME_PIX: slots 0-5 for frames, 6 and 7 for the two lookup tables, 8 for
// the binary image. The camera port delivers pixels in raster order whenever
// cam_ready is high; the finished binary image of each tracked frame leaves
// on bin_valid/bin_pixel in raster order during the last BIB pass.
module tracking_top
  import tracking_pkg::*;
#(
  parameter int unsigned PIX_W      = 16,        // pixel width
  parameter int unsigned FRAME_W    = 640,       // frame width
  parameter int unsigned FRAME_H    = 480,       // frame height
  parameter int unsigned N_ACC      = 30,        // frames used for the threshold
  parameter int unsigned K_TD       = 2,         // frame distance k for the threshold
  parameter int unsigned S_MAX      = 5,         // earlier frames compared while tracking
  parameter int unsigned BURST      = 256,       // memory burst length
  parameter int unsigned FIFO_DEPTH = 512,       // FIFO depth (two bursts)
  // derived
  parameter int unsigned FRAME_PIX  = FRAME_W * FRAME_H,
  parameter int unsigned SUM_W      = PIX_W + $clog2(N_ACC + 1),
  parameter int unsigned SQ_W       = 2 * PIX_W + $clog2(N_ACC + 1),
  parameter int unsigned THR_W      = PIX_W + 1,
  parameter int unsigned WORD_W     = SQ_W,
  parameter int unsigned ADDR_W     = $clog2(NUM_REGIONS * FRAME_PIX)
) (
  input  logic              mem_clk,
  input  logic              mem_rst_n,
  input  logic              unit_clk,
  input  logic              unit_rst_n,
  // control and status (unit domain)
  input  logic              start,
  output logic              thr_ready,
  output logic              frame_done,
  // camera pixels (unit domain)
  input  logic              cam_valid,
  input  logic [PIX_W-1:0]  cam_pixel,
  output logic              cam_ready,
  // binary image (unit domain)
  output logic              bin_valid,
  output logic              bin_pixel,
  // frame memory port (memory domain)
  output logic              mem_valid,
  input  logic              mem_ready,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [WORD_W-1:0] mem_wdata,
  input  logic              mem_rvalid,
  input  logic [WORD_W-1:0] mem_rdata
);
  localparam int unsigned CW  = $clog2(FIFO_DEPTH) + 1;
  localparam int unsigned PW  = $clog2(FRAME_PIX + 1);
  localparam int unsigned LAT = 5;   // deepest unit pipeline (TD, BIB)

  // ---------------------------------------------------------------- control
  pass_cfg_t cfg;
  logic      pass_start_u, pass_done_u, pass_start_m, pass_done_m;

  track_ctrl #(.N_ACC(N_ACC), .K_TD(K_TD), .S_MAX(S_MAX)) u_ctrl (
    .clk(unit_clk), .rst_n(unit_rst_n), .start(start),
    .pass_done(pass_done_u), .pass_start(pass_start_u), .cfg(cfg),
    .thr_ready(thr_ready), .frame_done(frame_done)
  );

  cdc_pulse u_start_sync (
    .src_clk(unit_clk), .src_rst_n(unit_rst_n), .src_pulse(pass_start_u),
    .dst_clk(mem_clk), .dst_rst_n(mem_rst_n), .dst_pulse(pass_start_m)
  );
  cdc_pulse u_done_sync (
    .src_clk(mem_clk), .src_rst_n(mem_rst_n), .src_pulse(pass_done_m),
    .dst_clk(unit_clk), .dst_rst_n(unit_rst_n), .dst_pulse(pass_done_u)
  );

  // ---------------------------------------------------------------- FIFOs
  logic [NUM_RD-1:0][CW-1:0]     rf_wcount, rf_rcount;
  logic [NUM_RD-1:0]             rf_push, rf_full, rf_pop, rf_empty;
  logic [WORD_W-1:0]             rf_wdata;
  logic [NUM_RD-1:0][WORD_W-1:0] rf_q;

  logic [NUM_WR-1:0][CW-1:0]     wf_wcount, wf_rcount;
  logic [NUM_WR-1:0]             wf_push, wf_full, wf_pop, wf_empty;
  logic [NUM_WR-1:0][WORD_W-1:0] wf_d, wf_q;

  for (genvar i = 0; i < int'(NUM_RD); i++) begin : g_rd_fifo
    async_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .wr_clk(mem_clk), .wr_rst_n(mem_rst_n), .wr_en(rf_push[i]), .wr_data(rf_wdata),
      .wr_full(rf_full[i]), .wr_count(rf_wcount[i]),
      .rd_clk(unit_clk), .rd_rst_n(unit_rst_n), .rd_en(rf_pop[i]), .rd_data(rf_q[i]),
      .rd_empty(rf_empty[i]), .rd_count(rf_rcount[i])
    );
  end
  for (genvar j = 0; j < int'(NUM_WR); j++) begin : g_wr_fifo
    async_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .wr_clk(unit_clk), .wr_rst_n(unit_rst_n), .wr_en(wf_push[j]), .wr_data(wf_d[j]),
      .wr_full(wf_full[j]), .wr_count(wf_wcount[j]),
      .rd_clk(mem_clk), .rd_rst_n(mem_rst_n), .rd_en(wf_pop[j]), .rd_data(wf_q[j]),
      .rd_empty(wf_empty[j]), .rd_count(wf_rcount[j])
    );
  end

  // ---------------------------------------------------------------- memory side
  burst_mover #(
    .WORD_W(WORD_W), .FRAME_PIX(FRAME_PIX), .BURST(BURST), .DEPTH(FIFO_DEPTH), .ADDR_W(ADDR_W)
  ) u_mover (
    .clk(mem_clk), .rst_n(mem_rst_n),
    .start(pass_start_m), .rd_en(cfg.rd_en), .rd_region(cfg.rd_region),
    .wr_en(cfg.wr_en), .wr_region(cfg.wr_region), .done(pass_done_m),
    .rf_count(rf_wcount), .rf_push(rf_push), .rf_data(rf_wdata),
    .wf_count(wf_rcount), .wf_data(wf_q), .wf_pop(wf_pop),
    .mem_valid(mem_valid), .mem_ready(mem_ready), .mem_we(mem_we), .mem_addr(mem_addr),
    .mem_wdata(mem_wdata), .mem_rvalid(mem_rvalid), .mem_rdata(mem_rdata)
  );

  // ---------------------------------------------------------------- unit side
  logic          active;      // a pass is being fed
  logic [PW-1:0] fed;         // beats taken in this pass
  logic          inputs_ok, room_ok, fire;

  always_comb begin
    inputs_ok = 1'b1;
    for (int i = 0; i < int'(NUM_RD); i++)
      if (cfg.rd_en[i] && rf_empty[i]) inputs_ok = 1'b0;
    if (cfg.mode == MODE_INGEST) inputs_ok = cam_valid;
    room_ok = 1'b1;
    for (int j = 0; j < int'(NUM_WR); j++)
      if (cfg.wr_en[j] && (wf_wcount[j] > CW'(FIFO_DEPTH - LAT - 2))) room_ok = 1'b0;
  end

  assign fire      = active && (fed != PW'(FRAME_PIX)) && inputs_ok && room_ok;
  assign rf_pop    = fire ? cfg.rd_en : '0;
  assign cam_ready = active && (cfg.mode == MODE_INGEST) && (fed != PW'(FRAME_PIX)) && room_ok;

  always_ff @(posedge unit_clk or negedge unit_rst_n) begin
    if (!unit_rst_n) begin
      active <= 1'b0;
      fed    <= '0;
    end else if (pass_start_u) begin
      active <= 1'b1;
      fed    <= '0;
    end else begin
      if (fire) fed <= fed + 1'b1;
      if (pass_done_u) active <= 1'b0;
    end
  end

  // stream words as seen by the units (LUT / binary image start from zero on
  // a pass flagged first, whose streams are not read)
  logic [SUM_W-1:0] lut1_in;
  logic [SQ_W-1:0]  lut2_in;
  logic             bin_prev;
  assign lut1_in  = cfg.rd_en[4] ? rf_q[4][SUM_W-1:0] : '0;
  assign lut2_in  = cfg.rd_en[5] ? rf_q[5][SQ_W-1:0]  : '0;
  assign bin_prev = cfg.rd_en[3] ? rf_q[3][0]         : 1'b0;

  logic             td_v;
  logic [SUM_W-1:0] td_s1;
  logic [SQ_W-1:0]  td_s2;
  td_unit #(.PIX_W(PIX_W), .N_ACC(N_ACC), .SUM_W(SUM_W), .SQ_W(SQ_W)) u_td (
    .clk(unit_clk), .rst_n(unit_rst_n), .in_valid(fire && cfg.mode == MODE_TD),
    .frame_t(rf_q[0][PIX_W-1:0]), .frame_tk(rf_q[1][PIX_W-1:0]),
    .frame_t1(rf_q[2][PIX_W-1:0]), .frame_t1k(rf_q[3][PIX_W-1:0]),
    .sum_dt_old(lut1_in), .sum_dt2_old(lut2_in),
    .out_valid(td_v), .sum_dt(td_s1), .sum_dt2(td_s2)
  );

  logic             fin_v;
  logic [THR_W-1:0] fin_hi, fin_lo;
  threshold_finalizer #(.PIX_W(PIX_W), .N_ACC(N_ACC), .SUM_W(SUM_W), .SQ_W(SQ_W), .THR_W(THR_W)) u_fin (
    .clk(unit_clk), .rst_n(unit_rst_n), .in_valid(fire && cfg.mode == MODE_FIN),
    .sum_dt(lut1_in), .sum_dt2(lut2_in),
    .out_valid(fin_v), .thr_hi(fin_hi), .thr_lo(fin_lo)
  );

  logic bib_v, bib_b;
  bib_unit #(.PIX_W(PIX_W), .THR_W(THR_W)) u_bib (
    .clk(unit_clk), .rst_n(unit_rst_n), .in_valid(fire && cfg.mode == MODE_BIB),
    .frame_t(rf_q[0][PIX_W-1:0]), .frame_ts(rf_q[1][PIX_W-1:0]), .frame_ts1(rf_q[2][PIX_W-1:0]),
    .thr_hi(rf_q[4][THR_W-1:0]), .thr_lo(rf_q[5][THR_W-1:0]), .bin_in(bin_prev),
    .out_valid(bib_v), .bin_out(bib_b)
  );

  // results to the write FIFOs
  always_comb begin
    wf_push = '0;
    wf_d    = '0;
    unique case (cfg.mode)
      MODE_INGEST: begin
        wf_push[0] = cam_valid && cam_ready;
        wf_d[0]    = WORD_W'(cam_pixel);
      end
      MODE_TD: begin
        wf_push = {td_v, td_v};
        wf_d[0] = WORD_W'(td_s1);
        wf_d[1] = WORD_W'(td_s2);
      end
      MODE_FIN: begin
        wf_push = {fin_v, fin_v};
        wf_d[0] = WORD_W'(fin_hi);
        wf_d[1] = WORD_W'(fin_lo);
      end
      MODE_BIB: begin
        wf_push[0] = bib_v;
        wf_d[0]    = WORD_W'(bib_b);
      end
      default: ;
    endcase
  end

  assign bin_valid = bib_v && cfg.last && cfg.mode == MODE_BIB;
  assign bin_pixel = bib_b;

  // a pass starts with empty read FIFOs and ends with empty write FIFOs
  assert property (@(posedge unit_clk) disable iff (!unit_rst_n) pass_start_u |-> rf_rcount == '0)
    else $error("tracking_top: read FIFOs not empty at pass start");
  assert property (@(posedge mem_clk) disable iff (!mem_rst_n) pass_done_m |-> &wf_empty)
    else $error("tracking_top: write FIFOs not empty at pass end");

  // the write FIFOs are never pushed when full, the read FIFOs never overrun
  for (genvar j = 0; j < int'(NUM_WR); j++) begin : g_wr_chk
    assert property (@(posedge unit_clk) disable iff (!unit_rst_n) !(wf_push[j] && wf_full[j]))
      else $error("tracking_top: write FIFO %0d overflow", j);
  end
  for (genvar i = 0; i < int'(NUM_RD); i++) begin : g_rd_chk
    assert property (@(posedge mem_clk) disable iff (!mem_rst_n) !(rf_push[i] && rf_full[i]))
      else $error("tracking_top: read FIFO %0d overflow", i);
  end

endmodule
