// track_ctrl: finite state machine that sequences the passes of the tracking
// core in the unit clock domain.
//
// Work is a series of passes, each moving one frame's worth of pixels through
// one unit. The controller chooses the pass, presents its configuration on cfg
// together with a one-cycle pass_start, holds cfg stable and waits for
// pass_done before choosing the next. The order is:
//   1. Threshold definition: for p = 0 .. N_ACC/2-1, with t = K_TD + 2p, make
//      sure camera frames up to t+1 have been stored (one INGEST pass per frame,
//      frame f into slot f mod 6), then a TD pass over frames t, t-k, t+1,
//      t+1-k. The first TD pass starts the sums from zero (its
//      lookup-table streams are not read).
//   2. One FIN pass turning the two sums into mu+sigma and mu-sigma.
//   3. Tracking, repeated forever: store the next camera frame t, then
//      BIB_PASSES = ceil(S_MAX/2) BIB passes; pass q compares frame t with
//      frames t-s and t-s-1 (s = 2q+1, the second clamped to t-S_MAX). The
//      first pass starts from an empty binary image (its stream is not read), the last one (last = 1)
//      publishes it. thr_ready rises when tracking starts; frame_done pulses
//      after the last pass of every tracked frame.
// start is sampled in the idle state only.
module track_ctrl
  import tracking_pkg::*;
#(
  parameter int unsigned N_ACC = 30,   // differences accumulated (N)
  parameter int unsigned K_TD  = 2,    // frame distance k of the threshold
  parameter int unsigned S_MAX = 5     // earlier frames compared while tracking
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      pass_done,
  output logic      pass_start,
  output pass_cfg_t cfg,
  output logic      thr_ready,
  output logic      frame_done
);
  localparam int unsigned TD_PASSES  = N_ACC / 2;
  localparam int unsigned BIB_PASSES = (S_MAX + 1) / 2;
  localparam int unsigned FW = $clog2(K_TD + N_ACC + 4);

  typedef enum logic [1:0] {PH_IDLE, PH_TD, PH_FIN, PH_TRACK} phase_e;
  phase_e phase;
  logic   waiting;               // a pass is running

  logic [FW-1:0] cam_cnt;        // frames stored so far (threshold phase)
  logic [2:0]    cam_slot;       // slot of the next camera frame
  logic [FW-1:0] td_p;           // TD pass index
  logic [$clog2(BIB_PASSES+1)-1:0] bib_q;
  logic [2:0]    t_slot;         // slot of the frame being tracked
  logic          need_ingest;

  function automatic logic [3:0] slot_back(input logic [2:0] s, input int unsigned d);
    return 4'((int'(s) + FRAME_SLOTS - d) % FRAME_SLOTS);
  endfunction

  function automatic logic [3:0] slot_of(input int unsigned f);
    return 4'(f % FRAME_SLOTS);
  endfunction

  // configuration of the pass the controller would start now
  pass_cfg_t nxt;
  logic      nxt_first;
  int unsigned td_t, s_a, s_b;

  always_comb begin
    nxt        = '0;
    nxt_first  = 1'b0;
    td_t       = K_TD + 2 * int'(td_p);
    s_a        = 2 * int'(bib_q) + 1;
    s_b        = (s_a + 1 > S_MAX) ? S_MAX : s_a + 1;
    unique case (phase)
      PH_TD: begin
        if (int'(cam_cnt) <= td_t + 1) begin
          nxt.mode        = MODE_INGEST;
          nxt.wr_en       = 2'b01;
          nxt.wr_region[0] = {1'b0, cam_slot};
        end else begin
          nxt.mode         = MODE_TD;
          nxt_first        = (td_p == '0);
          nxt.rd_en        = nxt_first ? 6'b00_1111 : 6'b11_1111;
          nxt.rd_region[0] = slot_of(td_t);
          nxt.rd_region[1] = slot_of(td_t - K_TD);
          nxt.rd_region[2] = slot_of(td_t + 1);
          nxt.rd_region[3] = slot_of(td_t + 1 - K_TD);
          nxt.rd_region[4] = 4'(REG_LUT1);
          nxt.rd_region[5] = 4'(REG_LUT2);
          nxt.wr_en        = 2'b11;
          nxt.wr_region[0] = 4'(REG_LUT1);
          nxt.wr_region[1] = 4'(REG_LUT2);
        end
      end
      PH_FIN: begin
        nxt.mode         = MODE_FIN;
        nxt.rd_en        = 6'b11_0000;
        nxt.rd_region[4] = 4'(REG_LUT1);
        nxt.rd_region[5] = 4'(REG_LUT2);
        nxt.wr_en        = 2'b11;
        nxt.wr_region[0] = 4'(REG_LUT1);
        nxt.wr_region[1] = 4'(REG_LUT2);
      end
      PH_TRACK: begin
        if (need_ingest) begin
          nxt.mode         = MODE_INGEST;
          nxt.wr_en        = 2'b01;
          nxt.wr_region[0] = {1'b0, cam_slot};
        end else begin
          nxt.mode         = MODE_BIB;
          nxt_first        = (bib_q == '0);
          nxt.last         = (int'(bib_q) == BIB_PASSES - 1);
          nxt.rd_en        = nxt_first ? 6'b11_0111 : 6'b11_1111;
          nxt.rd_region[0] = {1'b0, t_slot};
          nxt.rd_region[1] = slot_back(t_slot, s_a);
          nxt.rd_region[2] = slot_back(t_slot, s_b);
          nxt.rd_region[3] = 4'(REG_BIN);
          nxt.rd_region[4] = 4'(REG_LUT1);
          nxt.rd_region[5] = 4'(REG_LUT2);
          nxt.wr_en        = 2'b01;
          nxt.wr_region[0] = 4'(REG_BIN);
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= PH_IDLE;
      waiting     <= 1'b0;
      cam_cnt     <= '0;
      cam_slot    <= '0;
      td_p        <= '0;
      bib_q       <= '0;
      t_slot      <= '0;
      need_ingest <= 1'b0;
      cfg         <= '0;
      pass_start  <= 1'b0;
      thr_ready   <= 1'b0;
      frame_done  <= 1'b0;
    end else begin
      pass_start <= 1'b0;
      frame_done <= 1'b0;
      if (phase == PH_IDLE) begin
        if (start) phase <= PH_TD;
      end else if (!waiting) begin
        cfg        <= nxt;
        pass_start <= 1'b1;
        waiting    <= 1'b1;
      end else if (pass_done) begin
        waiting <= 1'b0;
        // account for the pass that just ended
        if (cfg.mode == MODE_INGEST) begin
          cam_cnt  <= (phase == PH_TD) ? cam_cnt + 1'b1 : cam_cnt;
          cam_slot <= (cam_slot == 3'(FRAME_SLOTS - 1)) ? '0 : cam_slot + 1'b1;
          if (phase == PH_TRACK) begin
            t_slot      <= cam_slot;
            need_ingest <= 1'b0;
          end
        end else if (phase == PH_TD) begin
          td_p <= td_p + 1'b1;
          if (int'(td_p) == TD_PASSES - 1) phase <= PH_FIN;
        end else if (phase == PH_FIN) begin
          phase       <= PH_TRACK;
          thr_ready   <= 1'b1;
          need_ingest <= 1'b1;
          bib_q       <= '0;
        end else begin
          if (int'(bib_q) == BIB_PASSES - 1) begin
            bib_q       <= '0;
            need_ingest <= 1'b1;
            frame_done  <= 1'b1;
          end else begin
            bib_q <= bib_q + 1'b1;
          end
        end
      end
    end
  end

  // the six slots must hold every frame one pass needs
  initial begin
    assert (K_TD + 2 <= FRAME_SLOTS) else $error("track_ctrl: K_TD too large for six slots");
    assert (S_MAX + 1 <= FRAME_SLOTS) else $error("track_ctrl: S_MAX too large for six slots");
    assert (N_ACC % 2 == 0) else $error("track_ctrl: N_ACC must be even");
  end

endmodule
