// cdc_pulse: carries a single-cycle pulse from one clock domain to another.
//
// The source pulse flips a toggle flop; the toggle passes a two-flop
// synchroniser in the destination domain and a change of its value becomes a
// one-cycle pulse there, two to three destination cycles later. Pulses must be
// spaced further apart than that latency (the core sends one per pass).
module cdc_pulse (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_pulse
);
  logic tgl;
  logic [2:0] sync;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n)     tgl <= 1'b0;
    else if (src_pulse) tgl <= ~tgl;
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) sync <= '0;
    else            sync <= {sync[1:0], tgl};
  end

  assign dst_pulse = sync[2] ^ sync[1];

endmodule
