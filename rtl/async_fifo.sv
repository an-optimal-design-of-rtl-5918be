// async_fifo: dual-clock FIFO used for every Rd_FIFO and Wr_FIFO of the core.
//
// It carries words between the memory clock domain and the processing-unit
// clock domain. The storage is a DEPTH-entry array (DEPTH a power of two; the
// design uses 512 words, room for two 256-word memory bursts). Read and write
// pointers are one bit wider than the address and cross domains as Gray code
// through two-flop synchronisers, the usual safe scheme for a dual-clock FIFO.
//
// Write side (wr_clk): wr_en pushes wr_data unless wr_full; wr_count is the
// fill level seen from the write side (it may overstate, never understate).
// Read side (rd_clk): first-word fall-through; rd_data shows the head word while
// !rd_empty and rd_en pops it; rd_count is the fill level seen from the read
// side (it may understate, never overstate). Each side has its own active-low
// asynchronous reset; both must be applied together.
module async_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 512
) (
  input  logic                   wr_clk,
  input  logic                   wr_rst_n,
  input  logic                   wr_en,
  input  logic [WIDTH-1:0]       wr_data,
  output logic                   wr_full,
  output logic [$clog2(DEPTH):0] wr_count,

  input  logic                   rd_clk,
  input  logic                   rd_rst_n,
  input  logic                   rd_en,
  output logic [WIDTH-1:0]       rd_data,
  output logic                   rd_empty,
  output logic [$clog2(DEPTH):0] rd_count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [AW:0] rd_gray_w1, rd_gray_w2;   // read pointer in write domain
  logic [AW:0] wr_gray_r1, wr_gray_r2;   // write pointer in read domain
  logic [AW:0] rd_bin_w, wr_bin_r;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic do_wr;
  assign do_wr = wr_en && !wr_full;

  always_ff @(posedge wr_clk) begin
    if (do_wr) mem[wr_bin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wr_bin     <= '0;
      wr_gray    <= '0;
      rd_gray_w1 <= '0;
      rd_gray_w2 <= '0;
    end else begin
      rd_gray_w1 <= rd_gray;
      rd_gray_w2 <= rd_gray_w1;
      if (do_wr) begin
        wr_bin  <= wr_bin + 1'b1;
        wr_gray <= bin2gray(wr_bin + 1'b1);
      end
    end
  end

  assign rd_bin_w = gray2bin(rd_gray_w2);
  assign wr_count = wr_bin - rd_bin_w;
  assign wr_full  = wr_count == (AW+1)'(DEPTH);

  // ---------------- read domain ----------------
  logic do_rd;
  assign do_rd = rd_en && !rd_empty;

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_r1 <= '0;
      wr_gray_r2 <= '0;
    end else begin
      wr_gray_r1 <= wr_gray;
      wr_gray_r2 <= wr_gray_r1;
      if (do_rd) begin
        rd_bin  <= rd_bin + 1'b1;
        rd_gray <= bin2gray(rd_bin + 1'b1);
      end
    end
  end

  assign wr_bin_r = gray2bin(wr_gray_r2);
  assign rd_count = wr_bin_r - rd_bin;
  assign rd_empty = rd_count == '0;
  assign rd_data  = mem[rd_bin[AW-1:0]];

endmodule
