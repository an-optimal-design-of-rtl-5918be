// frame_mem_model: behavioural model of the external single-port frame memory
// for simulation only (not synthesizable in intent: it holds the whole memory
// as an array and randomises its wait states).
// A command is accepted on a clock edge where mem_valid and mem_ready are both
// high; writes update the array at once, reads return mem_rdata on mem_rvalid
// READ_LAT cycles later, in order. When STALL_PCT is non-zero, mem_ready is
// low on about that percentage of cycles, standing in for refresh and row
// changes of a real SDRAM.
module frame_mem_model #(
  parameter int unsigned WORD_W    = 37,
  parameter int unsigned ADDR_W    = 22,
  parameter int unsigned WORDS     = 9 * 640 * 480,
  parameter int unsigned READ_LAT  = 3,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic              clk,
  input  logic              mem_valid,
  output logic              mem_ready,
  input  logic              mem_we,
  input  logic [ADDR_W-1:0] mem_addr,
  input  logic [WORD_W-1:0] mem_wdata,
  output logic              mem_rvalid,
  output logic [WORD_W-1:0] mem_rdata
);
  logic [WORD_W-1:0] mem [WORDS];
  logic [READ_LAT-1:0]             rv_pipe = '0;
  logic [READ_LAT-1:0][WORD_W-1:0] rd_pipe = '0;
  int unsigned stalls = 0;

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
    mem_ready = 1'b1;
  end

  always @(posedge clk) begin
    logic take;
    take = mem_valid && mem_ready;
    rv_pipe <= {rv_pipe[READ_LAT-2:0], take && !mem_we};
    rd_pipe <= {rd_pipe[READ_LAT-2:0], (take && !mem_we) ? mem[mem_addr] : WORD_W'(0)};
    if (take && mem_we) mem[mem_addr] <= mem_wdata;
    mem_ready <= (STALL_PCT == 0) || ($urandom_range(0, 99) >= STALL_PCT);
    if (!mem_ready) stalls++;
  end

  assign mem_rvalid = rv_pipe[READ_LAT-1];
  assign mem_rdata  = rd_pipe[READ_LAT-1];

  always @(posedge clk)
    if (mem_valid && mem_ready && int'(mem_addr) >= int'(WORDS))
      $error("frame_mem_model: address %0d out of range", mem_addr);
endmodule
