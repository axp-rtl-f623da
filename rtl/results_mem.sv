// results_mem: the results memory (SRAM) of the associative memory.
//
// It holds one pre-computed product per pair of stored patterns, N_w x N_in
// words of Abit bits each; a word keeps the Abit most significant bits of the
// product. The array here stands for the SRAM bank of the document, which is a
// characterised memory macro; the write port through which the words are loaded
// before inference is this design's choice.
//
// Timing: synchronous write and synchronous read. When re is high, rdata shows
// word raddr after the clock edge; when re is low rdata holds, so a cycle without
// a hit costs no read.
module results_mem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
