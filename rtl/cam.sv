// cam: binary content-addressable memory with approximate (MSB-only) matching.
//
// The processing element uses two of these: the inputs CAM, holding the most
// frequent input and activation patterns of a layer, and the weights CAM, holding
// the weight cluster centroids. Each row stores a KEY_W-bit key: the most
// significant bits of a floating-point pattern. A search compares the search key
// with every valid row in parallel, but only on the abit most significant key
// bits; the lower bits are ignored, so nearby values share a row (approximate
// matching). hit tells whether any row matched and hit_addr gives the lowest
// matching row. The document gives the function and the MSB-only matching rule;
// the lowest-index priority on multiple matches, the valid bits and the clear
// input are this design's choices.
//
// Timing: the search is combinational (the processing element registers hit and
// hit_addr at the end of its first stage). A write stores wr_key in row wr_addr
// and marks it valid at the clock edge; clear invalidates every row at the edge.
module cam #(
  parameter int unsigned ROWS   = 64,
  parameter int unsigned KEY_W  = 16,
  localparam int unsigned AW    = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned ABW   = $clog2(KEY_W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [KEY_W-1:0] wr_key,
  input  logic [KEY_W-1:0] search_key,
  input  logic [ABW-1:0]   abit,       // number of key MSBs compared, 1..KEY_W
  output logic             hit,
  output logic [AW-1:0]    hit_addr
);

  logic [KEY_W-1:0] key_q [ROWS];
  logic [ROWS-1:0]  valid_q;
  logic [KEY_W-1:0] mask;
  logic [ROWS-1:0]  match;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else if (clear) begin
      valid_q <= '0;
    end else if (wr_en) begin
      valid_q[wr_addr] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) key_q[wr_addr] <= wr_key;
  end

  always_comb begin
    // ones on the abit most significant positions
    mask = ~({KEY_W{1'b1}} >> abit);
    for (int r = 0; r < ROWS; r++)
      match[r] = valid_q[r] && (((key_q[r] ^ search_key) & mask) == '0);
    hit      = |match;
    hit_addr = '0;
    for (int r = ROWS - 1; r >= 0; r--)
      if (match[r]) hit_addr = AW'(r);
  end

  a_wr_addr: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> (int'(wr_addr) < ROWS))
    else $error("cam: write address %0d beyond %0d rows", wr_addr, ROWS);

endmodule
