// assoc_mem: the associative memory of the processing element: inputs CAM,
// weights CAM, address decoder and results memory.
//
// Stage 1: the top ABIT bits of the activation and of the weight (act_key,
// wgt_key; ABIT is half the operand width) are searched in
// the two CAMs in parallel, each compared on its cfg_abit most significant bits.
// A hit needs both CAMs to match. The hit flag and the results-memory address are
// registered. The address decoder joins the two row numbers as
// in_row * N_W + w_row, which for power-of-two sizes is the concatenation
// {in_row, w_row} of the document's example (input row 00 with weight row 01 gives
// word 0001). Stage 2: on a registered hit the results memory is read; rdata then
// holds the stored ABIT-bit product.
//
// The CAMs and the results memory are filled through one load port: ld_target
// selects the array, ld_addr the row or word, ld_data the ABIT-bit pattern or
// product. clear invalidates both CAMs. The two-CAM organisation, the
// row-pair addressing and the word size follow the document; the load port, the
// clear and the decoder formula for sizes that are not powers of two are this
// design's choices.
//
// Timing: hit_now is the combinational stage-1 match, used to isolate the
// multiplier's operands. Operands sampled at edge t give s1_hit and s1_addr after
// that edge, and rdata after edge t+1 when s1_hit was set.
module assoc_mem
  import axp_pkg::*;
#(
  parameter int unsigned ABIT = 16,      // CAM and results-memory word size (W/2)
  parameter int unsigned N_W  = 64,      // weights CAM rows
  parameter int unsigned N_IN = 16,      // inputs CAM rows
  localparam int unsigned N_M   = N_W * N_IN,
  localparam int unsigned WAW   = (N_W  > 1) ? $clog2(N_W)  : 1,
  localparam int unsigned IAW   = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int unsigned MAW   = (N_M  > 1) ? $clog2(N_M)  : 1,
  localparam int unsigned ABW   = $clog2(ABIT + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration and load port
  input  logic [ABW-1:0]  cfg_abit,     // matched MSBs, 1..ABIT
  input  logic            clear,
  input  logic            ld_en,
  input  ld_target_e      ld_target,
  input  logic [MAW-1:0]  ld_addr,
  input  logic [ABIT-1:0] ld_data,
  // search (stage 1)
  input  logic            search,
  input  logic [ABIT-1:0] act_key,      // top ABIT bits of the activation
  input  logic [ABIT-1:0] wgt_key,      // top ABIT bits of the weight
  output logic            hit_now,      // combinational: both CAMs match now
  output logic            s1_hit,       // registered: both CAMs matched
  output logic [MAW-1:0]  s1_addr,      // registered results-memory address
  // read (stage 2)
  output logic [ABIT-1:0] rdata
);

  logic           in_hit, w_hit;
  logic [IAW-1:0] in_row;
  logic [WAW-1:0] w_row;
  logic [MAW-1:0] addr;

  cam #(.ROWS(N_IN), .KEY_W(ABIT)) u_inputs_cam (
    .clk, .rst_n, .clear,
    .wr_en      (ld_en && ld_target == LD_INPUT_CAM),
    .wr_addr    (IAW'(ld_addr)),
    .wr_key     (ld_data),
    .search_key (act_key),
    .abit       (cfg_abit),
    .hit        (in_hit),
    .hit_addr   (in_row)
  );

  cam #(.ROWS(N_W), .KEY_W(ABIT)) u_weights_cam (
    .clk, .rst_n, .clear,
    .wr_en      (ld_en && ld_target == LD_WEIGHT_CAM),
    .wr_addr    (WAW'(ld_addr)),
    .wr_key     (ld_data),
    .search_key (wgt_key),
    .abit       (cfg_abit),
    .hit        (w_hit),
    .hit_addr   (w_row)
  );

  assign hit_now = search && in_hit && w_hit;

  // address decoder
  assign addr = MAW'(in_row) * MAW'(N_W) + MAW'(w_row);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_hit  <= 1'b0;
      s1_addr <= '0;
    end else begin
      s1_hit  <= hit_now;
      s1_addr <= addr;
    end
  end

  results_mem #(.DEPTH(N_M), .WIDTH(ABIT)) u_results (
    .clk,
    .we    (ld_en && ld_target == LD_RESULTS),
    .waddr (ld_addr),
    .wdata (ld_data),
    .re    (s1_hit),
    .raddr (s1_addr),
    .rdata
  );

  a_abit_range: assert property (@(posedge clk) disable iff (!rst_n)
    search |-> (cfg_abit >= 1 && int'(cfg_abit) <= ABIT))
    else $error("assoc_mem: cfg_abit %0d outside 1..%0d", cfg_abit, ABIT);

  a_ld_addr: assert property (@(posedge clk) disable iff (!rst_n)
    ld_en |-> (int'(ld_addr) < ((ld_target == LD_INPUT_CAM)  ? N_IN :
                                (ld_target == LD_WEIGHT_CAM) ? N_W  : N_M)))
    else $error("assoc_mem: load address %0d out of range", ld_addr);

endmodule
