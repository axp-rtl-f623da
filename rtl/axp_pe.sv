// axp_pe: hybrid floating-point processing element with an associative memory.
//
// A ConvNet whose weights have been clustered to a few centroids, and whose most
// frequent activations have been profiled, multiplies the same operand pairs over
// and over. This element keeps the products of those pairs in a small associative
// memory and computes a multiplication only when the pair is not there. It is a
// three-stage multiply-accumulate pipeline:
//
//   Stage 1  the activation and the weight are searched in the inputs CAM and the
//            weights CAM, on the cfg_abit most significant bits of each
//            (approximate matching). On a miss the operands are loaded into the
//            multiplier's input register; on a hit that register holds.
//   Stage 2  hit:  the results memory is read; the stored ABIT most significant
//                  bits of the product are padded with zeros to a full word.
//            miss: fp_mul computes the exact product. Its output register is
//                  enabled only on a miss, so on a hit the multiplier does not
//                  switch (the document clock-gates it).
//            A multiplexer picks the memory word or the multiplier result.
//   Stage 3  the single-stage accumulator adds the product to the running sum.
//
// Interface: operands enter with in_valid, one pair per cycle, no stalls.
// in_first starts a new sum, in_last ends it; done then pulses with the sum on
// result. The memory contents (CAM patterns and pre-computed products) come from
// an offline tool and are written through the load port (ld_*) before inference;
// am_clear invalidates both CAMs. prod_valid/prod/prod_hit show each product
// entering the accumulator and whether it came from the memory.
//
// Timing: a pair sampled at clock edge t is on prod after edge t+1 and in acc
// after edge t+2; for a last pair done and result follow edge t+2. Throughput is
// one pair per cycle whether it hits or misses.
//
// From the document: the three stages, the two CAMs in parallel, the hit
// condition on both operands, the MSB-only matching, the default word size
// ABIT = W/2 (16 bits for single, 8 for half precision) and the multiplier being
// idle on a hit. A wider ABIT (up to W) allows matching on more bits, as the
// document's accuracy sweeps do (up to 13 bits in single and 10 in half
// precision). This design's own choices: the default memory sizes (N_W = 64,
// N_IN = 16), the load port, the first/last framing, zero padding of stored
// products, and the multiplier fitting in one stage.
module axp_pe
  import axp_pkg::*;
#(
  parameter int unsigned W    = 32,      // 32: single precision, 16: half precision
  parameter int unsigned N_W  = 64,      // weights CAM rows
  parameter int unsigned N_IN = 16,      // inputs CAM rows
  parameter int unsigned ABIT = W / 2,   // CAM key and results word width, 1..W
  localparam int unsigned EXP_W = (W == 16) ? FP16_EXP_W : FP32_EXP_W,
  localparam int unsigned MAN_W = (W == 16) ? FP16_MAN_W : FP32_MAN_W,
  localparam int unsigned N_M   = N_W * N_IN,
  localparam int unsigned MAW   = (N_M > 1) ? $clog2(N_M) : 1,
  localparam int unsigned ABW   = $clog2(ABIT + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration and memory load
  input  logic [ABW-1:0]  cfg_abit,
  input  logic            am_clear,
  input  logic            ld_en,
  input  logic [1:0]      ld_target,    // axp_pkg::ld_target_e
  input  logic [MAW-1:0]  ld_addr,
  input  logic [ABIT-1:0] ld_data,
  // operand stream
  input  logic            in_valid,
  input  logic            in_first,
  input  logic            in_last,
  input  logic [W-1:0]    in_act,
  input  logic [W-1:0]    in_wgt,
  // products and sums
  output logic            prod_valid,
  output logic            prod_hit,
  output logic [W-1:0]    prod,
  output logic [W-1:0]    acc,
  output logic            done,
  output logic [W-1:0]    result
);

  if (W != 32 && W != 16) begin : g_bad_width
    $error("axp_pe: W must be 32 or 16");
  end
  if (ABIT < 1 || ABIT > W) begin : g_bad_abit
    $error("axp_pe: ABIT must lie in 1..W");
  end

  // ---------------- stage 1: associative search ----------------
  logic            s1_valid, s1_first, s1_last, s1_hit;
  logic [W-1:0]    mul_a, mul_b;
  logic [ABIT-1:0] mem_word;
  logic            hit_now, miss_now;

  assoc_mem #(.ABIT(ABIT), .N_W(N_W), .N_IN(N_IN)) u_am (
    .clk, .rst_n,
    .cfg_abit,
    .clear     (am_clear),
    .ld_en,
    .ld_target (ld_target_e'(ld_target)),
    .ld_addr,
    .ld_data,
    .search    (in_valid),
    .act_key   (in_act[W-1 -: ABIT]),
    .wgt_key   (in_wgt[W-1 -: ABIT]),
    .hit_now,
    .s1_hit,
    .s1_addr   (),
    .rdata     (mem_word)
  );

  // The multiplier operands are captured only on a miss.
  assign miss_now = in_valid && !hit_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      mul_a    <= '0;
      mul_b    <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_first <= in_first;
      s1_last  <= in_last;
      if (miss_now) begin
        mul_a <= in_act;
        mul_b <= in_wgt;
      end
    end
  end

  // ---------------- stage 2: FPMul or results memory ----------------
  logic         s2_valid, s2_first, s2_last, s2_hit;
  logic [W-1:0] mul_y;

  fp_mul #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_fpmul (
    .clk, .rst_n,
    .en (s1_valid && !s1_hit),
    .a  (mul_a),
    .b  (mul_b),
    .y  (mul_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_first <= 1'b0;
      s2_last  <= 1'b0;
      s2_hit   <= 1'b0;
    end else begin
      s2_valid <= s1_valid;
      s2_first <= s1_first;
      s2_last  <= s1_last;
      s2_hit   <= s1_hit;
    end
  end

  // a stored word holds the top ABIT bits of the product; the rest are zero
  assign prod       = s2_hit ? (W'(mem_word) << (W - ABIT)) : mul_y;
  assign prod_valid = s2_valid;
  assign prod_hit   = s2_valid && s2_hit;

  // ---------------- stage 3: accumulator ----------------
  fp_accumulator #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_acc (
    .clk, .rst_n,
    .in_valid (s2_valid),
    .in_first (s2_first),
    .in_last  (s2_last),
    .in_data  (prod),
    .acc,
    .done,
    .result
  );

  a_hit_needs_valid: assert property (@(posedge clk) disable iff (!rst_n)
    s1_hit |-> s1_valid)
    else $error("axp_pe: hit without a valid operand pair");

endmodule
