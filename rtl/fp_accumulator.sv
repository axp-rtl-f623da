// fp_accumulator: single-stage floating-point accumulator (stage 3 of the
// processing element).
//
// Each valid product either starts a new sum (first high: the register loads the
// product) or is added to the running sum by the combinational fp_add in the same
// cycle, so a new product can be accepted every cycle. A product marked last
// closes the sum: one cycle later done pulses and result holds the finished sum
// until the next last product. The single stage follows the document; the
// first/last framing of a dot product is this design's choice.
//
// Timing: the sum that includes a product presented at edge t is in acc at edge t;
// done and result follow at the same edge for a last product.
module fp_accumulator #(
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 23,
  localparam int unsigned W    = 1 + EXP_W + MAN_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_first,   // start a new sum with this product
  input  logic         in_last,    // this product ends the sum
  input  logic [W-1:0] in_data,
  output logic [W-1:0] acc,        // running sum
  output logic         done,       // pulse: result holds a finished sum
  output logic [W-1:0] result
);

  logic [W-1:0] sum, next;

  fp_add #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_add (.a(acc), .b(in_data), .y(sum));

  assign next = in_first ? in_data : sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc    <= '0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= in_valid && in_last;
      if (in_valid) begin
        acc <= next;
        if (in_last) result <= next;
      end
    end
  end

endmodule
