// tb_fp_accumulator: self-checking testbench of the single-stage accumulator,
// single precision and half precision side by side.
//
// Random dot-product frames of 1 to 12 products (first on the opening product,
// last on the closing one), with idle cycles in between, including frames that
// cancel to zero and products of mixed sign and magnitude. The expected running
// sum is rebuilt step by step in double precision and rounded to the format
// after every addition, as the hardware does. Then two-term sums over the whole
// exponent range (overflow, underflow, deep cancellation) and infinities, NaN
// and negative zeros. Checked: acc after every product,
// done one edge after a last product and never otherwise, result held between
// frames, and one product accepted per cycle.
module tb_fp_accumulator;
  import tb_fp_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        v, first, last;
  logic [31:0] d32, acc32, res32;
  logic [15:0] d16, acc16, res16;
  logic        done32, done16;
  logic [31:0] ref32, ref16;
  int          checks = 0, failures = 0;
  int          frames = 0, cancels = 0, overflows = 0;

  always #5 clk = ~clk;

  fp_accumulator #(.EXP_W(8), .MAN_W(23)) dut32 (
    .clk, .rst_n, .in_valid(v), .in_first(first), .in_last(last), .in_data(d32),
    .acc(acc32), .done(done32), .result(res32));
  fp_accumulator #(.EXP_W(5), .MAN_W(10)) dut16 (
    .clk, .rst_n, .in_valid(v), .in_first(first), .in_last(last), .in_data(d16),
    .acc(acc16), .done(done16), .result(res16));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    int n;
    v = 0; first = 0; last = 0; d32 = '0; d16 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int f = 0; f < 3000; f++) begin
      n = $urandom_range(1, 12);
      for (int i = 0; i < n; i++) begin
        if (f % 10 == 3 && i == 1) begin
          // cancel the previous value exactly
          d32 = ref32 ^ 32'h80000000;
          d16 = 16'(ref16) ^ 16'h8000;
        end else begin
          d32 = rand_fp(8, 23, 110, 140);
          d16 = 16'(rand_fp(5, 10, 8, 20));
        end
        v = 1; first = (i == 0); last = (i == n - 1);
        ref32 = first ? d32 : to_fp(from_fp(ref32, 8, 23) + from_fp(d32, 8, 23), 8, 23);
        ref16 = first ? 32'(d16) : to_fp(from_fp(ref16, 5, 10) + from_fp(32'(d16), 5, 10), 5, 10);
        @(posedge clk); #1;
        expect_eq("acc32", acc32, ref32);
        expect_eq("acc16", 32'(acc16), ref16);
        if (f % 10 == 3 && i == 1 && ref32 == 0) cancels++;
        checks++;
        if (done32 !== last || done16 !== last) begin
          failures++;
          $display("done %b/%b expected %b", done32, done16, last);
        end
      end
      expect_eq("result32", res32, ref32);
      expect_eq("result16", 32'(res16), ref16);
      frames++;
      v = 0; first = 0; last = 0;
      if ($urandom_range(0, 1) == 1) begin
        d32 = $urandom;
        @(posedge clk); #1;
        checks++;
        if (done32 || done16) begin
          failures++;
          $display("done while idle");
        end
        expect_eq("result32 held", res32, ref32);
        expect_eq("acc32 held", acc32, ref32);
      end
    end
    // two-term sums over the whole exponent range: large alignment shifts,
    // overflow to infinity and underflow to zero
    for (int f = 0; f < 20000; f++) begin
      for (int i = 0; i < 2; i++) begin
        d32 = rand_fp(8, 23, 1, 254);
        d16 = 16'(rand_fp(5, 10, 1, 30));
        if (i == 1 && $urandom_range(0, 3) == 0) begin
          // nearby magnitudes of opposite sign: deep cancellation
          d32 = (ref32 ^ 32'h80000000) + 32'($urandom_range(0, 3));
          d16 = (16'(ref16) ^ 16'h8000) + 16'($urandom_range(0, 3));
        end
        v = 1; first = (i == 0); last = (i == 1);
        ref32 = first ? d32 : to_fp(from_fp(ref32, 8, 23) + from_fp(d32, 8, 23), 8, 23);
        ref16 = first ? 32'(d16) : to_fp(from_fp(ref16, 5, 10) + from_fp(32'(d16), 5, 10), 5, 10);
        @(posedge clk); #1;
        expect_eq("wide acc32", acc32, ref32);
        expect_eq("wide acc16", 32'(acc16), ref16);
        if (i == 1 && (ref32[30:23] == 8'hff)) overflows++;
      end
    end
    // special values
    v = 1; first = 1; last = 0; d32 = 32'h7f800000; d16 = 16'h7c00;       // +inf
    @(posedge clk); #1;
    first = 0; d32 = 32'h3f800000; d16 = 16'h3c00;                         // inf + 1 = inf
    @(posedge clk); #1;
    expect_eq("inf+1 32", acc32, 32'h7f800000);
    expect_eq("inf+1 16", 32'(acc16), 32'h7c00);
    d32 = 32'hff800000; d16 = 16'hfc00;                                    // inf - inf = NaN
    @(posedge clk); #1;
    expect_eq("inf-inf 32", acc32, 32'h7fc00000);
    expect_eq("inf-inf 16", 32'(acc16), 32'h7e00);
    first = 1; d32 = 32'h80000000; d16 = 16'h8000;                         // -0
    @(posedge clk); #1;
    first = 0; last = 1;                                                   // -0 + -0 = -0
    @(posedge clk); #1;
    expect_eq("-0+-0 32", acc32, 32'h80000000);
    expect_eq("-0+-0 16", 32'(acc16), 32'h8000);
    v = 0; last = 0;
    checks++;
    if (overflows == 0) begin
      failures++;
      $display("no overflow exercised");
    end
    checks++;
    if (cancels == 0) begin
      failures++;
      $display("no exact cancellation exercised");
    end
    $display("frames=%0d cancellations=%0d overflows=%0d", frames, cancels, overflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
