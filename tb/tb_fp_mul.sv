// tb_fp_mul: self-checking testbench of fp_mul in single and half precision.
//
// Random normal operands (exponents chosen so the product stays normal), then
// directed cases: zeros, subnormals read as zero, infinities, NaN, infinity times
// zero, overflow, underflow and a rounding carry into the exponent. Expected
// products come from double-precision arithmetic rounded by tb_fp_pkg::to_fp.
// The testbench also checks the one-cycle latency and that the output holds
// while en is low.
module tb_fp_mul;
  import tb_fp_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        en;
  logic [31:0] a32, b32, y32;
  logic [15:0] a16, b16, y16;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  fp_mul #(.EXP_W(8), .MAN_W(23)) dut32 (.clk, .rst_n, .en, .a(a32), .b(b32), .y(y32));
  fp_mul #(.EXP_W(5), .MAN_W(10)) dut16 (.clk, .rst_n, .en, .a(a16), .b(b16), .y(y16));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] a, input logic [31:0] b);
    logic [31:0] exp;
    real r;
    r   = from_fp(a, 8, 23) * from_fp(b, 8, 23);
    exp = to_fp(r, 8, 23);
    if (((a[30:23] == 8'hff) && a[22:0] != 0) || ((b[30:23] == 8'hff) && b[22:0] != 0) ||
        ((a[30:23] == 8'hff) && b[30:23] == 0) || ((b[30:23] == 8'hff) && a[30:23] == 0))
      exp = 32'h7fc00000;
    else if (a[30:23] == 8'hff || b[30:23] == 8'hff)
      exp = {a[31] ^ b[31], 8'hff, 23'd0};
    a32 = a; b32 = b; en = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (y32 !== exp) begin
      failures++;
      $display("FP32 %h * %h: got %h expected %h", a, b, y32, exp);
    end
  endtask

  task automatic check16(input logic [15:0] a, input logic [15:0] b);
    logic [15:0] exp;
    real r;
    r   = from_fp(32'(a), 5, 10) * from_fp(32'(b), 5, 10);
    exp = 16'(to_fp(r, 5, 10));
    if (((a[14:10] == 5'h1f) && a[9:0] != 0) || ((b[14:10] == 5'h1f) && b[9:0] != 0) ||
        ((a[14:10] == 5'h1f) && b[14:10] == 0) || ((b[14:10] == 5'h1f) && a[14:10] == 0))
      exp = 16'h7e00;
    else if (a[14:10] == 5'h1f || b[14:10] == 5'h1f)
      exp = {a[15] ^ b[15], 5'h1f, 10'd0};
    a16 = a; b16 = b; en = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (y16 !== exp) begin
      failures++;
      $display("FP16 %h * %h: got %h expected %h", a, b, y16, exp);
    end
  endtask

  initial begin
    logic [31:0] hold32;
    en = 1'b0; a32 = '0; b32 = '0; a16 = '0; b16 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // random normal operands with a normal product
    for (int i = 0; i < 20000; i++)
      check32(rand_fp(8, 23, 64, 190), rand_fp(8, 23, 64, 190));
    for (int i = 0; i < 20000; i++)
      check16(16'(rand_fp(5, 10, 8, 22)), 16'(rand_fp(5, 10, 8, 22)));
    // full exponent range: overflow and underflow
    for (int i = 0; i < 5000; i++)
      check32(rand_fp(8, 23, 1, 254), rand_fp(8, 23, 1, 254));
    for (int i = 0; i < 5000; i++)
      check16(16'(rand_fp(5, 10, 1, 30)), 16'(rand_fp(5, 10, 1, 30)));

    // directed cases
    check32(32'h3f800000, 32'h3f800000);   // 1 * 1
    check32(32'h3fffffff, 32'h3fffffff);   // rounding carries into the exponent
    check32(32'h3f800001, 32'h3f7fffff);   // tie-breaking neighbourhood
    check32(32'h00000000, 32'h40490fdb);   // 0 * pi
    check32(32'h80000000, 32'h40490fdb);   // -0 * pi
    check32(32'h00400000, 32'h3f800000);   // subnormal reads as zero
    check32(32'h7f800000, 32'h40000000);   // inf * 2
    check32(32'h7f800000, 32'h00000000);   // inf * 0 -> NaN
    check32(32'h7fc00001, 32'h3f800000);   // NaN * 1
    check32(32'h7f000000, 32'h7f000000);   // overflow
    check32(32'h00800000, 32'h00800000);   // underflow
    check16(16'h3c00, 16'h3c00);
    check16(16'h3fff, 16'h3fff);
    check16(16'h7c00, 16'h0000);
    check16(16'hfc00, 16'h4000);
    check16(16'h7800, 16'h7800);

    // output holds while en is low
    check32(32'h40000000, 32'h40400000);   // 2 * 3 = 6
    hold32 = y32;
    en  = 1'b0;
    a32 = 32'h40a00000;
    b32 = 32'h40a00000;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (y32 !== hold32) begin
      failures++;
      $display("output changed while en was low: %h", y32);
    end
    // one-cycle latency: the result appears at the first edge after en
    en = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (y32 !== 32'h41c80000) begin
      failures++;
      $display("latency: got %h expected 41c80000 one edge after en", y32);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
