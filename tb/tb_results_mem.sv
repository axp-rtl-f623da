// tb_results_mem: self-checking testbench of the results memory.
//
// Fills every word, then mixes random writes and reads against a reference
// array. Checks that a read shows its word after exactly one clock edge, that
// rdata holds while re is low, and that a write and a read in the same cycle
// to different words do not disturb each other.
module tb_results_mem;
  localparam int DEPTH = 1024;
  localparam int WIDTH = 16;

  logic             clk = 1'b0;
  logic             we, re;
  logic [9:0]       waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int               checks = 0, failures = 0;

  always #5 clk = ~clk;

  results_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] held;
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    @(posedge clk); #1;
    for (int i = 0; i < DEPTH; i++) begin
      we = 1; waddr = 10'(i); wdata = 16'($urandom); model[i] = wdata;
      @(posedge clk); #1;
    end
    we = 0;
    for (int it = 0; it < 20000; it++) begin
      int ra, wa;
      ra = $urandom_range(0, DEPTH - 1);
      wa = $urandom_range(0, DEPTH - 1);
      if (wa == ra) wa = (wa + 1) % DEPTH;
      re = 1; raddr = 10'(ra);
      we = $urandom_range(0, 1); waddr = 10'(wa); wdata = 16'($urandom);
      @(posedge clk); #1;
      if (we) model[wa] = wdata;
      checks++;
      if (rdata !== model[ra]) begin
        failures++;
        if (failures < 20) $display("read %0d: got %h expected %h", ra, rdata, model[ra]);
      end
      if ($urandom_range(0, 7) == 0) begin
        held = rdata;
        re = 0; we = 0; raddr = 10'($urandom);
        @(posedge clk); #1;
        checks++;
        if (rdata !== held) begin
          failures++;
          $display("rdata changed with re low");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
