// tb_cam: self-checking testbench of the approximate-matching CAM.
//
// A reference model keeps the rows and their valid bits. Random writes, random
// searches with a random number of matched MSBs (abit from 1 to 16), searches for
// stored keys with their unmatched low bits flipped, and the clear input. The
// expected outcome is the lowest valid row whose key agrees with the search key
// on the abit top bits. A directed case takes the single-precision pattern
// 1 10011011 1111 0101... (16-bit key CDF5): with 13 matched bits (bits 31..19 of
// the word) a key that differs only in its three low bits must hit, with all 16
// bits it must miss.
module tb_cam;
  localparam int ROWS = 64;
  localparam int KW   = 16;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          clear, wr_en;
  logic [5:0]    wr_addr;
  logic [KW-1:0] wr_key, search_key;
  logic [4:0]    abit;
  logic          hit;
  logic [5:0]    hit_addr;
  logic [KW-1:0] m_key [ROWS];
  logic          m_valid [ROWS];
  int            checks = 0, failures = 0, hits = 0, misses = 0;

  always #5 clk = ~clk;

  cam #(.ROWS(ROWS), .KEY_W(KW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_row(input int r, input logic [KW-1:0] k);
    wr_en = 1; wr_addr = 6'(r); wr_key = k;
    @(posedge clk); #1;
    wr_en = 0;
    m_key[r] = k; m_valid[r] = 1;
  endtask

  task automatic search(input logic [KW-1:0] k, input int nb);
    int exp_row;
    exp_row = -1;
    search_key = k; abit = 5'(nb);
    #1;
    for (int r = 0; r < ROWS; r++)
      if (exp_row < 0 && m_valid[r] && ((m_key[r] >> (KW - nb)) == (k >> (KW - nb))))
        exp_row = r;
    checks++;
    if (hit !== (exp_row >= 0) || (exp_row >= 0 && int'(hit_addr) != exp_row)) begin
      failures++;
      if (failures < 20)
        $display("search %h abit %0d: hit %b row %0d, expected row %0d", k, nb, hit, hit_addr, exp_row);
    end
    if (exp_row >= 0) hits++; else misses++;
  endtask

  initial begin
    clear = 0; wr_en = 0; wr_addr = '0; wr_key = '0; search_key = '0; abit = 5'd16;
    for (int r = 0; r < ROWS; r++) begin m_valid[r] = 0; m_key[r] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // empty after reset
    search(16'h0000, 16);
    search(16'h1234, 1);

    // the 13-bit matching example
    write_row(5, 16'hCDF5);
    search(16'hCDF2, 13);    // differs in bits 2..0 only: hit
    search(16'hCDF2, 16);    // exact matching: miss
    search(16'hCDE5, 13);    // differs in bit 4 (inside the 13 MSBs): miss
    search(16'hCDF5, 16);

    for (int it = 0; it < 20000; it++) begin
      case ($urandom_range(0, 9))
        0, 1: write_row($urandom_range(0, ROWS - 1), 16'($urandom));
        2: begin
          int r;
          int nb;
          r  = $urandom_range(0, ROWS - 1);
          nb = $urandom_range(1, 16);
          // stored key with its low (unmatched) bits scrambled
          search(m_key[r] ^ (16'($urandom) & (16'hFFFF >> nb)), nb);
        end
        3: if ($urandom_range(0, 50) == 0) begin
          clear = 1;
          @(posedge clk); #1;
          clear = 0;
          for (int r = 0; r < ROWS; r++) m_valid[r] = 0;
        end
        default: search(16'($urandom), $urandom_range(1, 16));
      endcase
    end
    checks++;
    if (hits == 0 || misses == 0) begin
      failures++;
      $display("hits=%0d misses=%0d: both outcomes expected", hits, misses);
    end
    $display("hits=%0d misses=%0d", hits, misses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
