// tb_assoc_mem: self-checking testbench of the associative memory (two CAMs,
// address decoder, results memory) at its default sizes: 64 weight rows, 16 input
// rows, 16-bit words for single-precision operands.
//
// The CAMs are loaded with distinct random 16-bit keys and the results memory
// with random words. A new operand pair is searched every cycle: pairs built from
// stored patterns with noise in the low bits, pairs with one operand unknown, and
// random pairs, under a matched width that changes between phases. A reference
// model finds the rows, and the testbench checks hit_now in the search cycle,
// s1_hit one edge later and, for hits, rdata = word (in_row * 64 + w_row) two
// edges later. It also checks the clear input.
module tb_assoc_mem;
  import axp_pkg::*;
  localparam int W = 32, AB = 16, NW = 64, NIN = 16, NM = NW * NIN;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [4:0]    cfg_abit;
  logic          clear, ld_en, search;
  ld_target_e    ld_target;
  logic [9:0]    ld_addr;
  logic [AB-1:0] ld_data, rdata;
  logic [W-1:0]  act, wgt;
  logic [AB-1:0] act_key, wgt_key;
  assign act_key = act[W-1 -: AB];
  assign wgt_key = wgt[W-1 -: AB];
  logic          hit_now, s1_hit;
  logic [9:0]    s1_addr;

  logic [AB-1:0] wkey [NW];
  logic [AB-1:0] ikey [NIN];
  logic [AB-1:0] res  [NM];
  int            checks = 0, failures = 0, hits = 0, misses = 0;

  always #5 clk = ~clk;

  assoc_mem #(.ABIT(AB), .N_W(NW), .N_IN(NIN)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int find(input logic [AB-1:0] k, input int nb, input bit weights);
    int n;
    n = weights ? NW : NIN;
    for (int r = 0; r < n; r++)
      if (((weights ? wkey[r] : ikey[r]) >> (AB - nb)) == (k >> (AB - nb))) return r;
    return -1;
  endfunction

  task automatic load(input ld_target_e t, input int a, input logic [AB-1:0] d);
    ld_en = 1; ld_target = t; ld_addr = 10'(a); ld_data = d;
    @(posedge clk); #1;
    ld_en = 0;
  endtask

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    bit exp_hit [3];
    int exp_addr [3];
    bit v [3];
    clear = 0; ld_en = 0; ld_target = LD_RESULTS; ld_addr = '0; ld_data = '0;
    search = 0; act = '0; wgt = '0; cfg_abit = 5'd16;
    for (int i = 0; i < 3; i++) begin v[i] = 0; exp_hit[i] = 0; exp_addr[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // distinct keys in the 8 MSBs, so a pattern matches one row at any width >= 8
    for (int r = 0; r < NW; r++) begin
      wkey[r] = {8'(r * 3 + 1), 8'($urandom)};
      load(LD_WEIGHT_CAM, r, wkey[r]);
    end
    for (int r = 0; r < NIN; r++) begin
      ikey[r] = {8'(r * 7 + 2), 8'($urandom)};
      load(LD_INPUT_CAM, r, ikey[r]);
    end
    for (int i = 0; i < NM; i++) begin
      res[i] = 16'($urandom);
      load(LD_RESULTS, i, res[i]);
    end

    for (int it = 0; it < 30000; it++) begin
      int nb, ir, wr, kind;
      if (it % 5000 == 0) cfg_abit = 5'($urandom_range(8, 16));
      nb   = int'(cfg_abit);
      kind = $urandom_range(0, 3);
      ir   = $urandom_range(0, NIN - 1);
      wr   = $urandom_range(0, NW - 1);
      act  = {ikey[ir] ^ (16'($urandom) & (16'hFFFF >> nb)), 16'($urandom)};
      wgt  = {wkey[wr] ^ (16'($urandom) & (16'hFFFF >> nb)), 16'($urandom)};
      if (kind == 1) act = $urandom;
      if (kind == 2) wgt = $urandom;
      search = ($urandom_range(0, 9) != 0);
      ir = find(act[31:16], nb, 0);
      wr = find(wgt[31:16], nb, 1);
      // shift the expectation pipeline: [0] this cycle, [1] previous, [2] two back
      v[2] = v[1]; exp_hit[2] = exp_hit[1]; exp_addr[2] = exp_addr[1];
      v[1] = v[0]; exp_hit[1] = exp_hit[0]; exp_addr[1] = exp_addr[0];
      v[0] = search; exp_hit[0] = search && ir >= 0 && wr >= 0;
      exp_addr[0] = ir * NW + wr;
      #1;
      expect_bit("hit_now", hit_now, exp_hit[0]);
      @(posedge clk); #1;
      expect_bit("s1_hit", s1_hit, exp_hit[0]);
      if (exp_hit[0]) hits++; else if (search) misses++;
      // the read launched for the previous pair is now in rdata
      if (exp_hit[1]) begin
        checks++;
        if (rdata !== res[exp_addr[1]]) begin
          failures++;
          if (failures < 20) $display("rdata %h expected %h (word %0d)", rdata, res[exp_addr[1]], exp_addr[1]);
        end
      end
    end

    // clear invalidates both CAMs
    search = 0;
    clear = 1;
    @(posedge clk); #1;
    clear = 0;
    search = 1; act = {ikey[0], 16'h0}; wgt = {wkey[0], 16'h0};
    #1;
    expect_bit("hit after clear", hit_now, 1'b0);

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
