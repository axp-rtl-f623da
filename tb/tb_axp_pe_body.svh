// Shared body of the processing-element testbenches. The including module
// declares W, E, M (format), AB (word size), NW, NIN (CAM rows), LAYERS, FRAMES
// (workload length), NAME (a label), the DUT signals and the DUT instance named
// dut. The body sets finished when its workload is over; checks and failures
// then hold the outcome.
//
// Workload: dot products as a clustered convolution layer produces them. Each
// "layer" clears the CAMs and loads NW weight centroids, NIN profiled activation
// patterns and the NW*NIN pre-computed products (the ABIT most significant bits
// of each centroid product). Frames of 1 to 40 operand pairs follow, with idle
// gaps; weights are centroids (their bits below the matched width are noise), and
// activations are profiled patterns with noise or random values. The matched
// width cfg_abit changes from layer to layer.
//
// Reference: per pair, a hit when both top-ABIT keys agree with a stored row on
// cfg_abit bits (lowest row wins); the product is then the stored word padded
// with zeros, otherwise the correctly rounded product. Sums are rebuilt with one
// rounding per addition. Checked at every cycle: prod two edges after the pair,
// prod_hit, done and result three edges after a last pair, done never otherwise,
// and that the multiplier output does not change on a hit. Mechanisms counted,
// each must occur: exact hits, approximate hits (low bits differ from the stored
// pattern), misses, multiplier hold on a hit, frames, layer reloads, matched-width
// changes, back-to-back frames.

  int checks = 0, failures = 0;
  bit finished = 1'b0;
  int n_exact_hit = 0, n_approx_hit = 0, n_miss = 0, n_gated = 0;
  int n_frames = 0, n_reloads = 0, n_abit_changes = 0, n_back2back = 0;
  longint cycle = 0;

  logic [AB-1:0] wkey [NW];
  logic [AB-1:0] ikey [NIN];
  logic [AB-1:0] res  [NW*NIN];

  typedef struct { longint due; logic [W-1:0] p; bit hit; } prod_t;
  typedef struct { longint due; logic [W-1:0] s; } sum_t;
  prod_t pq[$];
  sum_t  sq[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic int find(input logic [AB-1:0] k, input int nb, input bit weights);
    int n;
    n = weights ? NW : NIN;
    for (int r = 0; r < n; r++)
      if (((weights ? wkey[r] : ikey[r]) >> (AB - nb)) == (k >> (AB - nb))) return r;
    return -1;
  endfunction

  // a key or stored word as the top AB bits of an operand, zeros below
  function automatic logic [W-1:0] widen(input logic [AB-1:0] k);
    return W'(k) << (W - AB);
  endfunction

  // random bits below the key
  function automatic logic [W-1:0] low_noise();
    return W'($urandom) & ((W'(1) << (W - AB)) - W'(1));
  endfunction

  function automatic logic [W-1:0] rnd(input int emin, input int emax);
    return W'(tb_fp_pkg::rand_fp(E, M, emin, emax));
  endfunction

  // monitor: compares what leaves stage 2 and stage 3 with the queues
  logic [W-1:0] mul_prev;
  always @(posedge clk) begin
    #1;
    if (prod_valid) begin
      checks++;
      if (pq.size() == 0 || pq[0].due != cycle || prod !== pq[0].p || prod_hit !== pq[0].hit) begin
        failures++;
        if (failures < 20)
          $display("cycle %0d: prod %h hit %b, expected %h hit %b due %0d", cycle, prod, prod_hit,
                   (pq.size() != 0) ? pq[0].p : '0, (pq.size() != 0) ? pq[0].hit : 1'b0, (pq.size() != 0) ? pq[0].due : -1);
      end
      if (prod_hit) begin
        checks++;
        if (dut.u_fpmul.y !== mul_prev) begin
          failures++;
          $display("cycle %0d: multiplier switched on a hit", cycle);
        end else n_gated++;
      end
      if (pq.size() != 0) void'(pq.pop_front());
    end else if (pq.size() != 0 && pq[0].due == cycle) begin
      failures++;
      $display("cycle %0d: expected product missing", cycle);
      void'(pq.pop_front());
    end
    if (done) begin
      checks++;
      if (sq.size() == 0 || sq[0].due != cycle || result !== sq[0].s) begin
        failures++;
        if (failures < 20)
          $display("cycle %0d: result %h, expected %h due %0d", cycle, result,
                   (sq.size() != 0) ? sq[0].s : '0, (sq.size() != 0) ? sq[0].due : -1);
      end
      if (sq.size() != 0) void'(sq.pop_front());
    end else if (sq.size() != 0 && sq[0].due == cycle) begin
      failures++;
      $display("cycle %0d: expected done missing", cycle);
      void'(sq.pop_front());
    end
    mul_prev = dut.u_fpmul.y;
  end

  task automatic load(input axp_pkg::ld_target_e t, input int a, input logic [AB-1:0] d);
    ld_en = 1; ld_target = 2'(t); ld_addr = $bits(ld_addr)'(a); ld_data = d;
    @(posedge clk); #2;
    ld_en = 0;
  endtask

  task automatic load_layer();
    am_clear = 1;
    @(posedge clk); #2;
    am_clear = 0;
    // centroids and profiled activations: distinct top bytes of the key
    for (int r = 0; r < NW; r++) begin
      logic [W-1:0] c;
      c = rnd(E == 8 ? 110 : 9, E == 8 ? 140 : 20);
      wkey[r] = c[W-1 -: AB];
      load(axp_pkg::LD_WEIGHT_CAM, r, wkey[r]);
    end
    for (int r = 0; r < NIN; r++) begin
      logic [W-1:0] c;
      c = rnd(E == 8 ? 110 : 9, E == 8 ? 140 : 20);
      ikey[r] = c[W-1 -: AB];
      load(axp_pkg::LD_INPUT_CAM, r, ikey[r]);
    end
    for (int i = 0; i < NIN; i++)
      for (int j = 0; j < NW; j++) begin
        logic [W-1:0] p;
        p = W'(tb_fp_pkg::to_fp(tb_fp_pkg::from_fp(32'(widen(ikey[i])), E, M) *
                                tb_fp_pkg::from_fp(32'(widen(wkey[j])), E, M), E, M));
        res[i * NW + j] = p[W-1 -: AB];
        load(axp_pkg::LD_RESULTS, i * NW + j, res[i * NW + j]);
      end
    n_reloads++;
  endtask

  task automatic run_frame(input int len);
    logic [W-1:0] sum;
    for (int k = 0; k < len; k++) begin
      int nb, ir, wr, c;
      logic [W-1:0] a, b, p;
      bit hit;
      nb = int'(cfg_abit);
      c  = $urandom_range(0, NW - 1);
      b  = widen(wkey[c]) | low_noise();
      b[W-1 -: AB] = b[W-1 -: AB] ^ (AB'($urandom) & (AB'({AB{1'b1}}) >> nb));
      if ($urandom_range(0, 9) < 7) begin
        c = $urandom_range(0, NIN - 1);
        a = widen(ikey[c]) | low_noise();
        a[W-1 -: AB] = a[W-1 -: AB] ^ (AB'($urandom) & (AB'({AB{1'b1}}) >> nb));
      end else begin
        a = rnd(E == 8 ? 110 : 9, E == 8 ? 140 : 20);
      end
      if ($urandom_range(0, 19) == 0) b = rnd(E == 8 ? 110 : 9, E == 8 ? 140 : 20);
      ir  = find(a[W-1 -: AB], nb, 0);
      wr  = find(b[W-1 -: AB], nb, 1);
      hit = (ir >= 0 && wr >= 0);
      if (hit) begin
        p = widen(res[ir * NW + wr]);
        if (a[W-1 -: AB] == ikey[ir] && b[W-1 -: AB] == wkey[wr]) n_exact_hit++;
        else n_approx_hit++;
      end else begin
        p = W'(tb_fp_pkg::to_fp(tb_fp_pkg::from_fp(32'(a), E, M) * tb_fp_pkg::from_fp(32'(b), E, M), E, M));
        n_miss++;
      end
      sum = (k == 0) ? p : W'(tb_fp_pkg::to_fp(tb_fp_pkg::from_fp(32'(sum), E, M) +
                                                tb_fp_pkg::from_fp(32'(p), E, M), E, M));
      in_valid = 1; in_first = (k == 0); in_last = (k == len - 1);
      in_act = a; in_wgt = b;
      // the pair is taken at the coming edge, numbered cycle+1 by the monitor
      pq.push_back('{due: cycle + 2, p: p, hit: hit});
      if (k == len - 1) sq.push_back('{due: cycle + 3, s: sum});
      @(posedge clk); #2;
    end
    in_valid = 0; in_first = 0; in_last = 0;
    n_frames++;
  endtask

  initial begin
    am_clear = 0; ld_en = 0; ld_target = '0; ld_addr = '0; ld_data = '0;
    in_valid = 0; in_first = 0; in_last = 0; in_act = '0; in_wgt = '0;
    cfg_abit = $bits(cfg_abit)'(AB);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #2;
    for (int layer = 0; layer < LAYERS; layer++) begin
      int nb;
      load_layer();
      nb = (layer == 0) ? AB : $urandom_range(AB - AB / 4, AB - 1);
      if (nb != int'(cfg_abit)) n_abit_changes++;
      cfg_abit = $bits(cfg_abit)'(nb);
      for (int f = 0; f < FRAMES; f++) begin
        run_frame($urandom_range(1, 40));
        if ($urandom_range(0, 2) == 0) n_back2back++;
        else repeat ($urandom_range(1, 3)) @(posedge clk);
        #2;
      end
      repeat (5) @(posedge clk);
      #2;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (pq.size() != 0 || sq.size() != 0) begin
      failures++;
      $display("outputs still pending: %0d products, %0d sums", pq.size(), sq.size());
    end
    $display("%s: exact_hits=%0d approx_hits=%0d misses=%0d mul_held_on_hit=%0d frames=%0d reloads=%0d abit_changes=%0d back_to_back=%0d",
             NAME, n_exact_hit, n_approx_hit, n_miss, n_gated, n_frames, n_reloads, n_abit_changes, n_back2back);
    if (n_exact_hit == 0)    begin failures++; $display("no exact hit"); end
    if (n_approx_hit == 0)   begin failures++; $display("no approximate hit"); end
    if (n_miss == 0)         begin failures++; $display("no miss"); end
    if (n_gated == 0)        begin failures++; $display("multiplier hold never seen"); end
    if (n_reloads < 2)       begin failures++; $display("no layer reload"); end
    if (n_abit_changes == 0) begin failures++; $display("matched width never changed"); end
    if (n_back2back == 0)    begin failures++; $display("no back-to-back frames"); end
    checks += 7;
    $display("%s: hit rate %0d%%", NAME, (100 * (n_exact_hit + n_approx_hit)) / (n_exact_hit + n_approx_hit + n_miss));
    finished = 1'b1;
  end
