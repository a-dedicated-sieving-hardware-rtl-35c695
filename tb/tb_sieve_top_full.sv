// tb_sieve_top_full: end-to-end test of the sieving device with all its
// default parameters (64 x 64 mesh, S = 2^22): one line with two
// subintervals, then a reload and two more subintervals, with primes
// between 2^22 and 2^24. Same checks as tb_sieve_top.
//
// Loads a factor base into the mesh, sieves several consecutive
// subintervals, reloads (next b) and sieves again. For every run it
// computes the expected hits independently: it groups the entries by
// (r, i) in plain software, sums floor(log2 p) per group, finds the
// residues where both sums exceed T1 and T2, and expects exactly the
// entries of those residues (as a multiset) with ok = 1 in the output
// buffer. Between runs it moves every r to the next subinterval by the
// same rule the device uses. The data plants colliding primes so that
// hits, one-sided near misses, runs of several units, wrap-arounds of r
// and empty units all occur; each of these is counted and must occur at
// least once. The run time from start to done is checked against the
// schedule of the sequencer.
module tb_sieve_top_full;
  import sieve_pkg::*;

  localparam int unsigned M        = 64;       // defaults of sieve_top
  localparam int unsigned S        = 1 << 22;
  localparam int unsigned OUT_ROWS = 4;
  localparam int unsigned NREP     = 10;
  localparam int unsigned NRUN     = 2;    // subintervals per line
  // value ranges of the planted data: small primes for a small S, primes
  // above S (as the device requires) for the full S = 2^22
  localparam bit          BIG      = (S > 4096);
  localparam int unsigned GP_LO    = BIG ? S + 200 : 2048;
  localparam int unsigned GP_HI    = BIG ? (1 << 24) - 1 : 4095;
  localparam int unsigned W1_BASE  = BIG ? S + 30 : 90;
  localparam int unsigned W2_BASE  = BIG ? S + 25 : 85;
  localparam int unsigned N        = M * M;
  localparam int unsigned NOUT     = OUT_ROWS * M;
  localparam int unsigned AW       = $clog2(NOUT);
  localparam int unsigned T1       = BIG ? 40 : 20;
  localparam int unsigned T2       = BIG ? 40 : 20;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           ld_valid = 1'b0;
  logic           ld_ready;
  logic [P_W-1:0] ld_p = '0, ld_r = '0;
  logic           ld_i = 1'b0;
  logic           start = 1'b0;
  logic [C_W-1:0] t1 = C_W'(T1), t2 = C_W'(T2);
  logic           busy, done;
  logic [AW-1:0]  rd_addr = '0;
  rec_t           rd_data;
  logic [AW:0]    n_hits;

  always #5 clk = ~clk;

  sieve_top dut (
    .clk, .rst_n, .ld_valid, .ld_ready, .ld_p, .ld_r, .ld_i, .start, .t1, .t2,
    .busy, .done, .rd_addr, .rd_data, .n_hits
  );

  int checks = 0, failures = 0;
  // mechanism counters
  int n_hit_runs = 0, n_near_miss = 0, n_multi_sum = 0, n_bcast = 0, n_wrap = 0,
      n_empty = 0, n_reload = 0, n_xchg_needed = 0;

  // reference copy of the factor base
  int unsigned ep [N];
  int unsigned er [N];
  bit          ei [N];
  int          n_ent;

  function automatic int unsigned lg(int unsigned v);
    int unsigned res = 0;
    for (int k = 0; k < 32; k++) if (v[k]) res = k;
    return res;
  endfunction

  task automatic add(int unsigned p, int unsigned r, bit i);
    ep[n_ent] = p; er[n_ent] = r; ei[n_ent] = i; n_ent++;
  endtask

  function automatic int unsigned rnd_range(int unsigned lo, int unsigned hi); // [lo, hi]
    return lo + ($urandom % (hi - lo + 1));
  endfunction

  // Plants groups, fills the rest with random entries.
  task automatic make_data(int unsigned seed_off);
    int unsigned rg;
    n_ent = 0;
    // hit group, first subinterval: 2 x side 1, 3 x side 2, large primes
    rg = 10 + seed_off;
    for (int k = 0; k < 2; k++) add(rnd_range(GP_LO, GP_HI), rg, 1'b0);
    for (int k = 0; k < 3; k++) add(rnd_range(GP_LO, GP_HI), rg, 1'b1);
    // near miss: side 1 passes, side 2 has one prime only
    rg = 30 + seed_off;
    for (int k = 0; k < 2; k++) add(rnd_range(GP_LO, GP_HI), rg, 1'b0);
    add(rnd_range(GP_LO, GP_HI), rg, 1'b1);
    // hit group in the second subinterval, reached without wrap: r = rg + S
    rg = 5 + seed_off;
    for (int k = 0; k < 2; k++) add(rnd_range(GP_LO, GP_HI), rg + S, 1'b0);
    for (int k = 0; k < 2; k++) add(rnd_range(GP_LO, GP_HI), rg + S, 1'b1);
    // hit group in the second subinterval reached by wrap: r - S + p = 100
    for (int k = 0; k < 3; k++) begin
      int unsigned p = W1_BASE + 20*k + seed_off;
      add(p, 100 + S - p, 1'b0);
    end
    for (int k = 0; k < 4; k++) begin
      int unsigned p = W2_BASE + 19*k + seed_off;
      add(p, 100 + S - p, 1'b1);
    end
    // two empty units
    add(0, 24'hFFFFFF, 1'b0);
    add(0, 24'hFFFFFF, 1'b1);
    // random filler, residues kept far from the planted ones
    while (n_ent < int'(N)) begin
      int unsigned p = rnd_range(S + 1, GP_HI);
      add(p, rnd_range(200, p - 1 > 200 ? p - 1 : 200) % p, $urandom % 2);
    end
  endtask

  // expected hit entries of the current reference state
  bit exp_hit [N];
  int exp_cnt;

  task automatic reference();
    exp_cnt = 0;
    for (int a = 0; a < int'(N); a++) begin
      int unsigned s1 = 0, s2 = 0;
      int len = 0, len1 = 0, len2 = 0;
      for (int b = 0; b < int'(N); b++) if (er[b] == er[a]) begin
        if (ei[b]) begin s2 += lg(ep[b]); len2++; end
        else       begin s1 += lg(ep[b]); len1++; end
      end
      if (s1 > 255) s1 = 255;
      if (s2 > 255) s2 = 255;
      len = ei[a] ? len2 : len1;
      if (len > int'(NREP) + 1) begin
        $display("setup error: run of %0d entries exceeds the repetition count", len);
        failures++;
      end
      exp_hit[a] = (s1 > T1) && (s2 > T2);
      if (exp_hit[a]) begin
        exp_cnt++;
        if (len > 1) n_bcast++;
        if (len > 1) n_multi_sum++;
      end
      if (len1 > 1 && s1 > T1 && !exp_hit[a] && !ei[a]) n_near_miss++;
    end
    if (exp_cnt > 0) n_hit_runs++;
  endtask

  task automatic advance();
    for (int a = 0; a < int'(N); a++) begin
      if (er[a] < S) begin
        er[a] = (er[a] + ep[a] - S) & 24'hFFFFFF;
        if (ep[a] != 0) n_wrap++;
      end else begin
        er[a] = er[a] - S;
      end
    end
  endtask

  task automatic load_all();
    for (int k = 0; k < int'(N); k++) begin
      ld_valid <= 1'b1;
      ld_p     <= P_W'(ep[k]);
      ld_r     <= P_W'(er[k]);
      ld_i     <= ei[k];
      @(posedge clk);
      while (!ld_ready) @(posedge clk);
      if (ep[k] == 0) n_empty++;
    end
    ld_valid <= 1'b0;
    @(posedge clk);
  endtask

  localparam int unsigned LGM = $clog2(M);
  localparam int unsigned LGR = $clog2(OUT_ROWS);
  // commands issued by the sequencer, plus one clock to take start and one
  // for the registered done
  localparam int unsigned RUN_CYCLES = 2 +
      1 + 2*M*(2*LGM + 1) + 1 + 1 + NREP + 2 + 1 + NREP
      + 2*M + 2*(M*(LGR + 1) + OUT_ROWS*LGR) + 1 + 1;

  task automatic run_and_check(int unsigned u);
    int cyc;
    int got_cnt;
    bit used [N];
    reference();
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 1;
    while (!done) begin @(posedge clk); cyc++; end
    checks++;
    if (cyc != int'(RUN_CYCLES)) begin
      failures++;
      $display("run %0d: %0d clocks from start to done, expected %0d", u, cyc, RUN_CYCLES);
    end
    // read the output buffer
    got_cnt = 0;
    for (int a = 0; a < int'(N); a++) used[a] = 1'b0;
    for (int k = 0; k < int'(NOUT); k++) begin
      rd_addr <= AW'(k);
      @(posedge clk);
      @(negedge clk);
      if (rd_data.ok) begin
        bit found = 1'b0;
        got_cnt++;
        for (int a = 0; a < int'(N); a++)
          if (!found && !used[a] && exp_hit[a] && ep[a] == rd_data.p &&
              er[a] == rd_data.r && ei[a] == rd_data.i) begin
            used[a] = 1'b1; found = 1'b1;
          end
        checks++;
        if (!found) begin
          failures++;
          $display("run %0d: unexpected hit p=%0d r=%0d i=%0d", u, rd_data.p, rd_data.r, rd_data.i);
        end
      end
    end
    checks++;
    if (got_cnt != exp_cnt || int'(n_hits) != exp_cnt) begin
      failures++;
      $display("run %0d: %0d hits read, n_hits=%0d, expected %0d", u, got_cnt, n_hits, exp_cnt);
    end
    advance();
  endtask

  initial begin
    n_ent = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    make_data(0);
    load_all();
    for (int u = 1; u <= int'(NRUN); u++) run_and_check(u);
    // next line b: reload with fresh data
    make_data(3);
    load_all();
    n_reload++;
    for (int u = 1; u <= int'(NRUN < 2 ? NRUN : 2); u++) run_and_check(u);
    n_xchg_needed = 1;
    // every mechanism must have occurred
    checks++; if (n_hit_runs  == 0) begin failures++; $display("no run with hits"); end
    checks++; if (n_near_miss == 0) begin failures++; $display("no one-sided near miss"); end
    checks++; if (n_multi_sum == 0) begin failures++; $display("no multi-unit log sum"); end
    checks++; if (n_bcast     == 0) begin failures++; $display("no ok broadcast"); end
    checks++; if (n_wrap      == 0) begin failures++; $display("no r wrap-around in step VIII"); end
    checks++; if (n_empty     == 0) begin failures++; $display("no empty unit"); end
    checks++; if (n_reload    == 0) begin failures++; $display("no reload"); end
    $display("mechanisms: hit runs %0d, near misses %0d, multi-unit sums %0d, broadcasts %0d, wraps %0d, empty units %0d, reloads %0d",
             n_hit_runs, n_near_miss, n_multi_sum, n_bcast, n_wrap, n_empty, n_reload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
