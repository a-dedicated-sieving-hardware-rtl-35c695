// tb_sieve_mesh: test of the processing-unit array driven by hand-made
// command sequences (no sequencer).
//
// An 8 x 8 mesh with all rows brought out. The test loads 64 entries
// through the snake load chain and checks where they land, shear-sorts
// them by r||i and checks ascending snake order and that no entry was
// lost, runs steps II-VI and compares the ok flags with hits computed
// here from the entry list, then shear-sorts by ok||r descending and
// checks that order too.
module tb_sieve_mesh;
  import sieve_pkg::*;

  localparam int unsigned M = 8;
  localparam int unsigned N = M * M;
  localparam int unsigned S = 64;
  localparam int unsigned LGM = 3;
  localparam int unsigned T1 = 20, T2 = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  cmd_t cmd;
  bus_t load_word;
  rec_t out_recs [N];

  always #5 clk = ~clk;

  sieve_mesh #(.M(M), .S(S), .OUT_ROWS(M)) dut (.clk, .rst_n, .cmd, .load_word, .out_recs);

  int checks = 0, failures = 0;
  int unsigned ep [N], er [N];
  bit          ei [N];

  function automatic int unsigned lg(int unsigned v);
    int unsigned res = 0;
    for (int k = 0; k < 32; k++) if (v[k]) res = k;
    return res;
  endfunction

  task automatic issue(op_e op);
    cmd.op = op;
    @(posedge clk);
    #1;
    cmd.op = OP_NOP;
  endtask

  task automatic shearsort(key_e ks, bit desc);
    cmd.ks = ks; cmd.desc = desc; cmd.rows_lim = 16'(M);
    for (int ph = 0; ph < 2*int'(LGM) + 1; ph++) begin
      cmd.col = ph[0];
      for (int st = 0; st < int'(M); st++) begin
        cmd.par = st[0];
        issue(OP_CE_A);
        issue(OP_CE_B);
      end
    end
  endtask

  function automatic logic [24:0] key(rec_t r, key_e ks);
    return (ks == KEY_RI) ? {r.r, r.i} : {r.ok, r.r};
  endfunction

  task automatic check_sorted(key_e ks, bit desc, string what);
    int bad = 0;
    for (int k = 1; k < int'(N); k++) begin
      if (!desc && key(out_recs[k-1], ks) > key(out_recs[k], ks)) bad++;
      if ( desc && key(out_recs[k-1], ks) < key(out_recs[k], ks)) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d inversions", what, bad); end
  endtask

  task automatic check_multiset(string what);
    bit used [N];
    int missing = 0;
    for (int a = 0; a < int'(N); a++) used[a] = 0;
    for (int k = 0; k < int'(N); k++) begin
      bit found = 0;
      for (int a = 0; a < int'(N); a++)
        if (!found && !used[a] && out_recs[k].p == ep[a] && out_recs[k].r == er[a] && out_recs[k].i == ei[a]) begin
          used[a] = 1; found = 1;
        end
      if (!found) missing++;
    end
    checks++;
    if (missing != 0) begin failures++; $display("FAIL %s: %0d entries not from the input", what, missing); end
  endtask

  initial begin
    int n;
    cmd = '0; cmd.op = OP_NOP; cmd.rows_lim = 16'(M);
    load_word = '0;
    // data: two planted residues, one hit (both sides) and one near miss
    n = 0;
    for (int k = 0; k < 3; k++) begin ep[n] = 2048 + 100*k; er[n] = 7;  ei[n] = 0; n++; end
    for (int k = 0; k < 2; k++) begin ep[n] = 3000 + 100*k; er[n] = 7;  ei[n] = 1; n++; end
    for (int k = 0; k < 2; k++) begin ep[n] = 2500 + 100*k; er[n] = 9;  ei[n] = 0; n++; end
    ep[n] = 3500; er[n] = 9; ei[n] = 1; n++;
    while (n < int'(N)) begin
      ep[n] = 100 + ($urandom % 3900);
      er[n] = 20 + ($urandom % 60);
      ei[n] = $urandom % 2;
      n++;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // load
    for (int k = 0; k < int'(N); k++) begin
      load_word = {P_W'(er[k]), ei[k]};
      issue(OP_LOAD_A);
      load_word = {P_W'(ep[k]), 1'b0};
      issue(OP_LOAD_B);
    end
    for (int k = 0; k < int'(N); k++) begin
      checks++;
      if (out_recs[N-1-k].p != ep[k] || out_recs[N-1-k].r != er[k] || out_recs[N-1-k].i != ei[k]) begin
        failures++;
        $display("FAIL load: entry %0d not at snake position %0d", k, N-1-k);
      end
    end
    // step I
    shearsort(KEY_RI, 1'b0);
    check_sorted(KEY_RI, 1'b0, "sort r||i ascending");
    check_multiset("sort r||i keeps entries");
    // steps II-VI
    cmd.t1 = 8'(T1); cmd.t2 = 8'(T2);
    issue(OP_SET_T);
    issue(OP_LOG);
    issue(OP_FLAGS);
    repeat (10) issue(OP_SUM);
    issue(OP_OK_SET);
    issue(OP_OK_MATCH);
    issue(OP_FLAGS);
    repeat (10) issue(OP_BCAST);
    for (int k = 0; k < int'(N); k++) begin
      int unsigned s1, s2;
      bit hit;
      s1 = 0;
      s2 = 0;
      for (int a = 0; a < int'(N); a++) if (er[a] == out_recs[k].r) begin
        if (ei[a]) s2 += lg(ep[a]); else s1 += lg(ep[a]);
      end
      hit = (s1 > T1) && (s2 > T2);
      checks++;
      if (out_recs[k].ok != hit) begin
        failures++;
        $display("FAIL ok flag at %0d (r=%0d i=%0d): got %0d expected %0d", k, out_recs[k].r, out_recs[k].i, out_recs[k].ok, hit);
      end
    end
    // step VII, full sort variant
    shearsort(KEY_OKR, 1'b1);
    check_sorted(KEY_OKR, 1'b1, "sort ok||r descending");
    checks++;
    if (!(out_recs[0].ok && out_recs[4].ok && !out_recs[5].ok)) begin
      failures++; $display("FAIL the five hits are not first");
    end
    // step VIII on all units
    issue(OP_SHIFT);
    checks++;
    if (out_recs[0].r != 7 - S + out_recs[0].p) begin failures++; $display("FAIL shift"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
