// tb_sieve_ctrl: test of the sequencer's command stream.
//
// Checks the load handshake (two commands per entry carrying r||i, then
// p) and, for one run, counts every command kind, the compare-exchange
// steps of each of the three sort jobs with their direction, key, rows
// limit and parity pattern, the order of the local steps, and the run
// length from start to done, all against numbers worked out here from the
// parameters.
module tb_sieve_ctrl;
  import sieve_pkg::*;

  localparam int unsigned M = 8, R = 4, NS = 3, NB = 4;
  localparam int unsigned LGM = 3, LGR = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ld_valid = 1'b0, ld_ready;
  logic [P_W-1:0] ld_p = '0, ld_r = '0;
  logic ld_i = 1'b0;
  logic start = 1'b0;
  logic [C_W-1:0] t1 = 8'd33, t2 = 8'd44;
  logic busy, done, out_we;
  cmd_t cmd;
  bus_t load_word;

  always #5 clk = ~clk;

  sieve_ctrl #(.M(M), .OUT_ROWS(R), .NREP_SUM(NS), .NREP_BC(NB)) dut (
    .clk, .rst_n, .ld_valid, .ld_ready, .ld_p, .ld_r, .ld_i, .start, .t1, .t2,
    .busy, .done, .cmd, .load_word, .out_we
  );

  int checks = 0, failures = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // command log of one run
  int n_ops [16];
  int n_ce_sort1 = 0, n_ce_sort1_col = 0, n_ce_7c = 0, n_ce_7t = 0, n_ce_7t_col = 0;
  int n_out = 0, cyc = 0, seq_err = 0, par_err = 0, t_err = 0;
  int last_local = 0;   // order of local steps
  bit logging = 0;
  int phase_job = 0;    // 0: sort1, 1: after BCAST (step VII)
  logic last_par;
  int  step_in_phase;

  always @(posedge clk) if (logging) begin
    cyc++;
    n_ops[cmd.op]++;
    if (out_we) n_out++;
    if (cmd.op == OP_SET_T && (cmd.t1 != 8'd33 || cmd.t2 != 8'd44)) t_err++;
    if (cmd.op == OP_CE_A) begin
      if (phase_job == 0) begin
        n_ce_sort1++;
        if (cmd.col) n_ce_sort1_col++;
        if (cmd.desc || cmd.ks != KEY_RI || cmd.rows_lim != 16'(M)) seq_err++;
      end else if (cmd.rows_lim == 16'(M)) begin
        n_ce_7c++;
        if (!cmd.col || !cmd.desc || cmd.ks != KEY_OKR) seq_err++;
      end else begin
        n_ce_7t++;
        if (cmd.col) n_ce_7t_col++;
        if (!cmd.desc || cmd.ks != KEY_OKR || cmd.rows_lim != 16'(R)) seq_err++;
      end
    end
    // odd-even transposition: the parity alternates from step to step
    if (cmd.op == OP_CE_A) begin
      if (step_in_phase > 0 && cmd.par == last_par) par_err++;
      last_par = cmd.par;
      step_in_phase++;
    end
    if (cmd.op == OP_LOG) begin
      if (last_local != 0) seq_err++;
      last_local = 1;
    end
    if (cmd.op == OP_BCAST) phase_job = 1;
    if (cmd.op == OP_SHIFT && n_out != 1) seq_err++;
  end

  initial begin
    for (int k = 0; k < 16; k++) n_ops[k] = 0;
    step_in_phase = 0;
    last_par = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // ---- load handshake ---------------------------------------------------
    check("ready when idle", ld_ready, 1);
    ld_valid = 1'b1; ld_p = 24'd1234; ld_r = 24'd56; ld_i = 1'b1;
    #1;
    check("LOAD_A op", cmd.op, OP_LOAD_A);
    check("LOAD_A word", load_word, {24'd56, 1'b1});
    @(posedge clk); #1;
    ld_valid = 1'b0; ld_p = 24'd0;
    check("not ready in second half", ld_ready, 0);
    check("LOAD_B op", cmd.op, OP_LOAD_B);
    check("LOAD_B word", load_word, {24'd1234, 1'b0});
    @(posedge clk); #1;
    check("NOP when idle", cmd.op, OP_NOP);
    // ---- one run -------------------------------------------------------------
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    logging = 1;
    check("busy", busy, 1);
    while (!done) @(posedge clk);
    logging = 0;
    #1;
    check("idle again", busy, 0);
    check("SET_T", n_ops[OP_SET_T], 1);
    check("thresholds", t_err, 0);
    check("sort1 steps", n_ce_sort1, M*(2*LGM+1));
    check("sort1 column steps", n_ce_sort1_col, M*LGM);
    check("CE_B = CE_A", n_ops[OP_CE_B], n_ops[OP_CE_A]);
    check("VII column steps", n_ce_7c, M);
    check("VII top-row steps", n_ce_7t, M*(LGR+1) + R*LGR);
    check("VII top-row column steps", n_ce_7t_col, R*LGR);
    check("LOG", n_ops[OP_LOG], 1);
    check("FLAGS", n_ops[OP_FLAGS], 2);
    check("SUM", n_ops[OP_SUM], NS);
    check("OK_SET", n_ops[OP_OK_SET], 1);
    check("OK_MATCH", n_ops[OP_OK_MATCH], 1);
    check("BCAST", n_ops[OP_BCAST], NB);
    check("SHIFT", n_ops[OP_SHIFT], 1);
    check("out_we", n_out, 1);
    check("sequence", seq_err, 0);
    check("run length", cyc, 1 + 2*M*(2*LGM+1) + 2 + NS + 3 + NB + 2*M
                             + 2*(M*(LGR+1) + R*LGR) + 2);
    check("parity alternates", par_err, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
