// tb_sieve_pu: unit test of one processing unit.
//
// The unit is placed at an interior position (x = 1, y = 2, an even row of
// an 8 x 8 mesh, so its predecessor is on the left and its successor on the
// right) and its four neighbour inputs are driven by the testbench. Each
// operation is checked against values computed here: the load shift, the
// log of p, the two-clock compare-exchange in both roles and both keys,
// run flags, the shift-and-add of step IV at a run end and inside a run,
// the ok comparison and match of step V, the ok broadcast of step VI and
// the r update of step VIII with and without wrap-around.
module tb_sieve_pu;
  import sieve_pkg::*;

  localparam int unsigned M = 8;
  localparam int unsigned S = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  cmd_t cmd;
  bus_t tx_l = '0, tx_r = '0, tx_u = '0, tx_d = '0, tx;
  rec_t rec;

  always #5 clk = ~clk;

  sieve_pu #(.M(M), .S(S)) dut (
    .clk, .rst_n, .cmd, .x(3'd1), .y(3'd2), .tx_l, .tx_r, .tx_u, .tx_d, .tx, .rec
  );

  int checks = 0, failures = 0;

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic issue(op_e op);
    cmd.op = op;
    @(posedge clk);
    #1;
    cmd.op = OP_NOP;
  endtask

  // load (p, r, i) through the left (predecessor) input
  task automatic load(int unsigned p, int unsigned r, bit i);
    tx_l = {P_W'(r), i};
    issue(OP_LOAD_A);
    tx_l = {P_W'(p), 1'b0};
    issue(OP_LOAD_B);
  endtask

  int unsigned c_now;

  initial begin
    cmd = '0;
    cmd.op = OP_NOP;
    cmd.rows_lim = 16'(M);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- load and transmit --------------------------------------------
    load(1000, 77, 1'b0);
    check("load p", rec.p, 1000);
    check("load r", rec.r, 77);
    check("load i", rec.i, 0);
    cmd.op = OP_LOAD_A; #1;
    check("tx in load A is r||i", tx, {24'd77, 1'b0});
    cmd.op = OP_NOP;

    // ---- step II ---------------------------------------------------------
    issue(OP_LOG);
    cmd.op = OP_SUM; #1;  // interior of a run? flags still 0 -> sends c
    cmd.op = OP_NOP;

    // ---- compare-exchange, row phase, x=1 with par=1 is the left member,
    // even row ascending: keeps the smaller key
    cmd.ks = KEY_RI; cmd.col = 1'b0; cmd.par = 1'b1; cmd.desc = 1'b0;
    tx_r = {24'd50, 1'b1};              // partner key r=50,i=1 < 77||0
    issue(OP_CE_A);
    tx_r = {24'd3001, 1'b1};            // partner rest p=3001, ok=1
    issue(OP_CE_B);
    check("CE swap p", rec.p, 3001);
    check("CE swap r", rec.r, 50);
    check("CE swap i", rec.i, 1);
    check("CE swap ok", rec.ok, 1);
    // same again with a larger partner key: no exchange
    tx_r = {24'd90, 1'b0};
    issue(OP_CE_A);
    tx_r = {24'd5, 1'b0};
    issue(OP_CE_B);
    check("CE keep p", rec.p, 3001);
    check("CE keep r", rec.r, 50);
    // descending on ok||r, par=0: x=1 is the right member, takes from left,
    // keeps the smaller one in a descending even row
    cmd.ks = KEY_OKR; cmd.par = 1'b0; cmd.desc = 1'b1;
    tx_l = {1'b1, 24'd60};              // partner 1||60 > own 1||50: keep
    issue(OP_CE_A);
    tx_l = {24'd7, 1'b0};
    issue(OP_CE_B);
    check("CE desc keep r", rec.r, 50);
    tx_l = {1'b0, 24'd10};              // 0||10 < 1||50: the right member keeps the smaller
    issue(OP_CE_A);
    tx_l = {24'd7, 1'b0};               // p=7, i=0
    issue(OP_CE_B);
    check("CE desc swap p", rec.p, 7);
    check("CE desc swap r", rec.r, 10);
    check("CE desc swap ok", rec.ok, 0);
    check("CE desc swap i", rec.i, 0);
    // column phase with rows_lim excluding the unit: no exchange
    cmd.col = 1'b1; cmd.par = 1'b0; cmd.rows_lim = 16'd2;
    tx_d = {1'b1, 24'd999};
    issue(OP_CE_A);
    tx_d = {24'd123, 1'b1};
    issue(OP_CE_B);
    check("CE outside rows_lim", rec.p, 7);
    cmd.rows_lim = 16'(M);
    cmd.col = 1'b0;

    // ---- steps II-VI for i = 1 (bit 0) as the last unit of its run ----------
    load(2500, 40, 1'b0);                 // floor(log2 2500) = 11
    issue(OP_LOG);
    cmd.op = OP_SUM; #1;
    check("tx in SUM before flags", tx, 11);
    cmd.op = OP_NOP;
    tx_l = {24'd40, 1'b0};                // predecessor: same run
    tx_r = {24'd40, 1'b1};                // successor: other side, same r
    issue(OP_FLAGS);                      // -> last = 1 (run end), first = 0
    cmd.op = OP_SUM; #1;
    check("run end sends 0", tx, 0);
    cmd.op = OP_NOP;
    tx_l = 25'd9;                         // predecessor sends c = 9
    issue(OP_SUM);
    tx_l = 25'd12;
    issue(OP_SUM);
    c_now = 11 + 9 + 12;
    // threshold: T1 = 31 -> 32 > 31 passes
    cmd.t1 = 8'd31; cmd.t2 = 8'd200;
    issue(OP_SET_T);
    issue(OP_OK_SET);
    check("ok set at run end", rec.ok, 1);
    // step V match: successor (other side) sends ok||r = 1||40
    cmd.op = OP_OK_MATCH; #1;
    check("tx in OK_MATCH", tx, {1'b1, 24'd40});
    cmd.op = OP_NOP;
    tx_r = {1'b1, 24'd40};
    issue(OP_OK_MATCH);
    check("ok kept on match", rec.ok, 1);
    // broadcast: run end keeps ok, sends ok
    tx_r = 25'd0;
    issue(OP_BCAST);
    check("run end keeps ok in BCAST", rec.ok, 1);
    // a lower threshold check of the accumulated sum: c = 32 -> T1 = 32 fails
    cmd.t1 = 8'd32;
    issue(OP_SET_T);
    issue(OP_OK_SET);
    check("ok clear when c == T1", rec.ok, 0);
    cmd.t1 = 8'd31;
    issue(OP_SET_T);
    issue(OP_OK_SET);
    tx_r = {1'b0, 24'd40};               // other side failed
    issue(OP_OK_MATCH);
    check("ok cleared on mismatch", rec.ok, 0);

    // ---- inside a run (i = 1 side, bit 1): takes value from successor ------
    load(300, 12, 1'b1);                  // log2 300 = 8
    issue(OP_LOG);
    tx_l = {24'd12, 1'b1};                // predecessor same run -> not first
    tx_r = {24'd12, 1'b1};                // successor same run -> not last
    issue(OP_FLAGS);
    cmd.op = OP_SUM; #1;
    check("interior sends c", tx, 8);
    cmd.op = OP_NOP;
    tx_r = 25'd5;
    issue(OP_SUM);
    cmd.op = OP_SUM; #1;
    check("interior took successor value", tx, 5);
    cmd.op = OP_NOP;
    issue(OP_OK_SET);
    check("interior ok = 0", rec.ok, 0);
    tx_l = 25'd1;                          // i=2 interior takes ok from predecessor
    issue(OP_BCAST);
    check("interior took ok from predecessor", rec.ok, 1);
    cmd.op = OP_BCAST; #1;
    check("interior forwards ok", tx, 1);
    cmd.op = OP_NOP;

    // ---- step VIII ------------------------------------------------------------
    load(300, 100, 1'b0);
    issue(OP_SHIFT);
    check("shift no wrap", rec.r, 100 - S);
    issue(OP_SHIFT);
    check("shift wrap", rec.r, 100 - 2*S + 300);
    issue(OP_SHIFT);
    check("shift no wrap 2", rec.r, 100 - 3*S + 300);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
