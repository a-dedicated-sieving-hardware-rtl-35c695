// sieve_pu: one processing unit of the sieving mesh.
//
// The unit stores one entry (p, r, i, ok) of the factor bases, the 8-bit
// log counter c, the two thresholds T1/T2, a 25-bit receive register for
// the sort key of its partner, and two run flags (first / last of a run of
// equal r||i values along the snake order). Every clock it executes the
// command broadcast by the controller; all decisions a unit takes on its
// own follow from its coordinates (x, y), which are tied to constants by
// the mesh.
//
// Links: the unit drives one 25-bit word, tx, to its four neighbours and
// receives theirs on tx_l/tx_r/tx_u/tx_d. The snake order runs left to
// right in even rows and right to left in odd rows, so the predecessor
// and successor of a unit are always mesh neighbours. The left input of
// unit (0,0) carries the external load word.
//
// Operations (one clock each unless noted), following the device's steps:
//  - OP_CE_A / OP_CE_B: the two-cycle elementary step of the mesh sort.
//    Cycle 1 latches the partner's 25-bit key, cycle 2 receives the other
//    25 bits of its record and both units evaluate exchange := key of the
//    partner beyond own key (for the unit that keeps the smaller one);
//    on exchange the unit takes over the partner's record.
//  - OP_LOG (II): c <= floor(log2 p).
//  - OP_FLAGS (III, VI): first/last of a run, from both neighbours' r||i.
//  - OP_SUM (IV): the run end (last unit for i=1, first for i=2) adds the
//    value sent by its upstream neighbour to c; every other unit takes
//    over that value; the run end sends 0, the rest send c.
//  - OP_OK_SET / OP_OK_MATCH (V): ok <= (c > T_i) at the run end, then ok
//    survives only if the unit on the other side of the r-run boundary
//    sent the same ok||r.
//  - OP_BCAST (VI): the ok flag travels from the run end back through the
//    run, one unit per clock.
//  - OP_SHIFT (VIII): r <= r - S, plus p if that is negative.
//  - OP_LOAD_A / OP_LOAD_B: shift the records one unit along the snake
//    (r||i, then p), the first unit taking the external load word.
//
// Own choices (the device description leaves them open): the upstream
// start of a run takes 0 rather than the value of a unit outside its run
// in OP_SUM, and in OP_BCAST the run end keeps its ok flag instead of
// taking its neighbour's; without these two rules values would leak
// between adjacent runs. The counter c saturates at 255. Reset clears all
// registers.
module sieve_pu
  import sieve_pkg::*;
#(
  parameter int unsigned M   = 2048,       // mesh side
  parameter int unsigned S   = 1 << 22,    // subinterval length
  parameter int unsigned XW  = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  cmd_t          cmd,
  input  logic [XW-1:0] x,      // column, 0 = left
  input  logic [XW-1:0] y,      // row, 0 = top
  input  bus_t          tx_l,
  input  bus_t          tx_r,
  input  bus_t          tx_u,
  input  bus_t          tx_d,
  output bus_t          tx,
  output rec_t          rec
);

  localparam logic [XW-1:0] XMAX = XW'(M - 1);

  rec_t           q;
  logic [C_W-1:0] c, t1, t2;
  bus_t           rx_key;
  logic           first, last;

  assign rec = q;

  // ---- position in the snake order ---------------------------------
  logic even_row, has_pred, has_succ;
  bus_t pred_tx, succ_tx;
  always_comb begin
    even_row = ~y[0];
    has_pred = !(x == '0 && y == '0);
    has_succ = !(y == XMAX && (even_row ? (x == XMAX) : (x == '0)));
    if (even_row) begin
      pred_tx = (x != '0 || y == '0) ? tx_l : tx_u;  // (0,0): load word
      succ_tx = (x != XMAX) ? tx_r : tx_d;
    end else begin
      pred_tx = (x != XMAX) ? tx_r : tx_u;
      succ_tx = (x != '0)   ? tx_l : tx_d;
    end
  end

  // ---- sort partner -------------------------------------------------
  logic  ce_active, keep_small;
  bus_t  part_tx;
  always_comb begin
    logic low_member;
    if (!cmd.col) begin
      low_member = (x[0] == cmd.par);              // left unit of the pair
      part_tx    = low_member ? tx_r : tx_l;
      ce_active  = (low_member ? (x != XMAX) : (x != '0))
                   && ({{(16-XW){1'b0}}, y} < cmd.rows_lim);
      keep_small = (low_member == even_row) ^ cmd.desc;
    end else begin
      low_member = (y[0] == cmd.par);              // upper unit of the pair
      part_tx    = low_member ? tx_d : tx_u;
      ce_active  = low_member ? (y != XMAX && ({{(16-XW){1'b0}}, y} + 16'd1 < cmd.rows_lim))
                              : (y != '0   && ({{(16-XW){1'b0}}, y} < cmd.rows_lim));
      keep_small = low_member ^ cmd.desc;
    end
  end

  bus_t own_key, own_rest;
  always_comb begin
    own_key  = (cmd.ks == KEY_RI) ? {q.r, q.i} : {q.ok, q.r};
    own_rest = (cmd.ks == KEY_RI) ? {q.p, q.ok} : {q.p, q.i};
  end

  // ---- run roles ------------------------------------------------------
  // run end: where the log sum of a run collects (last for i=1, first for i=2)
  // run start: the opposite end
  logic run_end, run_start;
  assign run_end   = q.i ? first : last;
  assign run_start = q.i ? last  : first;

  // up: towards the run start (pred for i=1, succ for i=2); down: towards the run end
  bus_t up_tx, down_tx;
  logic has_down;
  assign up_tx    = q.i ? succ_tx  : pred_tx;
  assign down_tx  = q.i ? pred_tx  : succ_tx;
  assign has_down = q.i ? has_pred : has_succ;

  // ---- transmit word --------------------------------------------------
  always_comb begin
    unique case (cmd.op)
      OP_LOAD_A, OP_FLAGS: tx = {q.r, q.i};
      OP_LOAD_B:           tx = {q.p, 1'b0};
      OP_CE_A:             tx = own_key;
      OP_CE_B:             tx = own_rest;
      OP_SUM:              tx = BUS_W'(run_end ? '0 : c);
      OP_OK_MATCH:         tx = {q.ok, q.r};
      OP_BCAST:            tx = BUS_W'(run_start ? 1'b0 : q.ok);
      default:             tx = '0;
    endcase
  end

  // ---- step (IV) saturating add, step (VIII) subtract --------------------
  logic [C_W:0]   sum;
  logic [P_W:0]   diff;
  logic           xchg;
  assign sum  = {1'b0, c} + {1'b0, up_tx[C_W-1:0]};
  assign diff = {1'b0, q.r} - (P_W+1)'(S);
  assign xchg = keep_small ? (rx_key < own_key) : (rx_key > own_key);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q      <= '0;
      c      <= '0;
      t1     <= '0;
      t2     <= '0;
      rx_key <= '0;
      first  <= 1'b0;
      last   <= 1'b0;
    end else begin
      unique case (cmd.op)
        OP_LOAD_A: {q.r, q.i} <= pred_tx;
        OP_LOAD_B: begin
          q.p  <= pred_tx[BUS_W-1:1];
          q.ok <= 1'b0;
        end
        OP_SET_T: begin
          t1 <= cmd.t1;
          t2 <= cmd.t2;
        end
        OP_CE_A: if (ce_active) rx_key <= part_tx;
        OP_CE_B: if (ce_active && xchg) begin
          if (cmd.ks == KEY_RI) begin
            {q.r, q.i}  <= rx_key;
            {q.p, q.ok} <= part_tx;
          end else begin
            {q.ok, q.r} <= rx_key;
            {q.p, q.i}  <= part_tx;
          end
        end
        OP_LOG: c <= floor_log2(q.p);
        OP_FLAGS: begin
          first <= !has_pred || (pred_tx != {q.r, q.i});
          last  <= !has_succ || (succ_tx != {q.r, q.i});
        end
        OP_SUM: begin
          if (run_end)        c <= run_start ? c : (sum[C_W] ? '1 : sum[C_W-1:0]);
          else if (run_start) c <= '0;
          else                c <= up_tx[C_W-1:0];
        end
        OP_OK_SET: q.ok <= run_end && (c > (q.i ? t2 : t1));
        OP_OK_MATCH: q.ok <= q.ok && has_down && (down_tx == {q.ok, q.r});
        OP_BCAST: if (!run_end) q.ok <= down_tx[0];
        OP_SHIFT: q.r <= diff[P_W] ? (diff[P_W-1:0] + q.p) : diff[P_W-1:0];
        default: ;
      endcase
    end
  end

endmodule
