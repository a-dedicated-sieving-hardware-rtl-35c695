// sieve_mesh: the M x M array of processing units.
//
// Every unit receives the same broadcast command and the 25-bit words of
// its four mesh neighbours; units on the border see zero on the missing
// sides. The left input of unit (0,0), the head of the snake order, is the
// external load word, so that loading shifts entries one by one along the
// snake (row 0 left to right, row 1 right to left, and so on).
//
// The first OUT_ROWS rows are brought out as out_recs in snake order
// (index = row * M + position along the row in snake direction); after
// step (VII) they hold the hits and are copied into the output buffer.
// There is no register or logic of its own here: timing is that of the
// units, one command per clock. Each unit's outgoing word and record are
// local nets of its generate block, read by the neighbours' blocks.
//
// M defaults to 64 rather than the 2048 of the full device. The memory the
// RTL tools need grows with the number of units (about 2 GB for lint and
// 3 GB for elaboration at 64 x 64, four times that at 128 x 128), and a
// 2048 x 2048 array is far out of reach.
module sieve_mesh
  import sieve_pkg::*;
#(
  parameter int unsigned M        = 64,
  parameter int unsigned S        = 1 << 22,
  parameter int unsigned OUT_ROWS = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  cmd_t cmd,
  input  bus_t load_word,
  output rec_t out_recs [OUT_ROWS*M]
);

  localparam int unsigned XW = (M > 1) ? $clog2(M) : 1;

  for (genvar gy = 0; gy < M; gy++) begin : g_row
    for (genvar gx = 0; gx < M; gx++) begin : g_col
      bus_t l, r, u, d;   // words from the left, right, upper, lower neighbour
      bus_t t;            // word sent by this unit
      rec_t rc;           // entry stored in this unit
      if (gx > 0) begin : g_l assign l = g_row[gy].g_col[gx-1].t; end
      else        begin : g_l0 assign l = (gy == 0) ? load_word : '0; end
      if (gx < M-1) begin : g_r assign r = g_row[gy].g_col[gx+1].t; end
      else          begin : g_r0 assign r = '0; end
      if (gy > 0) begin : g_u assign u = g_row[gy-1].g_col[gx].t; end
      else        begin : g_u0 assign u = '0; end
      if (gy < M-1) begin : g_d assign d = g_row[gy+1].g_col[gx].t; end
      else          begin : g_d0 assign d = '0; end

      sieve_pu #(.M(M), .S(S)) u_pu (
        .clk  (clk),
        .rst_n(rst_n),
        .cmd  (cmd),
        .x    (XW'(gx)),
        .y    (XW'(gy)),
        .tx_l (l),
        .tx_r (r),
        .tx_u (u),
        .tx_d (d),
        .tx   (t),
        .rec  (rc)
      );

      if (gy < OUT_ROWS) begin : g_out
        assign out_recs[gy*M + ((gy % 2 == 0) ? gx : M-1-gx)] = rc;
      end
    end
  end

endmodule
