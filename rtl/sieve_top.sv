// sieve_top: the mesh sieving device.
//
// Line sieving for the number field sieve: for a fixed b, every factor-base
// entry (p, r, i) with r = b*root mod p sits in its own processing unit of
// an M x M mesh. One run (start pulse) sieves a subinterval of length S:
// the mesh sorts the entries by r||i so that all primes hitting the same
// sieve position end up side by side, sums their floor(log2 p) values per
// factor base with neighbour-only communication, flags the positions where
// both sums exceed the thresholds T1 and T2, marks every entry of such a
// position, gathers the marked entries into the first OUT_ROWS rows by a
// second sort, copies those rows into the output buffer and finally moves
// every r to the next subinterval (r - S, plus p when negative), so that
// the next run needs no new data. For a new b the host reloads the mesh.
//
// Interface:
//  - load: ld_valid/ld_ready with (ld_p, ld_r, ld_i); one entry per two
//    clocks; M*M entries fill the mesh, the first one ends in the last unit
//    of the snake order. Unused units are loaded with p = 0, which adds 0
//    to every log sum.
//  - run: start (with thresholds t1, t2) while idle; busy during the run;
//    done pulses for one clock when the output buffer holds the result.
//  - result: rd_addr -> rd_data (one clock latency), OUT_ROWS*M entries,
//    entries with ok = 1 are the hits; n_hits counts them. A hit entry
//    (p, r, i) reports a = -A + (u-1)*S + r for the u-th subinterval.
//
// Run time in clocks from start to done: see sieve_ctrl (dominated by the
// two sorts, 2*M*(2*log2(M)+1) and about 2*M*(log2(OUT_ROWS)+2) clocks).
//
// M defaults to 64 rather than the 2048 of the full device. The memory the
// RTL tools need grows with the number of units (about 2 GB for lint and
// 3 GB for elaboration at 64 x 64, four times that at 128 x 128), and a
// 2048 x 2048 array is far out of reach.
module sieve_top
  import sieve_pkg::*;
#(
  parameter int unsigned M        = 64,
  parameter int unsigned S        = 1 << 22,
  parameter int unsigned OUT_ROWS = 4,
  parameter int unsigned NREP_SUM = 10,
  parameter int unsigned NREP_BC  = 10,
  parameter int unsigned AW       = $clog2(OUT_ROWS * M)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ld_valid,
  output logic           ld_ready,
  input  logic [P_W-1:0] ld_p,
  input  logic [P_W-1:0] ld_r,
  input  logic           ld_i,
  input  logic           start,
  input  logic [C_W-1:0] t1,
  input  logic [C_W-1:0] t2,
  output logic           busy,
  output logic           done,
  input  logic [AW-1:0]  rd_addr,
  output rec_t           rd_data,
  output logic [AW:0]    n_hits
);

  cmd_t cmd;
  bus_t load_word;
  logic out_we;
  rec_t out_recs [OUT_ROWS*M];

  sieve_ctrl #(
    .M(M), .OUT_ROWS(OUT_ROWS), .NREP_SUM(NREP_SUM), .NREP_BC(NREP_BC)
  ) u_ctrl (
    .clk, .rst_n, .ld_valid, .ld_ready, .ld_p, .ld_r, .ld_i,
    .start, .t1, .t2, .busy, .done,
    .cmd, .load_word, .out_we
  );

  sieve_mesh #(.M(M), .S(S), .OUT_ROWS(OUT_ROWS)) u_mesh (
    .clk, .rst_n, .cmd, .load_word, .out_recs
  );

  sieve_out_buffer #(.M(M), .OUT_ROWS(OUT_ROWS)) u_obuf (
    .clk, .rst_n,
    .wr_en  (out_we),
    .wr_recs(out_recs),
    .rd_addr,
    .rd_data,
    .n_hits
  );

endmodule
