// sieve_out_buffer: output buffer of the sieving mesh.
//
// After step (VII) the hits of a subinterval sit in the first OUT_ROWS
// rows of the mesh. On wr_en those OUT_ROWS*M entries are written in
// parallel, in snake order, into this buffer, which an external reader
// then scans one entry per clock through rd_addr / rd_data (one clock of
// read latency). The buffer also counts, in the same write, how many of the
// stored entries carry ok = 1 (n_hits), so that a reader can stop early;
// the count is this design's own addition for convenience. Reset clears the
// buffer and the count.
module sieve_out_buffer
  import sieve_pkg::*;
#(
  parameter int unsigned M        = 2048,
  parameter int unsigned OUT_ROWS = 4,
  parameter int unsigned N        = OUT_ROWS * M,
  parameter int unsigned AW       = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  rec_t          wr_recs [N],
  input  logic [AW-1:0] rd_addr,
  output rec_t          rd_data,
  output logic [AW:0]   n_hits
);

  rec_t mem [N];

  logic [AW:0] cnt;
  always_comb begin
    cnt = '0;
    for (int k = 0; k < int'(N); k++)
      cnt += (AW+1)'(wr_recs[k].ok);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(N); k++) mem[k] <= '0;
      n_hits  <= '0;
      rd_data <= '0;
    end else begin
      if (wr_en) begin
        for (int k = 0; k < int'(N); k++) mem[k] <= wr_recs[k];
        n_hits <= cnt;
      end
      rd_data <= mem[rd_addr];
    end
  end

endmodule
