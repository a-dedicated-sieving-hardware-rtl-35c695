// tb_sieve_out_buffer: test of the output buffer.
//
// Writes two different sets of entries in parallel, reads every address
// back with its one-clock latency and compares with the written data,
// checks the hit count of each write and that the contents hold while
// wr_en is low.
module tb_sieve_out_buffer;
  import sieve_pkg::*;

  localparam int unsigned M = 8, R = 4, N = M * R, AW = 5;

  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0;
  rec_t wr_recs [N];
  rec_t ref_recs [N];
  logic [AW-1:0] rd_addr = '0;
  rec_t rd_data;
  logic [AW:0] n_hits;

  always #5 clk = ~clk;

  sieve_out_buffer #(.M(M), .OUT_ROWS(R)) dut (.clk, .rst_n, .wr_en, .wr_recs, .rd_addr, .rd_data, .n_hits);

  int checks = 0, failures = 0;

  task automatic fill(int seed);
    for (int k = 0; k < int'(N); k++) begin
      wr_recs[k].p  = P_W'($urandom);
      wr_recs[k].r  = P_W'($urandom);
      wr_recs[k].i  = 1'($urandom);
      wr_recs[k].ok = ((k * 7 + seed) % 5) == 0;
    end
  endtask

  task automatic read_all(string what);
    for (int k = 0; k < int'(N); k++) begin
      rd_addr = AW'(k);
      @(posedge clk); #1;
      checks++;
      if (rd_data != ref_recs[k]) begin
        failures++;
        $display("FAIL %s: address %0d", what, k);
      end
    end
  endtask

  initial begin
    int hits;
    fill(0);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int w = 0; w < 2; w++) begin
      fill(w);
      hits = 0;
      for (int k = 0; k < int'(N); k++) begin
        ref_recs[k] = wr_recs[k];
        hits += int'(wr_recs[k].ok);
      end
      wr_en = 1'b1;
      @(posedge clk); #1;
      wr_en = 1'b0;
      checks++;
      if (int'(n_hits) != hits) begin failures++; $display("FAIL n_hits %0d expected %0d", n_hits, hits); end
      fill(w + 3);        // change the inputs while wr_en is low
      read_all("read back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
