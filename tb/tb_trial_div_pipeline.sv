// tb_trial_div_pipeline: test of the trial-division pipeline.
//
// Eight stages hold the divisors 16, 4, 2, 3, 5, 7, 11, 13, loaded through
// the divisor chain. A stream of values, one per clock, with planted small
// factors (including high powers of 2 and repeated odd primes) goes
// through; each output is compared with the value divided here once by
// every divisor that divides it, in stage order, and must come out after
// exactly eight clocks with its tag.
module tb_trial_div_pipeline;

  localparam int unsigned NS = 8, W = 64, DW = 17, TAG_W = 16;
  localparam int unsigned NV = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic div_shift = 1'b0;
  logic [DW-1:0] div_in = '0;
  logic in_valid = 1'b0;
  logic [W-1:0] in_val = '0;
  logic [TAG_W-1:0] in_tag = '0;
  logic out_valid;
  logic [W-1:0] out_val;
  logic [TAG_W-1:0] out_tag;

  always #5 clk = ~clk;

  trial_div_pipeline #(.NSTAGES(NS), .W(W), .DW(DW), .TAG_W(TAG_W)) dut (
    .clk, .rst_n, .div_shift, .div_in, .in_valid, .in_val, .in_tag, .out_valid, .out_val, .out_tag
  );

  int unsigned divs [NS] = '{16, 4, 2, 3, 5, 7, 11, 13};
  longint unsigned vals [NV];
  longint unsigned expv [NV];
  int unsigned     t_in [NV];
  int checks = 0, failures = 0, n_out = 0, n_div2 = 0;
  int cyc = 0;

  always @(posedge clk) cyc++;

  initial begin
    // stimulus and expected values
    for (int k = 0; k < int'(NV); k++) begin
      longint unsigned v;
      v = longint'($urandom % 100000) * 1009 + 1;
      repeat ($urandom % 8) v = v * 2;
      repeat ($urandom % 3) v = v * 3;
      repeat ($urandom % 2) v = v * 13;
      vals[k] = v;
      for (int s = 0; s < int'(NS); s++)
        if (v % divs[s] == 0) begin
          v = v / divs[s];
          if (s < 3) n_div2++;
        end
      expv[k] = v;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // divisors: the last stage's divisor goes in first
    for (int s = NS - 1; s >= 0; s--) begin
      div_shift = 1'b1;
      div_in = DW'(divs[s]);
      @(posedge clk); #1;
    end
    div_shift = 1'b0;
    for (int k = 0; k < int'(NV); k++) begin
      in_valid = 1'b1;
      in_val = vals[k];
      in_tag = TAG_W'(k);
      t_in[k] = cyc;
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    repeat (NS + 2) @(posedge clk);
    checks++;
    if (n_out != int'(NV)) begin failures++; $display("FAIL %0d outputs, expected %0d", n_out, NV); end
    checks++;
    if (n_div2 == 0) begin failures++; $display("FAIL no power of two divided"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int k;
    k = int'(out_tag);
    checks++;
    if (out_val != expv[k] || cyc - t_in[k] != int'(NS)) begin
      failures++;
      $display("FAIL tag %0d: got %0d after %0d clocks, expected %0d after %0d", k, out_val, cyc - t_in[k], expv[k], NS);
    end
    n_out++;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
