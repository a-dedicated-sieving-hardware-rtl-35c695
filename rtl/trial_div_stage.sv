// trial_div_stage: one stage of the trial-division pipeline.
//
// The stage holds one small divisor d (normally a prime, or a prime power
// such as 16, 4 or 2 for the smallest prime). Each clock it takes a value
// from the previous stage and passes on value / d if d divides it, else
// the value unchanged, together with a tag that travels with the value.
// Latency one clock, one value per clock.
//
// Divisors are loaded at set-up through a shift chain (div_shift moves
// div_in into this stage and the old divisor out on div_out); this loading
// path is this design's own choice. A divisor of 0 or 1 divides nothing.
module trial_div_stage #(
  parameter int unsigned W     = 256,  // value width
  parameter int unsigned DW    = 17,   // divisor width (primes < 2^17)
  parameter int unsigned TAG_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             div_shift,
  input  logic [DW-1:0]    div_in,
  output logic [DW-1:0]    div_out,
  input  logic             in_valid,
  input  logic [W-1:0]     in_val,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [W-1:0]     out_val,
  output logic [TAG_W-1:0] out_tag
);

  logic [DW-1:0] d;
  logic [W-1:0]  quo, rem;
  logic          divides;

  assign div_out = d;

  always_comb begin
    quo     = '0;
    rem     = '1;
    divides = 1'b0;
    if (d > DW'(1)) begin
      quo     = in_val / W'(d);
      rem     = in_val % W'(d);
      divides = (rem == '0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d         <= '0;
      out_valid <= 1'b0;
      out_val   <= '0;
      out_tag   <= '0;
    end else begin
      if (div_shift) d <= div_in;
      out_valid <= in_valid;
      out_val   <= divides ? quo : in_val;
      out_tag   <= in_tag;
    end
  end

endmodule
