// trial_div_pipeline: the trial-division pipeline for small primes.
//
// Primes below the sieving bound that the mesh does not handle (the
// first 12,251 primes for S = 2^22) are divided out here: the values
// F1(a,b) and F2(a,b) of a candidate pair enter one after the other, and
// stage k divides the value by its divisor d_k once if d_k divides it.
// The result leaves after NSTAGES clocks; a following processor compares
// its bit length with the stored log sum. One value per clock, tags
// (e.g. table index and side) travel with the values.
//
// Divisors are loaded before use through a shift chain: NSTAGES pulses of
// div_shift with the divisors presented on div_in, last stage first. To
// remove all powers of a very small prime, several stages may hold its
// powers (16, 4, 2 remove every power of 2 up to 2^7). The pipeline does
// not record which divisors it removed; those are recovered later.
//
// The value width W = 256 is this design's own choice (it covers the
// algebraic norms of a 512-bit factorisation); the stage count follows the
// 12,251 primes named for the main configuration.
module trial_div_pipeline #(
  parameter int unsigned NSTAGES = 12251,
  parameter int unsigned W       = 256,
  parameter int unsigned DW      = 17,
  parameter int unsigned TAG_W   = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             div_shift,
  input  logic [DW-1:0]    div_in,
  input  logic             in_valid,
  input  logic [W-1:0]     in_val,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [W-1:0]     out_val,
  output logic [TAG_W-1:0] out_tag
);

  // Each stage's outputs are local nets of its generate block; stage k
  // reads those of stage k-1.
  for (genvar k = 0; k < NSTAGES; k++) begin : g_stage
    logic             v_i, v_o;
    logic [W-1:0]     val_i, val_o;
    logic [TAG_W-1:0] tag_i, tag_o;
    logic [DW-1:0]    d_i, d_o;
    if (k == 0) begin : g_first
      assign v_i   = in_valid;
      assign val_i = in_val;
      assign tag_i = in_tag;
      assign d_i   = div_in;
    end else begin : g_next
      assign v_i   = g_stage[k-1].v_o;
      assign val_i = g_stage[k-1].val_o;
      assign tag_i = g_stage[k-1].tag_o;
      assign d_i   = g_stage[k-1].d_o;
    end
    trial_div_stage #(.W(W), .DW(DW), .TAG_W(TAG_W)) u_stage (
      .clk, .rst_n, .div_shift,
      .div_in   (d_i),
      .div_out  (d_o),
      .in_valid (v_i),
      .in_val   (val_i),
      .in_tag   (tag_i),
      .out_valid(v_o),
      .out_val  (val_o),
      .out_tag  (tag_o)
    );
  end

  assign out_valid = g_stage[NSTAGES-1].v_o;
  assign out_val   = g_stage[NSTAGES-1].val_o;
  assign out_tag   = g_stage[NSTAGES-1].tag_o;

endmodule
