// sieve_pkg: types and constants shared by the mesh sieving device.
//
// A processing unit (PU) of the mesh holds one factor-base entry: a prime
// (or a multiple k*p of a small prime) p, the residue r of the next sieve
// position it hits relative to the start of the current subinterval, the
// factor-base flag i (algebraic or rational side) and the "ok" hit flag.
// Neighbouring PUs talk over one 25-bit word per clock, as in the device
// description: a sort step sends the 25-bit key in its first cycle and the
// other 25 bits of the record in its second.
//
// Encoding of i (own choice): 1'b0 stands for factor base 1 (algebraic),
// 1'b1 for factor base 2 (rational), so that the concatenation r||i orders
// the algebraic entries of a residue before its rational entries.
package sieve_pkg;

  localparam int unsigned P_W   = 24;  // prime / residue width (primes < 2^24)
  localparam int unsigned C_W   = 8;   // log2 sum counter and threshold width
  localparam int unsigned BUS_W = 25;  // neighbour link width

  typedef logic [BUS_W-1:0] bus_t;

  // One factor-base entry as stored and moved by the mesh.
  typedef struct packed {
    logic [P_W-1:0] p;
    logic [P_W-1:0] r;
    logic           i;   // 0: factor base 1 (algebraic), 1: factor base 2 (rational)
    logic           ok;
  } rec_t;

  // Commands broadcast from the controller to every PU.
  typedef enum logic [3:0] {
    OP_NOP      = 4'd0,
    OP_LOAD_A   = 4'd1,   // load chain, first half: shift r||i one PU along the snake
    OP_LOAD_B   = 4'd2,   // load chain, second half: shift p||0
    OP_SET_T    = 4'd3,   // latch thresholds T1, T2
    OP_CE_A     = 4'd4,   // compare-exchange, cycle 1: exchange keys
    OP_CE_B     = 4'd5,   // compare-exchange, cycle 2: exchange the rest, decide
    OP_LOG      = 4'd6,   // step (II):  c <= floor(log2 p)
    OP_FLAGS    = 4'd7,   // steps (III)/(VI): first/last of an r||i run
    OP_SUM      = 4'd8,   // step (IV):  one shift-and-accumulate of c
    OP_OK_SET   = 4'd9,   // step (V), part 1: ok <= (c > T_i) at the run end
    OP_OK_MATCH = 4'd10,  // step (V), part 2: compare ok||r with the other side
    OP_BCAST    = 4'd11,  // step (VI): one shift of the ok flag through the run
    OP_SHIFT    = 4'd12   // step (VIII): r <= r - S (+ p if negative)
  } op_e;

  // Key used by a sort: r||i ascending (step I) or ok||r descending (step VII).
  typedef enum logic { KEY_RI = 1'b0, KEY_OKR = 1'b1 } key_e;

  typedef struct packed {
    op_e            op;
    key_e           ks;        // key select for OP_CE_*
    logic           col;       // 0: row phase, 1: column phase
    logic           par;       // odd-even transposition parity
    logic           desc;      // 1: larger keys first
    logic [15:0]    rows_lim;  // only rows below this index take part in a sort step
    logic [C_W-1:0] t1;        // threshold, factor base 1 (OP_SET_T)
    logic [C_W-1:0] t2;        // threshold, factor base 2 (OP_SET_T)
  } cmd_t;

  // floor(log2 p) by leading-zero count; 0 for p = 0 and p = 1.
  function automatic logic [C_W-1:0] floor_log2(input logic [P_W-1:0] v);
    logic [C_W-1:0] res;
    res = '0;
    for (int k = 0; k < P_W; k++)
      if (v[k]) res = C_W'(k);
    return res;
  endfunction

endpackage
