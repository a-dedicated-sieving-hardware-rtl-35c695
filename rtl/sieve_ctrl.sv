// sieve_ctrl: program sequencer of the sieving mesh.
//
// The processing units hold almost no program logic: this block, placed
// outside the array, produces one command per clock and broadcasts it to
// every unit. Two jobs exist:
//
//  - Load. While idle, every accepted load word (p, r, i) becomes two
//    commands, OP_LOAD_A (r||i) and OP_LOAD_B (p), which shift all entries
//    one unit further along the snake order. M*M words fill the mesh; the
//    first word ends in the last unit.
//  - Sieve one subinterval (start pulse), steps (I) to (VIII):
//      SET_T                      1 clock   thresholds to every unit
//      (I)   sort by r||i, ascending snake order          2*M*(2*log2(M)+1)
//      (II)  OP_LOG               1 clock
//      (III) OP_FLAGS             1 clock
//      (IV)  OP_SUM               NREP_SUM clocks
//      (V)   OP_OK_SET, OP_OK_MATCH  2 clocks
//      (VI)  OP_FLAGS, OP_BCAST   1 + NREP_BC clocks
//      (VII) column sort by ok||r, descending             2*M
//            sort of the first OUT_ROWS rows, snake order  2*(M*(log2(R)+1) + R*log2(R))
//            copy of those rows to the output buffer       1 clock (out_we)
//      (VIII) OP_SHIFT            1 clock
//    done pulses in the clock after the last command.
//
// Sorting: the device cites Schimmler's algorithm (8M-8 steps) without
// giving its schedule. This sequencer uses shearsort instead, which is
// built from the same elementary compare-exchange step (odd-even
// transposition along rows in snake directions, then along columns,
// log2(M)+1 row phases and log2(M) column phases of M steps each). It
// sorts correctly but needs (2*log2(M)+1)*M steps instead of about 8M.
// Each step takes two clocks, as in the device description.
module sieve_ctrl
  import sieve_pkg::*;
#(
  parameter int unsigned M        = 2048,
  parameter int unsigned OUT_ROWS = 4,
  parameter int unsigned NREP_SUM = 10,
  parameter int unsigned NREP_BC  = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // load port: one (p, r, i) entry per handshake
  input  logic                   ld_valid,
  output logic                   ld_ready,
  input  logic [P_W-1:0]         ld_p,
  input  logic [P_W-1:0]         ld_r,
  input  logic                   ld_i,
  // sieve one subinterval
  input  logic                   start,
  input  logic [C_W-1:0]         t1,
  input  logic [C_W-1:0]         t2,
  output logic                   busy,
  output logic                   done,
  // to the mesh and the output buffer
  output cmd_t                   cmd,
  output bus_t                   load_word,
  output logic                   out_we
);

  localparam int unsigned LGM = $clog2(M);
  localparam int unsigned LGR = $clog2(OUT_ROWS);

  typedef enum logic [3:0] {
    ST_IDLE, ST_LD_B, ST_SET_T, ST_SORT1, ST_LOG, ST_FLAGS, ST_SUM, ST_OK_SET,
    ST_OK_MATCH, ST_FLAGS2, ST_BCAST, ST_SORT7C, ST_SORT7T, ST_OUT, ST_SHIFT
  } state_e;

  state_e         state;
  logic [15:0]    phase;    // phase of a sort
  logic [15:0]    step;     // step within a phase, or repetition counter
  logic           half;     // 0: first clock of a compare-exchange step
  logic [P_W-1:0] ld_p_q;
  logic [C_W-1:0] t1_q, t2_q;

  // Shape of the current sort phase
  logic        ph_col;
  logic [15:0] ph_len, n_phases, rows;
  always_comb begin
    ph_col   = 1'b0;
    ph_len   = 16'(M);
    n_phases = 16'(2*LGM + 1);
    rows     = 16'(M);
    unique case (state)
      ST_SORT7C: begin
        ph_col   = 1'b1;
        n_phases = 16'd1;
      end
      ST_SORT7T: begin
        ph_col   = phase[0];
        ph_len   = phase[0] ? 16'(OUT_ROWS) : 16'(M);
        n_phases = 16'(2*LGR + 1);
        rows     = 16'(OUT_ROWS);
      end
      default: begin
        ph_col = phase[0];
      end
    endcase
  end

  logic sort_last;  // last clock of the sort job
  assign sort_last = half && (step == ph_len - 16'd1) && (phase == n_phases - 16'd1);

  always_comb begin
    cmd       = '0;
    cmd.op    = OP_NOP;
    cmd.t1    = t1_q;
    cmd.t2    = t2_q;
    load_word = '0;
    out_we    = 1'b0;
    ld_ready  = (state == ST_IDLE) && !start;
    unique case (state)
      ST_IDLE: if (ld_valid && !start) begin
        cmd.op    = OP_LOAD_A;
        load_word = {ld_r, ld_i};
      end
      ST_LD_B: begin
        cmd.op    = OP_LOAD_B;
        load_word = {ld_p_q, 1'b0};
      end
      ST_SET_T:    cmd.op = OP_SET_T;
      ST_SORT1, ST_SORT7C, ST_SORT7T: begin
        cmd.op       = half ? OP_CE_B : OP_CE_A;
        cmd.ks       = (state == ST_SORT1) ? KEY_RI : KEY_OKR;
        cmd.desc     = (state != ST_SORT1);
        cmd.col      = ph_col;
        cmd.par      = step[0];
        cmd.rows_lim = rows;
      end
      ST_LOG:      cmd.op = OP_LOG;
      ST_FLAGS:    cmd.op = OP_FLAGS;
      ST_SUM:      cmd.op = OP_SUM;
      ST_OK_SET:   cmd.op = OP_OK_SET;
      ST_OK_MATCH: cmd.op = OP_OK_MATCH;
      ST_FLAGS2:   cmd.op = OP_FLAGS;
      ST_BCAST:    cmd.op = OP_BCAST;
      ST_OUT:      out_we = 1'b1;
      ST_SHIFT:    cmd.op = OP_SHIFT;
      default: ;
    endcase
  end

  assign busy = (state != ST_IDLE) && (state != ST_LD_B);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      phase  <= '0;
      step   <= '0;
      half   <= 1'b0;
      ld_p_q <= '0;
      t1_q   <= '0;
      t2_q   <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          phase <= '0;
          step  <= '0;
          half  <= 1'b0;
          if (start) begin
            t1_q  <= t1;
            t2_q  <= t2;
            state <= ST_SET_T;
          end else if (ld_valid) begin
            ld_p_q <= ld_p;
            state  <= ST_LD_B;
          end
        end
        ST_LD_B:  state <= ST_IDLE;
        ST_SET_T: state <= ST_SORT1;
        ST_SORT1, ST_SORT7C, ST_SORT7T: begin
          half <= ~half;
          if (half) begin
            if (step == ph_len - 16'd1) begin
              step  <= '0;
              phase <= phase + 16'd1;
            end else begin
              step <= step + 16'd1;
            end
          end
          if (sort_last) begin
            phase <= '0;
            unique case (state)
              ST_SORT1:  state <= ST_LOG;
              ST_SORT7C: state <= ST_SORT7T;
              default:   state <= ST_OUT;
            endcase
          end
        end
        ST_LOG:   state <= ST_FLAGS;
        ST_FLAGS: state <= ST_SUM;
        ST_SUM: begin
          if (step == 16'(NREP_SUM - 1)) begin
            step  <= '0;
            state <= ST_OK_SET;
          end else begin
            step <= step + 16'd1;
          end
        end
        ST_OK_SET:   state <= ST_OK_MATCH;
        ST_OK_MATCH: state <= ST_FLAGS2;
        ST_FLAGS2:   state <= ST_BCAST;
        ST_BCAST: begin
          if (step == 16'(NREP_BC - 1)) begin
            step  <= '0;
            state <= ST_SORT7C;
          end else begin
            step <= step + 16'd1;
          end
        end
        ST_OUT:   state <= ST_SHIFT;
        ST_SHIFT: begin
          state <= ST_IDLE;
          done  <= 1'b1;
        end
        default:  state <= ST_IDLE;
      endcase
    end
  end

  // A subinterval is only started from idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (state == ST_IDLE));

endmodule
