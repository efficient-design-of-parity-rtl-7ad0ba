// div_control: sequencer of the non-restoring divider.
//
// It steers the two left-shift registers (accumulator A and quotient Q)
// through the non-restoring schedule, two clocks per quotient bit:
//   IDLE   : both registers hold. On START (sampled at the rising edge) A is
//            parallel-loaded with zero, Q with the dividend, and the divisor
//            latch is opened for that cycle.
//   SHIFT  : A:Q shift left together. A takes Q's top bit; Q takes the
//            quotient bit decided by the previous step (the complement of
//            A's sign), which is also the add/subtract control for the next
//            step.
//   ADDSUB : A is loaded with A - M (last A was >= 0) or A + M (last A < 0);
//            Q holds. After the n-th ADDSUB the sequencer goes to LASTQ.
//   LASTQ  : Q alone shifts in the last quotient bit; then back to IDLE with
//            DONE high.
// A division therefore takes 2n+2 rising edges counting the one that
// accepts START. DONE stays high until the next START; BUSY is high from the
// edge after START until DONE rises. START is ignored while BUSY. The
// source describes the datapath only; this sequencer and its reset (active
// low, synchronous) are this design's own.
module div_control
  import pp_div_pkg::*;
#(
  parameter int unsigned N = DIV_N
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  output logic      m_load,   // divisor latch enable
  output logic      a_clear,  // make A's parallel input zero
  output lsr_mode_t a_mode,
  output lsr_mode_t q_mode,
  output logic      busy,
  output logic      done
);
  localparam int unsigned CW = $clog2(N + 1);

  div_state_t    state, state_nx;
  logic [CW-1:0] cnt;
  logic          accept;

  assign accept  = (state == ST_IDLE) && start;
  assign m_load  = accept;
  assign a_clear = accept;
  assign busy    = (state != ST_IDLE);

  always_comb begin
    state_nx = state;
    a_mode   = MODE_HOLD;
    q_mode   = MODE_HOLD;
    unique case (state)
      ST_IDLE: if (start) begin
        a_mode   = MODE_LOAD;
        q_mode   = MODE_LOAD;
        state_nx = ST_SHIFT;
      end
      ST_SHIFT: begin
        a_mode   = MODE_SHIFT;
        q_mode   = MODE_SHIFT;
        state_nx = ST_ADDSUB;
      end
      ST_ADDSUB: begin
        a_mode   = MODE_LOAD;
        state_nx = (cnt == CW'(N - 1)) ? ST_LASTQ : ST_SHIFT;
      end
      ST_LASTQ: begin
        q_mode   = MODE_SHIFT;
        state_nx = ST_IDLE;
      end
      default: state_nx = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      state <= state_nx;
      if (accept)              cnt <= '0;
      else if (state == ST_ADDSUB) cnt <= cnt + 1'b1;
      if (accept)                  done <= 1'b0;
      else if (state == ST_LASTQ)  done <= 1'b1;
    end
  end

  // The add/subtract step always follows a shift, and the schedule always
  // ends with the quotient-only shift.
  a_addsub_after_shift: assert property (@(posedge clk) disable iff (!rst_n)
    state == ST_ADDSUB |-> $past(state) == ST_SHIFT);
  a_lastq_then_done: assert property (@(posedge clk) disable iff (!rst_n)
    state == ST_LASTQ |=> state == ST_IDLE && done);
endmodule
