// hybrid_div_ctrl: controller of the hybrid restoring / non-restoring
// decimal divider.
//
// Walks the flow of the hybrid algorithm one add/subtract per cycle. For
// each of the n quotient digits it repeatedly subtracts the divisor while
// the partial remainder is non-negative (quotient + 1) or adds it while the
// remainder is negative (quotient - 1), until the remainder changes sign.
// At that point the remainder before the last step (Pre_R) and after it
// (Cur_R) straddle zero. If |Pre_R| >= |Cur_R| the digit ends as in
// non-restoring division: Cur_R is kept, even if negative. Otherwise the
// digit ends as in restoring division: the last step is undone (one more
// add or subtract) and Pre_R is kept. Keeping the remainder of smaller
// magnitude makes the next digit cheap whichever sign it has; this reading
// of the "previous greater (less) than current" rule as a comparison of
// magnitudes is this design's interpretation, and it reproduces the
// published worst-case operation counts. Between digits remainder and
// quotient shift one digit left. After the last digit a negative remainder
// gets one final addition of the divisor and the quotient is decremented.
//
// Timing: start is taken in ST_IDLE (1 cycle, load). Each plain add/subtract
// takes one cycle. Each digit ends with one decision cycle, which also
// performs the undo step of a restoring digit and the digit shift. The
// final correction, if needed, is one more cycle. done pulses for one cycle
// after the last register update; busy is high from the cycle after start
// until done. op_count counts every add/subtract of the divisor (plain,
// undo and final), the cost measure the algorithm is judged by.
//
// Overflow: the dividend X must be less than 10*D so that the first quotient
// digit is at most 9. If the quotient reaches 10 during the first digit while
// the remainder is still non-negative, the division stops with overflow = 1
// (this also catches D = 0). num_digits outside 1..N is read as N. Both are
// this design's choices, as is the start/busy/done handshake.
module hybrid_div_ctrl
  import hdiv_pkg::*;
#(
  parameter int N = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [$clog2(N+1)-1:0] num_digits,
  input  dp_status_t             st,
  output dp_ctrl_t               ctl,
  output logic                   busy,
  output logic                   done,
  output logic                   overflow,
  output logic [15:0]            op_count
);
  localparam int IW = $clog2(N+1);

  state_t          state, state_n;
  logic [IW-1:0]   idx, idx_n, n_lat, n_sel;
  logic            first, first_n;
  logic            done_n, ovf_n;
  logic            changed, last, result_neg;

  always_comb begin
    if (num_digits == '0 || int'(num_digits) > N) n_sel = IW'(N);
    else                                          n_sel = num_digits;
  end

  always_comb begin
    ctl        = '0;
    state_n    = state;
    idx_n      = idx;
    first_n    = first;
    done_n     = 1'b0;
    ovf_n      = overflow;
    changed    = !first && (st.cur_neg != st.pre_neg);
    last       = (idx == n_lat - IW'(1));
    // sign of the kept remainder: Cur_R (non-restoring) or Pre_R (restoring)
    result_neg = st.pre_ge_cur ? st.cur_neg : st.pre_neg;
    unique case (state)
      ST_IDLE: begin
        if (start) begin
          ctl.load = 1'b1;
          idx_n    = '0;
          first_n  = 1'b1;
          ovf_n    = 1'b0;
          state_n  = ST_RUN;
        end
      end
      ST_RUN: begin
        if (!changed) begin
          if (idx == '0 && !st.cur_neg && st.q_ge10) begin
            ovf_n   = 1'b1;
            done_n  = 1'b1;
            state_n = ST_IDLE;
          end else begin
            ctl.arith    = 1'b1;
            ctl.sub      = !st.cur_neg;
            ctl.save_pre = 1'b1;
            first_n      = 1'b0;
          end
        end else begin
          if (!st.pre_ge_cur) begin
            // restoring choice: undo the step that crossed zero
            ctl.arith = 1'b1;
            ctl.sub   = !st.cur_neg;
          end
          if (last) begin
            if (result_neg) state_n = ST_FIX;
            else begin
              done_n  = 1'b1;
              state_n = ST_IDLE;
            end
          end else begin
            ctl.shift = 1'b1;
            idx_n     = idx + IW'(1);
            first_n   = 1'b1;
          end
        end
      end
      ST_FIX: begin
        ctl.arith = 1'b1;
        ctl.sub   = 1'b0;
        done_n    = 1'b1;
        state_n   = ST_IDLE;
      end
      default: state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      idx      <= '0;
      n_lat    <= IW'(1);
      first    <= 1'b1;
      done     <= 1'b0;
      overflow <= 1'b0;
      op_count <= '0;
    end else begin
      state    <= state_n;
      idx      <= idx_n;
      first    <= first_n;
      done     <= done_n;
      overflow <= ovf_n;
      if (ctl.load) begin
        n_lat    <= n_sel;
        op_count <= '0;
      end else if (ctl.arith) begin
        op_count <= op_count + 16'd1;
      end
    end
  end

  assign busy = (state != ST_IDLE);

  // Command rules: a load only when idle, never together with arithmetic,
  // and a shift only in the digit loop.
  a_load_idle:  assert property (@(posedge clk) disable iff (!rst_n)
                                 ctl.load |-> (state == ST_IDLE && !ctl.arith && !ctl.shift));
  a_shift_run:  assert property (@(posedge clk) disable iff (!rst_n)
                                 ctl.shift |-> state == ST_RUN);
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                                 done |-> !busy);
endmodule
