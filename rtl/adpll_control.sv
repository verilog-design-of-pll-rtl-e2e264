// adpll_control: state machine of the ADPLL (frequency search, then phase tracking).
//
// Clocked by the rising edge of the reference CLK_REF. When ENABLE is seen high the machine
// spends one reference cycle in TDC_A (TDC_A_ENABLE: the coarse flash samples the reference
// high phase) and one in TDC_B (TDC_B_ENABLE: the fine flash samples the remainder). At the
// end of the second cycle it turns the half period TDC_HPER into a starting DCO code: the
// wanted DCO half period is TDC_HPER / N_DIV, the coarse code is how many coarse steps that
// lies above the fastest half period, and the fine code how many fine steps are left over.
// It then raises DCO_ENABLE on that same reference edge and enters TRACK.
//
// In TRACK the UP/DN decision of the digital filter is taken over at the falling reference
// edge (the filter settles it within a few DCO cycles of the reference rising edge and holds
// it until a few DCO cycles after the falling edge) and moves the fine code at the next rising
// edge, once per reference cycle: UP (the reference leads, DCO too slow) shortens the delay,
// DN lengthens it. The correction has an integral part, an accumulator with INT_FRAC
// fractional bits that moves one fine step every 2**INT_FRAC consistent decisions, and a
// proportional part of PROP_STEPS fine steps for the current decision only. When the integral
// part runs past fine code 0 or FINE_MAX it carries into the coarse code and moves back by one
// coarse step's worth of fine steps (181/28, rounded in integral units), which keeps the DCO
// period nearly continuous across the carry. Decisions reach the DCO one reference cycle
// after the comparison that produced them.
// LOCKED is high after LOCK_CYC reference cycles in TRACK without a coarse change and without
// a decision that would push the code past either end of its range (target out of reach). ENABLE
// low returns to IDLE and stops the DCO.
//
// From the design: the two reference cycles of TDC search, the coarse code from the TDC, the
// switch to tracking and fine-code steering by UP/DN. Choices made here: the code arithmetic,
// the proportional/integral split, the coarse carry, the half-cycle hand-over and the lock rule.
`timescale 1ps/1ps
module adpll_control
  import adpll_pkg::*;
#(
  parameter int unsigned INT_FRAC    = 2,
  parameter int unsigned PROP_STEPS  = 1,
  parameter int unsigned LOCK_CYC    = 32
) (
  input  logic        clk_ref,
  input  logic        rst_n,
  input  logic        enable,
  input  ndiv_t       n_div,
  input  hper_t       tdc_hper,
  input  logic        up,
  input  logic        dn,
  output logic        tdc_a_en,
  output logic        tdc_b_en,
  output logic        dco_enable,
  output dco_tune_t   tune,
  output logic        locked,
  output ctrl_state_t state
);

  localparam int unsigned IW    = FINE_W + INT_FRAC + 1;
  localparam int unsigned I_MIN  = 0;
  localparam int unsigned I_MAX  = (FINE_MAX << INT_FRAC) | ((1 << INT_FRAC) - 1);
  // one coarse step in integral units, rounded: (181 << INT_FRAC) / 28
  localparam int unsigned I_WRAP = ((COARSE_STEP_PS << INT_FRAC) + FINE_STEP_PS / 2) / FINE_STEP_PS;
  localparam int unsigned LW    = $clog2(LOCK_CYC + 1);

  logic                   up_s, dn_s;
  logic [IW-1:0]          integ, integ_nxt, integ_init;
  coarse_t                coarse_nxt, coarse_init;
  fine_t                  fine_nxt, fine_init;
  logic [LW-1:0]          lock_cnt;
  logic                   pinned;     // a decision asked for a code beyond the DCO's range

  // ---- starting code from the TDC result --------------------------------------------
  hper_t target, excess;
  ndiv_t n_eff;
  always_comb begin
    int unsigned c, rem, f;
    n_eff  = (n_div == '0) ? ndiv_t'(1) : n_div;
    target = tdc_hper / hper_t'(n_eff);
    excess = (target > hper_t'(DCO_HALF_MIN_PS)) ? target - hper_t'(DCO_HALF_MIN_PS) : '0;
    c      = int'(excess) / COARSE_STEP_PS;
    if (c > COARSE_MAX) begin
      c   = COARSE_MAX;
      rem = FINE_MAX * FINE_STEP_PS;
    end else begin
      rem = int'(excess) - c * COARSE_STEP_PS;
    end
    f = rem / FINE_STEP_PS;
    if (f > FINE_MAX) f = FINE_MAX;
    coarse_init = coarse_t'(c);
    integ_init = IW'(f << INT_FRAC);
    fine_init = fine_t'(integ_init >> INT_FRAC);
  end

  // ---- tracking step --------------------------------------------------------------------
  // UP/DN settle a few DCO cycles after each reference rising edge and then hold until the
  // next one, so they are taken over at the falling reference edge, half a period later.
  always_ff @(negedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      up_s <= 1'b0;
      dn_s <= 1'b0;
    end else begin
      up_s <= (state == ST_TRACK) && up;
      dn_s <= (state == ST_TRACK) && dn;
    end
  end

  always_comb begin
    logic [IW-1:0] base;
    coarse_nxt = tune.coarse;
    integ_nxt  = integ;
    pinned     = 1'b0;
    if (up_s && !dn_s) begin
      if (integ == IW'(I_MIN)) begin
        if (tune.coarse != '0) begin
          coarse_nxt = tune.coarse - 1'b1;
          integ_nxt  = integ - 1'b1 + IW'(I_WRAP);
        end else begin
          pinned = 1'b1;
        end
      end else begin
        integ_nxt = integ - 1'b1;
      end
    end else if (dn_s && !up_s) begin
      if (integ == IW'(I_MAX)) begin
        if (tune.coarse != coarse_t'(COARSE_MAX)) begin
          coarse_nxt = tune.coarse + 1'b1;
          integ_nxt  = integ + 1'b1 - IW'(I_WRAP);
        end else begin
          pinned = 1'b1;
        end
      end else begin
        integ_nxt = integ + 1'b1;
      end
    end
    base = integ_nxt >> INT_FRAC;
    // proportional part, clipped to the fine range
    if (up_s && !dn_s)
      fine_nxt = (base > IW'(PROP_STEPS)) ? fine_t'(base - IW'(PROP_STEPS)) : '0;
    else if (dn_s && !up_s)
      fine_nxt = (base + IW'(PROP_STEPS) < IW'(FINE_MAX)) ? fine_t'(base + IW'(PROP_STEPS))
                                                         : fine_t'(FINE_MAX);
    else
      fine_nxt = fine_t'(base);
  end

  // ---- state machine --------------------------------------------------------------------
  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      tune     <= '0;
      integ    <= IW'(I_MIN);
      lock_cnt <= '0;
    end else begin
      case (state)
        ST_IDLE:  if (enable) state <= ST_TDC_A;
        ST_TDC_A: state <= enable ? ST_TDC_B : ST_IDLE;
        ST_TDC_B: begin
          if (enable) begin
            state       <= ST_TRACK;
            tune.coarse <= coarse_init;
            tune.fine   <= fine_init;
            integ       <= integ_init;
            lock_cnt    <= '0;
          end else begin
            state <= ST_IDLE;
          end
        end
        ST_TRACK: begin
          if (!enable) begin
            state <= ST_IDLE;
          end else begin
            tune.coarse <= coarse_nxt;
            tune.fine   <= fine_nxt;
            integ       <= integ_nxt;
            if (coarse_nxt != tune.coarse || pinned) lock_cnt <= '0;
            else if (lock_cnt != LW'(LOCK_CYC)) lock_cnt <= lock_cnt + 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign tdc_a_en   = (state == ST_TDC_A);
  assign tdc_b_en   = (state == ST_TDC_B);
  assign dco_enable = (state == ST_TRACK);
  assign locked     = (state == ST_TRACK) && (lock_cnt == LW'(LOCK_CYC));

  a_coarse_range: assert property (@(posedge clk_ref) disable iff (!rst_n)
                                   tune.coarse <= coarse_t'(COARSE_MAX));

endmodule
