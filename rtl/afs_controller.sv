// afs_controller -- adaptive frequency switching (AFS).
//
// On a channel-switch request the controller first measures the local
// frequency step of one coarse DCO capacitor, dFc, expressed as
// M = dFc / F_ref (in DCO periods), and then moves the coarse bank by
//     dIc = round(dFCW / M)
// at the same cycle the new FCW is applied, so the PLL starts close to the
// target frequency and the auxiliary loops only clean up the residue.
//
// Sequence (one step per reference cycle):
//   PULSE  coarse code +1 for exactly one cycle: the DCO runs dFc faster for
//          one reference period, which injects a time error of M * T0.
//   WAIT   WAIT_CYC cycles for the injected error to reach the phase
//          detector through the loop latency.
//   STAIR  the calibration word cal[k] rises by STEP per cycle. cal is
//          differentiated and added to the FCW, so the divider phase is
//          pushed back by cal[k] DCO periods. The first main-BBPD sample of
//          the staircase gives the sign of the injected error; when the
//          BBPD output flips, the error has been cancelled and
//          M = (number of steps) * STEP. At most MAX_STEPS steps are taken.
//   DIVIDE restoring division, one quotient bit per cycle, of 2*|dFCW| by M.
//   APPLY  one-cycle `apply` strobe with dIc (rounded, signed). The caller
//          loads the new FCW and adds dIc to the coarse bank on this strobe.
// With `afs_en` low a request goes straight to APPLY with dIc = 0.
// cal is a free-running modular word: it is never reset between
// measurements, because a jump back would be differentiated into a phase
// step; each measurement is taken relative to where the staircase began.
//
// The pulse-and-staircase measurement, the stop on the BBPD sign change,
// the step of 0.006 DCO periods (about 1.5 MHz resolution at 250 MHz) and
// the budget of 50 staircase cycles follow the reference design; the wait
// length, the divider and the round-half-up rule are this implementation's.
//
// Interface: req is a one-cycle request (ignored while busy); dfcw is the
// signed FCW change (target minus current). `freeze` is high during the
// pulse, wait and staircase when freeze_en is set; the main loop filter,
// the auxiliary integrators and the LMS loop may be held with it.
module afs_controller
  import bbpll_pkg::*;
#(
  parameter int STEP      = AFS_STEP,
  parameter int MAX_STEPS = AFS_MAX_STEPS,
  parameter int WAIT_CYC  = AFS_WAIT,
  parameter int DIC_W     = 8            // width of the signed coarse-code change
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    afs_en,
  input  logic                    freeze_en,
  input  logic                    req,
  input  fcw_t                    dfcw,
  input  logic                    e_pos,
  output logic                    ic_pulse,
  output fcw_t                    cal,
  output logic                    busy,
  output logic                    freeze,
  output logic                    apply,
  output logic signed [DIC_W-1:0] dic,
  output fcw_t                    m_est,
  output logic                    meas_done
);
  typedef enum logic [2:0] {S_IDLE, S_PULSE, S_WAIT, S_STAIR, S_DIVIDE, S_APPLY} state_e;

  localparam int QW  = DIC_W + 1;                 // quotient bits of 2*|dFCW|/M
  localparam int DW  = FCW_W + QW + 1;            // shifted-divisor width
  localparam int CW  = $clog2(MAX_STEPS + WAIT_CYC + QW + 2);

  state_e            st;
  logic [CW-1:0]     cnt;
  logic [CW-1:0]     nsteps;
  logic              e_first;
  logic              neg;
  logic [DW-1:0]     rem;
  logic [QW-1:0]     quo;
  fcw_t              dfcw_l;

  wire [DW-1:0] den_sh = DW'(m_est) << cnt;

  // round half up of quo / 2, then saturate and apply sign
  logic [QW-1:0]            q_rnd;
  logic signed [DIC_W-1:0]  dic_mag;
  always_comb begin
    q_rnd = (quo >> 1) + QW'(quo[0]);
    if (q_rnd > QW'((1 << (DIC_W - 1)) - 1)) dic_mag = DIC_W'((1 << (DIC_W - 1)) - 1);
    else                                     dic_mag = DIC_W'(q_rnd);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      cnt       <= '0;
      nsteps    <= '0;
      e_first   <= 1'b0;
      neg       <= 1'b0;
      rem       <= '0;
      quo       <= '0;
      dfcw_l    <= '0;
      cal       <= '0;
      m_est     <= '0;
      apply     <= 1'b0;
      dic       <= '0;
      meas_done <= 1'b0;
    end else begin
      apply     <= 1'b0;
      meas_done <= 1'b0;
      unique case (st)
        S_IDLE: if (req) begin
          dfcw_l <= dfcw;
          if (afs_en) st <= S_PULSE;
          else begin
            dic <= '0;
            st  <= S_APPLY;
          end
        end
        S_PULSE: begin
          cnt <= '0;
          st  <= S_WAIT;
        end
        S_WAIT: begin
          if (cnt == CW'(WAIT_CYC - 1)) begin
            cnt    <= '0;
            nsteps <= '0;
            st     <= S_STAIR;
          end else cnt <= cnt + 1'b1;
        end
        S_STAIR: begin
          if (nsteps == '0) e_first <= e_pos;
          if ((nsteps != '0 && e_pos != e_first) || nsteps == CW'(MAX_STEPS)) begin
            m_est     <= fcw_t'(nsteps) * fcw_t'(STEP);
            meas_done <= 1'b1;
            neg       <= dfcw_l[FCW_W-1];
            rem       <= DW'(dfcw_l[FCW_W-1] ? fcw_t'(-dfcw_l) : dfcw_l) << 1;
            quo       <= '0;
            cnt       <= CW'(QW - 1);
            st        <= S_DIVIDE;
          end else begin
            cal    <= cal + fcw_t'(STEP);
            nsteps <= nsteps + 1'b1;
          end
        end
        S_DIVIDE: begin
          if (cnt == CW'(QW - 1) && rem >= (DW'(m_est) << QW)) begin
            quo <= '1;                        // quotient beyond range: saturate
            st  <= S_APPLY;
          end else if (rem >= den_sh) begin
            rem      <= rem - den_sh;
            quo[cnt[$clog2(QW)-1:0]] <= 1'b1;
          end
          if (!(cnt == CW'(QW - 1) && rem >= (DW'(m_est) << QW))) begin
            if (cnt == '0) st <= S_APPLY;
            else           cnt <= cnt - 1'b1;
          end
        end
        S_APPLY: begin
          if (afs_en) dic <= neg ? -dic_mag : dic_mag;
          apply <= 1'b1;
          st    <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign ic_pulse = (st == S_PULSE);
  assign busy     = (st != S_IDLE);
  assign freeze   = freeze_en && (st == S_PULSE || st == S_WAIT || st == S_STAIR);

  // The coarse pulse lasts exactly one reference cycle.
  a_pulse_one: assert property (@(posedge clk) disable iff (!rst_n)
    ic_pulse |=> !ic_pulse);
endmodule
