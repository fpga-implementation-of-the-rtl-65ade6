// cmantec_neuron: one hidden thermal-perceptron neuron of the C-Mantec network.
//
// The neuron keeps its NI synaptic weights and its bias in registers (not in
// block RAM) and works in three phases, each started by the control block:
//
//  * Evaluation, on pat_valid: h = sum(w_i * psi_i) - b is accumulated one
//    input per two clocks (multiply, then add), and S = (h > 0). Note the
//    strict inequality: a neuron with h = 0 is OFF. Takes 2*NI + 2 clocks;
//    eval_done pulses in the last one and S is valid from the next.
//  * Tfac, on maj_valid when the network output maj differs from the target:
//      T    = T0 - (T0 * I) >> log2_imax                  (temperature, eq. 5)
//      x    = |h| / T, restoring division, 8 fractional bits
//      e    = exp(-x) from a 0.125-step table with linear interpolation,
//             zero for x >= 8
//      Tfac = e * (Imax - I) >> log2_imax  (= T/T0 * exp(-|h|/T), eq. 4)
//    I counts the weight updates the neuron made since the temperatures
//    were last reset. |h| is clamped to the N1+N2-bit weight range before the
//    division, so the divider runs N1+N2+8 clocks and the whole phase takes
//    N1+N2+16 clocks; tfac_done pulses in the last one. The tfac output is
//    forced to zero while the neuron is inactive or answered correctly.
//  * Update, on upd_sel: w_i += (t - S) * psi_i * Tfac one input per two
//    clocks, then b -= (t - S) * Tfac and I += 1 (eq. 3, the bias seen as a
//    weight on a constant -1 input). Weights saturate at the N1+N2-bit range.
//    Takes 2*NI + 2 clocks; upd_done pulses in the last one.
//
// All products go through one shift-and-add multiplier that the phases share
// in time. The pattern inputs are read straight from the pattern block's
// broadcast register, which stays stable from pat_valid through the update.
// clear zeroes weights, bias and I; temp_reset zeroes I (all temperatures
// back to T0). log2_imax above 17 is treated as 17. The formats are in
// cmantec_pkg. The serial two-clock
// multiply/add step, the divider and the clamping are this design's choices.
module cmantec_neuron
  import cmantec_pkg::*;
#(
  parameter int NI = 15,             // inputs per pattern
  parameter int N1 = 8,              // integer bits of a weight
  parameter int N2 = 8,              // fractional bits of a weight
  parameter int T0 = 1 << N2,        // initial temperature, N2 fractional bits
  localparam int W = N1 + N2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    temp_reset,
  input  logic                    active,
  input  logic [4:0]              log2_imax,
  input  logic                    pat_valid,
  input  logic [NI-1:0][PSI_W-1:0] psi,
  input  logic                    target,
  input  logic                    maj_valid,
  input  logic                    maj,
  input  logic                    upd_sel,
  output logic                    s,
  output logic [EXP_W-1:0]        tfac,
  output logic                    eval_done,
  output logic                    tfac_done,
  output logic                    upd_done
);
  localparam int IXW = (NI > 1) ? $clog2(NI) : 1;
  localparam int HW  = W + 2 + $clog2(NI + 1);        // potential h, N2 frac bits
  localparam int DW  = W + X_FRAC;                     // dividend bits = divide clocks
  localparam int MA  = (W > EXP_W) ? W : EXP_W;        // multiplier operand widths
  localparam int MB  = ITER_W;
  localparam int UPD_SHIFT = EXP_FRAC + PSI_FRAC - N2; // Tfac*psi -> weight format
  localparam int DCW = $clog2(DW + 1);

  typedef enum logic [4:0] {
    IDLE, EV_LOAD, EV_MUL, EV_ACC, EV_SIGN, EV_WAIT,
    TF_MULT, TF_T, TF_DINIT, TF_DIV, TF_LOOK, TF_IMUL, TF_E, TF_FMUL, TF_OUT,
    UP_MUL, UP_ACC, UP_BMUL, UP_BACC
  } state_t;
  state_t st;

  logic signed [W-1:0]  w [NI];
  logic signed [W-1:0]  b;
  logic [ITER_W-1:0]    iter;           // I
  logic [IXW-1:0]       ix;
  logic signed [HW-1:0] acc;
  logic [W-1:0]         habs;           // |h| clamped to W bits
  logic [MA+MB-1:0]     prod_r;
  logic                 neg_r;
  logic [W-1:0]         temp;           // T
  logic [W:0]           rem;
  logic [DW-1:0]        dvd, quo;
  logic [DCW-1:0]       dcnt;
  logic [EXP_W-1:0]     e0_r, diff_r, e_r, tfac_r;
  logic [4:0]           frac_r;
  logic                 zero_r;

  // ---------------- shared multiplier ----------------
  logic [MA-1:0]    ma;
  logic [MB-1:0]    mb;
  logic [MA+MB-1:0] mp;
  logic [ITER_W-1:0] imax, iter_left;

  // Imax is at most 2^17; larger exponents are clamped
  logic [4:0] l2imax;
  assign l2imax    = (log2_imax > 5'(LOG2_IMAX_MAX)) ? 5'(LOG2_IMAX_MAX) : log2_imax;
  assign imax      = ITER_W'(1) << l2imax;
  assign iter_left = imax - iter;

  function automatic logic [W-1:0] mag(input logic signed [W-1:0] v);
    return v[W-1] ? W'(-v) : W'(v);
  endfunction

  always_comb begin
    ma = '0;
    mb = '0;
    unique case (st)
      EV_MUL:  begin ma = MA'(mag(w[ix])); mb = MB'(psi[ix]); end
      TF_MULT: begin ma = MA'(T0);         mb = iter;         end
      TF_IMUL: begin ma = MA'(diff_r);     mb = MB'(frac_r);  end
      TF_FMUL: begin ma = MA'(e_r);        mb = iter_left;    end
      UP_MUL:  begin ma = MA'(tfac_r);     mb = MB'(psi[ix]); end
      UP_BMUL: begin ma = MA'(tfac_r);     mb = MB'(1 << PSI_FRAC); end
      default: ;
    endcase
  end

  shift_add_mult #(.A_W(MA), .B_W(MB)) u_mult (.a(ma), .b(mb), .p(mp));

  // ---------------- exponential table ----------------
  logic [EXP_W-1:0] te0, te1;
  exp_table u_exp (.k(quo[X_FRAC+2:X_FRAC-EXP_STEP_BITS]), .e0(te0), .e1(te1));

  // Weight/bias step: prod_r holds Tfac*psi with EXP_FRAC+PSI_FRAC frac bits.
  logic signed [W+1:0] step;
  assign step = (W+2)'(prod_r >> UPD_SHIFT);

  function automatic logic signed [W-1:0] sat(input logic signed [W+1:0] v);
    if (v > (W+2)'(2**(W-1) - 1))   return W'(2**(W-1) - 1);
    if (v < -(W+2)'(2**(W-1)))      return W'(-(2**(W-1)));
    return W'(v);
  endfunction

  // restoring divider step
  logic [W+1:0] rem_sh, rem_sub;
  assign rem_sh  = {rem, dvd[DW-1]};
  assign rem_sub = rem_sh - (W+2)'(temp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE;
      for (int i = 0; i < NI; i++) w[i] <= '0;
      b <= '0; iter <= '0; ix <= '0; acc <= '0; habs <= '0; prod_r <= '0;
      neg_r <= 1'b0; temp <= '0; rem <= '0; dvd <= '0; quo <= '0; dcnt <= '0;
      e0_r <= '0; diff_r <= '0; e_r <= '0; tfac_r <= '0; frac_r <= '0;
      zero_r <= 1'b0; s <= 1'b0;
    end else begin
      unique case (st)
        IDLE: begin
          if (clear) begin
            for (int i = 0; i < NI; i++) w[i] <= '0;
            b    <= '0;
            iter <= '0;
          end else if (temp_reset) begin
            iter <= '0;
          end
          if (pat_valid) st <= EV_LOAD;
          else if (upd_sel) begin
            ix <= '0;
            st <= UP_MUL;
          end
        end
        // ---- evaluation ----
        EV_LOAD: begin
          acc <= -HW'(b);
          ix  <= '0;
          st  <= EV_MUL;
        end
        EV_MUL: begin
          prod_r <= mp;
          neg_r  <= w[ix][W-1];
          st     <= EV_ACC;
        end
        EV_ACC: begin
          if (neg_r) acc <= acc - HW'(prod_r >> PSI_FRAC);
          else       acc <= acc + HW'(prod_r >> PSI_FRAC);
          if (int'(ix) == NI - 1) st <= EV_SIGN;
          else begin
            ix <= ix + 1'b1;
            st <= EV_MUL;
          end
        end
        EV_SIGN: begin
          s <= (acc > 0);
          if (acc[HW-1]) habs <= (-acc > HW'(2**W - 1)) ? '1 : W'(-acc);
          else           habs <= (acc  > HW'(2**W - 1)) ? '1 : W'(acc);
          st <= EV_WAIT;
        end
        EV_WAIT: begin
          if (maj_valid) st <= (maj != target) ? TF_MULT : IDLE;
        end
        // ---- Tfac ----
        TF_MULT: begin
          prod_r <= mp;
          st     <= TF_T;
        end
        TF_T: begin
          temp <= W'(T0) - W'(prod_r >> l2imax);
          st   <= TF_DINIT;
        end
        TF_DINIT: begin
          dvd  <= {habs, X_FRAC'(0)};
          rem  <= '0;
          quo  <= '0;
          dcnt <= '0;
          st   <= TF_DIV;
        end
        TF_DIV: begin
          if (!rem_sub[W+1]) begin
            rem <= rem_sub[W:0];
            quo <= {quo[DW-2:0], 1'b1};
          end else begin
            rem <= rem_sh[W:0];
            quo <= {quo[DW-2:0], 1'b0};
          end
          dvd  <= dvd << 1;
          dcnt <= dcnt + 1'b1;
          if (int'(dcnt) == DW - 1) st <= TF_LOOK;
        end
        TF_LOOK: begin
          // x >= 8 (or a zero temperature) gives exp(-x) = 0
          zero_r <= (quo >= DW'(8 << X_FRAC)) || (temp == '0);
          e0_r   <= te0;
          diff_r <= te0 - te1;
          frac_r <= quo[X_FRAC-EXP_STEP_BITS-1:0];
          st     <= TF_IMUL;
        end
        TF_IMUL: begin
          prod_r <= mp;
          st     <= TF_E;
        end
        TF_E: begin
          e_r <= zero_r ? '0 : e0_r - EXP_W'(prod_r >> (X_FRAC - EXP_STEP_BITS));
          st  <= TF_FMUL;
        end
        TF_FMUL: begin
          prod_r <= mp;
          st     <= TF_OUT;
        end
        TF_OUT: begin
          tfac_r <= EXP_W'(prod_r >> l2imax);
          st     <= IDLE;
        end
        // ---- weight update ----
        UP_MUL: begin
          prod_r <= mp;
          st     <= UP_ACC;
        end
        UP_ACC: begin
          if (target) w[ix] <= sat((W+2)'(w[ix]) + step);
          else        w[ix] <= sat((W+2)'(w[ix]) - step);
          if (int'(ix) == NI - 1) st <= UP_BMUL;
          else begin
            ix <= ix + 1'b1;
            st <= UP_MUL;
          end
        end
        UP_BMUL: begin
          prod_r <= mp;
          st     <= UP_BACC;
        end
        UP_BACC: begin
          if (target) b <= sat((W+2)'(b) - step);
          else        b <= sat((W+2)'(b) + step);
          if (iter != imax) iter <= iter + 1'b1;
          st <= IDLE;
        end
        default: st <= IDLE;
      endcase
    end
  end

  assign eval_done = (st == EV_SIGN);
  assign tfac_done = (st == TF_OUT);
  assign upd_done  = (st == UP_BACC);
  assign tfac      = (active && (s != target)) ? tfac_r : '0;
endmodule
