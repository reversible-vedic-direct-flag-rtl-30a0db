// rdfvdm: Direct Flag (Dhvajanka) Vedic divider for an NDIG-digit decimal
// dividend and a 2-digit decimal divisor {nd, fl}.
//
// The divisor is split into the "new divisor" nd (tens digit) and the "flag"
// fl (units digit). One Divide-Multiply-Compare-Subtract (DMCS) step produces
// each quotient digit, NDIG-1 steps in all. With working value W (first the
// leading dividend digit, later the result of the previous step) and the next
// dividend digit d:
//   Divide   : Q = W / nd, R = W - Q*nd       (Q limited to 9)
//   Multiply : P = Q * fl
//   Compare  : RD = 10*R + d  >=  P ?
//   Subtract : if so, W = RD - P and Q is the quotient digit;
//              if not, Q = Q - 1, R = R + nd and compare again.
// After the last step W is the remainder. This is the method of the reference
// design, built from its four blocks: the non-restoring divider, the 4x4 Vedic
// multiplier (shared between Q*nd and Q*fl), the 8-bit comparator and the
// 8-bit adder/subtractor (shared between W - Q*nd and RD - P); Fredkin gates
// select the limited trial digit.
//
// Own choices: the check is ">=" so that exact divisions work; corrections are
// repeated until the check holds, one per clock; and a divisor below 10
// (nd = 0) is handled by dividing by fl with flag 0, which takes one DMCS step
// more and whose remainder is the last R. A zero divisor sets err.
//
// Interface: pulse start with dvd/nd/fl valid (they are captured); busy stays
// high until done pulses for one cycle with quo (BCD digits) and rem (binary,
// < divisor) valid; they hold until the next start. Digits must be BCD.
// Timing: 1 cycle to start, then per quotient digit one DIV cycle and one CHK
// cycle per trial digit, then the done cycle.
module rdfvdm
  import rdfvdm_pkg::*;
#(
  parameter int unsigned NDIG = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  digit_t [NDIG-1:0]   dvd,
  input  digit_t              nd,
  input  digit_t              fl,
  output logic                busy,
  output logic                done,
  output logic                err,
  output digit_t [NDIG-1:0]   quo,
  output logic   [7:0]        rem
);
  if (NDIG < 2) begin : g_bad
    $error("rdfvdm: NDIG must be at least 2");
  end

  localparam int unsigned JW = $clog2(NDIG) + 1;

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_CHK, S_DONE} state_t;
  state_t state;

  digit_t [NDIG-1:0] dvd_r;
  digit_t            ndv, flv;     // effective new divisor and flag
  logic              single;       // divisor has a single digit
  logic [JW-1:0]     j;            // position of the quotient digit in work
  logic [7:0]        w, r;
  digit_t            qd;

  // ---------------- datapath ----------------
  logic [7:0] dq, prod, rd, t10, diff, rpn, sub_a;
  digit_t     q0, qdm, nxt, m_a, m_b;
  logic       cap, ge_gt, ge_eq, ge;

  // Divide: trial digit from the non-restoring divider, limited to 9
  nr_divider #(.DW(8), .VW(4)) u_div (.dividend(w), .divisor(ndv), .quotient(dq), .remainder());
  rev_comparator #(.N(8)) u_cap (.a(dq), .b({4'd0, MAX_DIGIT}), .gt(cap), .lt(), .eq());
  // Fredkin gates as a 2:1 selector: q0 = cap ? 9 : dq
  for (genvar i = 0; i < 4; i++) begin : g_sel
    rev_frg u_frg (.a(cap), .b(dq[i]), .c(MAX_DIGIT[i]), .p(), .q(q0[i]), .r());
  end

  // Multiply: Q*nd while dividing, Q*fl while checking
  assign m_a = (state == S_DIV) ? q0  : qd;
  assign m_b = (state == S_DIV) ? ndv : flv;
  vedic_mult4 u_mul (.a(m_a), .b(m_b), .p(prod));

  // next dividend digit brought down in this step
  always_comb begin
    nxt = '0;
    for (int unsigned k = 0; k < NDIG; k++) begin
      if (single) begin
        if (j == JW'(k + 1)) nxt = dvd_r[k];
      end else begin
        if (j == JW'(k)) nxt = dvd_r[k];
      end
    end
  end

  // RD = 10*R + d = (R<<3) + (R<<1) + d
  rev_addsub #(.N(8)) u_x10 (.a({r[4:0], 3'b000}), .b({r[6:0], 1'b0}), .c(1'b0), .sd(t10), .cd());
  rev_addsub #(.N(8)) u_rd  (.a(t10), .b({4'd0, nxt}), .c(1'b0), .sd(rd), .cd());

  // Compare RD with Q*fl
  rev_comparator #(.N(8)) u_cmp (.a(rd), .b(prod), .gt(ge_gt), .lt(), .eq(ge_eq));
  assign ge = ge_gt | ge_eq;

  // Subtract: W - Q*nd while dividing, RD - Q*fl while checking
  assign sub_a = (state == S_DIV) ? w : rd;
  rev_addsub #(.N(8)) u_sub (.a(sub_a), .b(prod), .c(1'b1), .sd(diff), .cd());

  // Correction: Q - 1 and R + nd
  rev_addsub #(.N(4)) u_qm1 (.a(qd), .b(4'd1), .c(1'b1), .sd(qdm), .cd());
  rev_addsub #(.N(8)) u_rpn (.a(r), .b({4'd0, ndv}), .c(1'b0), .sd(rpn), .cd());

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      dvd_r  <= '0;
      ndv    <= '0;
      flv    <= '0;
      single <= 1'b0;
      j      <= '0;
      w      <= '0;
      r      <= '0;
      qd     <= '0;
      quo    <= '0;
      rem    <= '0;
      err    <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          dvd_r  <= dvd;
          quo    <= '0;
          rem    <= '0;
          single <= (nd == '0);
          ndv    <= (nd == '0) ? fl : nd;
          flv    <= (nd == '0) ? '0 : fl;
          w      <= {4'd0, dvd[NDIG-1]};
          j      <= (nd == '0) ? JW'(NDIG - 1) : JW'(NDIG - 2);
          err    <= (nd == '0) && (fl == '0);
          state  <= ((nd == '0) && (fl == '0)) ? S_DONE : S_DIV;
        end
        S_DIV: begin
          qd    <= q0;
          r     <= diff;
          state <= S_CHK;
        end
        S_CHK: begin
          if (ge) begin
            quo[j] <= qd;
            w      <= diff;
            if (j == '0) begin
              rem   <= single ? r : diff;
              state <= S_DONE;
            end else begin
              j     <= j - 1'b1;
              state <= S_DIV;
            end
          end else begin
            qd <= qdm;
            r  <= rpn;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  // a trial digit never needs to go below zero
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_CHK && qd == '0) |-> ge);
endmodule
