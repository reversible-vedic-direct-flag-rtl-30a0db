// rsa_keygen: RSA key generation for single-digit primes p, q and a 2-digit
// public exponent e, all in BCD (the 8-bit configuration of the reference).
//   n   = p * q              4x4 Vedic multiplier
//   phi = (p-1) * (q-1)      adder/subtractors and a second multiplier
//   e_valid = 1 < e < phi and gcd(e, phi) = 1
//                            comparators and the Vedic-divider GCD unit
//   d   = e^-1 mod phi       see below
// The public key is (e, n), the private exponent d. n, phi and d are given as
// BCD digits; each binary value (< 100) is split into digits by the
// non-restoring divider dividing by 10, and e is turned into binary as
// 10*e1 + e0 with shift-and-add.
// d is found by stepping acc = (acc + e) mod phi, starting from acc = e and
// d = 1, until acc = 1; each step is one cycle (an adder, a comparator against
// phi, a subtractor). This search, the BCD conversions and the handshake are
// own choices; the reference only states the formulas. d = 0 when e is not
// valid. p or q below 2 gives meaningless phi and is reported as not valid
// only if the range check catches it.
// Interface: pulse start with p, q, e valid (captured); busy is high until
// done pulses for one cycle; outputs hold until the next start.
// Timing: 2 cycles + the GCD unit + d cycles for the inverse search + 1.
module rsa_keygen
  import rdfvdm_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  digit_t        p,
  input  digit_t        q,
  input  digit_t [1:0]  e,
  output logic          busy,
  output logic          done,
  output digit_t [1:0]  n,
  output digit_t [1:0]  phi,
  output logic          e_valid,
  output digit_t [1:0]  d
);
  typedef enum logic [2:0] {S_IDLE, S_GCD_START, S_GCD_WAIT, S_INV, S_DONE} state_t;
  state_t state;

  digit_t       pr, qr;
  digit_t [1:0] er;
  logic   [7:0] acc, dreg;
  logic         range_ok;

  // ---------------- n and phi ----------------
  digit_t     pm1, qm1;
  logic [7:0] nbin, phib, e10, ebin;
  rev_addsub #(.N(4)) u_pm1 (.a(pr), .b(4'd1), .c(1'b1), .sd(pm1), .cd());
  rev_addsub #(.N(4)) u_qm1 (.a(qr), .b(4'd1), .c(1'b1), .sd(qm1), .cd());
  vedic_mult4 u_mul_n   (.a(pr),  .b(qr),  .p(nbin));
  vedic_mult4 u_mul_phi (.a(pm1), .b(qm1), .p(phib));

  // e in binary: (e1 << 3) + (e1 << 1) + e0
  rev_addsub #(.N(8)) u_e10 (.a({1'b0, er[1], 3'b000}), .b({3'b000, er[1], 1'b0}), .c(1'b0), .sd(e10), .cd());
  rev_addsub #(.N(8)) u_e   (.a(e10), .b({4'd0, er[0]}), .c(1'b0), .sd(ebin), .cd());

  // ---------------- binary to BCD ----------------
  logic [7:0] n_t, phi_t, d_t;
  digit_t     n_u, phi_u, d_u;
  nr_divider #(.DW(8), .VW(4)) u_bcd_n   (.dividend(nbin), .divisor(TEN[3:0]), .quotient(n_t),   .remainder(n_u));
  nr_divider #(.DW(8), .VW(4)) u_bcd_phi (.dividend(phib), .divisor(TEN[3:0]), .quotient(phi_t), .remainder(phi_u));
  nr_divider #(.DW(8), .VW(4)) u_bcd_d   (.dividend(dreg), .divisor(TEN[3:0]), .quotient(d_t),   .remainder(d_u));
  assign n   = {n_t[3:0],   n_u};
  assign phi = {phi_t[3:0], phi_u};
  assign d   = {d_t[3:0],   d_u};

  // ---------------- range check 1 < e < phi ----------------
  logic e_gt1, e_ltphi;
  rev_comparator #(.N(8)) u_cmp_lo (.a(ebin), .b(8'd1), .gt(e_gt1), .lt(),        .eq());
  rev_comparator #(.N(8)) u_cmp_hi (.a(ebin), .b(phib), .gt(),      .lt(e_ltphi), .eq());

  // ---------------- gcd(phi, e) ----------------
  logic         gcd_start, gcd_done;
  digit_t [1:0] g;
  assign gcd_start = (state == S_GCD_START);
  gcd u_gcd (.clk, .rst_n, .start(gcd_start), .a(phi), .b(er), .busy(), .done(gcd_done), .g(g));

  // ---------------- modular inverse search ----------------
  logic [7:0] sum, red, acc_next, dinc;
  logic       s_gt, s_eq, acc_one;
  rev_addsub #(.N(8)) u_acc  (.a(acc), .b(ebin), .c(1'b0), .sd(sum), .cd());
  rev_comparator #(.N(8)) u_cmp_red (.a(sum), .b(phib), .gt(s_gt), .lt(), .eq(s_eq));
  rev_addsub #(.N(8)) u_red  (.a(sum), .b(phib), .c(1'b1), .sd(red), .cd());
  assign acc_next = (s_gt | s_eq) ? red : sum;
  rev_comparator #(.N(8)) u_cmp_one (.a(acc), .b(8'd1), .gt(), .lt(), .eq(acc_one));
  rev_addsub #(.N(8)) u_dinc (.a(dreg), .b(8'd1), .c(1'b0), .sd(dinc), .cd());

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pr       <= '0;
      qr       <= '0;
      er       <= '0;
      acc      <= '0;
      dreg     <= '0;
      range_ok <= 1'b0;
      e_valid  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          pr      <= p;
          qr      <= q;
          er      <= e;
          e_valid <= 1'b0;
          dreg    <= '0;
          state   <= S_GCD_START;
        end
        S_GCD_START: begin
          range_ok <= e_gt1 & e_ltphi;
          state    <= S_GCD_WAIT;
        end
        S_GCD_WAIT: if (gcd_done) begin
          if (range_ok && g == {4'd0, 4'd1}) begin
            e_valid <= 1'b1;
            acc     <= ebin;
            dreg    <= 8'd1;
            state   <= S_INV;
          end else begin
            state   <= S_DONE;
          end
        end
        S_INV: begin
          if (acc_one) begin
            state <= S_DONE;
          end else begin
            acc  <= acc_next;
            dreg <= dinc;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);
endmodule
