// gcd: greatest common divisor of two 2-digit decimal numbers, g = gcd(a, b),
// built around the Direct Flag Vedic divider (rdfvdm).
// Euclid's algorithm: while y != 0, (x, y) <= (y, x mod y). Each x mod y is
// one rdfvdm division with x as the dividend digits and y split into new
// divisor (tens) and flag (units). The binary remainder is turned back into
// two BCD digits by the non-restoring divider dividing by 10. Using the Vedic
// divider for the GCD follows the reference design; the Euclid loop and the
// conversion are own choices. gcd(0, b) = b, gcd(0, 0) = 0.
// Interface: pulse start with a and b valid (captured); done pulses for one
// cycle with g valid (held until the next start). Timing: two cycles per
// Euclid step plus the divider's own cycles.
module gcd
  import rdfvdm_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  digit_t [1:0]  a,
  input  digit_t [1:0]  b,
  output logic          busy,
  output logic          done,
  output digit_t [1:0]  g
);
  typedef enum logic [2:0] {S_IDLE, S_TEST, S_RUN, S_WAIT, S_DONE} state_t;
  state_t state;

  digit_t [1:0] x, y;
  logic         div_start, div_done;
  logic [7:0]   div_rem, tens;
  digit_t [1:0] div_quo;
  digit_t       units;

  assign div_start = (state == S_RUN);

  rdfvdm #(.NDIG(2)) u_div (
    .clk, .rst_n, .start(div_start), .dvd(x), .nd(y[1]), .fl(y[0]),
    .busy(), .done(div_done), .err(), .quo(div_quo), .rem(div_rem));

  // binary remainder (< 99) back to BCD digits
  nr_divider #(.DW(8), .VW(4)) u_b2d (.dividend(div_rem), .divisor(TEN[3:0]),
                                      .quotient(tens), .remainder(units));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      x     <= '0;
      y     <= '0;
      g     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          x     <= a;
          y     <= b;
          state <= S_TEST;
        end
        S_TEST: begin
          if (y == '0) begin
            g     <= x;
            state <= S_DONE;
          end else begin
            state <= S_RUN;
          end
        end
        S_RUN:  state <= S_WAIT;
        S_WAIT: if (div_done) begin
          x     <= y;
          y     <= {tens[3:0], units};
          state <= S_TEST;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);
endmodule
