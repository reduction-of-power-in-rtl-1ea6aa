// gf_digit_ctrl: digit sequencer of the digit-serial multiplier.
//
// Operand A is split into D = ceil(m/k) digits of k bits (zero-padded at the
// top); the multiplier consumes them most significant first, one per clock.
// A start pulse while idle clears the accumulator (acc_clr) and loads the
// digit counter with D-1. In each of the next D cycles the sequencer asserts
// acc_en and presents digit A_j, j = D-1 .. 0, on 'digit'. After the cycle
// that consumes A_0 it raises done for one cycle and returns to idle, so a
// multiplication takes D+1 cycles from the start cycle to the done cycle
// (start at edge t, done high after edge t+D). Start while busy is ignored.
// A must be held steady while busy (it is read through a multiplexer, not
// stored). The design only states that A_j changes from cycle to cycle; the
// handshake, the digit order and the multiplexer are this design's choices.
//
// Ports: clk, rst_n, start, a (m bits), busy, done, acc_clr, acc_en,
// digit (k bits).
module gf_digit_ctrl #(
  parameter int unsigned M = gf_pkg::M_DEFAULT,
  parameter int unsigned K = gf_pkg::K_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  output logic         busy,
  output logic         done,
  output logic         acc_clr,
  output logic         acc_en,
  output logic [K-1:0] digit
);

  localparam int unsigned D  = gf_pkg::num_digits(M, K);
  localparam int unsigned CW = gf_pkg::cnt_width(D);

  logic [CW-1:0]  cnt;
  logic [D*K-1:0] a_pad;

  assign a_pad   = (D*K)'(a);
  assign acc_clr = start && !busy;
  assign acc_en  = busy;
  assign digit   = a_pad[cnt*K +: K];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          cnt  <= CW'(D - 1);
        end
      end else if (cnt == '0) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

  // digit index never leaves 0 .. D-1
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n) cnt < CW'(D))
    else $error("digit counter out of range");

  // done is a single-cycle pulse issued only after the iterations have ended
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy)
    else $error("done raised while busy");
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done)
    else $error("done held for more than one cycle");

endmodule
