// t_accumulator: ternary accumulator, a parallel-in parallel-out register
// that adds its input to its own contents on every enabled clock.
//
// q holds W trits. On a rising clk edge with clken high, q takes q + b,
// formed by a W-trit ternary ripple-carry adder (t_rca); with clken low it
// holds. rst is an active-high asynchronous clear that sets q to zero (the
// clear-to-zero function of the MAC). The sum wraps modulo 3^W: the adder's
// final carry is dropped. b is the value to accumulate, BW trits wide and
// zero-extended to W trits; sum is the adder output q + b, visible before
// the clock edge. One accumulation per clock; q changes one clock after b.
//
// The register-plus-adder arrangement, clock enable and clear follow the
// design's MAC structure; the asynchronous clear and the wrap-around on
// overflow are this implementation's choices. Defaults: BW = 32 (the product
// of two 16-trit operands), W = 33.
module t_accumulator
  import tern_pkg::*;
#(
  parameter int unsigned BW = 32,
  parameter int unsigned W  = 33
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            clken,
  input  trit_t [BW-1:0]  b,
  output trit_t [W-1:0]   sum,
  output trit_t [W-1:0]   q
);

  if (BW > W) begin : g_bad_w
    $error("t_accumulator: BW must not exceed W");
  end

  trit_t [W-1:0] b_ext;
  trit_t         unused_co;

  always_comb begin
    b_ext = '0;
    b_ext[BW-1:0] = b;
  end

  t_rca #(.N(W)) u_add (.x(q), .y(b_ext), .ci(T0), .s(sum), .co(unused_co));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      q <= '0;
    end else if (clken) begin
      q <= sum;
    end
  end

endmodule
