// mac_unit: 16-trit ternary multiply-accumulate unit (top level).
//
// Computes dataout = sum over i of dataa_i * datab_i, where every operand is
// a ternary number of N trits and the running sum is ACC_W trits. The
// datapath has three register stages:
//   1. dataa_reg, datab_reg capture the operands;
//   2. the hierarchical ternary multiplier (t_mul) forms the 2N-trit product
//      multa = dataa_reg * datab_reg, captured in multa_reg;
//   3. the accumulator (t_accumulator) adds multa_reg to dataout with a
//      ternary ripple-carry adder (adder_out) and stores the result.
// A new operand pair can be presented every clock. An operand pair present
// at a rising edge is included in dataout two edges later (after the third
// edge counting the one that captured it). Holding the same operands keeps
// adding the same product every clock.
//
// Control: clken high lets all three stages advance; clken low freezes the
// whole pipeline. rst (active high, asynchronous) clears every register to
// zero, which is also the accumulator's clear-to-zero function. The
// accumulator wraps modulo 3^ACC_W.
//
// Trits use the two-wire code of tern_pkg (00 = 0, 01 = 1, 10 = 2) and the
// vectors are little-endian. The structure (multiplier, product register,
// accumulate adder, accumulator, signal names, 16-trit operands and a
// 33-trit result) follows the design; the operand registers at the input,
// the asynchronous clear and the clock-enable reach over all stages are this
// implementation's reading of it.
module mac_unit
  import tern_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned ACC_W = 2 * N + 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clken,
  input  trit_t [N-1:0]     dataa,
  input  trit_t [N-1:0]     datab,
  output trit_t [ACC_W-1:0] dataout
);

  trit_t [N-1:0]     dataa_reg, datab_reg;
  trit_t [2*N-1:0]   multa, multa_reg;
  trit_t [ACC_W-1:0] adder_out;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      dataa_reg <= '0;
      datab_reg <= '0;
      multa_reg <= '0;
    end else if (clken) begin
      dataa_reg <= dataa;
      datab_reg <= datab;
      multa_reg <= multa;
    end
  end

  t_mul #(.N(N)) u_mul (
    .a(dataa_reg),
    .b(datab_reg),
    .p(multa)
  );

  t_accumulator #(.BW(2 * N), .W(ACC_W)) u_acc (
    .clk  (clk),
    .rst  (rst),
    .clken(clken),
    .b    (multa_reg),
    .sum  (adder_out),
    .q    (dataout)
  );

endmodule
