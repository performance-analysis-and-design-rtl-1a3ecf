// tap_alu: shift-and-add arithmetic of the FIR ADM digital processor.
//
// Each enabled cycle adds one term of the incremental output
//     dy(k) = sum_i G(i) * 2^-l(k-i) * b(k-i-1)
// to a running sum. The coefficient arrives in sign-and-magnitude. Its
// magnitude is shifted right by the level (the multiplication by 2^-l; the
// bits shifted out are discarded, i.e. truncated). The term's sign is the
// coefficient sign XOR the inverted increment sign; a negative term is added
// as its 2's complement, formed by exclusive-OR gates and a carry-in of one,
// so one adder serves for both addition and subtraction. No multiplier is
// used. Shift truncation and 2's-complement subtraction follow the source
// design; the shift is done by a one-cycle barrel shifter here, where the
// source uses a shift register stepped by a counter.
//
// Interface: with en high, acc takes (first ? 0 : acc) + term, or
// (first ? 0 : acc) if use is low (a tap with no data yet). acc is
// registered; after the last tap of a sample it holds dy(k).
module tap_alu
  import adm_pkg::*;
#(
  parameter int unsigned COEF_W = 16,
  parameter int unsigned ACC_W  = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    first,
  input  logic                    use_tap,
  input  logic [COEF_W-1:0]       coef,      // sign-magnitude coefficient
  input  level_t                  level,     // shift count
  input  logic                    inc_sign,  // 1: +, 0: -
  output logic signed [ACC_W-1:0] acc
);

  logic [COEF_W-2:0] mag_sh;
  logic              neg;
  logic [ACC_W-1:0]  operand, base;

  always_comb begin
    mag_sh  = coef[COEF_W-2:0] >> level;
    neg     = coef[COEF_W-1] ^ ~inc_sign;
    // exclusive-OR gates; the carry-in completes the 2's complement
    operand = ACC_W'(mag_sh) ^ {ACC_W{neg}};
    base    = first ? '0 : acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= use_tap ? $signed(base + operand + ACC_W'(neg)) : $signed(base);
  end

  initial assert (ACC_W >= COEF_W + 1) else $error("ACC_W too small");

endmodule
