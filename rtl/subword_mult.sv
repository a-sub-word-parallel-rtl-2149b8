// subword_mult: 16x16 signed multiplier made of four 8x8 sub-word multipliers.
//
// The operands are split into a high byte and a low byte. Each of the four
// sub-word multipliers is 9x9 signed: the high byte is always sign-extended,
// the low byte is sign-extended only in split mode and zero-extended otherwise.
// With split = 0 the four partial products are shifted and summed into the
// signed 32-bit product x*y. With split = 1 each byte is an independent signed
// 8-bit number and the four 16-bit products are returned separately:
//   pp[0] = xh*yh, pp[1] = xh*yl, pp[2] = xl*yh, pp[3] = xl*yl.
// Purely combinational. The division of a 16x16 multiplier into four 8x8
// multipliers whose products are shifted and summed follows the document; the
// 9-bit extension trick used to share them between both formats is this
// design's choice.
module subword_mult (
  input  logic [15:0]        x,
  input  logic [15:0]        y,
  input  logic               split,
  output logic signed [31:0] p,
  output logic signed [15:0] pp [4]
);
  logic signed [8:0]  xh, xl, yh, yl;
  logic signed [17:0] hh, hl, lh, ll;

  always_comb begin
    xh = {x[15], x[15:8]};
    yh = {y[15], y[15:8]};
    xl = {split & x[7], x[7:0]};
    yl = {split & y[7], y[7:0]};
    hh = xh * yh;
    hl = xh * yl;
    lh = xl * yh;
    ll = xl * yl;
    p  = 32'(hh <<< 16) + 32'((34'(hl) + 34'(lh)) <<< 8) + 32'(ll);
    pp[0] = hh[15:0];
    pp[1] = hl[15:0];
    pp[2] = lh[15:0];
    pp[3] = ll[15:0];
  end
endmodule
