// requant: integer-only output stage of a quantized convolution.
//
// With r = S*(q - Z) for every tensor, a convolution output is
//   q_y = Z_y + (S_x*S_w/S_y) * acc,   acc = bias + sum (q_x - Z_x)*(q_w - Z_w).
// The real factor S_x*S_w/S_y is given as m / 2^sh, so the stage computes
//   q_y = Z_y + ((acc * m + 2^(sh-1)) >>> sh)      (round half up; no rounding when sh = 0)
// and then clamps to [Z_y, 255], which applies the layer's ReLU (real zero is
// q = Z_y) and the 8-bit range. Purely combinational. Using integer multiply
// and shift only follows the quantization scheme; the 16-bit multiplier, the
// 6-bit shift and round-half-up are this design's choices.
module requant
  import aod_pkg::*;
(
  input  acc_t    acc,
  input  qparam_t qp,
  output pix_t    q
);

  localparam int unsigned PW = ACCBITS + MBITS + 1;

  logic signed [PW-1:0] prod, rnd, shifted, y;

  always_comb begin
    prod = PW'(acc) * $signed({1'b0, qp.m});
    rnd  = (qp.sh == '0) ? '0 : (PW'(1) <<< (qp.sh - 1'b1));
    shifted = (prod + rnd) >>> qp.sh;
    y = shifted + PW'($signed({1'b0, qp.zy}));
    if (y < PW'($signed({1'b0, qp.zy})))  q = qp.zy;
    else if (y > PW'(255))           q = 8'd255;
    else                             q = y[DBITS-1:0];
  end

endmodule
