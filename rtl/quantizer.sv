// Hardware requantizer: int32 convolution result to int8.
//
// Implements y = clamp(round(acc * M) + zp_out) with the combined scale
// M = Si*Sw/So written as the fixed-point pair M = M0 * 2^-n. The product
// acc*M0 is formed at 64 bits, then rounded by adding the equivalent of 0.5
// (2^(n-1)) and truncating the n fraction bits with an arithmetic shift; this
// rounds halves upwards (towards +inf for positive, towards zero for negative
// numbers), as described for the rounding-by-truncation scheme. With relu set
// the lower clamp is the output zero point, which fuses the layer's ReLU.
// One register stage: the result appears one cycle after in_valid, and
// out_valid follows in_valid with that delay. n = 0 disables rounding.
// The 64-bit product width and n being at most 63 are this design's choices.
module quantizer
  import vgg_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  acc_t        acc,
  input  quant_cfg_t  cfg,
  input  logic        relu,
  output logic        out_valid,
  output act_t        q
);
  logic signed [63:0] prod, rounded;
  logic signed [63:0] shifted, with_zp;
  act_t               result;

  always_comb begin
    prod    = 64'(acc) * $signed({32'd0, cfg.m0});
    rounded = (cfg.shift == 0) ? prod : prod + (64'sd1 <<< (cfg.shift - 6'd1));
    shifted = rounded >>> cfg.shift;
    with_zp = shifted + 64'(cfg.zp_out);
    if (with_zp > 64'sd127)
      result = 8'sd127;
    else if (relu && with_zp < 64'(cfg.zp_out))
      result = cfg.zp_out;
    else if (with_zp < -64'sd128)
      result = -8'sd128;
    else
      result = act_t'(with_zp);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      q         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) q <= result;
    end
  end
endmodule
