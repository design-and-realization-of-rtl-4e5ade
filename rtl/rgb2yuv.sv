// rgb2yuv: colour-space conversion from RGB to YUV, 8 bits per component.
//
//   Y = ( 38 R + 75 G + 15 B) >>> 7     ( 0.299,  0.587,  0.114 ) x 128
//   U = (-22 R - 42 G + 64 B) >>> 7     (-0.169, -0.332,  0.500 ) x 128
//   V = ( 64 R - 54 G - 10 B) >>> 7     ( 0.500, -0.419, -0.0813) x 128
//
// Each result below 0 is set to 0 and each above 255 to 255.  The formulas,
// the 8-bit coefficients (decimal coefficient times 128) and the clamping
// follow the document; U and V carry no +128 offset there, so negative
// colour differences clamp to 0.  Rounding the coefficients to the nearest
// integer and the arithmetic (floor) shift are this design's choices.
//
// Timing: two pipeline stages, yuv_valid follows rgb_valid by two clocks.
// Throughput one pixel per clock.
module rgb2yuv
  import img_cap_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic rgb_valid,
  input  rgb_t rgb,
  output logic yuv_valid,
  output yuv_t yuv
);
  typedef logic signed [17:0] acc_t;

  acc_t acc_y, acc_u, acc_v;
  logic v_q;

  function automatic acc_t mac3(input rgb_t p, input acc_t cr, input acc_t cg, input acc_t cb);
    acc_t r, g, b;
    r = acc_t'({10'd0, p.r});
    g = acc_t'({10'd0, p.g});
    b = acc_t'({10'd0, p.b});
    return cr * r + cg * g + cb * b;
  endfunction

  function automatic logic [7:0] clamp8(input acc_t a);
    acc_t s;
    s = a >>> COEF_SHIFT;
    if (s < 0)        return 8'd0;
    else if (s > 255) return 8'd255;
    else              return s[7:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0;
      acc_y <= '0; acc_u <= '0; acc_v <= '0;
    end else begin
      v_q <= rgb_valid;
      if (rgb_valid) begin
        acc_y <= mac3(rgb, acc_t'(C_YR), acc_t'(C_YG), acc_t'(C_YB));
        acc_u <= mac3(rgb, acc_t'(C_UR), acc_t'(C_UG), acc_t'(C_UB));
        acc_v <= mac3(rgb, acc_t'(C_VR), acc_t'(C_VG), acc_t'(C_VB));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      yuv_valid <= 1'b0;
      yuv <= '0;
    end else begin
      yuv_valid <= v_q;
      if (v_q) begin
        yuv.y <= clamp8(acc_y);
        yuv.u <= clamp8(acc_u);
        yuv.v <= clamp8(acc_v);
      end
    end
  end
endmodule
