// hevc_pkg: types, constants and arithmetic shared by the I-frame decoder blocks.
// It holds the pixel and coefficient types, the HEVC intra angle tables and the
// deblocking beta/tc tables, plus small pure functions (clipping, table lookup)
// that several blocks need. The table values are those of the HEVC standard;
// the document names the tables ("look-up table") but does not print them.
package hevc_pkg;

  localparam int unsigned PIX_W  = 8;    // 8-bit video (4:2:0 luma path)
  localparam int unsigned COEF_W = 16;   // dequantised coefficient width
  localparam int unsigned RES_W  = 16;   // residual width after the 2-D transform

  typedef logic [PIX_W-1:0]         pix_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [RES_W-1:0]  res_t;

  // Deblocking decision for one 4-line edge segment.
  typedef enum logic [1:0] {DF_OFF = 2'd0, DF_WEAK = 2'd1, DF_STRONG = 2'd2} df_mode_e;

  typedef struct packed {
    df_mode_e   mode;
    logic       dep;   // weak filter may also modify p1
    logic       deq;   // weak filter may also modify q1
    logic [4:0] tc;
  } df_dec_t;

  function automatic pix_t clip_pix(input int v);
    if (v < 0)        return '0;
    else if (v > 255) return 8'd255;
    else              return pix_t'(v);
  endfunction

  function automatic int clip3(input int lo, input int hi, input int v);
    if (v < lo)      return lo;
    else if (v > hi) return hi;
    else             return v;
  endfunction

  function automatic res_t clip16(input int v);
    return res_t'(clip3(-32768, 32767, v));
  endfunction

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  // intraPredAngle for modes 2..34.
  function automatic int intra_angle(input logic [5:0] mode);
    case (mode)
      6'd2:  return 32;  6'd3:  return 26;  6'd4:  return 21;  6'd5:  return 17;
      6'd6:  return 13;  6'd7:  return 9;   6'd8:  return 5;   6'd9:  return 2;
      6'd10: return 0;   6'd11: return -2;  6'd12: return -5;  6'd13: return -9;
      6'd14: return -13; 6'd15: return -17; 6'd16: return -21; 6'd17: return -26;
      6'd18: return -32; 6'd19: return -26; 6'd20: return -21; 6'd21: return -17;
      6'd22: return -13; 6'd23: return -9;  6'd24: return -5;  6'd25: return -2;
      6'd26: return 0;   6'd27: return 2;   6'd28: return 5;   6'd29: return 9;
      6'd30: return 13;  6'd31: return 17;  6'd32: return 21;  6'd33: return 26;
      default: return 32;
    endcase
  endfunction

  // Inverse angle (256*32/angle) for the negative angles.
  function automatic int intra_inv_angle(input int angle);
    case (angle)
      -2:  return -4096; -5:  return -1638; -9:  return -910; -13: return -630;
      -17: return -482;  -21: return -390;  -26: return -315; default: return -256;
    endcase
  endfunction

  // beta' as a function of Q = Clip3(0,51,QP+beta_offset).
  function automatic int df_beta(input int q);
    if (q < 16)       return 0;
    else if (q <= 28) return q - 10;
    else              return 2 * q - 38;
  endfunction

  // tc' as a function of Q = Clip3(0,53,QP+2*(bS-1)+tc_offset).
  function automatic int df_tc(input int q);
    if (q < 18)       return 0;
    else if (q <= 26) return 1;
    else if (q <= 30) return 2;
    else if (q <= 34) return 3;
    else if (q <= 37) return 4;
    else if (q <= 39) return 5;
    else if (q <= 41) return 6;
    else if (q <= 46) return q - 35;
    else if (q <= 48) return q - 34;
    else              return 2 * q - 82;
  endfunction

endpackage
