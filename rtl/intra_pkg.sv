// intra_pkg: types, constants and mode tables shared by the intra prediction
// accelerator.
//
// Mode numbering follows HEVC: 0 = planar, 1 = DC, 2..34 = angular, with 2..17
// predicting from the left column (horizontal family) and 18..34 from the row
// above (vertical family). The angle and inverse-angle tables are the standard
// HEVC intraPredAngle / invAngle values. The reference array layout is the
// single-array style: left column stored bottom-to-top below a
// fixed corner position, the above row stored left-to-right after it.
package intra_pkg;

  localparam int unsigned NUM_MODES   = 35;
  localparam int unsigned MODE_W      = 6;
  localparam int unsigned MODE_PLANAR = 0;
  localparam int unsigned MODE_DC     = 1;
  localparam int unsigned MODE_LAST   = 34;

  // Kind of computation a mode needs.
  typedef enum logic [1:0] {
    KIND_PLANAR  = 2'd0,
    KIND_DC      = 2'd1,
    KIND_ANGULAR = 2'd2
  } mode_kind_e;

  // Control unit states.
  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,
    ST_SETUP = 3'd1,
    ST_RUN   = 3'd2,
    ST_DRAIN = 3'd3,
    ST_DONE  = 3'd4
  } ctrl_state_e;

  function automatic mode_kind_e mode_kind(input logic [MODE_W-1:0] mode);
    if (mode == MODE_W'(MODE_PLANAR)) return KIND_PLANAR;
    if (mode == MODE_W'(MODE_DC))     return KIND_DC;
    return KIND_ANGULAR;
  endfunction

  // intraPredAngle for modes 2..34 (0 for planar/DC).
  function automatic logic signed [6:0] pred_angle(input logic [MODE_W-1:0] mode);
    logic signed [6:0] a;
    case (mode)
      6'd2, 6'd34:  a = 7'sd32;
      6'd3, 6'd33:  a = 7'sd26;
      6'd4, 6'd32:  a = 7'sd21;
      6'd5, 6'd31:  a = 7'sd17;
      6'd6, 6'd30:  a = 7'sd13;
      6'd7, 6'd29:  a = 7'sd9;
      6'd8, 6'd28:  a = 7'sd5;
      6'd9, 6'd27:  a = 7'sd2;
      6'd10, 6'd26: a = 7'sd0;
      6'd11, 6'd25: a = -7'sd2;
      6'd12, 6'd24: a = -7'sd5;
      6'd13, 6'd23: a = -7'sd9;
      6'd14, 6'd22: a = -7'sd13;
      6'd15, 6'd21: a = -7'sd17;
      6'd16, 6'd20: a = -7'sd21;
      6'd17, 6'd19: a = -7'sd26;
      6'd18:        a = -7'sd32;
      default:      a = 7'sd0;
    endcase
    return a;
  endfunction

  // invAngle = round(8192 / intraPredAngle) for the negative angles.
  function automatic logic signed [13:0] inv_angle(input logic signed [6:0] angle);
    logic signed [13:0] v;
    case (angle)
      -7'sd2:  v = -14'sd4096;
      -7'sd5:  v = -14'sd1638;
      -7'sd9:  v = -14'sd910;
      -7'sd13: v = -14'sd630;
      -7'sd17: v = -14'sd482;
      -7'sd21: v = -14'sd390;
      -7'sd26: v = -14'sd315;
      -7'sd32: v = -14'sd256;
      default: v = 14'sd0;
    endcase
    return v;
  endfunction

endpackage
