// Shared constants and types of the video object segmentation design.
package vos_pkg;
  // frame geometry registers are 12 bits wide (up to 4095 pixels or lines)
  localparam int unsigned GEOM_W = 12;
  typedef logic [GEOM_W-1:0] geom_t;

  // 2D filter kinds
  typedef enum logic {FILT_AVG = 1'b0, FILT_MAX = 1'b1} filt_kind_e;

  // chain code stream: 4-bit symbols, 0..7 are Freeman codes, 0x8 marks a
  // header or tail that is followed by a descriptor nibble
  localparam logic [3:0] CC_MARK      = 4'h8;
  localparam logic [3:0] CC_D_FRAME_H = 4'h0;  // chain code frame header
  localparam logic [3:0] CC_D_FRAME_T = 4'h1;  // chain code frame tail
  localparam logic [3:0] CC_D_SEG_H   = 4'h2;  // chain code segment header
  localparam logic [3:0] CC_D_SEG_T   = 4'h3;  // chain code segment tail

  // Freeman direction d -> pixel offset (x to the right, y downwards);
  // 0 east, 1 north-east, 2 north, ... counter-clockwise on the screen
  function automatic logic signed [1:0] dir_dx(input logic [2:0] d);
    unique case (d)
      3'd0, 3'd1, 3'd7: return 2'sd1;
      3'd2, 3'd6:       return 2'sd0;
      default:          return -2'sd1;
    endcase
  endfunction

  function automatic logic signed [1:0] dir_dy(input logic [2:0] d);
    unique case (d)
      3'd1, 3'd2, 3'd3: return -2'sd1;
      3'd0, 3'd4:       return 2'sd0;
      default:          return 2'sd1;
    endcase
  endfunction
endpackage
