// line_engine: Bresenham line-drawing accelerator.
//
// The CPU writes the two end points and a colour into memory-mapped
// registers; a write to one of the four trigger registers (offsets
// 0x50..0x5C) stores that coordinate and starts the engine. The engine
// works in any octant: it first swaps X and Y when the line is steep
// (|dy| > |dx|) and swaps the end points when they run right to left,
// then walks the major axis one step per pixel with the integer error
// term of Bresenham's algorithm (error starts at dx/2, loses dy per step,
// and when it goes negative the minor axis steps and dx is added back).
// No multiply or divide is needed.
//
// Interface: reg_we/reg_addr/reg_wdata is the register write port
// (reg_addr is the byte offset within the line engine page); ready is the
// read-only status bit at offset 0x64. Pixels leave on pix_valid/pix
// with a pix_ready handshake: the engine holds a pixel until it is taken.
//
// Timing: one set-up cycle after the trigger write, then one pixel per
// cycle while pix_ready is high, |major axis|+1 pixels in all. ready is low
// from the trigger until the last pixel has been accepted. A trigger
// written while the engine is busy still updates the coordinate but does
// not restart the engine. The register map and the algorithm follow the
// document; the handshake and busy behaviour are this design's own.
module line_engine
  import mips150_io_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      reg_we,
  input  logic [7:0] reg_addr,
  input  logic [31:0] reg_wdata,
  output logic      ready,
  output logic      pix_valid,
  output fb_write_t pix,
  input  logic      pix_ready
);

  localparam int unsigned EW = COORD_W + 2;  // signed error / delta width

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_DRAW} state_t;
  state_t state;

  coord_t x0_r, y0_r, x1_r, y1_r;
  pixel_t color_r;

  // Drawing registers: a = major axis, b = minor axis
  coord_t            a_cur, a_end, b_cur;
  logic signed [EW-1:0] err, d_major, d_minor;
  logic              steep_r, bdown_r;
  pixel_t            draw_color;

  logic trigger;
  assign trigger = reg_we && (reg_addr[7:4] == LE_X0_GO[7:4]);

  // Register file
  always_ff @(posedge clk) begin
    if (rst) begin
      x0_r <= '0; y0_r <= '0; x1_r <= '0; y1_r <= '0; color_r <= '0;
    end else if (reg_we) begin
      unique case (reg_addr)
        LE_X0, LE_X0_GO: x0_r    <= reg_wdata[COORD_W-1:0];
        LE_Y0, LE_Y0_GO: y0_r    <= reg_wdata[COORD_W-1:0];
        LE_X1, LE_X1_GO: x1_r    <= reg_wdata[COORD_W-1:0];
        LE_Y1, LE_Y1_GO: y1_r    <= reg_wdata[COORD_W-1:0];
        LE_COLOR:        color_r <= reg_wdata[PIXEL_W-1:0];
        default: ;
      endcase
    end
  end

  // Set-up arithmetic on the latched end points
  logic signed [EW-1:0] dx_s, dy_s, adx, ady;
  logic   steep;
  coord_t pa0, pb0, pa1, pb1;   // after the steep swap
  coord_t sa0, sb0, sa1, sb1;   // after the left-right swap
  logic signed [EW-1:0] s_dmaj, s_dmin;

  always_comb begin
    dx_s  = EW'(signed'({1'b0, x1_r})) - EW'(signed'({1'b0, x0_r}));
    dy_s  = EW'(signed'({1'b0, y1_r})) - EW'(signed'({1'b0, y0_r}));
    adx   = dx_s < 0 ? -dx_s : dx_s;
    ady   = dy_s < 0 ? -dy_s : dy_s;
    steep = ady > adx;
    if (steep) begin
      pa0 = y0_r; pb0 = x0_r; pa1 = y1_r; pb1 = x1_r;
    end else begin
      pa0 = x0_r; pb0 = y0_r; pa1 = x1_r; pb1 = y1_r;
    end
    if (pa0 > pa1) begin
      sa0 = pa1; sb0 = pb1; sa1 = pa0; sb1 = pb0;
    end else begin
      sa0 = pa0; sb0 = pb0; sa1 = pa1; sb1 = pb1;
    end
    s_dmaj = EW'(sa1) - EW'(sa0);
    s_dmin = sb1 > sb0 ? EW'(sb1) - EW'(sb0) : EW'(sb0) - EW'(sb1);
  end

  // Next error term
  logic signed [EW-1:0] err_dec;
  assign err_dec = err - d_minor;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      a_cur <= '0; a_end <= '0; b_cur <= '0;
      err <= '0; d_major <= '0; d_minor <= '0;
      steep_r <= 1'b0; bdown_r <= 1'b0; draw_color <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (trigger) state <= S_SETUP;
        S_SETUP: begin
          a_cur      <= sa0;
          a_end      <= sa1;
          b_cur      <= sb0;
          d_major    <= s_dmaj;
          d_minor    <= s_dmin;
          err        <= s_dmaj >>> 1;
          steep_r    <= steep;
          bdown_r    <= sb0 > sb1;
          draw_color <= color_r;
          state      <= S_DRAW;
        end
        S_DRAW: if (pix_ready) begin
          if (a_cur == a_end) begin
            state <= S_IDLE;
          end else begin
            a_cur <= a_cur + 1'b1;
            if (err_dec < 0) begin
              b_cur <= bdown_r ? b_cur - 1'b1 : b_cur + 1'b1;
              err   <= err_dec + d_major;
            end else begin
              err   <= err_dec;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready     = (state == S_IDLE);
  assign pix_valid = (state == S_DRAW);
  always_comb begin
    pix.color = draw_color;
    pix.x     = steep_r ? b_cur : a_cur;
    pix.y     = steep_r ? a_cur : b_cur;
  end

endmodule
